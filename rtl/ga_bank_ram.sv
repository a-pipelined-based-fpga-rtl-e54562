// Banked working memory.
//
// BANKS banks of DEPTH words of W bits. Each subpopulation in flight owns one
// bank, and each pipeline stage addresses the bank of the subpopulation it is
// working on, so a subpopulation never moves: the stages move over it. One
// synchronous write port and NRD combinational read ports (distributed-RAM
// style); a read in the cycle of a write to the same word returns the old
// value. The banked organisation is this implementation's choice; the method
// only names a working memory that holds the subpopulation.
module ga_bank_ram #(
  parameter int unsigned W     = ga_pkg::DEF_CHROM_W,
  parameter int unsigned DEPTH = ga_pkg::DEF_SUB_SIZE + ga_pkg::DEF_P_BEST,
  parameter int unsigned BANKS = ga_pkg::DEF_STAGES,
  parameter int unsigned NRD   = 1,
  localparam int unsigned BW   = (BANKS > 1) ? $clog2(BANKS) : 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [BW-1:0] wbank,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [BW-1:0] rbank [NRD],
  input  logic [AW-1:0] raddr [NRD],
  output logic [W-1:0]  rdata [NRD]
);
  logic [W-1:0] mem [BANKS][DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wbank][waddr] <= wdata;
  end

  always_comb begin
    for (int p = 0; p < NRD; p++)
      rdata[p] = mem[rbank[p]][raddr[p]];
  end

  always_ff @(posedge clk) begin
    if (we) begin
      assert (int'(wbank) < BANKS && int'(waddr) < DEPTH)
        else $error("ga_bank_ram: write outside the memory");
    end
  end
endmodule
