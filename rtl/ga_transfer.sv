// Transfer (immigration) unit.
//
// Links the subpopulations: at the first cycle of every time slot it captures
// the best-P list that the evaluation stage has just finished for the
// subpopulation it evaluated in the previous slot. During the slot the memory
// stage reads the captured members one by one (`sel`) and appends them to the
// subpopulation it is building. While `use_random` is high (the first two
// subpopulations of the run, for which no evaluated subpopulation exists yet)
// it hands out the random chromosome `rnd` instead.
//
// Timing: `imm` is combinational in `sel`, `use_random` and `rnd`; the list is
// registered on the clock where `capture` is high. The capture point is this
// implementation's choice; the immigration rule itself follows the method.
module ga_transfer #(
  parameter int unsigned CHROM_W = ga_pkg::DEF_CHROM_W,
  parameter int unsigned P_BEST  = ga_pkg::DEF_P_BEST,
  localparam int unsigned SW     = (P_BEST > 1) ? $clog2(P_BEST) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               capture,
  input  logic               use_random,
  input  logic [CHROM_W-1:0] best_in [P_BEST],
  input  logic [SW-1:0]      sel,
  input  logic [CHROM_W-1:0] rnd,
  output logic [CHROM_W-1:0] imm
);
  logic [CHROM_W-1:0] held [P_BEST];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < P_BEST; i++) held[i] <= '0;
    end else if (capture) begin
      held <= best_in;
    end
  end

  assign imm = use_random ? rnd : held[sel];
endmodule
