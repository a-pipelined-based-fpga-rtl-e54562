// Evaluation stage E.
//
// While `act` is high, member `idx` of the current bank is read, scored by
// ga_fitness and the score written back for the selection stage, one member
// per clock. At the same time a sorted list of the P_BEST best members
// (lowest score first, earlier member first on a tie) is kept in registers:
// on the first cycle of a slot (`first`) the list restarts with the member
// read in that cycle, so at the end of the slot it holds the best of this
// subpopulation, which the transfer unit then captures. `found` flags a member
// with score 0 (a solution); `cur_*` present the member scored this cycle to
// the best-solution comparator.
//
// Timing: memory read and scoring are combinational; the list updates on the
// clock edge. Scoring, the best-P list and the stop on a solution follow the
// method; the tie rule and one member per clock are this design's choices.
module ga_stage_e #(
  parameter int unsigned CHROM_W  = ga_pkg::DEF_CHROM_W,
  parameter int unsigned SUB_SIZE = ga_pkg::DEF_SUB_SIZE,
  parameter int unsigned P_BEST   = ga_pkg::DEF_P_BEST,
  localparam int unsigned GROUP   = SUB_SIZE + P_BEST,
  localparam int unsigned AW      = $clog2(GROUP),
  localparam int unsigned FIT_W   = $clog2(CHROM_W + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               act,
  input  logic               first,
  input  logic [AW-1:0]      idx,
  input  logic [CHROM_W-1:0] target,
  output logic [AW-1:0]      mem_addr,
  input  logic [CHROM_W-1:0] mem_data,
  output logic               fit_we,
  output logic [AW-1:0]      fit_addr,
  output logic [FIT_W-1:0]   fit_wdata,
  output logic [CHROM_W-1:0] best_chrom [P_BEST],
  output logic [FIT_W-1:0]   best_fit   [P_BEST],
  output logic [P_BEST-1:0]  best_valid,
  output logic               found,
  output logic               cur_valid,
  output logic [CHROM_W-1:0] cur_chrom,
  output logic [FIT_W-1:0]   cur_fit
);
  logic [FIT_W-1:0] fit;

  ga_fitness #(.CHROM_W(CHROM_W), .FIT_W(FIT_W)) u_fit (
    .chrom (mem_data),
    .target,
    .fit
  );

  assign mem_addr  = idx;
  assign fit_we    = act;
  assign fit_addr  = idx;
  assign fit_wdata = fit;
  assign found     = act && fit == '0;
  assign cur_valid = act;
  assign cur_chrom = mem_data;
  assign cur_fit   = fit;

  // Sorted insertion of the new member into the best-P list.
  logic [CHROM_W-1:0] n_chrom [P_BEST];
  logic [FIT_W-1:0]   n_fit   [P_BEST];
  logic [P_BEST-1:0]  n_valid;

  always_comb begin
    logic [CHROM_W-1:0] o_chrom [P_BEST];
    logic [FIT_W-1:0]   o_fit   [P_BEST];
    logic [P_BEST-1:0]  o_valid;
    int unsigned        pos;
    o_chrom = best_chrom;
    o_fit   = best_fit;
    o_valid = first ? '0 : best_valid;
    // Position = number of valid entries that score no worse than the new one.
    pos = 0;
    for (int j = 0; j < P_BEST; j++)
      if (o_valid[j] && o_fit[j] <= fit) pos = j + 1;
    for (int j = 0; j < P_BEST; j++) begin
      if (j < pos) begin
        n_chrom[j] = o_chrom[j]; n_fit[j] = o_fit[j]; n_valid[j] = o_valid[j];
      end else if (j == pos) begin
        n_chrom[j] = mem_data;   n_fit[j] = fit;      n_valid[j] = 1'b1;
      end else begin
        n_chrom[j] = o_chrom[j-1]; n_fit[j] = o_fit[j-1]; n_valid[j] = o_valid[j-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < P_BEST; j++) begin
        best_chrom[j] <= '0;
        best_fit[j]   <= '0;
      end
      best_valid <= '0;
    end else if (act) begin
      best_chrom <= n_chrom;
      best_fit   <= n_fit;
      best_valid <= n_valid;
    end
  end
endmodule
