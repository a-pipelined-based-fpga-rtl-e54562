// Best-solution comparator.
//
// Watches every member scored by the evaluation stage and keeps the best one
// seen since `clear` (lowest score; the earlier one on a tie). If a run ends
// after the generation limit without an exact solution, this is the answer to
// use. Timing: registered, updated on the clock where `in_valid` is high;
// `clear` has priority and empties the register.
module ga_best_keeper #(
  parameter int unsigned CHROM_W = ga_pkg::DEF_CHROM_W,
  localparam int unsigned FIT_W  = $clog2(CHROM_W + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               in_valid,
  input  logic [CHROM_W-1:0] in_chrom,
  input  logic [FIT_W-1:0]   in_fit,
  output logic               best_valid,
  output logic [CHROM_W-1:0] best_chrom,
  output logic [FIT_W-1:0]   best_fit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_valid <= 1'b0;
      best_chrom <= '0;
      best_fit   <= '1;
    end else if (clear) begin
      best_valid <= 1'b0;
      best_chrom <= '0;
      best_fit   <= '1;
    end else if (in_valid && (!best_valid || in_fit < best_fit)) begin
      best_valid <= 1'b1;
      best_chrom <= in_chrom;
      best_fit   <= in_fit;
    end
  end
endmodule
