// Fitness score of one chromosome.
//
// The score is the number of adjustments still needed to solve the problem,
// so lower is better and 0 marks a solution. The problem instance used here is
// the simplest one of that form: reach a target bit pattern, so the score is
// the Hamming distance between the chromosome and `target` (a population
// count of their XOR). Replace this module to solve a different problem; the
// rest of the engine only sees a FIT_W-bit score where 0 means solved.
// Purely combinational.
module ga_fitness #(
  parameter int unsigned CHROM_W = ga_pkg::DEF_CHROM_W,
  parameter int unsigned FIT_W   = $clog2(CHROM_W + 1)
) (
  input  logic [CHROM_W-1:0] chrom,
  input  logic [CHROM_W-1:0] target,
  output logic [FIT_W-1:0]   fit
);
  logic [CHROM_W-1:0] diff;

  always_comb begin
    diff = chrom ^ target;
    fit  = '0;
    for (int i = 0; i < CHROM_W; i++)
      fit = fit + FIT_W'(diff[i]);
  end
endmodule
