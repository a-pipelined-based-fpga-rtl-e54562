// Shared constants and helpers of the pipelined genetic-algorithm engine.
//
// The engine splits the population into STAGES subpopulations and runs them
// one after another through a single four-stage pipeline (memory, evaluation,
// selection, crossover/mutation). The values below are the default sizes used
// by every module; each module takes them as parameters, so a user can build a
// smaller or larger engine without editing this file. The four stages and the
// one-subpopulation-per-stage rule come from the method itself; the numeric
// sizes (chromosome width, subpopulation size, immigrants, generator size,
// generation limit) are this implementation's choices.
package ga_pkg;

  // Pipeline stages, and therefore subpopulations in flight (n = m). The
  // stage order M, E, S, CM and the bank rotation are built for exactly four.
  localparam int unsigned STAGES       = 4;
  localparam int unsigned DEF_STAGES   = STAGES;
  // Members produced by crossover/mutation for each subpopulation.
  localparam int unsigned DEF_SUB_SIZE = 16;
  // Immigrants: best members of the previously evaluated subpopulation.
  localparam int unsigned DEF_P_BEST   = 2;
  // Bits per chromosome.
  localparam int unsigned DEF_CHROM_W  = 16;
  // Generator has 2*Q+1 cells and delivers Q-bit random numbers.
  localparam int unsigned DEF_PRBG_Q   = 16;
  // Rule vector of the 33-cell automaton (bit i set: cell i uses rule 150).
  // Its characteristic polynomial is primitive, so the period is 2^33-1.
  localparam logic [32:0] DEF_PRBG_RULE = 33'h1_6509_b4f4;
  // Maximum number of generations (gn).
  localparam int unsigned DEF_GN       = 64;
  // Mutation happens when an 8-bit random number is below MUT_THRESH;
  // 256 means every child gets one toggled bit.
  localparam int unsigned DEF_MUT_THRESH = 256;
  // Bits toggled by one mutation.
  localparam int unsigned DEF_MUT_BITS = 1;

endpackage
