// Crossover and mutation stage CM.
//
// While `act` is high it builds child number `idx` (0..SUB_SIZE-1) of the
// current bank, one per clock. Children 2k and 2k+1 come from parents 2k and
// 2k+1 of the parent list written by selection. Crossover is uniform: a random
// mask taken on the even cycle chooses, bit by bit, which parent each bit comes
// from; the odd child uses the complementary mask, so each pair of parents
// gives two complementary children and the subpopulation keeps its size.
// Mutation then toggles MUT_BITS bits of the child (default one), bit k at
// the random position (rnd_pos[k] * CHROM_W) >> Q, when the 8-bit random
// number `rnd_prob` is below MUT_THRESH (256: always, as in "one random bit is
// toggled"). Positions that coincide toggle that bit once.
//
// Interface: parent-list read ports `par_addr_*`/`par_*`, member read ports
// `mem_addr_*`/`mem_*` (addresses are the parent indices), and the child write
// port. Timing: combinational, plus the mask register for the odd child.
// Uniform crossover with complementary pairs and the probability encoding are
// this design's choices; a toggled random bit, and the number of toggled bits
// and the probability as parameters, follow the method.
module ga_stage_cm #(
  parameter int unsigned CHROM_W    = ga_pkg::DEF_CHROM_W,
  parameter int unsigned SUB_SIZE   = ga_pkg::DEF_SUB_SIZE,
  parameter int unsigned P_BEST     = ga_pkg::DEF_P_BEST,
  parameter int unsigned Q          = ga_pkg::DEF_PRBG_Q,
  parameter int unsigned MUT_THRESH = ga_pkg::DEF_MUT_THRESH,
  parameter int unsigned MUT_BITS   = ga_pkg::DEF_MUT_BITS,
  localparam int unsigned GROUP     = SUB_SIZE + P_BEST,
  localparam int unsigned AW        = $clog2(GROUP),
  localparam int unsigned CW        = (SUB_SIZE > 1) ? $clog2(SUB_SIZE) : 1,
  localparam int unsigned MW        = $clog2(CHROM_W)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               act,
  input  logic [AW-1:0]      idx,
  input  logic [Q-1:0]       rnd_mask,
  input  logic [Q-1:0]       rnd_pos [MUT_BITS],
  input  logic [7:0]         rnd_prob,
  output logic [CW-1:0]      par_addr_a,
  output logic [CW-1:0]      par_addr_b,
  input  logic [AW-1:0]      par_a,
  input  logic [AW-1:0]      par_b,
  output logic [AW-1:0]      mem_addr_a,
  output logic [AW-1:0]      mem_addr_b,
  input  logic [CHROM_W-1:0] mem_a,
  input  logic [CHROM_W-1:0] mem_b,
  output logic               child_we,
  output logic [CW-1:0]      child_addr,
  output logic [CHROM_W-1:0] child_wdata
);
  localparam int unsigned PW = Q + MW + 1;

  logic [CHROM_W-1:0] mask_q, mask, xover, flip;
  logic               odd, mutate;

  assign odd        = idx[0];
  assign par_addr_a = CW'({idx[AW-1:1], 1'b0});
  assign par_addr_b = CW'({idx[AW-1:1], 1'b1});
  assign mem_addr_a = par_a;
  assign mem_addr_b = par_b;

  // Mask of the pair: fresh on the even child, kept and inverted for the odd.
  assign mask  = odd ? ~mask_q : CHROM_W'(rnd_mask);
  assign xover = (mem_a & mask) | (mem_b & ~mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              mask_q <= '0;
    else if (act && !odd)    mask_q <= CHROM_W'(rnd_mask);
  end

  assign mutate = 9'(rnd_prob) < 9'(MUT_THRESH);

  always_comb begin
    logic [PW-1:0] prod;
    flip = '0;
    for (int k = 0; k < MUT_BITS; k++) begin
      prod = PW'(rnd_pos[k]) * PW'(CHROM_W);
      flip = flip | (CHROM_W'(1) << MW'(prod >> Q));
    end
    if (!mutate) flip = '0;
  end

  assign child_we    = act;
  assign child_addr  = CW'(idx);
  assign child_wdata = xover ^ flip;

  initial begin
    assert (SUB_SIZE % 2 == 0) else $error("ga_stage_cm: SUB_SIZE must be even");
    assert (CHROM_W <= Q)      else $error("ga_stage_cm: CHROM_W must not exceed Q");
  end
endmodule
