// Pseudo-random bit generator built from a linear cellular automaton (LCA).
//
// 2*Q+1 flip-flops form a one-dimensional automaton with null boundaries.
// Each cell i takes the XOR of its two neighbours (rule 90), and also its own
// value when RULE[i] is set (rule 150). With the default rule vector the
// characteristic polynomial is primitive, so every non-zero state recurs only
// after 2^(2Q+1)-1 clocks. The state is read as 2*Q+1 Q-bit random numbers:
// window i holds cells i, i+1, ..., i+Q-1 taken cyclically, so one clock
// delivers many numbers in 0..2^Q-1 in parallel for the different stages.
// The automaton and the cyclic windows follow the method; the rule vector,
// Q and the seed handling are this implementation's choices.
//
// Timing: state advances every clock; `load` replaces it with `seed` (or SEED
// when seed is zero, the all-zero state being a fixed point). Reset loads SEED.
module ga_prbg #(
  parameter int unsigned      Q    = ga_pkg::DEF_PRBG_Q,
  parameter logic [2*Q:0]     RULE = ga_pkg::DEF_PRBG_RULE[2*Q:0],
  parameter logic [2*Q:0]     SEED = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [2*Q:0]     seed,
  output logic [2*Q:0]     state,
  output logic [Q-1:0]     win [2*Q+1]
);
  localparam int unsigned N = 2 * Q + 1;

  logic [N-1:0] nxt;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic l, r;
      l = (i > 0)     ? state[i-1] : 1'b0;
      r = (i < N - 1) ? state[i+1] : 1'b0;
      nxt[i] = l ^ r ^ (RULE[i] & state[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= (seed == '0) ? SEED : seed;
    else           state <= nxt;
  end

  always_comb begin
    for (int w = 0; w < N; w++)
      for (int b = 0; b < Q; b++)
        win[w][b] = state[(w + b) % N];
  end

  initial assert (SEED != '0) else $error("ga_prbg: SEED must be non-zero");
endmodule
