// Selection stage S.
//
// While `act` is high it picks parent number `idx` (0..SUB_SIZE-1) of the
// current bank, one per clock, by a binary tournament: two random numbers from
// the generator are mapped onto member indices in 0..GROUP-1 by
// (r * GROUP) >> Q, the two scores are read, and the index of the member with
// the lower score (the first one on a tie) is written to the parent list. The
// method only says that parents are chosen with respect to their scores using
// the generator; the tournament is this design's choice. Combinational except
// for the memory write done by the parent-list RAM.
module ga_stage_s #(
  parameter int unsigned CHROM_W  = ga_pkg::DEF_CHROM_W,
  parameter int unsigned SUB_SIZE = ga_pkg::DEF_SUB_SIZE,
  parameter int unsigned P_BEST   = ga_pkg::DEF_P_BEST,
  parameter int unsigned Q        = ga_pkg::DEF_PRBG_Q,
  localparam int unsigned GROUP   = SUB_SIZE + P_BEST,
  localparam int unsigned AW      = $clog2(GROUP),
  localparam int unsigned CW      = (SUB_SIZE > 1) ? $clog2(SUB_SIZE) : 1,
  localparam int unsigned FIT_W   = $clog2(CHROM_W + 1)
) (
  input  logic             act,
  input  logic [CW-1:0]    idx,
  input  logic [Q-1:0]     rnd_a,
  input  logic [Q-1:0]     rnd_b,
  output logic [AW-1:0]    fit_addr_a,
  output logic [AW-1:0]    fit_addr_b,
  input  logic [FIT_W-1:0] fit_a,
  input  logic [FIT_W-1:0] fit_b,
  output logic             par_we,
  output logic [CW-1:0]    par_addr,
  output logic [AW-1:0]    par_wdata
);
  localparam int unsigned PW = Q + AW + 1;

  logic [PW-1:0] prod_a, prod_b;

  assign prod_a     = PW'(rnd_a) * PW'(GROUP);
  assign prod_b     = PW'(rnd_b) * PW'(GROUP);
  assign fit_addr_a = AW'(prod_a >> Q);
  assign fit_addr_b = AW'(prod_b >> Q);

  assign par_we    = act;
  assign par_addr  = idx;
  assign par_wdata = (fit_b < fit_a) ? fit_addr_b : fit_addr_a;
endmodule
