// Memory stage M: builds the working subpopulation of one time slot.
//
// In every slot the controller points M at the bank of one subpopulation and
// steps `idx` through 0..SUB_SIZE+P_BEST-1, one member per clock while `act`
// is high. Members 0..SUB_SIZE-1 are the children that crossover/mutation
// wrote into this bank in the previous slot, or random chromosomes while
// `init_pop` is high (building the initial population). Members
// SUB_SIZE..SUB_SIZE+P_BEST-1 are immigrants from the transfer unit held
// inside this stage: the best P_BEST of the subpopulation evaluated in the
// previous slot, or random chromosomes while `rand_imm` is high.
//
// Interface: `child_addr`/`child_data` read the children of the bank;
// `mem_we`/`mem_addr`/`mem_wdata` write the members. The bank number itself is
// routed by the top. Timing: everything combinational except the transfer
// list, which is captured on the clock where `first` is high.
module ga_stage_m #(
  parameter int unsigned CHROM_W  = ga_pkg::DEF_CHROM_W,
  parameter int unsigned SUB_SIZE = ga_pkg::DEF_SUB_SIZE,
  parameter int unsigned P_BEST   = ga_pkg::DEF_P_BEST,
  localparam int unsigned GROUP   = SUB_SIZE + P_BEST,
  localparam int unsigned AW      = $clog2(GROUP),
  localparam int unsigned CW      = (SUB_SIZE > 1) ? $clog2(SUB_SIZE) : 1,
  localparam int unsigned SW      = (P_BEST > 1) ? $clog2(P_BEST) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               act,
  input  logic               first,
  input  logic [AW-1:0]      idx,
  input  logic               init_pop,
  input  logic               rand_imm,
  input  logic [CHROM_W-1:0] rnd_chrom,
  output logic [CW-1:0]      child_addr,
  input  logic [CHROM_W-1:0] child_data,
  input  logic [CHROM_W-1:0] e_best [P_BEST],
  output logic               mem_we,
  output logic [AW-1:0]      mem_addr,
  output logic [CHROM_W-1:0] mem_wdata
);
  logic               is_child;
  logic [SW-1:0]      imm_sel;
  logic [CHROM_W-1:0] imm;

  assign is_child   = int'(idx) < SUB_SIZE;
  assign child_addr = CW'(idx);
  assign imm_sel    = SW'(int'(idx) - SUB_SIZE);

  ga_transfer #(.CHROM_W(CHROM_W), .P_BEST(P_BEST)) u_transfer (
    .clk, .rst_n,
    .capture    (first),
    .use_random (rand_imm),
    .best_in    (e_best),
    .sel        (imm_sel),
    .rnd        (rnd_chrom),
    .imm        (imm)
  );

  assign mem_we    = act;
  assign mem_addr  = idx;
  assign mem_wdata = is_child ? (init_pop ? rnd_chrom : child_data) : imm;
endmodule
