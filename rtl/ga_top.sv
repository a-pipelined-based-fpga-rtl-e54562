// Pipelined genetic-algorithm engine (top level).
//
// The population is split into four subpopulations that share one four-stage
// pipeline instead of each having its own: M (working memory: builds a
// subpopulation from the previous children plus immigrants), E (evaluation:
// scores every member, keeps the best P_BEST for immigration, detects a
// solution), S (selection: binary tournaments) and CM (uniform crossover and
// one-bit mutation). In every time slot each stage works on a different
// subpopulation, so all four stages are busy once the pipeline is full, and
// each subpopulation receives the best members of the one evaluated just
// before it (the transfer unit). A free-running cellular-automaton generator
// supplies all random numbers, each consumer taking its own window of the
// generator state (the two tournament candidates use disjoint windows).
//
// Use: hold `seed` and `target`, pulse `start` for one clock. `busy` stays high
// while the run lasts. The run ends (`done`) when a member matches the target
// (`solved`, `best_chrom` is the solution) or after GN generations
// (`best_chrom` is the best member seen). One generation of all four
// subpopulations takes 4 * (SUB_SIZE + P_BEST) clocks; a run that is not
// solved early takes (4 * GN + 3) * (SUB_SIZE + P_BEST) clocks.
//
// The pipeline schedule, the immigration rule, the cellular-automaton
// generator and the best-solution comparator follow the method; the fitness
// problem (distance to a target pattern), the selection and crossover
// operators and all sizes are this design's choices.
module ga_top #(
  parameter int unsigned CHROM_W    = ga_pkg::DEF_CHROM_W,
  parameter int unsigned SUB_SIZE   = ga_pkg::DEF_SUB_SIZE,
  parameter int unsigned P_BEST     = ga_pkg::DEF_P_BEST,
  parameter int unsigned Q          = ga_pkg::DEF_PRBG_Q,
  parameter logic [2*Q:0] RULE      = ga_pkg::DEF_PRBG_RULE[2*Q:0],
  parameter int unsigned GN         = ga_pkg::DEF_GN,
  parameter int unsigned MUT_THRESH = ga_pkg::DEF_MUT_THRESH,
  parameter int unsigned MUT_BITS   = ga_pkg::DEF_MUT_BITS,
  localparam int unsigned NSUB      = ga_pkg::STAGES,
  localparam int unsigned GROUP     = SUB_SIZE + P_BEST,
  localparam int unsigned AW        = $clog2(GROUP),
  localparam int unsigned CW        = (SUB_SIZE > 1) ? $clog2(SUB_SIZE) : 1,
  localparam int unsigned BW        = $clog2(NSUB),
  localparam int unsigned FIT_W     = $clog2(CHROM_W + 1),
  localparam int unsigned TW        = $clog2(NSUB * GN + NSUB) + 1,
  localparam int unsigned GW        = $clog2(GN + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [2*Q:0]       seed,
  input  logic [CHROM_W-1:0] target,
  output logic               busy,
  output logic               done,
  output logic               solved,
  output logic [TW-1:0]      slot,
  output logic [GW-1:0]      generation,
  output logic               best_valid,
  output logic [CHROM_W-1:0] best_chrom,
  output logic [FIT_W-1:0]   best_fit
);
  // ---------------------------------------------------------------- control
  logic [AW-1:0] cyc;
  logic          first, init_pop, rand_imm, found;
  logic [BW-1:0] bank_m, bank_e, bank_s, bank_cm;
  logic          act_m, act_e, act_s, act_cm;

  ga_ctrl #(.SUB_SIZE(SUB_SIZE), .P_BEST(P_BEST), .GN(GN)) u_ctrl (
    .clk, .rst_n, .start, .found,
    .busy, .done, .solved, .cyc, .slot, .first, .slot_end(),
    .bank_m, .bank_e, .bank_s, .bank_cm,
    .act_m, .act_e, .act_s, .act_cm,
    .init_pop, .rand_imm, .generation
  );

  // ---------------------------------------------------------- random numbers
  logic [Q-1:0] win [2*Q+1];

  ga_prbg #(.Q(Q), .RULE(RULE)) u_prbg (
    .clk, .rst_n, .load(start), .seed, .state(), .win
  );

  // ---------------------------------------------------------------- memories
  // members: written by M, read by E and (twice) by CM
  logic          mem_we;
  logic [AW-1:0] mem_waddr;
  logic [CHROM_W-1:0] mem_wdata;
  logic [BW-1:0] mem_rbank [3];
  logic [AW-1:0] mem_raddr [3];
  logic [CHROM_W-1:0] mem_rdata [3];
  // children: written by CM, read by M
  logic          ch_we;
  logic [CW-1:0] ch_waddr;
  logic [CHROM_W-1:0] ch_wdata;
  logic [BW-1:0] ch_rbank [1];
  logic [CW-1:0] ch_raddr [1];
  logic [CHROM_W-1:0] ch_rdata [1];
  // scores: written by E, read twice by S
  logic          fit_we;
  logic [AW-1:0] fit_waddr;
  logic [FIT_W-1:0] fit_wdata;
  logic [BW-1:0] fit_rbank [2];
  logic [AW-1:0] fit_raddr [2];
  logic [FIT_W-1:0] fit_rdata [2];
  // parent indices: written by S, read twice by CM
  logic          par_we;
  logic [CW-1:0] par_waddr;
  logic [AW-1:0] par_wdata;
  logic [BW-1:0] par_rbank [2];
  logic [CW-1:0] par_raddr [2];
  logic [AW-1:0] par_rdata [2];

  ga_bank_ram #(.W(CHROM_W), .DEPTH(GROUP), .BANKS(NSUB), .NRD(3)) u_members (
    .clk, .we(mem_we), .wbank(bank_m), .waddr(mem_waddr), .wdata(mem_wdata),
    .rbank(mem_rbank), .raddr(mem_raddr), .rdata(mem_rdata)
  );
  ga_bank_ram #(.W(CHROM_W), .DEPTH(SUB_SIZE), .BANKS(NSUB), .NRD(1)) u_children (
    .clk, .we(ch_we), .wbank(bank_cm), .waddr(ch_waddr), .wdata(ch_wdata),
    .rbank(ch_rbank), .raddr(ch_raddr), .rdata(ch_rdata)
  );
  ga_bank_ram #(.W(FIT_W), .DEPTH(GROUP), .BANKS(NSUB), .NRD(2)) u_scores (
    .clk, .we(fit_we), .wbank(bank_e), .waddr(fit_waddr), .wdata(fit_wdata),
    .rbank(fit_rbank), .raddr(fit_raddr), .rdata(fit_rdata)
  );
  ga_bank_ram #(.W(AW), .DEPTH(SUB_SIZE), .BANKS(NSUB), .NRD(2)) u_parents (
    .clk, .we(par_we), .wbank(bank_s), .waddr(par_waddr), .wdata(par_wdata),
    .rbank(par_rbank), .raddr(par_raddr), .rdata(par_rdata)
  );

  assign ch_rbank[0]  = bank_m;
  assign mem_rbank[0] = bank_e;
  assign mem_rbank[1] = bank_cm;
  assign mem_rbank[2] = bank_cm;
  assign fit_rbank[0] = bank_s;
  assign fit_rbank[1] = bank_s;
  assign par_rbank[0] = bank_cm;
  assign par_rbank[1] = bank_cm;

  // ------------------------------------------------------------------ stages
  logic [CHROM_W-1:0] e_best_chrom [P_BEST];
  logic               e_cur_valid;
  logic [CHROM_W-1:0] e_cur_chrom;
  logic [FIT_W-1:0]   e_cur_fit;

  ga_stage_m #(.CHROM_W(CHROM_W), .SUB_SIZE(SUB_SIZE), .P_BEST(P_BEST)) u_m (
    .clk, .rst_n, .act(act_m), .first, .idx(cyc),
    .init_pop, .rand_imm, .rnd_chrom(CHROM_W'(win[0])),
    .child_addr(ch_raddr[0]), .child_data(ch_rdata[0]),
    .e_best(e_best_chrom),
    .mem_we, .mem_addr(mem_waddr), .mem_wdata
  );

  ga_stage_e #(.CHROM_W(CHROM_W), .SUB_SIZE(SUB_SIZE), .P_BEST(P_BEST)) u_e (
    .clk, .rst_n, .act(act_e), .first, .idx(cyc), .target,
    .mem_addr(mem_raddr[0]), .mem_data(mem_rdata[0]),
    .fit_we, .fit_addr(fit_waddr), .fit_wdata,
    .best_chrom(e_best_chrom), .best_fit(), .best_valid(),
    .found,
    .cur_valid(e_cur_valid), .cur_chrom(e_cur_chrom), .cur_fit(e_cur_fit)
  );

  ga_stage_s #(.CHROM_W(CHROM_W), .SUB_SIZE(SUB_SIZE), .P_BEST(P_BEST), .Q(Q)) u_s (
    .act(act_s), .idx(CW'(cyc)), .rnd_a(win[4]), .rnd_b(win[21]),
    .fit_addr_a(fit_raddr[0]), .fit_addr_b(fit_raddr[1]),
    .fit_a(fit_rdata[0]), .fit_b(fit_rdata[1]),
    .par_we, .par_addr(par_waddr), .par_wdata
  );

  // Mutation position k comes from window (27 + 5k) mod (2Q+1).
  logic [Q-1:0] mut_pos [MUT_BITS];
  always_comb
    for (int k = 0; k < MUT_BITS; k++) mut_pos[k] = win[(27 + 5 * k) % (2 * Q + 1)];

  ga_stage_cm #(.CHROM_W(CHROM_W), .SUB_SIZE(SUB_SIZE), .P_BEST(P_BEST), .Q(Q),
                .MUT_THRESH(MUT_THRESH), .MUT_BITS(MUT_BITS)) u_cm (
    .clk, .rst_n, .act(act_cm), .idx(cyc),
    .rnd_mask(win[10]), .rnd_pos(mut_pos), .rnd_prob(win[26][7:0]),
    .par_addr_a(par_raddr[0]), .par_addr_b(par_raddr[1]),
    .par_a(par_rdata[0]), .par_b(par_rdata[1]),
    .mem_addr_a(mem_raddr[1]), .mem_addr_b(mem_raddr[2]),
    .mem_a(mem_rdata[1]), .mem_b(mem_rdata[2]),
    .child_we(ch_we), .child_addr(ch_waddr), .child_wdata(ch_wdata)
  );

  // ------------------------------------------------- best-solution comparator
  ga_best_keeper #(.CHROM_W(CHROM_W)) u_best (
    .clk, .rst_n, .clear(start),
    .in_valid(e_cur_valid), .in_chrom(e_cur_chrom), .in_fit(e_cur_fit),
    .best_valid, .best_chrom, .best_fit
  );
endmodule
