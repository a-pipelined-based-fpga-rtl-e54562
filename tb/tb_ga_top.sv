// End-to-end testbench for ga_top.
// Instance A has the default sizes (16 + 2 members per subpopulation, 16-bit
// chromosomes, GN = 64) and runs several problems to completion. Instance B
// has GN = 1 so that its runs end at the generation limit. A ga_top_checker
// scoreboard on each instance checks every stage on every clock; at the end
// each mechanism (random initial population, random and transferred
// immigrants, children returning to M, selection, crossover, mutation, stop on
// a solution, stop at the limit, best-solution updates) must have happened.
module tb_ga_top;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic        start_a, start_b;
  logic [32:0] seed_a, seed_b;
  logic [15:0] target_a, target_b;
  logic        busy_a, done_a, solved_a, bv_a, busy_b, done_b, solved_b, bv_b;
  logic [9:0]  slot_a;
  logic [3:0]  slot_b;
  logic [6:0]  gen_a;
  logic        gen_b;
  logic [15:0] bc_a, bc_b;
  logic [4:0]  bf_a, bf_b;

  ga_top u_a (.clk, .rst_n, .start(start_a), .seed(seed_a), .target(target_a),
              .busy(busy_a), .done(done_a), .solved(solved_a), .slot(slot_a), .generation(gen_a),
              .best_valid(bv_a), .best_chrom(bc_a), .best_fit(bf_a));
  ga_top #(.GN(1)) u_b (.clk, .rst_n, .start(start_b), .seed(seed_b), .target(target_b),
              .busy(busy_b), .done(done_b), .solved(solved_b), .slot(slot_b), .generation(gen_b),
              .best_valid(bv_b), .best_chrom(bc_b), .best_fit(bf_b));

  int c_a [12], c_b [12];

  ga_top_checker #(.GN(64)) u_chk_a (.clk, .start(start_a), .target(target_a), .busy(busy_a),
    .done(done_a), .solved(solved_a), .generation(int'(gen_a)), .best_valid(bv_a),
    .best_chrom(bc_a), .best_fit(bf_a),
    .mem_we(u_a.mem_we), .mem_waddr(u_a.mem_waddr), .mem_wdata(u_a.mem_wdata), .bank_m(u_a.bank_m),
    .e_valid(u_a.e_cur_valid), .e_chrom(u_a.e_cur_chrom), .e_fit(u_a.e_cur_fit),
    .par_we(u_a.par_we), .par_wdata(u_a.par_wdata),
    .s_cand_a(u_a.fit_raddr[0]), .s_cand_b(u_a.fit_raddr[1]),
    .ch_we(u_a.ch_we), .ch_wdata(u_a.ch_wdata),
    .checks(c_a[0]), .failures(c_a[1]), .n_init_random(c_a[2]), .n_random_imm(c_a[3]),
    .n_transfer_imm(c_a[4]), .n_children_in(c_a[5]), .n_selections(c_a[6]),
    .n_crossovers(c_a[7]), .n_mutations(c_a[8]), .n_solved_stops(c_a[9]),
    .n_limit_stops(c_a[10]), .n_best_updates(c_a[11]));
  ga_top_checker #(.GN(1)) u_chk_b (.clk, .start(start_b), .target(target_b), .busy(busy_b),
    .done(done_b), .solved(solved_b), .generation(int'(gen_b)), .best_valid(bv_b),
    .best_chrom(bc_b), .best_fit(bf_b),
    .mem_we(u_b.mem_we), .mem_waddr(u_b.mem_waddr), .mem_wdata(u_b.mem_wdata), .bank_m(u_b.bank_m),
    .e_valid(u_b.e_cur_valid), .e_chrom(u_b.e_cur_chrom), .e_fit(u_b.e_cur_fit),
    .par_we(u_b.par_we), .par_wdata(u_b.par_wdata),
    .s_cand_a(u_b.fit_raddr[0]), .s_cand_b(u_b.fit_raddr[1]),
    .ch_we(u_b.ch_we), .ch_wdata(u_b.ch_wdata),
    .checks(c_b[0]), .failures(c_b[1]), .n_init_random(c_b[2]), .n_random_imm(c_b[3]),
    .n_transfer_imm(c_b[4]), .n_children_in(c_b[5]), .n_selections(c_b[6]),
    .n_crossovers(c_b[7]), .n_mutations(c_b[8]), .n_solved_stops(c_b[9]),
    .n_limit_stops(c_b[10]), .n_best_updates(c_b[11]));

  int checks = 0, failures = 0;

  task automatic finish_tb();
    string names [12] = '{"", "", "random initial members", "random immigrants",
      "transferred immigrants", "children returned to M", "selections", "crossovers",
      "visible mutations", "stops on a solution", "stops at the generation limit",
      "best-solution updates"};
    checks = checks + c_a[0] + c_b[0];
    failures = failures + c_a[1] + c_b[1];
    for (int i = 2; i < 12; i++) begin
      $display("  %-30s %0d", names[i], c_a[i] + c_b[i]);
      checks++;
      if (c_a[i] + c_b[i] == 0) begin failures++; $display("FAIL: never happened: %s", names[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  task automatic run_a(input logic [15:0] t, input logic [32:0] s);
    @(negedge clk);
    target_a = t; seed_a = s; start_a = 1;
    @(negedge clk) start_a = 0;
    while (!done_a) @(negedge clk);
    $display("A: target %h seed %h -> %s after %0d generations, best %h (score %0d)",
             t, s, solved_a ? "solved" : "limit", gen_a, bc_a, bf_a);
  endtask

  task automatic run_b(input logic [15:0] t, input logic [32:0] s);
    @(negedge clk);
    target_b = t; seed_b = s; start_b = 1;
    @(negedge clk) start_b = 0;
    while (!done_b) @(negedge clk);
    $display("B: target %h seed %h -> %s after %0d generations, best %h (score %0d)",
             t, s, solved_b ? "solved" : "limit", gen_b, bc_b, bf_b);
  endtask

  initial begin
    start_a = 0; start_b = 0; seed_a = 0; seed_b = 0; target_a = 0; target_b = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin
        run_a(16'hbeef, 33'h0_1234_5678);
        run_a(16'h5a3c, 33'h1_0f0f_0f0f);
        run_a(16'h0001, 33'h0_0000_0000);
      end
      begin
        run_b(16'hc0de, 33'h0_dead_beef);
        run_b(16'h7e57, 33'h1_5555_aaaa);
      end
    join
    repeat (3) @(negedge clk);
    finish_tb();
  end
endmodule
