// Full-size testbench for ga_top: the engine at its default sizes (four
// subpopulations of 16 + 2 members, 16-bit chromosomes, 33-cell generator,
// GN = 64) solves two target patterns from start to done, with a
// ga_top_checker scoreboard checking every stage on every clock.
module tb_ga_top_full;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic        start;
  logic [32:0] seed;
  logic [15:0] target;
  logic        busy, done, solved, bv;
  logic [9:0]  slot;
  logic [6:0]  gen;
  logic [15:0] bc;
  logic [4:0]  bf;
  int          c [12];
  int          checks = 0, failures = 0;

  ga_top u_dut (.clk, .rst_n, .start, .seed, .target, .busy, .done, .solved, .slot,
                .generation(gen), .best_valid(bv), .best_chrom(bc), .best_fit(bf));

  ga_top_checker u_chk (.clk, .start, .target, .busy, .done, .solved, .generation(int'(gen)),
    .best_valid(bv), .best_chrom(bc), .best_fit(bf),
    .mem_we(u_dut.mem_we), .mem_waddr(u_dut.mem_waddr), .mem_wdata(u_dut.mem_wdata),
    .bank_m(u_dut.bank_m), .e_valid(u_dut.e_cur_valid), .e_chrom(u_dut.e_cur_chrom),
    .e_fit(u_dut.e_cur_fit), .par_we(u_dut.par_we), .par_wdata(u_dut.par_wdata),
    .s_cand_a(u_dut.fit_raddr[0]), .s_cand_b(u_dut.fit_raddr[1]),
    .ch_we(u_dut.ch_we), .ch_wdata(u_dut.ch_wdata),
    .checks(c[0]), .failures(c[1]), .n_init_random(c[2]), .n_random_imm(c[3]),
    .n_transfer_imm(c[4]), .n_children_in(c[5]), .n_selections(c[6]), .n_crossovers(c[7]),
    .n_mutations(c[8]), .n_solved_stops(c[9]), .n_limit_stops(c[10]), .n_best_updates(c[11]));

  task automatic finish_tb();
    checks = checks + c[0];
    failures = failures + c[1];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  task automatic run(input logic [15:0] t, input logic [32:0] s);
    int ncyc;
    @(negedge clk);
    target = t; seed = s; start = 1;
    @(negedge clk) start = 0;
    ncyc = 0;
    while (!done) begin @(negedge clk); ncyc++; end
    $display("target %h -> %s after %0d generations (%0d clocks), best %h (score %0d)",
             t, solved ? "solved" : "limit", gen, ncyc, bc, bf);
    checks++;
    if (ncyc > (4 * 64 + 3) * 18) begin failures++; $display("FAIL: run too long"); end
    checks++;
    if (!(solved || int'(gen) == 64)) begin failures++; $display("FAIL: run ended without a reason"); end
  endtask

  initial begin
    start = 0; seed = 0; target = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(16'h9c71, 33'h0_cafe_f00d);
    run(16'h3e05, 33'h1_7777_1111);
    repeat (3) @(negedge clk);
    checks++;
    if (c[9] + c[10] != 2) begin failures++; $display("FAIL: runs not completed"); end
    finish_tb();
  end
endmodule
