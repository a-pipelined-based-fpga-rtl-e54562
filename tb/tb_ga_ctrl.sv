// Self-checking testbench for ga_ctrl.
// A small instance (4 children + 2 immigrants, so 6-clock slots, GN = 3) is
// compared on every clock with the schedule worked out here: slot = t / 6,
// cyc = t % 6, M on bank slot mod 4, E/S/CM on the three banks before it,
// stages enabled from slots 1/2/3 on, S and CM only for the first 4 clocks,
// random population in slots 0..3, random immigrants in slots 0..1, a
// generation at the end of slots 6, 10, 14, and the end of the run after
// (4*3+3)*6 = 90 clocks. A second run is stopped by `found`. A default-size
// instance must run (4*64+3)*18 = 4662 clocks.
module tb_ga_ctrl;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       start, found;
  logic       busy, done, solved, first, slot_end, act_m, act_e, act_s, act_cm, init_pop, rand_imm;
  logic [2:0] cyc;
  logic [4:0] slot;
  logic [1:0] bank_m, bank_e, bank_s, bank_cm;
  logic [1:0] generation;

  ga_ctrl #(.SUB_SIZE(4), .P_BEST(2), .GN(3)) u_dut (
    .clk, .rst_n, .start, .found, .busy, .done, .solved, .cyc, .slot, .first, .slot_end,
    .bank_m, .bank_e, .bank_s, .bank_cm, .act_m, .act_e, .act_s, .act_cm,
    .init_pop, .rand_imm, .generation);

  logic       start_f, busy_f, done_f;
  ga_ctrl u_full (
    .clk, .rst_n, .start(start_f), .found(1'b0), .busy(busy_f), .done(done_f), .solved(),
    .cyc(), .slot(), .first(), .slot_end(), .bank_m(), .bank_e(), .bank_s(), .bank_cm(),
    .act_m(), .act_e(), .act_s(), .act_cm(), .init_pop(), .rand_imm(), .generation());

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t, s, c, gens, ncyc;
    start = 0; found = 0; start_f = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!busy && !done, "idle after reset");
    // run 1: to the generation limit
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t = 0; gens = 0;
    while (busy && t < 200) begin
      s = t / 6; c = t % 6;
      check(int'(cyc) == c && int'(slot) == s, $sformatf("t %0d: cyc %0d slot %0d", t, cyc, slot));
      check(int'(bank_m) == s % 4 && int'(bank_e) == (s + 3) % 4 &&
            int'(bank_s) == (s + 2) % 4 && int'(bank_cm) == (s + 1) % 4, "bank rotation");
      check(act_m && act_e == (s >= 1) && act_s == (s >= 2 && c < 4) && act_cm == (s >= 3 && c < 4),
            $sformatf("t %0d: stage enables", t));
      check(init_pop == (s < 4) && rand_imm == (s < 2), "initialization flags");
      check(first == (c == 0) && slot_end == (c == 5), "slot markers");
      check(int'(generation) == gens, $sformatf("t %0d: generation %0d expected %0d", t, generation, gens));
      if (c == 5 && s >= 6 && (s - 6) % 4 == 0) gens++;
      @(negedge clk); t++;
    end
    check(t == 90, $sformatf("run length %0d clocks, expected 90", t));
    check(done && !solved && int'(generation) == 3, "end by generation limit");
    // run 2: stopped by a solution in slot 5, clock 2
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (32) @(negedge clk);
    check(busy && int'(slot) == 5 && int'(cyc) == 2, "running before the solution");
    found = 1;
    @(negedge clk) found = 0;
    check(!busy && done && solved, "stop on solution");
    check(int'(slot) == 5, "no slot advance after the stop");
    // default size
    @(negedge clk) start_f = 1;
    @(negedge clk) start_f = 0;
    ncyc = 0;
    while (busy_f && ncyc < 10000) begin @(negedge clk); ncyc++; end
    check(ncyc == 4662 && done_f, $sformatf("default run %0d clocks, expected 4662", ncyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
