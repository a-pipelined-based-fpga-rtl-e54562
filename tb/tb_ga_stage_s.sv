// Self-checking testbench for ga_stage_s (default sizes: 18 members, 16
// parents, 16-bit random numbers). Random numbers and a model score memory are
// driven; the two candidate indices must be (r * 18) >> 16 and the written
// parent must be the candidate with the lower score (the first on a tie).
module tb_ga_stage_s;
  int checks = 0, failures = 0;
  localparam int G = 18;

  logic        act, par_we;
  logic [3:0]  idx, par_addr;
  logic [15:0] rnd_a, rnd_b;
  logic [4:0]  fit_addr_a, fit_addr_b, par_wdata;
  logic [4:0]  fit_a, fit_b;
  logic [4:0]  scores [32];

  ga_stage_s u_dut (.act, .idx, .rnd_a, .rnd_b, .fit_addr_a, .fit_addr_b, .fit_a, .fit_b,
                    .par_we, .par_addr, .par_wdata);

  assign fit_a = scores[fit_addr_a];
  assign fit_b = scores[fit_addr_b];

  initial begin
    #1000000;
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
    int ia, ib, win;
    for (int i = 0; i < 32; i++) scores[i] = 5'($urandom % 17);
    for (int t = 0; t < 3000; t++) begin
      if (t % 100 == 0) for (int i = 0; i < G; i++) scores[i] = 5'($urandom % 17);
      act = 1; idx = 4'(t); rnd_a = 16'($urandom); rnd_b = 16'($urandom);
      if (t % 10 == 0) rnd_b = rnd_a;
      if (t == 1) begin rnd_a = 16'hffff; rnd_b = 16'h0000; end
      #1;
      ia = (int'(rnd_a) * G) >> 16;
      ib = (int'(rnd_b) * G) >> 16;
      win = (scores[ib] < scores[ia]) ? ib : ia;
      check(int'(fit_addr_a) == ia && int'(fit_addr_b) == ib, "candidate indices");
      check(int'(fit_addr_a) < G && int'(fit_addr_b) < G, "candidates inside the subpopulation");
      check(par_we && par_addr == idx && int'(par_wdata) == win,
            $sformatf("winner %0d expected %0d (scores %0d, %0d)", par_wdata, win, scores[ia], scores[ib]));
    end
    act = 0; #1;
    check(!par_we, "no write when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
