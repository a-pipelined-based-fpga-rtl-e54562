// Self-checking testbench for ga_prbg.
// A 5-cell instance (Q=2, rule vector 5'b00111) is compared every clock with
// a reference automaton written here from the rule definition, and its period
// must be exactly 2^5-1 = 31. A full-size 33-cell instance is compared with the
// same reference for 500 clocks. Windows, seed loading and the zero-seed
// substitution are checked too. Finally the default rule vector is shown to
// give the maximal period 2^33-1 without simulating it: the characteristic
// polynomial of the automaton (continuant recurrence p_i = (x + r_i) p_{i-1}
// + p_{i-2} over GF(2)) must satisfy x^(2^33-1) = 1 and x^((2^33-1)/f) != 1
// modulo itself for each prime factor f of 2^33-1 = 7 * 23 * 89 * 599479.
module tb_ga_prbg;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int FAC [4] = '{7, 23, 89, 599479};  // prime factors of 2^33-1

  // small instance
  logic       load_s;
  logic [4:0] seed_s, state_s;
  logic [1:0] win_s [5];
  ga_prbg #(.Q(2), .RULE(5'h07), .SEED(5'h01)) u_small (
    .clk, .rst_n, .load(load_s), .seed(seed_s), .state(state_s), .win(win_s));

  // full-size instance
  logic        load_f;
  logic [32:0] seed_f, state_f;
  logic [15:0] win_f [33];
  ga_prbg u_full (.clk, .rst_n, .load(load_f), .seed(seed_f), .state(state_f), .win(win_f));

  function automatic logic [63:0] ref_next(input logic [63:0] s, input logic [63:0] rule, input int n);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < n; i++) begin
      logic l, rr;
      l  = (i > 0)     ? s[i-1] : 1'b0;
      rr = (i < n - 1) ? s[i+1] : 1'b0;
      r[i] = l ^ rr ^ (rule[i] & s[i]);
    end
    return r;
  endfunction

  // GF(2) polynomial helpers, polynomials as bit vectors (bit k = x^k).
  function automatic logic [127:0] pmod(input logic [127:0] a, input logic [127:0] m, input int dm);
    for (int k = 127; k >= dm; k--)
      if (a[k]) a = a ^ (m << (k - dm));
    return a;
  endfunction

  function automatic logic [127:0] pmulmod(input logic [127:0] a, input logic [127:0] b,
                                           input logic [127:0] m, input int dm);
    logic [127:0] r;
    r = '0;
    for (int k = 0; k < 64; k++)
      if (b[k]) r = r ^ (a << k);
    return pmod(r, m, dm);
  endfunction

  function automatic logic [127:0] ppow_x(input logic [63:0] e, input logic [127:0] m, input int dm);
    logic [127:0] r, b;
    r = 128'd1; b = pmod(128'd2, m, dm);
    for (int k = 0; k < 64; k++) begin
      if (e[k]) r = pmulmod(r, b, m, dm);
      b = pmulmod(b, b, m, dm);
    end
    return r;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ms, mf;
    int period;
    load_s = 0; load_f = 0; seed_s = 0; seed_f = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(state_s == 5'h01 && state_f == 33'h1, "reset loads SEED");
    // reference comparison and period of the small automaton
    ms = 64'h1; period = 0;
    for (int t = 1; t <= 40; t++) begin
      @(posedge clk); #1;
      ms = ref_next(ms, 64'h07, 5);
      check(state_s == ms[4:0], $sformatf("small state step %0d", t));
      for (int w = 0; w < 5; w++)
        for (int b = 0; b < 2; b++)
          check(win_s[w][b] == ms[(w + b) % 5], "small window bit");
      if (period == 0 && state_s == 5'h01) period = t;
    end
    check(period == 31, $sformatf("small period %0d, expected 31", period));
    // load a seed, and a zero seed
    seed_s = 5'h16; load_s = 1; @(posedge clk); #1 load_s = 0;
    check(state_s == 5'h16, "seed load");
    seed_s = 5'h00; load_s = 1; @(posedge clk); #1 load_s = 0;
    check(state_s == 5'h01, "zero seed replaced by SEED");
    // full-size automaton against the reference
    seed_f = 33'h1_2345_6789; load_f = 1; @(posedge clk); #1 load_f = 0;
    mf = 64'h1_2345_6789;
    check(state_f == mf[32:0], "full seed load");
    for (int t = 1; t <= 500; t++) begin
      @(posedge clk); #1;
      mf = ref_next(mf, 64'h1_6509_b4f4, 33);
      check(state_f == mf[32:0], $sformatf("full state step %0d", t));
      check(win_f[0] == mf[15:0] && win_f[20] == {mf[2:0], mf[32:20]}, "full windows");
      check(state_f != '0, "full state never zero");
    end
    // maximal period of the default rule vector
    begin
      logic [127:0] p0, p1, p2;
      logic [63:0]  n;

      p0 = 128'd1;
      p1 = 128'd2 ^ 128'(ga_pkg::DEF_PRBG_RULE[0]);
      for (int i = 1; i < 33; i++) begin
        logic [127:0] t;
        t = (p1 << 1) ^ (ga_pkg::DEF_PRBG_RULE[i] ? p1 : 128'd0) ^ p0;
        p0 = p1; p1 = t;
      end
      check(p1[33] && p1[127:34] == '0, "characteristic polynomial has degree 33");
      n = (64'd1 << 33) - 1;
      check(ppow_x(n, p1, 33) == 128'd1, "x^(2^33-1) = 1");
      foreach (FAC[f])
        check(ppow_x(n / 64'(FAC[f]), p1, 33) != 128'd1, $sformatf("order not divided by %0d", FAC[f]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
