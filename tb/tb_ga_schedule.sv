// Schedule testbench: runs the default-size engine and names, for each of the
// first eight time slots t1..t8, which subpopulation and generation every
// stage works on (P0_j is subpopulation j of the initial population, P0_jk
// its k-th new generation), and which subpopulation supplied the immigrants
// that M appends. The names are derived from the bank each stage addresses and
// from counting how often M has rebuilt each bank, and are compared with the
// expected four-stage table:
//
//   t    M               E       S       CM
//   t1   P0_1
//   t2   P0_2            P0_1
//   t3   P0_3 +best P0_1 P0_2    P0_1
//   t4   P0_4 +best P0_2 P0_3    P0_2    P0_1
//   t5   P0_11+best P0_3 P0_4    P0_3    P0_2
//   t6   P0_21+best P0_4 P0_11   P0_4    P0_3
//   t7   P0_31+best P0_11 P0_21  P0_11   P0_4
//   t8   P0_41+best P0_21 P0_31  P0_21   P0_11
//
// It also checks that every immigrant M writes is a member E scored in the
// slot before, and that by the end of t5 every subpopulation has been scored.
module tb_ga_schedule;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, busy, done, solved, bv;
  logic [32:0] seed;
  logic [15:0] target, bc;
  logic [9:0]  slot;
  logic [6:0]  gen;
  logic [4:0]  bf;

  ga_top u_dut (.clk, .rst_n, .start, .seed, .target, .busy, .done, .solved, .slot,
                .generation(gen), .best_valid(bv), .best_chrom(bc), .best_fit(bf));

  // expected table, one row per slot: M, immigrant source, E, S, CM ("" = idle)
  string exp_tab [8][5] = '{
    '{"P0_1",  "",      "",      "",      ""},
    '{"P0_2",  "",      "P0_1",  "",      ""},
    '{"P0_3",  "P0_1",  "P0_2",  "P0_1",  ""},
    '{"P0_4",  "P0_2",  "P0_3",  "P0_2",  "P0_1"},
    '{"P0_11", "P0_3",  "P0_4",  "P0_3",  "P0_2"},
    '{"P0_21", "P0_4",  "P0_11", "P0_4",  "P0_3"},
    '{"P0_31", "P0_11", "P0_21", "P0_11", "P0_4"},
    '{"P0_41", "P0_21", "P0_31", "P0_21", "P0_11"}};

  int    rebuilt [4];
  string e_prev;
  logic [15:0] e_seen [$], e_prev_seen [$];
  logic [3:0]  scored;

  function automatic string name_of(input int bank, input int k);
    return (k == 0) ? $sformatf("P0_%0d", bank + 1) : $sformatf("P0_%0d%0d", bank + 1, k);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string m, imm, e, s, cm;
    start = 0; seed = 0; target = 0;
    for (int b = 0; b < 4; b++) rebuilt[b] = 0;
    e_prev = ""; scored = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    // a target no early member is likely to hit, so the run lasts past t8
    target = 16'h6b1d; seed = 33'h0_0bad_cafe; start = 1;
    @(negedge clk) start = 0;
    for (int t = 0; t < 8; t++) begin
      // first clock of slot t
      check(busy && int'(slot) == t && u_dut.cyc == '0, $sformatf("slot %0d starts", t + 1));
      if (!u_dut.init_pop) rebuilt[u_dut.bank_m]++;
      m   = name_of(int'(u_dut.bank_m), rebuilt[u_dut.bank_m]);
      imm = u_dut.rand_imm ? "" : e_prev;
      e   = u_dut.act_e  ? name_of(int'(u_dut.bank_e),  rebuilt[u_dut.bank_e])  : "";
      s   = u_dut.act_s  ? name_of(int'(u_dut.bank_s),  rebuilt[u_dut.bank_s])  : "";
      cm  = u_dut.act_cm ? name_of(int'(u_dut.bank_cm), rebuilt[u_dut.bank_cm]) : "";
      $display("t%0d  M %-6s +best %-6s  E %-6s  S %-6s  CM %-6s", t + 1, m, imm, e, s, cm);
      check(m == exp_tab[t][0] && imm == exp_tab[t][1] && e == exp_tab[t][2] &&
            s == exp_tab[t][3] && cm == exp_tab[t][4], $sformatf("row t%0d differs from the table", t + 1));
      // walk through the slot: collect what E scores, check what M appends
      e_prev_seen = e_seen;
      e_seen.delete();
      for (int c = 0; c < 18; c++) begin
        if (u_dut.act_e) begin
          e_seen.push_back(u_dut.e_cur_chrom);
          scored[u_dut.bank_e] = 1'b1;
        end
        if (c >= 16 && !u_dut.rand_imm) begin
          int hits [$];
          hits = e_prev_seen.find_index(x) with (x == u_dut.mem_wdata);
          check(hits.size() > 0, $sformatf("t%0d immigrant %h was scored in the slot before", t + 1, u_dut.mem_wdata));
        end
        @(negedge clk);
      end
      if (t == 4) check(scored == 4'hf, "whole population scored by the end of t5");
      e_prev = e;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
