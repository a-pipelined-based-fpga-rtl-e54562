// Self-checking testbench for ga_stage_e (default sizes: 18 members, best 2).
// For each simulated slot a model member memory is filled (with forced ties
// and, in some slots, an exact solution), the stage is stepped through all 18
// members, and the score writes, the solution flag and the best-2 list at the
// end of the slot are compared with values computed here by sorting.
module tb_ga_stage_e;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int G = 18, P = 2;

  logic        act, first, found, fit_we, cur_valid;
  logic [4:0]  idx, mem_addr, fit_addr;
  logic [15:0] target, mem_data, cur_chrom;
  logic [4:0]  fit_wdata, cur_fit;
  logic [15:0] best_chrom [P];
  logic [4:0]  best_fit [P];
  logic [P-1:0] best_valid;
  logic [15:0] members [G];

  ga_stage_e u_dut (.clk, .rst_n, .act, .first, .idx, .target, .mem_addr, .mem_data,
                    .fit_we, .fit_addr, .fit_wdata, .best_chrom, .best_fit, .best_valid,
                    .found, .cur_valid, .cur_chrom, .cur_fit);

  assign mem_data = members[mem_addr];

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
    int e_fit [2];
    logic [15:0] e_chrom [2];
    int f;
    act = 0; first = 0; idx = 0; target = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      int nfound;
      target = 16'($urandom);
      for (int i = 0; i < G; i++) members[i] = target ^ 16'($urandom) ^ 16'($urandom);
      members[5] = target ^ 16'h0003;                 // score 2
      members[9] = target ^ 16'h0300;                 // score 2, a tie
      if (s % 4 == 1) members[$urandom % G] = target; // a solution
      // reference: stable selection of the two lowest scores
      e_fit[0] = 99; e_fit[1] = 99; e_chrom[0] = 0; e_chrom[1] = 0;
      for (int i = 0; i < G; i++) begin
        f = $countones(members[i] ^ target);
        if (f < e_fit[0]) begin
          e_fit[1] = e_fit[0]; e_chrom[1] = e_chrom[0]; e_fit[0] = f; e_chrom[0] = members[i];
        end else if (f < e_fit[1]) begin
          e_fit[1] = f; e_chrom[1] = members[i];
        end
      end
      nfound = 0;
      for (int c = 0; c < G; c++) begin
        @(negedge clk);
        act = 1; first = (c == 0); idx = 5'(c);
        #1;
        f = $countones(members[c] ^ target);
        check(fit_we && fit_addr == 5'(c) && int'(fit_wdata) == f, $sformatf("score of member %0d", c));
        check(found == (f == 0), "solution flag");
        check(cur_valid && cur_chrom == members[c] && int'(cur_fit) == f, "comparator output");
        if (found) nfound++;
      end
      @(negedge clk) act = 0; first = 0;
      #1;
      check(best_valid == 2'b11, "best list full");
      check(int'(best_fit[0]) == e_fit[0] && best_chrom[0] == e_chrom[0],
            $sformatf("slot %0d best[0] %h/%0d expected %h/%0d", s, best_chrom[0], best_fit[0], e_chrom[0], e_fit[0]));
      check(int'(best_fit[1]) == e_fit[1] && best_chrom[1] == e_chrom[1],
            $sformatf("slot %0d best[1] %h/%0d expected %h/%0d", s, best_chrom[1], best_fit[1], e_chrom[1], e_fit[1]));
      check(!fit_we && !found, "idle stage quiet");
      if (s % 4 == 1) check(nfound >= 1, "solution seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
