// Self-checking testbench for ga_transfer: the list offered by evaluation is
// taken only on a capture clock and then served by index; between captures a
// changing input must not leak through, and in the random phase the random
// chromosome is served instead.
module tb_ga_transfer;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        capture, use_random;
  logic [15:0] best_in [4];
  logic [1:0]  sel;
  logic [15:0] rnd, imm;
  logic [15:0] expect_list [4];

  ga_transfer #(.CHROM_W(16), .P_BEST(4)) u_dut (
    .clk, .rst_n, .capture, .use_random, .best_in, .sel, .rnd, .imm);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    capture = 0; use_random = 0; sel = 0; rnd = 0;
    for (int i = 0; i < 4; i++) best_in[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 200; round++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) best_in[i] = 16'($urandom);
      capture = 1;
      expect_list = best_in;
      @(negedge clk);
      capture = 0;
      for (int i = 0; i < 4; i++) best_in[i] = 16'($urandom);   // must not be taken
      for (int k = 0; k < 6; k++) begin
        @(negedge clk);
        sel = 2'($urandom); rnd = 16'($urandom); use_random = ($urandom % 3) == 0;
        #1;
        checks++;
        if (imm !== (use_random ? rnd : expect_list[sel])) begin
          failures++;
          $display("FAIL: round %0d sel %0d random %0d imm %h", round, sel, use_random, imm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
