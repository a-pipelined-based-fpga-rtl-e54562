// Self-checking testbench for ga_best_keeper: a random stream of scored
// chromosomes (with many equal scores) is fed in; the register must always
// hold the first chromosome that reached the lowest score since the last
// clear, and `clear` must empty it.
module tb_ga_best_keeper;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clear, in_valid, best_valid;
  logic [15:0] in_chrom, best_chrom;
  logic [4:0]  in_fit, best_fit;

  ga_best_keeper u_dut (.clk, .rst_n, .clear, .in_valid, .in_chrom, .in_fit,
                        .best_valid, .best_chrom, .best_fit);

  initial begin
    repeat (50000) @(posedge clk);
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
    logic m_valid;
    logic [15:0] m_chrom;
    int m_fit;
    clear = 0; in_valid = 0; in_chrom = 0; in_fit = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!best_valid, "empty after reset");
    m_valid = 0; m_chrom = 0; m_fit = 99;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      clear = (t % 500 == 0);
      in_valid = ($urandom % 4) != 0;
      in_chrom = 16'($urandom);
      in_fit = 5'(3 + $urandom % 4 - ((t % 500) / 150));
      @(posedge clk);
      if (clear) begin m_valid = 0; m_fit = 99; m_chrom = 0; end
      else if (in_valid && (!m_valid || int'(in_fit) < m_fit)) begin
        m_valid = 1; m_fit = in_fit; m_chrom = in_chrom;
      end
      #1;
      check(best_valid == m_valid, "valid flag");
      if (m_valid) check(best_chrom == m_chrom && int'(best_fit) == m_fit,
                         $sformatf("t %0d best %h/%0d expected %h/%0d", t, best_chrom, best_fit, m_chrom, m_fit));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
