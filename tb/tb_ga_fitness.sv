// Self-checking testbench for ga_fitness: the score must equal the number of
// bits in which the chromosome differs from the target, computed here with
// $countones, for fixed corner cases and random pairs.
module tb_ga_fitness;
  int checks = 0, failures = 0;
  logic [15:0] chrom, target;
  logic [4:0]  fit;
  ga_fitness u_dut (.chrom, .target, .fit);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [15:0] c, input logic [15:0] t);
    chrom = c; target = t; #1;
    checks++;
    if (int'(fit) != $countones(c ^ t)) begin
      failures++;
      $display("FAIL: chrom %h target %h fit %0d", c, t, fit);
    end
  endtask

  initial begin
    try(16'h0000, 16'h0000);
    try(16'hffff, 16'h0000);
    try(16'h0000, 16'hffff);
    try(16'h1234, 16'h1234);
    try(16'h8001, 16'h0000);
    for (int i = 0; i < 2000; i++) try(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
