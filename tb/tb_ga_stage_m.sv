// Self-checking testbench for ga_stage_m (default sizes: 16 children plus 2
// immigrants per slot). Each simulated slot steps idx 0..17 with `first` on
// the first clock. The expected member for every write is worked out here:
// children from a model child memory (or the random chromosome in the
// initial-population phase), then the evaluation list that was present at
// the first clock (or random chromosomes in the random-immigrant phase).
module tb_ga_stage_m;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int SUB = 16, P = 2, G = SUB + P;

  logic        act, first, init_pop, rand_imm;
  logic [4:0]  idx;
  logic [15:0] rnd_chrom, child_data;
  logic [3:0]  child_addr;
  logic [15:0] e_best [P];
  logic        mem_we;
  logic [4:0]  mem_addr;
  logic [15:0] mem_wdata;
  logic [15:0] children [SUB];
  logic [15:0] captured [P];

  ga_stage_m u_dut (.clk, .rst_n, .act, .first, .idx, .init_pop, .rand_imm, .rnd_chrom,
                    .child_addr, .child_data, .e_best, .mem_we, .mem_addr, .mem_wdata);

  assign child_data = children[child_addr];

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
    logic [15:0] exp;
    act = 0; first = 0; init_pop = 0; rand_imm = 0; idx = 0; rnd_chrom = 0;
    for (int i = 0; i < P; i++) e_best[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 24; s++) begin
      // slot kinds: 0 = initial pop + random immigrants, 1 = initial pop, 2 = normal
      int kind;
      kind = (s % 6 == 0) ? 0 : (s % 6 == 1) ? 1 : 2;
      for (int i = 0; i < SUB; i++) children[i] = 16'($urandom);
      for (int i = 0; i < P; i++) e_best[i] = 16'($urandom);
      captured = e_best;
      for (int c = 0; c < G; c++) begin
        @(negedge clk);
        act = 1; first = (c == 0); idx = 5'(c);
        init_pop = (kind <= 1); rand_imm = (kind == 0);
        rnd_chrom = 16'($urandom);
        if (c == 1) for (int i = 0; i < P; i++) e_best[i] = 16'($urandom);  // after capture
        #1;
        if (c < SUB) exp = init_pop ? rnd_chrom : children[c];
        else         exp = rand_imm ? rnd_chrom : captured[c - SUB];
        check(mem_we && mem_addr == 5'(c), "write enable and address");
        check(mem_wdata == exp, $sformatf("slot %0d member %0d: %h expected %h", s, c, mem_wdata, exp));
      end
      @(negedge clk) act = 0; first = 0;
      #1 check(!mem_we, "no write when idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
