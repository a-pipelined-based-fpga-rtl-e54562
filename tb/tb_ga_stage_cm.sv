// Self-checking testbench for ga_stage_cm (default sizes: 16 children from 18
// members). A model parent list and member memory are driven together with
// random numbers; each child is worked out here: uniform crossover of parents
// 2k and 2k+1 with the mask drawn on the even clock (its complement on the
// odd one), then one bit toggled at (pos * 16) >> 16. The default instance
// mutates every child; a second instance with MUT_THRESH = 100 must mutate
// only when the 8-bit random number is below 100, and a third instance with
// MUT_BITS = 2 must toggle the bits at both positions (once if they coincide).
module tb_ga_stage_cm;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int SUB = 16, G = 18;

  logic        act;
  logic [4:0]  idx;
  logic [15:0] rnd_mask, rnd_pos2 [2];
  logic [15:0] rnd_pos [1];
  logic [7:0]  rnd_prob;
  logic [3:0]  par_addr_a [3], par_addr_b [3];
  logic [4:0]  par_a [3], par_b [3];
  logic [4:0]  mem_addr_a [3], mem_addr_b [3];
  logic [15:0] mem_a [3], mem_b [3];
  logic        child_we [3];
  logic [3:0]  child_addr [3];
  logic [15:0] child_wdata [3];
  logic [4:0]  parents [SUB];
  logic [15:0] members [32];

  ga_stage_cm u_dut (.clk, .rst_n, .act, .idx, .rnd_mask, .rnd_pos, .rnd_prob,
    .par_addr_a(par_addr_a[0]), .par_addr_b(par_addr_b[0]), .par_a(par_a[0]), .par_b(par_b[0]),
    .mem_addr_a(mem_addr_a[0]), .mem_addr_b(mem_addr_b[0]), .mem_a(mem_a[0]), .mem_b(mem_b[0]),
    .child_we(child_we[0]), .child_addr(child_addr[0]), .child_wdata(child_wdata[0]));
  ga_stage_cm #(.MUT_THRESH(100)) u_dut_p (.clk, .rst_n, .act, .idx, .rnd_mask, .rnd_pos, .rnd_prob,
    .par_addr_a(par_addr_a[1]), .par_addr_b(par_addr_b[1]), .par_a(par_a[1]), .par_b(par_b[1]),
    .mem_addr_a(mem_addr_a[1]), .mem_addr_b(mem_addr_b[1]), .mem_a(mem_a[1]), .mem_b(mem_b[1]),
    .child_we(child_we[1]), .child_addr(child_addr[1]), .child_wdata(child_wdata[1]));
  ga_stage_cm #(.MUT_BITS(2)) u_dut_2 (.clk, .rst_n, .act, .idx, .rnd_mask, .rnd_pos(rnd_pos2), .rnd_prob,
    .par_addr_a(par_addr_a[2]), .par_addr_b(par_addr_b[2]), .par_a(par_a[2]), .par_b(par_b[2]),
    .mem_addr_a(mem_addr_a[2]), .mem_addr_b(mem_addr_b[2]), .mem_a(mem_a[2]), .mem_b(mem_b[2]),
    .child_we(child_we[2]), .child_addr(child_addr[2]), .child_wdata(child_wdata[2]));

  for (genvar k = 0; k < 3; k++) begin : g_mem
    assign par_a[k] = parents[par_addr_a[k]];
    assign par_b[k] = parents[par_addr_b[k]];
    assign mem_a[k] = members[mem_addr_a[k]];
    assign mem_b[k] = members[mem_addr_b[k]];
  end

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
    logic [15:0] mask, pa, pb, xo, flip, flip2;
    int mutated_p = 0, kept_p = 0;
    act = 0; idx = 0; rnd_mask = 0; rnd_pos[0] = 0; rnd_pos2[0] = 0; rnd_pos2[1] = 0; rnd_prob = 0;
    for (int i = 0; i < 32; i++) members[i] = 16'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      for (int i = 0; i < G; i++) members[i] = 16'($urandom);
      for (int i = 0; i < SUB; i++) parents[i] = 5'($urandom % G);
      for (int c = 0; c < SUB; c++) begin
        @(negedge clk);
        act = 1; idx = 5'(c);
        rnd_mask = 16'($urandom); rnd_pos[0] = 16'($urandom); rnd_prob = 8'($urandom);
        rnd_pos2[0] = rnd_pos[0]; rnd_pos2[1] = (c % 5 == 0) ? rnd_pos[0] : 16'($urandom);
        #1;
        if (c % 2 == 0) mask = rnd_mask; else mask = ~mask;
        pa = members[parents[c & ~1]];
        pb = members[parents[c | 1]];
        xo = (pa & mask) | (pb & ~mask);
        flip = 16'(1) << ((int'(rnd_pos[0]) * 16) >> 16);
        flip2 = flip | (16'(1) << ((int'(rnd_pos2[1]) * 16) >> 16));
        check(child_we[0] && child_addr[0] == 4'(c), "child write enable and address");
        check(child_wdata[0] == (xo ^ flip),
              $sformatf("slot %0d child %0d: %h expected %h", s, c, child_wdata[0], xo ^ flip));
        check(child_wdata[1] == (rnd_prob < 100 ? (xo ^ flip) : xo), "mutation probability");
        check(child_wdata[2] == (xo ^ flip2), "two-bit mutation");
        if (rnd_prob < 100) mutated_p++; else kept_p++;
        if (c % 2 == 1) mask = ~mask;   // keep the even mask for reference
      end
      @(negedge clk) act = 0;
      #1 check(!child_we[0], "no write when idle");
    end
    check(mutated_p > 0 && kept_p > 0, "both mutation outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
