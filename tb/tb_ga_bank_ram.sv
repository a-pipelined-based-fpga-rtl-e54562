// Self-checking testbench for ga_bank_ram: random writes to every bank and
// address of a 4-bank, 18-word, 3-read-port memory are mirrored in a model
// array; all three read ports are compared with the model each cycle, and a
// read of the word being written must still return the old value.
module tb_ga_bank_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we;
  logic [1:0]  wbank;
  logic [4:0]  waddr;
  logic [15:0] wdata;
  logic [1:0]  rbank [3];
  logic [4:0]  raddr [3];
  logic [15:0] rdata [3];
  logic [15:0] model [4][18];

  ga_bank_ram #(.W(16), .DEPTH(18), .BANKS(4), .NRD(3)) u_dut (
    .clk, .we, .wbank, .waddr, .wdata, .rbank, .raddr, .rdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wbank = 0; waddr = 0; wdata = 0;
    for (int p = 0; p < 3; p++) begin rbank[p] = 0; raddr[p] = 0; end
    // fill every word
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < 18; a++) begin
        @(negedge clk);
        we = 1; wbank = 2'(b); waddr = 5'(a); wdata = 16'($urandom);
        model[b][a] = wdata;
      end
    @(negedge clk) we = 0;
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      wbank = 2'($urandom); waddr = 5'($urandom % 18); wdata = 16'($urandom);
      for (int p = 0; p < 3; p++) begin
        rbank[p] = 2'($urandom); raddr[p] = 5'($urandom % 18);
      end
      if (i % 7 == 0) begin rbank[0] = wbank; raddr[0] = waddr; end
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] !== model[rbank[p]][raddr[p]]) begin
          failures++;
          $display("FAIL: port %0d bank %0d addr %0d read %h expected %h", p, rbank[p], raddr[p],
                   rdata[p], model[rbank[p]][raddr[p]]);
        end
      end
      @(posedge clk);
      if (we) model[wbank][waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
