// Scoreboard for a running ga_top, used by the top-level testbenches.
//
// It follows the run with its own slot and clock counters and keeps shadow
// copies of the four kinds of bank contents (members, scores, parent indices,
// children), updated from the write ports it is connected to. Every clock it
// checks that:
//   - M writes bank slot mod 4; its first SUB members are the children CM
//     wrote into that bank in the previous slot (random in slots 0..3), its
//     last P members are the best P of the subpopulation scored in the
//     previous slot, ties to the earlier member (random in slots 0..1);
//   - E reads the member M wrote and scores it as the number of bits that
//     differ from the target;
//   - S writes a parent that scores no worse than either tournament candidate;
//   - every child bit comes from one of its two parents, except at most one
//     toggled bit;
//   - the run stops on the clock after a score of 0, or after
//     (4*GN+3)*(SUB+P) clocks with generation = GN, and the reported best is
//     the lowest score seen and matches its chromosome.
// It counts how often each mechanism happened so the testbench can demand
// that every one was exercised.
module ga_top_checker #(
  parameter int SUB = 16,
  parameter int P   = 2,
  parameter int CW  = 16,
  parameter int GN  = 64,
  localparam int G  = SUB + P,
  localparam int AW = $clog2(G),
  localparam int FW = $clog2(CW + 1)
) (
  input  logic          clk,
  input  logic          start,
  input  logic [CW-1:0] target,
  input  logic          busy,
  input  logic          done,
  input  logic          solved,
  input  int            generation,
  input  logic          best_valid,
  input  logic [CW-1:0] best_chrom,
  input  logic [FW-1:0] best_fit,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_waddr,
  input  logic [CW-1:0] mem_wdata,
  input  logic [1:0]    bank_m,
  input  logic          e_valid,
  input  logic [CW-1:0] e_chrom,
  input  logic [FW-1:0] e_fit,
  input  logic          par_we,
  input  logic [AW-1:0] par_wdata,
  input  logic [AW-1:0] s_cand_a,
  input  logic [AW-1:0] s_cand_b,
  input  logic          ch_we,
  input  logic [CW-1:0] ch_wdata,
  output int            checks,
  output int            failures,
  output int            n_init_random,
  output int            n_random_imm,
  output int            n_transfer_imm,
  output int            n_children_in,
  output int            n_selections,
  output int            n_crossovers,
  output int            n_mutations,
  output int            n_solved_stops,
  output int            n_limit_stops,
  output int            n_best_updates
);
  logic [CW-1:0] sh_mem [4][G];
  int            sh_fit [4][G];
  int            sh_par [4][SUB];
  logic [CW-1:0] sh_child [4][SUB];
  logic [CW-1:0] eb_chrom [P];
  int            eb_fit [P];
  logic [CW-1:0] imm [P];
  logic          running = 1'b0;
  logic          stop_due = 1'b0;
  int            tslot, tcyc, tclk, run_min;

  initial begin
    checks = 0; failures = 0;
    n_init_random = 0; n_random_imm = 0; n_transfer_imm = 0; n_children_in = 0;
    n_selections = 0; n_crossovers = 0; n_mutations = 0;
    n_solved_stops = 0; n_limit_stops = 0; n_best_updates = 0;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (slot %0d clock %0d)", what, tslot, tcyc); end
  endtask

  function automatic int score(input logic [CW-1:0] c);
    return $countones(c ^ target);
  endfunction

  always @(posedge clk) begin
    if (start) begin
      running = 1'b1; stop_due = 1'b0;
      tslot = 0; tcyc = 0; tclk = 0; run_min = CW + 1;
    end else if (running) begin
      int bm, be, bs, bc, f;
      bm = tslot % 4; be = (tslot + 3) % 4; bs = (tslot + 2) % 4; bc = (tslot + 1) % 4;
      check(busy, "busy while the run lasts");
      check(!stop_due, "run did not stop after a solution");
      // ---- M
      check(mem_we && int'(mem_waddr) == tcyc && int'(bank_m) == bm, "M write port");
      if (tcyc < SUB) begin
        if (tslot < 4) n_init_random++;
        else begin
          check(mem_wdata == sh_child[bm][tcyc], "M copies the children of the bank");
          n_children_in++;
        end
      end else begin
        if (tslot < 2) n_random_imm++;
        else begin
          check(mem_wdata == imm[tcyc - SUB], $sformatf("immigrant %0d is %h, expected %h",
                                                        tcyc - SUB, mem_wdata, imm[tcyc - SUB]));
          n_transfer_imm++;
        end
      end
      // ---- E
      check(e_valid == (tslot >= 1), "E active from slot 1");
      if (tslot >= 1) begin
        f = score(sh_mem[be][tcyc]);
        check(e_chrom == sh_mem[be][tcyc] && int'(e_fit) == f, "E scores the member M wrote");
        sh_fit[be][tcyc] = f;
        if (tcyc == 0) for (int j = 0; j < P; j++) eb_fit[j] = CW + 1;
        for (int j = 0; j < P; j++)
          if (f < eb_fit[j]) begin
            for (int k = P - 1; k > j; k--) begin eb_fit[k] = eb_fit[k-1]; eb_chrom[k] = eb_chrom[k-1]; end
            eb_fit[j] = f; eb_chrom[j] = sh_mem[be][tcyc];
            break;
          end
        if (f < run_min) begin run_min = f; n_best_updates++; end
        if (f == 0) stop_due = 1'b1;
      end
      // ---- S
      check(par_we == (tslot >= 2 && tcyc < SUB), "S active window");
      if (par_we) begin
        int pw;
        pw = int'(par_wdata);
        check(pw < G && sh_fit[bs][pw] <= sh_fit[bs][s_cand_a] && sh_fit[bs][pw] <= sh_fit[bs][s_cand_b]
              && (pw == int'(s_cand_a) || pw == int'(s_cand_b)), "tournament winner");
        sh_par[bs][tcyc] = pw;
        n_selections++;
      end
      // ---- CM
      check(ch_we == (tslot >= 3 && tcyc < SUB), "CM active window");
      if (ch_we) begin
        logic [CW-1:0] pa, pb;
        int odd_bits;
        pa = sh_mem[bc][sh_par[bc][tcyc & ~1]];
        pb = sh_mem[bc][sh_par[bc][tcyc | 1]];
        odd_bits = $countones((ch_wdata ^ pa) & (ch_wdata ^ pb));
        check(odd_bits <= 1, "child bits come from its parents but one");
        if (pa != pb) n_crossovers++;
        if (odd_bits == 1) n_mutations++;
        sh_child[bc][tcyc] = ch_wdata;
      end
      // shadow write of M (after E has read the old bank contents)
      sh_mem[bm][tcyc] = mem_wdata;
      // ---- advance
      tclk++;
      if (stop_due) begin
        running = 1'b0;
      end else if (tcyc == G - 1) begin
        tcyc = 0;
        imm = eb_chrom;
        if (tslot >= 3 && (tslot - 3) % 4 == 3 && (tslot - 6) / 4 + 1 >= GN) running = 1'b0;
        tslot++;
      end else tcyc++;
      if (!running) begin
        // the run ends at this clock edge: look one step later
        fork begin
          #1;
          check(!busy && done, "run ends");
          if (stop_due) begin
            check(solved && best_valid && best_fit == 0 && best_chrom == target, "solution reported");
            n_solved_stops++;
          end else begin
            check(!solved && generation == GN && tclk == (4 * GN + 3) * G,
                  $sformatf("generation limit: %0d generations after %0d clocks", generation, tclk));
            n_limit_stops++;
          end
          check(best_valid && int'(best_fit) == run_min && score(best_chrom) == run_min,
                "best-solution comparator");
        end join_none
      end
    end else begin
      check(!busy, "idle between runs");
    end
  end
endmodule
