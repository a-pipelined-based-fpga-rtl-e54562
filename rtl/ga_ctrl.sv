// Pipeline controller: time slots, bank rotation and run control.
//
// Time is divided into slots of GROUP = SUB_SIZE + P_BEST clocks (`cyc` counts
// 0..GROUP-1, `slot` counts slots from the start of a run). The population
// is split into four subpopulations held in four memory banks, and in slot t
// stage M works on bank t mod 4, E on (t-1) mod 4, S on (t-2) mod 4 and CM on
// (t-3) mod 4, so every subpopulation walks through M, E, S, CM in four
// consecutive slots and returns to M with its new generation:
//
//   slot   M        E        S        CM
//    0     P1
//    1     P2       P1
//    2     P3+bP1   P2       P1
//    3     P4+bP2   P3       P2       P1
//    4     P1'+bP3  P4       P3       P2      (P1' = children of P1)
//
// While the pipeline fills, a stage is enabled only from the slot in which the
// first subpopulation reaches it. `init_pop` (slots 0..3) makes M fill the
// banks with random chromosomes; `rand_imm` (slots 0..1) makes the immigrants
// random because no subpopulation has been evaluated yet. M and E handle one
// member per clock for the whole slot; S and CM one parent or child per clock
// for the first SUB_SIZE clocks.
//
// A generation is counted each time CM finishes the last subpopulation. The
// run (started by a one-clock `start`) ends at the end of the slot in which
// the GN-th generation is counted, or at once when E reports a score of 0
// (`found`); `done` then stays high until the next start. The slot table and
// the stop rules follow the method; slot length and counting are this
// design's choices.
module ga_ctrl #(
  parameter int unsigned SUB_SIZE = ga_pkg::DEF_SUB_SIZE,
  parameter int unsigned P_BEST   = ga_pkg::DEF_P_BEST,
  parameter int unsigned GN       = ga_pkg::DEF_GN,
  localparam int unsigned NSUB    = ga_pkg::STAGES,
  localparam int unsigned GROUP   = SUB_SIZE + P_BEST,
  localparam int unsigned AW      = $clog2(GROUP),
  localparam int unsigned BW      = $clog2(NSUB),
  localparam int unsigned TW      = $clog2(NSUB * GN + NSUB) + 1,
  localparam int unsigned GW      = $clog2(GN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          found,
  output logic          busy,
  output logic          done,
  output logic          solved,
  output logic [AW-1:0] cyc,
  output logic [TW-1:0] slot,
  output logic          first,
  output logic          slot_end,
  output logic [BW-1:0] bank_m,
  output logic [BW-1:0] bank_e,
  output logic [BW-1:0] bank_s,
  output logic [BW-1:0] bank_cm,
  output logic          act_m,
  output logic          act_e,
  output logic          act_s,
  output logic          act_cm,
  output logic          init_pop,
  output logic          rand_imm,
  output logic [GW-1:0] generation
);
  logic gen_tick;

  assign first    = busy && cyc == '0;
  assign slot_end = busy && int'(cyc) == GROUP - 1;

  assign bank_e  = bank_m - BW'(1);
  assign bank_s  = bank_m - BW'(2);
  assign bank_cm = bank_m - BW'(3);

  assign act_m  = busy;
  assign act_e  = busy && slot >= TW'(1);
  assign act_s  = busy && slot >= TW'(2) && int'(cyc) < SUB_SIZE;
  assign act_cm = busy && slot >= TW'(3) && int'(cyc) < SUB_SIZE;

  assign init_pop = slot < TW'(NSUB);
  assign rand_imm = slot < TW'(2);

  // CM finishes the last subpopulation at the end of this slot.
  assign gen_tick = slot_end && slot >= TW'(3) && int'(bank_cm) == NSUB - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      solved     <= 1'b0;
      cyc        <= '0;
      slot       <= '0;
      bank_m     <= '0;
      generation <= '0;
    end else if (start) begin
      busy       <= 1'b1;
      done       <= 1'b0;
      solved     <= 1'b0;
      cyc        <= '0;
      slot       <= '0;
      bank_m     <= '0;
      generation <= '0;
    end else if (busy) begin
      if (found) begin
        busy   <= 1'b0;
        done   <= 1'b1;
        solved <= 1'b1;
      end else if (slot_end) begin
        cyc    <= '0;
        slot   <= slot + TW'(1);
        bank_m <= bank_m + BW'(1);
        if (gen_tick) begin
          generation <= generation + GW'(1);
          if (int'(generation) + 1 >= GN) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end else begin
        cyc <= cyc + AW'(1);
      end
    end
  end

  initial assert (NSUB == 4) else $error("ga_ctrl: the bank rotation needs four subpopulations");
endmodule
