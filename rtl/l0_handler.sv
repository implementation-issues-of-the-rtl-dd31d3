// l0_handler: L0 trigger handling.
//
// Each bunch crossing it takes the phased external L0 word, the periodic
// (sequencer) trigger and the random trigger and forms one L0 decision:
//   * external sync check: a valid external word whose bunch ID differs
//     from the local bunch counter is a sync error, and its accept is
//     turned into NO;
//   * priority external > periodic > random picks the source, which also
//     fixes the L1 frc bit (external: the word's frc bit, periodic:
//     always forced, random: the random generator's L1 frc);
//   * the trigger is refused while the combined L0 inhibit is set, while
//     the gap generator is active, or when the L0 Accept FIFO is full;
//   * the gap generator refuses the gap_len crossings after an accept.
// An accepted trigger writes {frc, ext, event number} into the AFIFO and
// sends YES on TTC channel A. All outputs are registered: one clock cycle
// from inputs to chan_a/afifo_we. cnt_ce drives counters 0..15 of Table-1
// order ("gated" = not refused). The functions listed follow the original
// design; the word formats, priority order and frc rules are this
// design's choice.
module l0_handler
  import rs_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              ecr,          // clears the event number
  input  logic              ext_en,
  input  logic              ext_valid,
  input  l0_word_t          ext_word,
  input  logic [BX_W-1:0]   bx,
  input  logic              per_trig,
  input  logic              rnd_trig,
  input  logic              rnd_l1force,
  input  logic              l0_inhibit,
  input  logic [7:0]        gap_len,
  input  logic              afifo_full,
  output logic              afifo_we,
  output afifo_word_t       afifo_wdata,
  output logic              chan_a,
  output logic [15:0]       cnt_ce,
  output logic              rnd_force_ce, // accepted random trigger forced at L1
  output logic              gap_refused   // a trigger was refused by the gap generator
);

  logic [7:0]  gap_cnt;
  logic [23:0] evnum;

  logic sync_err, ext_acc_raw, ext_acc, any, blocked, accept, force_sel, ext_sel;

  always_comb begin
    ext_acc_raw = ext_en && ext_valid && ext_word.accept;
    sync_err    = ext_en && ext_valid && (ext_word.bcid != bx);
    ext_acc     = ext_acc_raw && !sync_err;
    any         = ext_acc || per_trig || rnd_trig;
    blocked     = l0_inhibit || (gap_cnt != 0) || afifo_full;
    accept      = any && !blocked;
    ext_sel     = ext_acc;
    if (ext_acc)       force_sel = ext_word.frc;
    else if (per_trig) force_sel = 1'b1;
    else               force_sel = rnd_l1force;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gap_cnt      <= '0;
      evnum        <= '0;
      afifo_we     <= 1'b0;
      afifo_wdata  <= '0;
      chan_a       <= 1'b0;
      cnt_ce       <= '0;
      rnd_force_ce <= 1'b0;
      gap_refused  <= 1'b0;
    end else begin
      if (accept)            gap_cnt <= gap_len;
      else if (gap_cnt != 0) gap_cnt <= gap_cnt - 1'b1;

      if (ecr)         evnum <= '0;
      else if (accept) evnum <= evnum + 1'b1;

      afifo_we    <= accept;
      afifo_wdata <= '{frc: force_sel, ext: ext_sel, evid: evnum[6:0]};
      chan_a      <= accept;
      gap_refused <= any && (gap_cnt != 0);

      cnt_ce[0]  <= sync_err;
      cnt_ce[1]  <= sync_err && !blocked;
      cnt_ce[2]  <= ext_acc_raw && sync_err;
      cnt_ce[3]  <= any;
      cnt_ce[4]  <= accept;
      cnt_ce[5]  <= any && force_sel;
      cnt_ce[6]  <= accept && force_sel;
      cnt_ce[7]  <= ext_acc;
      cnt_ce[8]  <= ext_acc && !blocked;
      cnt_ce[9]  <= ext_acc && ext_word.frc;
      cnt_ce[10] <= ext_acc && ext_word.frc && !blocked;
      cnt_ce[11] <= per_trig;
      cnt_ce[12] <= per_trig && !blocked;
      cnt_ce[13] <= rnd_trig;
      cnt_ce[14] <= rnd_trig && !blocked;
      cnt_ce[15] <= 1'b0;  // reserved
      rnd_force_ce <= accept && !ext_acc && !per_trig && rnd_l1force;
    end
  end

endmodule
