// t1b: L1 trigger broadcasts and inhibits.
//
// Rate controller: while the L1 de-randomizer (TFIFO) holds a decision, the
// L1 inhibit is clear and at least l1_spacing crossings have passed since
// the previous L1 broadcast, it requests a broadcast from the command
// sender (trig_req, byte {1, accept, event number[3:0], 00}). The request
// is held until trig_ack; the acknowledged entry is popped in that cycle.
//
// Occupancy controllers emulate the front-end buffers:
//   * L0 de-randomizer: +1 per L0 accept, -1 every readout_cycles crossings
//     while not empty; full at derand_thr entries;
//   * L1 buffer: +1 per positive L1 broadcast, -1 every l1_drain crossings
//     while not empty; full at l1buf_thr entries.
// Combined inhibits (combinational from registered state and inputs):
//   l0_inhibit = ECS | enabled L0 throttle | de-randomizer full
//                | AFIFO almost full | TFIFO almost full
//   l1_inhibit = ECS | enabled L1 throttle | L1 buffer full
// cnt_ce drives counters 26, 27, 28. The tasks follow the original design;
// the emulator model, thresholds and broadcast byte are this design's own.
module t1b
  import rs_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  tfifo_word_t tfifo_rdata,
  input  logic        tfifo_empty,
  output logic        tfifo_re,
  output logic        trig_req,
  output logic [7:0]  trig_data,
  input  logic        trig_ack,
  input  logic [7:0]  l1_spacing,
  input  logic        l0_accept,
  input  logic        ext_l0_throttle,
  input  logic        ext_l1_throttle,
  input  logic        thr_l0_en,
  input  logic        thr_l1_en,
  input  logic        ecs_l0_inh,
  input  logic        ecs_l1_inh,
  input  logic        afifo_af,
  input  logic        tfifo_af,
  input  logic [4:0]  derand_thr,
  input  logic [7:0]  readout_cycles,
  input  logic [7:0]  l1buf_thr,
  input  logic [15:0] l1_drain,
  output logic        l0_inhibit,
  output logic        l1_inhibit,
  output logic        derand_full,
  output logic        l1buf_full,
  output logic [4:0]  derand_occ,
  output logic [7:0]  l1buf_occ,
  output logic [2:0]  cnt_ce
);

  logic [7:0]  space_cnt;
  logic [7:0]  ro_timer;
  logic [15:0] dr_timer;

  assign derand_full = (derand_occ >= derand_thr);
  assign l1buf_full  = (l1buf_occ >= l1buf_thr);
  assign l0_inhibit  = ecs_l0_inh || (thr_l0_en && ext_l0_throttle) || derand_full
                       || afifo_af || tfifo_af;
  assign l1_inhibit  = ecs_l1_inh || (thr_l1_en && ext_l1_throttle) || l1buf_full;

  assign trig_req  = !tfifo_empty && !l1_inhibit && (space_cnt == 0);
  assign trig_data = {1'b1, tfifo_rdata.accept, tfifo_rdata.evid[3:0], 2'b00};
  assign tfifo_re  = trig_ack;

  wire ro_done = (derand_occ != 0) && (ro_timer >= readout_cycles - 1'b1);
  wire dr_done = (l1buf_occ != 0) && (dr_timer >= l1_drain - 1'b1);
  wire l1_pos  = trig_ack && tfifo_rdata.accept;

  always_ff @(posedge clk) begin
    if (rst) begin
      space_cnt  <= '0;
      ro_timer   <= '0;
      dr_timer   <= '0;
      derand_occ <= '0;
      l1buf_occ  <= '0;
      cnt_ce     <= '0;
    end else begin
      if (trig_ack)            space_cnt <= l1_spacing;
      else if (space_cnt != 0) space_cnt <= space_cnt - 1'b1;

      if (derand_occ == 0 || ro_done) ro_timer <= '0;
      else                            ro_timer <= ro_timer + 1'b1;
      derand_occ <= derand_occ + 5'(l0_accept) - 5'(ro_done);

      if (l1buf_occ == 0 || dr_done) dr_timer <= '0;
      else                           dr_timer <= dr_timer + 1'b1;
      l1buf_occ <= l1buf_occ + 8'(l1_pos) - 8'(dr_done);

      cnt_ce[0] <= trig_ack;
      cnt_ce[1] <= tfifo_re && tfifo_rdata.accept;
      cnt_ce[2] <= l1_pos;
    end
  end

  // The emulators must never wrap: the inhibit has to stop accepts in time.
  assert property (@(posedge clk) disable iff (rst)
                   !(l0_accept && derand_occ == 5'h1F && !ro_done));

endmodule
