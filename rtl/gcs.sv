// gcs: Generic Command Sender, TTC shifter, bunch/orbit counter and general
// status.
//
// Bunch counter: counts crossings 0..BX_PER_ORBIT-1. With internal
// synchronization it wraps by itself (internal orbit); with external
// synchronization an external orbit pulse restarts it at 0. orbit pulses
// while bx is 0. The external orbit counts as present if one was seen in
// the last two turns.
//
// Broadcast arbitration, one TTC short broadcast at a time on channel B:
//   1. BCR (bit 0) at bunch bcr_bx every turn when enabled, carrying ECR
//      (bit 1) if an ECR is pending; no other broadcast may start within
//      FRAME crossings before bcr_bx, so the BCR is never refused;
//      with BCR disabled a pending ECR goes out alone, first in line;
//   2. a command: accepted into a one-entry slot (cmd_ack) together with
//      the bunch number of its request; it goes out at once if the sender
//      is free, otherwise it is postponed to the same bunch of the next
//      turn, and so on; a command requested in the bunches reserved for
//      or occupied by the BCR frame is moved to the first bunch after it,
//      since it could never be sent at its own bunch;
//   3. an L1 trigger broadcast: sent as soon as the sender is free
//      (trig_ack), otherwise simply kept waiting.
// TTC shifter: a frame {0, 0, data[7:0], hamming[4:0], 1} leaves MSB first,
// one bit per crossing, starting the cycle after it is chosen; the line
// idles at 1. A new frame may follow the previous one without a gap.
// The priorities, the postponement rule and the orbit functions follow the
// original design; the frame format is the standard TTC short broadcast
// and the guard window is this design's own mechanism.
module gcs
  import rs_pkg::*;
#(
  parameter int unsigned BX_PER_TURN = BX_PER_ORBIT,
  parameter int unsigned FRAME       = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            use_ext_orbit,
  input  logic            ext_orbit,
  input  logic            bcr_en,
  input  logic [BX_W-1:0] bcr_bx,
  input  logic            ecr_req,
  input  logic            cmd_req,
  input  logic [7:0]      cmd_data,
  output logic            cmd_ack,
  input  logic            trig_req,
  input  logic [7:0]      trig_data,
  output logic            trig_ack,
  input  logic [15:0]     status_in,
  output logic [BX_W-1:0] bx,
  output logic            orbit,
  output logic            chan_b,
  output logic            ext_orbit_present,
  output logic [31:0]     status,
  output logic            ev_bcr,        // a BCR broadcast started
  output logic            ev_ecr,        // an ECR went out (alone or with BCR)
  output logic            ev_cmd,        // a command broadcast started
  output logic            ev_postponed   // a command was refused and postponed
);

  typedef enum logic [2:0] {SEL_NONE, SEL_BCR, SEL_ECR, SEL_CMD, SEL_TRIG} sel_e;

  logic [FRAME-1:0] sh_reg;
  logic [4:0]       sh_cnt;
  logic             ecr_pend;
  logic             cmd_pend;
  logic [7:0]       cmd_pend_data;
  logic [BX_W-1:0]  cmd_pend_bx;
  localparam int unsigned AGE_W = $clog2(2*BX_PER_TURN+1);
  localparam logic [AGE_W-1:0] AGE_MAX = AGE_W'(2*BX_PER_TURN);
  logic [AGE_W-1:0] orbit_age;

  sel_e        sel;
  logic        free, guard_ok, bcr_now, cmd_go;
  logic [7:0]  cmd_go_data;
  logic [7:0]  frame_data;
  logic [BX_W:0] bcr_dist;
  logic [BX_W:0] bcr_since;    // crossings since bcr_bx
  logic          bcr_zone;     // bunch reserved for, or occupied by, the BCR frame
  logic [BX_W-1:0] bcr_after;  // first bunch at which the BCR frame has left

  always_comb begin
    free = (sh_cnt <= 1);
    if (bcr_bx >= bx) bcr_dist = (BX_W+1)'(bcr_bx) - (BX_W+1)'(bx);
    else              bcr_dist = (BX_W+1)'(bcr_bx) + (BX_W+1)'(BX_PER_TURN) - (BX_W+1)'(bx);
    if (bx >= bcr_bx) bcr_since = (BX_W+1)'(bx) - (BX_W+1)'(bcr_bx);
    else              bcr_since = (BX_W+1)'(bx) + (BX_W+1)'(BX_PER_TURN) - (BX_W+1)'(bcr_bx);
    guard_ok = !bcr_en || (bcr_dist >= (BX_W+1)'(FRAME));
    bcr_zone = bcr_en && (!guard_ok || bcr_since < (BX_W+1)'(FRAME));
    if (32'(bcr_bx) + FRAME >= BX_PER_TURN) bcr_after = BX_W'(32'(bcr_bx) + FRAME - BX_PER_TURN);
    else                                    bcr_after = BX_W'(32'(bcr_bx) + FRAME);
    bcr_now  = bcr_en && (bx == bcr_bx);

    cmd_go      = (cmd_pend && bx == cmd_pend_bx) || (cmd_req && !cmd_pend);
    cmd_go_data = cmd_pend ? cmd_pend_data : cmd_data;

    sel        = SEL_NONE;
    frame_data = '0;
    if (free) begin
      if (bcr_now) begin
        sel = SEL_BCR;  frame_data = {6'b0, ecr_pend || ecr_req, 1'b1};
      end else if (!bcr_en && (ecr_pend || ecr_req)) begin
        sel = SEL_ECR;  frame_data = 8'b0000_0010;
      end else if (cmd_go && guard_ok) begin
        sel = SEL_CMD;  frame_data = cmd_go_data;
      end else if (trig_req && guard_ok) begin
        sel = SEL_TRIG; frame_data = trig_data;
      end
    end

    cmd_ack  = cmd_req && !cmd_pend;
    trig_ack = (sel == SEL_TRIG);
    chan_b   = (sh_cnt != 0) ? sh_reg[FRAME-1] : 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bx            <= '0;
      sh_reg        <= '1;
      sh_cnt        <= '0;
      ecr_pend      <= 1'b0;
      cmd_pend      <= 1'b0;
      cmd_pend_data <= '0;
      cmd_pend_bx   <= '0;
      orbit_age     <= '1;
      ev_bcr        <= 1'b0;
      ev_ecr        <= 1'b0;
      ev_cmd        <= 1'b0;
      ev_postponed  <= 1'b0;
    end else begin
      // bunch counter and orbit
      if ((use_ext_orbit && ext_orbit) || bx == BX_W'(BX_PER_TURN - 1)) bx <= '0;
      else                                                               bx <= bx + 1'b1;
      if (ext_orbit)                                 orbit_age <= '0;
      else if (orbit_age < AGE_MAX)          orbit_age <= orbit_age + 1'b1;

      // TTC shifter
      if (sel != SEL_NONE) begin
        sh_reg <= {2'b00, frame_data, ttc_hamming(frame_data), 1'b1};
        sh_cnt <= 5'(FRAME);
      end else if (sh_cnt != 0) begin
        sh_reg <= {sh_reg[FRAME-2:0], 1'b1};
        sh_cnt <= sh_cnt - 1'b1;
      end

      // ECR bookkeeping
      if (sel == SEL_ECR || (sel == SEL_BCR && frame_data[1])) ecr_pend <= 1'b0;
      else if (ecr_req)                                        ecr_pend <= 1'b1;

      // command slot: filled on acceptance, emptied when sent
      if (sel == SEL_CMD) begin
        cmd_pend <= 1'b0;
      end else if (cmd_ack) begin
        cmd_pend      <= 1'b1;
        cmd_pend_data <= cmd_data;
        cmd_pend_bx   <= bcr_zone ? bcr_after : bx;
      end

      ev_bcr       <= (sel == SEL_BCR);
      ev_ecr       <= (sel == SEL_ECR) || (sel == SEL_BCR && frame_data[1]);
      ev_cmd       <= (sel == SEL_CMD);
      ev_postponed <= cmd_go && (sel != SEL_CMD);
    end
  end

  assign orbit             = (bx == '0);
  assign ext_orbit_present = (orbit_age < AGE_MAX);
  assign status = {status_in, 11'b0, cmd_pend, ecr_pend, (sh_cnt != 0),
                   use_ext_orbit, ext_orbit_present};

  // With internal synchronization a BCR never finds the shifter busy.
  assert property (@(posedge clk) disable iff (rst) (bcr_now && !use_ext_orbit) |-> free);

endmodule
