// cmd_gen: command generator, internal triggers and dedicated resets.
//
// Calibration sequencer (state machine IDLE -> REQ -> DELAY):
//   every cal_turns turns (0 = off), from the crossing after cal_bx, it requests the
//   broadcast of command byte cal_cmd and holds cmd_req until cmd_ack;
//   on the acknowledge it gives the one-cycle cal_pulse that accompanies
//   the command, waits cal_delay crossings and fires an internal L0
//   trigger (the calibration trigger).
// Periodic trigger: one internal L0 trigger every per_period crossings
//   (0 = off). per_trig carries periodic and calibration triggers.
// ECR: an ECS strobe becomes a one-cycle ecr_req.
// Dedicated resets: node_rst[i] is the system reset or a one-cycle reset
//   pulse requested by the ECS for node i. All outputs are registered.
// These tasks follow the original design; the exact sequences are this
// design's choice.
// An assertion states the command handshake: a request stays up until the
// command sender acknowledges it.
module cmd_gen
  import rs_pkg::*;
#(
  parameter int unsigned NRST = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [BX_W-1:0] bx,
  input  logic            orbit,
  input  logic [BX_W-1:0] cal_bx,
  input  logic [7:0]      cal_turns,
  input  logic [7:0]      cal_delay,
  input  logic [7:0]      cal_cmd,
  input  logic [15:0]     per_period,
  input  logic            ecr_strobe,
  input  logic [NRST-1:0] rst_strobe,
  output logic            cmd_req,
  output logic [7:0]      cmd_data,
  input  logic            cmd_ack,
  output logic            per_trig,
  output logic            cal_pulse,
  output logic            ecr_req,
  output logic [NRST-1:0] node_rst
);

  typedef enum logic [1:0] {IDLE, REQ, DELAY} cal_state_e;
  cal_state_e state;

  logic [7:0]  turn_cnt;
  logic [7:0]  delay_cnt;
  logic [15:0] per_cnt;
  logic        cal_trig, periodic;

  always_comb begin
    cmd_req  = (state == REQ);
    cmd_data = cal_cmd;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      turn_cnt  <= '0;
      delay_cnt <= '0;
      per_cnt   <= '0;
      per_trig  <= 1'b0;
      cal_pulse <= 1'b0;
      ecr_req   <= 1'b0;
      cal_trig  <= 1'b0;
      periodic  <= 1'b0;
    end else begin
      cal_pulse <= 1'b0;
      cal_trig  <= 1'b0;
      unique case (state)
        IDLE: begin
          if (orbit) turn_cnt <= (turn_cnt + 1'b1 >= cal_turns) ? '0 : turn_cnt + 1'b1;
          if (cal_turns != 0 && turn_cnt == 0 && bx == cal_bx) state <= REQ;
        end
        REQ: if (cmd_ack) begin
          cal_pulse <= 1'b1;
          delay_cnt <= cal_delay;
          state     <= DELAY;
        end
        DELAY: begin
          if (delay_cnt == 0) begin
            cal_trig <= 1'b1;
            state    <= IDLE;
          end else begin
            delay_cnt <= delay_cnt - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase

      periodic <= 1'b0;
      if (per_period == 0) per_cnt <= '0;
      else if (per_cnt >= per_period - 1'b1) begin
        per_cnt  <= '0;
        periodic <= 1'b1;
      end else per_cnt <= per_cnt + 1'b1;

      per_trig <= periodic || cal_trig;
      ecr_req  <= ecr_strobe;
    end
  end

  always_ff @(posedge clk) begin
    node_rst <= {NRST{rst}} | rst_strobe;
  end

  // a command request stays up until the sender takes it
  assert property (@(posedge clk) disable iff (rst) (cmd_req && !cmd_ack) |=> cmd_req);

endmodule
