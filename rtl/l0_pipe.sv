// l0_pipe: L0 external trigger phasing and pipelining.
//
// The L0 trigger word arrives with a strobe every bunch crossing. A
// trig_phaser moves it onto the bunch clock; a BX without the strobe raises
// missing (one cycle, aligned with the depth-0 tap) and the sticky
// missing_seen. The phased word and its valid bit then pass a pipeline of
// STAGES registers; depth (0..STAGES-1) picks the tap, so the total latency
// from the phaser output is depth+1 clock cycles. The 16-stage programmable
// pipeline and strobe check follow the original design; the tap numbering is
// this design's choice.
module l0_pipe #(
  parameter int unsigned W      = 16,
  parameter int unsigned STAGES = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      strobe,
  input  logic [W-1:0]              data,
  input  logic                      tested_strobe,
  input  logic                      phase_neg,
  input  logic [$clog2(STAGES)-1:0] depth,
  output logic [W-1:0]              q,
  output logic                      q_valid,
  output logic                      missing,
  output logic                      missing_seen
);

  logic [W-1:0] ph_q;
  logic         ph_valid;

  trig_phaser #(.W(W)) u_phaser (
    .clk, .rst, .strobe, .data, .tested_strobe, .phase_neg,
    .q(ph_q), .valid(ph_valid)
  );

  logic [W:0] stage [STAGES];  // {valid, data}

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) stage[i] <= '0;
      missing_seen <= 1'b0;
      missing      <= 1'b0;
    end else begin
      stage[0] <= {ph_valid, ph_q};
      for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
      missing <= !ph_valid;
      if (!ph_valid) missing_seen <= 1'b1;
    end
  end

  assign {q_valid, q} = stage[depth];

endmodule
