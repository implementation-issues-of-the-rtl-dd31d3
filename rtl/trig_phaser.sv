// trig_phaser: brings externally clocked trigger data onto the bunch clock
// by clock-edge selection.
//
// The source sends W-bit data with a strobe. The data are captured on the
// strobe's rising edge (First Pipeline). Off-chip, the strobe is delayed by
// about 5 ns and or'ed with itself; that widened strobe enters here as
// tested_strobe and is sampled on both edges of the local clock. The edge
// chosen at timing alignment (phase_neg = 1: falling edge) decides the path:
//   falling edge: First -> Second Pipeline (falling edge) -> Third (rising)
//   rising edge : First -> Third Pipeline (rising), Second skipped
// valid is the widened strobe as seen on the chosen edge, aligned with q;
// for L1 it is the write enable of the trigger de-randomizer. Latency from
// the chosen sampling edge: half a cycle (falling) or one cycle (rising).
// The pipeline structure follows the original design; the port naming and
// the phase_neg polarity are this design's choice.
module trig_phaser #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         strobe,
  input  logic [W-1:0] data,
  input  logic         tested_strobe,
  input  logic         phase_neg,
  output logic [W-1:0] q,
  output logic         valid
);

  logic [W-1:0] first_q, second_q;
  logic         seen_neg;

  always_ff @(posedge strobe) first_q <= data;

  always_ff @(negedge clk) begin
    second_q <= first_q;
    seen_neg <= tested_strobe;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q     <= '0;
      valid <= 1'b0;
    end else if (phase_neg) begin
      q     <= second_q;
      valid <= seen_neg;
    end else begin
      q     <= first_q;
      valid <= tested_strobe;
    end
  end

endmodule
