// ttc_encoder: TTC channel A/B time-division multiplexer and bi-phase mark
// encoder.
//
// One bunch period (25 ns, four clk4x cycles) carries two 12.5 ns cells:
// channel A first, while the basic clock is low, then channel B. In
// bi-phase mark code every cell begins with a transition of the line and a
// 1 adds a second transition in the middle of the cell. The module runs on
// the 160 MHz clock with a 2-bit quarter counter: quarter 0 begins cell A,
// 1 is its middle, 2 begins cell B, 3 is its middle. a and b are sampled at
// the edge that begins cell A and must be stable there. Reset sets the
// counter to 3. clk4x is expected to rise with the basic clock and rst to be
// released by a register on the rising basic-clock edge: the first clk4x
// edge after reset is then 6.25 ns after that edge and closes quarter 3, so
// cell A begins at the falling edge of the basic clock. The line waveform follows the
// original design; encoding in clocked logic rather than discrete ECL parts
// is this design's choice.
module ttc_encoder (
  input  logic clk4x,
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic q,
  output logic [1:0] quarter
);

  logic a_hold, b_hold;

  always_ff @(posedge clk4x) begin
    if (rst) begin
      quarter <= 2'd3;
      q       <= 1'b0;
      a_hold  <= 1'b0;
      b_hold  <= 1'b0;
    end else begin
      quarter <= quarter + 2'd1;
      unique case (quarter)
        2'd0: begin q <= ~q; a_hold <= a; b_hold <= b; end  // start of cell A
        2'd1: if (a_hold) q <= ~q;                  // middle of cell A
        2'd2: q <= ~q;                              // start of cell B
        2'd3: if (b_hold) q <= ~q;                  // middle of cell B
      endcase
    end
  end

endmodule
