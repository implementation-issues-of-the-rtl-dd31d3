// rnd_gen: random trigger generator.
//
// Every bunch crossing a 32-bit maximal-length LFSR, advanced 16 steps,
// is compared with the programmable l0_rate: l0_trig is set when the upper
// 16 LFSR bits are below it, so the trigger probability per crossing is l0_rate/65536 and the
// arrivals form a Bernoulli sequence that approximates a Poisson process.
// A second, independent LFSR decides which random L0 triggers are also
// forced at L1, according to l1_mode: 0 none, 1 every one, 2 a random subset
// with probability l1_rate/65536. Outputs are registered, one cycle after
// the LFSR step. Random L0 triggers, the L1 forcing of a subset and the
// none/every options follow the original design; the LFSR method is this
// design's own (the original rate formula is not available).
module rnd_gen (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [15:0] l0_rate,
  input  logic [1:0]  l1_mode,
  input  logic [15:0] l1_rate,
  output logic        l0_trig,
  output logic        l1_force
);

  logic [31:0] lfsr_a, lfsr_b;

  // Galois LFSRs, taps 32,22,2,1 (0x80200003) and 32,30,26,25 (0xA3000000),
  // advanced 16 steps per crossing so that successive comparisons use
  // fresh bits.
  function automatic logic [31:0] step(input logic [31:0] s, input logic [31:0] taps);
    logic [31:0] v;
    v = s;
    for (int k = 0; k < 16; k++) v = v[0] ? ((v >> 1) ^ taps) : (v >> 1);
    return v;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr_a   <= 32'h1;
      lfsr_b   <= 32'hACE1_2468;
      l0_trig  <= 1'b0;
      l1_force <= 1'b0;
    end else begin
      lfsr_a  <= step(lfsr_a, 32'h8020_0003);
      lfsr_b  <= step(lfsr_b, 32'hA300_0000);
      l0_trig <= en && (lfsr_a[31:16] < l0_rate);
      unique case (l1_mode)
        2'd1:    l1_force <= 1'b1;
        2'd2:    l1_force <= (lfsr_b[31:16] < l1_rate);
        default: l1_force <= 1'b0;
      endcase
    end
  end

endmodule
