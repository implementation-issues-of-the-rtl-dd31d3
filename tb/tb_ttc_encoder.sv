// tb_ttc_encoder: sends random A/B bit pairs, one per bunch period, and
// decodes the encoded line independently: for each 12.5 ns cell there must
// be a transition at the cell start, and a mid-cell transition exactly
// when the bit is 1. Channel A must occupy the first half-period.
module tb_ttc_encoder;
  logic clk4x = 0, rst = 1, a = 0, b = 0, q;
  logic [1:0] quarter;
  int checks = 0, failures = 0;

  ttc_encoder dut (.*);
  always #3125 clk4x = ~clk4x;  // 160 MHz in ps

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] sent[$];
    logic prev, cur;
    logic t [4];
    repeat (3) @(posedge clk4x); #1 rst = 0;
    // generator: new bits stable before each period start (quarter 0)
    fork
      forever begin
        @(posedge clk4x); #1;
        if (quarter === 2'd0) begin
          a = 1'($urandom); b = 1'($urandom);
          sent.push_back({a, b});
        end
      end
    join_none
    // decoder: sample q after each clk4x edge; the four samples following
    // a quarter-0 edge are cell-A start, cell-A middle, cell-B start, cell-B middle
    @(posedge clk4x); #1; prev = q;
    for (int p = 0; p < 400; p++) begin
      logic [1:0] bits;
      // wait until the edge that consumed the bits (quarter wrapped to 1)
      do begin @(posedge clk4x); #1; cur = q; t[0] = (cur !== prev); prev = cur; end while (quarter !== 2'd1);
      for (int k = 1; k < 4; k++) begin @(posedge clk4x); #1; cur = q; t[k] = (cur !== prev); prev = cur; end
      if (sent.size() === 0) continue;
      bits = sent.pop_front();
      checks++;
      if (!(t[0] && t[2] && t[1] === bits[1] && t[3] === bits[0])) begin
        failures++; $display("FAIL period %0d sent a=%b b=%b transitions %b%b%b%b", p, bits[1], bits[0], t[0], t[1], t[2], t[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
