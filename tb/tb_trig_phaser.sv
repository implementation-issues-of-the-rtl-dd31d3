`timescale 1ns/1ps
// tb_trig_phaser: drives a strobe-accompanied data stream whose strobe
// lags the local clock by a fixed phase and checks, for both edge
// selections, that every word arrives exactly once on q with valid set,
// in order, and with the expected latency in clock cycles.
module tb_trig_phaser;
  localparam int W = 16;
  logic clk = 0, rst = 1, strobe = 0, tested = 0, phase_neg;
  logic [W-1:0] data, q;
  logic valid;
  int checks = 0, failures = 0;

  trig_phaser #(.W(W)) dut (.clk, .rst, .strobe, .data, .tested_strobe(tested), .phase_neg, .q, .valid);

  always #12.5 clk = ~clk;   // 25 ns bunch clock

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // External source: strobe rises `lag` ns after each rising clock edge and
  // lasts 12.5 ns; data change 6 ns before it. The or'ed strobe is the
  // strobe widened by 5 ns.
  real lag;
  task automatic source(input int n);
    @(posedge clk);
    #(lag + 19.0);  // first data change one period later, 6 ns before the strobe
    for (int i = 0; i < n; i++) begin
      data = W'(16'hA000 + i);
      #6.0  strobe = 1; tested = 1;
      #12.5 strobe = 0;
      #5.0  tested = 0;
      #1.5;
    end
  endtask

  task automatic run(input logic neg, input real lag_ns, input int exp_lat);
    int got, first_cycle, cyc;
    phase_neg = neg; lag = lag_ns; got = 0; cyc = 0; first_cycle = -1;
    rst = 1; repeat (3) @(posedge clk); rst = 0;
    fork
      source(20);
      begin
        repeat (40) begin
          @(posedge clk); #1; cyc++;
          if (valid) begin
            if (first_cycle < 0) first_cycle = cyc;
            checks++;
            if (q !== W'(16'hA000 + got)) begin failures++; $display("FAIL data %h exp %h", q, 16'hA000 + got); end
            got++;
          end
        end
      end
    join
    checks++;
    if (got !== 20) begin failures++; $display("FAIL got %0d words (neg=%0d)", got, neg); end
    checks++;
    if (first_cycle !== exp_lat) begin failures++; $display("FAIL latency %0d exp %0d (neg=%0d)", first_cycle, exp_lat, neg); end
  endtask

  initial begin
    data = '0;
    // The first strobe rises in the clock period after the source starts
    // (cycle 2); in both cases the word must be on q after the first
    // rising edge that follows its strobe, i.e. in cycle 3.
    // Strobe 3 ns after the rising edge: the falling edge sees the or'ed
    // strobe and the second pipeline is used.
    run(1'b1, 3.0, 3);
    // Strobe 16 ns after the rising edge: the rising edge sees the or'ed
    // strobe (16..33.5 ns), data go straight to the third pipeline.
    run(1'b0, 16.0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
