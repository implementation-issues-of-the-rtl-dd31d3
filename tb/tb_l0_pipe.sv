`timescale 1ns/1ps
// tb_l0_pipe: sends a numbered L0 word every crossing with its strobe,
// skipping the strobe of one chosen word. For several pipeline depths it
// checks that word i appears on q exactly depth+1 cycles after it appears
// at the phaser output, that the skipped word is flagged missing, and that
// the sticky flag is set.
module tb_l0_pipe;
  localparam int W = 16;
  logic clk = 0, rst = 1, strobe = 0, tested = 0;
  logic [W-1:0] data = '0, q;
  logic [3:0] depth;
  logic q_valid, missing, missing_seen;
  int checks = 0, failures = 0;
  int cyc = 0;

  l0_pipe #(.W(W), .STAGES(16)) dut (.clk, .rst, .strobe, .data, .tested_strobe(tested),
    .phase_neg(1'b0), .depth, .q, .q_valid, .missing, .missing_seen);

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word i is launched in cycle `base+i`; the strobe of word `skip` is omitted
  int base, skip;
  task automatic source(input int n);
    @(posedge clk);
    base = cyc + 1;
    #10.0;
    for (int i = 0; i < n; i++) begin
      data = W'(16'h4000 + i);
      #6.0 if (i !== skip) begin strobe = 1; tested = 1; end
      #12.5 strobe = 0;
      #5.0 tested = 0;
      #1.5;
    end
  endtask

  task automatic run(input int d);
    int seen_words, seen_missing;
    depth = 4'(d); skip = 7; seen_words = 0; seen_missing = 0;
    rst = 1; repeat (2) @(posedge clk); rst = 0;
    fork
      source(30);
      repeat (60) begin
        @(posedge clk); #1;
        if (q_valid) begin
          // phaser output of word i is valid in cycle base+i+1 (counted at
          // the edge ending that cycle), so the tap shows it d cycles later
          int i;
          i = int'(q) - 16'h4000;
          checks++;
          if (cyc !== base + i + 2 + d) begin
            failures++; $display("FAIL depth %0d word %0d at cycle %0d exp %0d", d, i, cyc, base + i + 2 + d);
          end
          seen_words++;
        end
        if (missing && cyc > base + 3 && cyc < base + 30) seen_missing++;
      end
    join
    checks++; if (seen_words !== 29) begin failures++; $display("FAIL depth %0d words %0d", d, seen_words); end
    checks++; if (seen_missing !== 1) begin failures++; $display("FAIL depth %0d missing %0d", d, seen_missing); end
    checks++; if (!missing_seen) begin failures++; $display("FAIL sticky"); end
  endtask

  initial begin
    run(0); run(1); run(5); run(15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
