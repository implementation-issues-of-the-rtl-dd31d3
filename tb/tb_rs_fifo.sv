// tb_rs_fifo: random writes and reads against a queue model, including
// runs that fill the FIFO completely and drain it, checking head data,
// empty, full, almost-full and the word count every cycle. Run at a
// reduced depth so that full and empty are reached often.
module tb_rs_fifo;
  localparam int DEPTH = 64, W = 9;
  logic clk = 0, rst = 1, we = 0, re = 0, empty, full, almost_full;
  logic [W-1:0] wdata = '0, rdata;
  logic [$clog2(DEPTH):0] count;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0, fulls = 0;

  rs_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst = 0;
    for (int t = 0; t < 20000; t++) begin
      int bias;
      bias = ((t / 500) % 2 === 0) ? 70 : 30;     // alternately fill and drain
      @(negedge clk);
      we    = ($urandom % 100) < bias;
      re    = ($urandom % 100) < (100 - bias);
      wdata = W'($urandom);
      // check outputs against the model before the edge
      checks++;
      if (empty !== (model.size() === 0) || full !== (model.size() === DEPTH) ||
          count !== model.size() || almost_full !== (model.size() >= DEPTH - 16) ||
          (model.size() !== 0 && rdata !== model[0])) begin
        failures++;
        $display("FAIL t=%0d size=%0d count=%0d empty=%b full=%b rdata=%h", t, model.size(), count, empty, full, rdata);
      end
      if (full) fulls++;
      @(posedge clk);
      if (re && model.size() !== 0) void'(model.pop_front());
      if (we && model.size() < DEPTH + (re && model.size() !== 0 ? 1 : 0) && !full) model.push_back(wdata);
    end
    checks++;
    if (fulls === 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
