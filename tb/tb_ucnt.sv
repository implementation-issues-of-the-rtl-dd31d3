// tb_ucnt: random count enables against a reference model of sixteen
// counters with per-counter prescale sub-counters, for several prescale
// factors and masks, reading every counter through the select port; also
// checks the clear input.
module tb_ucnt;
  localparam int N = 16;
  logic clk = 0, rst = 1, clr = 0;
  logic [N-1:0] ce = '0, ps_mask;
  logic [10:0] ps_factor;
  logic [3:0] sel = '0;
  logic [31:0] rdata;
  longint unsigned mcnt[N], msub[N];
  int checks = 0, failures = 0;

  ucnt #(.N(N), .CW(32), .PS_W(10)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int i = 0; i < N; i++) begin
      sel = 4'(i); #1;
      checks++;
      if (rdata !== 32'(mcnt[i])) begin
        failures++; $display("FAIL %s counter %0d = %0d exp %0d", what, i, rdata, mcnt[i]);
      end
    end
  endtask

  task automatic run(input int factor, input logic [N-1:0] mask, input int cycles);
    ps_factor = 11'(factor); ps_mask = mask;
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      ce = N'($urandom);
      @(posedge clk);
      for (int i = 0; i < N; i++) if (ce[i]) begin
        if (!mask[i] || factor <= 1) mcnt[i]++;
        else if (msub[i] + 1 >= factor) begin msub[i] = 0; mcnt[i]++; end
        else msub[i]++;
      end
    end
    @(negedge clk); ce = '0;
    compare($sformatf("factor %0d", factor));
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin mcnt[i] = 0; msub[i] = 0; end
    ps_factor = 11'd4; ps_mask = '0;
    repeat (2) @(posedge clk); rst = 0;
    run(1, 16'hFFFF, 300);
    run(4, 16'h6198, 3000);       // counters 3,4,7,8,13,14 prescaled
    run(1024, 16'h0001, 5000);
    // clear
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < N; i++) begin mcnt[i] = 0; msub[i] = 0; end
    compare("after clear");
    run(4, 16'hFFFF, 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
