// tb_rnd_gen: measures the random trigger rate over many crossings against
// the programmed probability (within 5 standard deviations), and checks that
// a trigger in one crossing does not change the chance of one in the next
// (the memoryless property of Poisson arrivals). Per crossing it checks the
// L1 force modes (none: never forced, all: every trigger forced), that a
// zero rate or a disabled generator gives no trigger, and that the forced
// fraction in the random mode follows its own rate.
module tb_rnd_gen;
  logic clk = 0, rst = 1, en, l0_trig, l1_force;
  logic [15:0] l0_rate, l1_rate;
  logic [1:0] l1_mode;
  int checks = 0, failures = 0;

  rnd_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // counts L0 triggers, forced triggers and triggers that follow a trigger
  // over n crossings; in modes 0 and 1 the force bit is checked each crossing
  int n_pairs;
  task automatic measure(input int n, output int nt, output int nf);
    logic prev;
    nt = 0; nf = 0; n_pairs = 0; prev = 0;
    repeat (n) begin
      @(posedge clk); #1;
      if (l0_trig) nt++;
      if (l0_trig && l1_force) nf++;
      if (l0_trig && prev) n_pairs++;
      if (l0_trig && l1_mode === 2'd0) check(l1_force === 1'b0, "mode 0: trigger not forced");
      if (l0_trig && l1_mode === 2'd1) check(l1_force === 1'b1, "mode 1: trigger forced");
      if (!en || l0_rate === 16'd0)   check(l0_trig === 1'b0, "no trigger when disabled or at rate 0");
      prev = l0_trig;
    end
  endtask

  task automatic rate_ok(input int got, input int n, input real p, input string what);
    real mean, sd;
    mean = n * p;
    sd   = $sqrt(n * p * (1.0 - p));
    check((got > mean - 5.0 * sd) && (got < mean + 5.0 * sd), what);
    $display("%s: %0d (expected %0.1f)", what, got, mean);
  endtask

  initial begin
    int nt, nf;
    en = 1; l0_rate = 16'd4096; l1_mode = 2'd0; l1_rate = 16'd0;
    repeat (3) @(posedge clk); rst = 0;
    measure(64000, nt, nf);
    rate_ok(nt, 64000, 4096.0 / 65536.0, "L0 rate 1/16");
    check(nf === 0, "mode 0 forces none");

    l0_rate = 16'd655; l1_mode = 2'd1;
    measure(100000, nt, nf);
    rate_ok(nt, 100000, 655.0 / 65536.0, "L0 rate 1/100");
    check(nf === nt, "mode 1 forces all");

    l0_rate = 16'd16384; l1_mode = 2'd2; l1_rate = 16'd16384;
    measure(64000, nt, nf);
    rate_ok(nt, 64000, 0.25, "L0 rate 1/4");
    rate_ok(nf, nt, 0.25, "L1 force fraction 1/4");
    rate_ok(n_pairs, nt, 0.25, "trigger right after a trigger, 1/4");

    l0_rate = 16'd0;
    @(posedge clk);
    measure(2000, nt, nf);
    check(nt === 0, "rate 0");
    l0_rate = 16'd16384;

    en = 0;
    @(posedge clk);
    measure(2000, nt, nf);
    check(nt === 0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
