// tb_cmd_gen: runs the command generator on a model bunch counter with a
// short turn. Checks: calibration command requested at bunch cal_bx every
// cal_turns turns and held until acknowledged; the calibration pulse in the
// cycle after the acknowledge; the calibration trigger exactly cal_delay+2
// cycles after the pulse; periodic triggers every per_period crossings;
// ECR request after the ECS strobe; node resets.
module tb_cmd_gen;
  import rs_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst = 1;
  logic [BX_W-1:0] bx = '0, cal_bx = 12'd10;
  logic orbit;
  logic [7:0] cal_turns = 8'd0, cal_delay = 8'd7, cal_cmd = 8'h5A;
  logic [15:0] per_period = 16'd0;
  logic ecr_strobe = 0;
  logic [7:0] rst_strobe = '0;
  logic cmd_req, cmd_ack = 0, per_trig, cal_pulse, ecr_req;
  logic [7:0] cmd_data, node_rst;
  int checks = 0, failures = 0, cycle = 0;

  cmd_gen #(.NRST(8)) dut (.*);
  always #5 clk = ~clk;
  assign orbit = (bx === 0);
  always @(posedge clk) begin
    cycle <= cycle + 1;
    bx <= (bx === BX_W'(N - 1)) ? '0 : bx + 1'b1;
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d bx %0d", what, cycle, bx); end
  endtask

  initial begin
    int last_req_turn, n_req, n_per, last_per, pulse_cycle, turn;
    repeat (3) @(posedge clk); #1;
    chk(node_rst === 8'hFF, "node resets during reset");
    rst = 0;
    @(posedge clk); #1;
    chk(node_rst === 8'h00, "node resets released");
    // periodic triggers
    per_period = 16'd13; n_per = 0; last_per = -1;
    repeat (400) begin
      @(posedge clk); #1;
      if (per_trig) begin
        if (last_per >= 0) chk(cycle - last_per === 13, "periodic spacing");
        last_per = cycle; n_per++;
      end
    end
    chk(n_per >= 29, "periodic count");
    per_period = 0;
    repeat (5) @(posedge clk);
    // calibration every 3 turns, acknowledged after a random wait
    cal_turns = 8'd3; n_req = 0; last_req_turn = -100; turn = 0;
    repeat (N * 40) begin
      @(negedge clk);
      if (bx === 0) turn++;
      if (cmd_req && !cmd_ack) begin
        if (last_req_turn !== turn) begin
          chk(bx === cal_bx + 1, "request bunch");  // raised at the edge ending bunch cal_bx
          if (last_req_turn >= 0) chk(turn - last_req_turn === 3, "request every 3 turns");
          last_req_turn = turn; n_req++;
        end
        chk(cmd_data === cal_cmd, "command data");
        cmd_ack = ($urandom % 4) === 0;
        if (cmd_ack) begin
          @(posedge clk); #1; cmd_ack = 0;
          chk(cal_pulse, "calibration pulse");
          pulse_cycle = cycle;
          while (!per_trig && cycle < pulse_cycle + 300) begin @(posedge clk); #1; end
          chk(cycle - pulse_cycle === int'(cal_delay) + 2, "calibration trigger delay");
        end
      end
    end
    chk(n_req >= 12, "calibration requests");
    cal_turns = 0;
    // ECR and node resets
    @(negedge clk); ecr_strobe = 1; rst_strobe = 8'h24;
    @(negedge clk); ecr_strobe = 0; rst_strobe = 0;
    chk(ecr_req && node_rst === 8'h24, "ECR request and node reset");
    @(negedge clk);
    chk(!ecr_req && node_rst === 8'h00, "one-cycle pulses");
    $display("periodic %0d calibration requests %0d", n_per, n_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
