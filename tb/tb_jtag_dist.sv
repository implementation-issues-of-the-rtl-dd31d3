// tb_jtag_dist: checks the JTAG distribution against a reference chain
// walk for random select patterns: TMS fan-out, idle-high lines of
// unselected PLDs and the TDI -> TDO path through the selected PLDs.
module tb_jtag_dist;
  localparam int N = 10;
  logic [N-1:0] sel, tms_x, tdi_x, tdo_x;
  logic tms, tdi, tdo;
  int checks = 0, failures = 0;

  jtag_dist #(.NPLD(N)) dut (.*);

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s sel=%b", what, sel); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic exp_link;
      sel   = (t === 0) ? '0 : (t === 1) ? '1 : N'($urandom);
      tms   = 1'($urandom);
      tdi   = 1'($urandom);
      tdo_x = N'($urandom);
      #1;
      exp_link = tdi;
      for (int i = 0; i < N; i++) begin
        check(tms_x[i] === (sel[i] ? tms : 1'b1), "tms_x");
        check(tdi_x[i] === (sel[i] ? exp_link : 1'b1), "tdi_x");
        if (sel[i]) exp_link = tdo_x[i];
      end
      check(tdo === exp_link, "tdo");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
