// tb_iobus_if: local-bus master model issuing single and burst writes and
// reads to random IOBUS targets and registers, with a model IOBUS slave
// holding a register file per chip select. Checks: one-hot chip select and
// RADR of every write, written data read back, READYi# timing (write: the
// cycle after ADS#, read: two cycles after), the module's own CSR (JTAG
// select, H_EXT, LED, soft reset driving /SRES) and LHOLD/LHOLDA.
module tb_iobus_if;
  import rs_pkg::*;
  logic clk = 0, lreset_n = 0, ads_n = 1, blast_n = 1, lw_r = 0, lhold = 0, usr_sw = 1;
  logic [31:0] lad_i = '0, lad_o, bus_rdata;
  logic lad_oe, ready_n, lholda, h_ext, usr_led_n, sres_n;
  iobus_t bus;
  logic [9:0] jtag_sel;
  logic [31:0] regs [1:10][32];
  logic [31:0] model [1:10][32];
  int checks = 0, failures = 0;

  iobus_if #(.NPLD(10)) dut (.*);
  always #5 clk = ~clk;

  // model IOBUS slave
  always_comb begin
    bus_rdata = '0;
    for (int k = 1; k <= 10; k++) if (bus.cs[k]) bus_rdata = regs[k][bus.radr];
  end
  always @(posedge clk) if (bus.wr) begin
    for (int k = 1; k <= 10; k++) if (bus.cs[k]) regs[k][bus.radr] <= bus.wdata;
    checks++;
    if (!$onehot(bus.cs)) begin failures++; $display("FAIL chip select %b", bus.cs); end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] addr(input int tgt, input int r);
    return 32'((tgt << 7) | (r << 2));
  endfunction

  // write n words starting at register r of target tgt
  task automatic lb_write(input int tgt, input int r, input logic [31:0] d[$]);
    @(negedge clk); ads_n = 0; lw_r = 1; lad_i = addr(tgt, r);
    @(negedge clk); ads_n = 1;
    foreach (d[i]) begin
      lad_i = d[i]; blast_n = (i !== d.size() - 1);
      #1 chk(!ready_n, "write ready in data phase");
      @(negedge clk);
    end
    blast_n = 1;
  endtask

  task automatic lb_read(input int tgt, input int r, input int n, output logic [31:0] d[$]);
    d = {};
    @(negedge clk); ads_n = 0; lw_r = 0; lad_i = addr(tgt, r);
    @(negedge clk); ads_n = 1;
    for (int i = 0; i < n; i++) begin
      blast_n = (i !== n - 1);
      chk(ready_n, "read not ready in first data cycle");
      @(negedge clk);
      chk(!ready_n && lad_oe, "read ready in second data cycle");
      d.push_back(lad_o);
      @(negedge clk);
      if (i === n - 1) break;
      // burst continues: next data phase begins on this edge
    end
    blast_n = 1;
  endtask

  initial begin
    logic [31:0] d[$], got[$];
    for (int k = 1; k <= 10; k++) for (int r = 0; r < 32; r++) begin regs[k][r] = '0; model[k][r] = '0; end
    repeat (3) @(posedge clk);
    chk(!sres_n, "/SRES during local reset");
    lreset_n = 1;
    repeat (2) @(posedge clk); #1;
    chk(sres_n, "/SRES released");
    // random single and burst writes
    for (int t = 0; t < 200; t++) begin
      int tgt, r, n;
      tgt = 1 + $urandom % 10; n = 1 + $urandom % 4; r = $urandom % (33 - n);
      d = {};
      for (int i = 0; i < n; i++) begin d.push_back($urandom); model[tgt][r + i] = d[i]; end
      lb_write(tgt, r, d);
    end
    // read everything back, in bursts of 4
    for (int k = 1; k <= 10; k++) for (int r = 0; r < 32; r += 4) begin
      lb_read(k, r, 4, got);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (got[i] !== model[k][r + i]) begin
          failures++; $display("FAIL read cs%0d r%0d = %h exp %h", k, r + i, got[i], model[k][r + i]);
        end
      end
    end
    // own CSR
    lb_write(0, 0, '{32'h2A5});
    chk(jtag_sel === 10'h2A5, "JTAG select register");
    lb_write(0, 1, '{32'h5});
    chk(h_ext && !usr_led_n, "H_EXT and LED");
    lb_read(0, 2, 1, got);
    chk(got[0] === 32'h1, "USR_SW readback");
    lb_read(0, 0, 1, got);
    chk(got[0] === 32'h2A5, "JTAG select readback");
    lb_write(0, 1, '{32'h2});
    @(posedge clk); #1;
    chk(!sres_n, "soft reset asserts /SRES");
    lb_write(0, 1, '{32'h0});
    @(posedge clk); #1;
    chk(sres_n, "soft reset released");
    // local bus arbitration
    @(negedge clk); lhold = 1; @(negedge clk);
    chk(lholda, "LHOLDA follows LHOLD");
    lhold = 0; @(negedge clk);
    chk(!lholda, "LHOLDA released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
