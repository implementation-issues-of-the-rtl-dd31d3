// tb_t1b: reference model of the L1 broadcast rate controller, the two
// occupancy emulators and the inhibit combination, run against the block
// with random L0 accepts, throttles, FIFO flags, TFIFO contents and
// acknowledge delays. Checks every cycle: trig_req, trig_data, pop, both
// inhibits, both occupancies and the count enables; also checks that the
// spacing between broadcasts never falls below l1_spacing.
module tb_t1b;
  import rs_pkg::*;
  logic clk = 0, rst = 1;
  tfifo_word_t tfifo_rdata, q[$];
  logic tfifo_empty, tfifo_re, trig_req, trig_ack;
  logic [7:0] trig_data;
  logic [7:0] l1_spacing = 8'd5;
  logic l0_accept = 0, ext_l0_throttle = 0, ext_l1_throttle = 0, thr_l0_en = 1, thr_l1_en = 1;
  logic ecs_l0_inh = 0, ecs_l1_inh = 0, afifo_af = 0, tfifo_af = 0;
  logic [4:0] derand_thr = 5'd15;
  logic [7:0] readout_cycles = 8'd36, l1buf_thr = 8'd6;
  logic [15:0] l1_drain = 16'd40;
  logic l0_inhibit, l1_inhibit, derand_full, l1buf_full;
  logic [4:0] derand_occ;
  logic [7:0] l1buf_occ;
  logic [2:0] cnt_ce;
  int checks = 0, failures = 0, n_bc = 0, n_l0full = 0, n_l1full = 0;

  t1b dut (.*);
  always #5 clk = ~clk;

  function automatic void refresh();
    tfifo_empty = (q.size() === 0);
    tfifo_rdata = tfifo_empty ? '0 : q[0];
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_space = 0, m_occ = 0, m_ro = 0, m_l1 = 0, m_dr = 0, last_bc = -1000;

  task automatic chk(input logic c, input string what, input int t);
    checks++;
    if (!c) begin failures++; $display("FAIL t=%0d %s", t, what); end
  endtask

  initial begin
    refresh();
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 20000; t++) begin
      logic e_req, e_l0i, e_l1i, ro_done, dr_done, pos;
      @(negedge clk);
      if (($urandom % 5) === 0 && q.size() < 20)
        q.push_back('{accept: 1'($urandom), frc: 1'($urandom), evid: 7'($urandom)});
      refresh();
      ext_l0_throttle = ($urandom % 40) === 0;
      ext_l1_throttle = ($urandom % 30) === 0;
      afifo_af        = ($urandom % 100) === 0;
      tfifo_af        = ($urandom % 100) === 0;
      ecs_l0_inh      = (t > 15000 && t < 15100);
      thr_l1_en       = (t < 18000);
      l1_spacing      = 8'(t / 5000 * 3);
      #1;
      e_l0i = ecs_l0_inh || (thr_l0_en && ext_l0_throttle) || (m_occ >= derand_thr) || afifo_af || tfifo_af;
      e_l1i = ecs_l1_inh || (thr_l1_en && ext_l1_throttle) || (m_l1 >= l1buf_thr);
      e_req = !tfifo_empty && !e_l1i && (m_space === 0);
      // the command sender grants at random
      trig_ack = trig_req && (($urandom % 3) !== 0);
      l0_accept = !l0_inhibit && (($urandom % 4) === 0);
      #1;
      chk(trig_req === e_req, "trig_req", t);
      chk(l0_inhibit === e_l0i && l1_inhibit === e_l1i, "inhibits", t);
      chk(derand_occ === 5'(m_occ) && l1buf_occ === 8'(m_l1), "occupancy", t);
      chk(tfifo_re === trig_ack, "pop", t);
      if (trig_req)
        chk(trig_data === {1'b1, tfifo_rdata.accept, tfifo_rdata.evid[3:0], 2'b00}, "trig_data", t);
      if (trig_ack) begin
        chk(t - last_bc > int'(l1_spacing), "spacing", t);
        last_bc = t; n_bc++;
      end
      if (m_occ >= derand_thr) n_l0full++;
      if (m_l1 >= l1buf_thr) n_l1full++;
      // model update at the clock edge
      pos     = trig_ack && tfifo_rdata.accept;
      ro_done = (m_occ !== 0) && (m_ro >= readout_cycles - 1);
      dr_done = (m_l1 !== 0) && (m_dr >= l1_drain - 1);
      if (trig_ack) m_space = l1_spacing; else if (m_space !== 0) m_space--;
      if (m_occ === 0 || ro_done) m_ro = 0; else m_ro++;
      m_occ = m_occ + l0_accept - ro_done;
      if (m_l1 === 0 || dr_done) m_dr = 0; else m_dr++;
      m_l1 = m_l1 + pos - dr_done;
      @(posedge clk); #1;
      chk(cnt_ce === {pos, pos, trig_ack}, "count enables", t);
      if (trig_ack) void'(q.pop_front());
      refresh();
    end
    chk(n_bc > 0 && n_l0full > 0 && n_l1full > 0, "coverage", 0);
    $display("broadcasts %0d derandomizer-full cycles %0d L1-buffer-full cycles %0d", n_bc, n_l0full, n_l1full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
