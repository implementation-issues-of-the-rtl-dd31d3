// tb_l0_handler: random external, periodic and random triggers, inhibits,
// gap lengths and a nearly-full AFIFO, compared cycle by cycle with a
// reference model of the decision: sync check against the bunch counter,
// priority, inhibit/gap/full refusal, force bit, event number, channel A
// and the sixteen count enables. Latency is one clock cycle.
module tb_l0_handler;
  import rs_pkg::*;
  logic clk = 0, rst = 1, ecr = 0;
  logic ext_en, ext_valid, per_trig, rnd_trig, rnd_l1force, l0_inhibit, afifo_full;
  l0_word_t ext_word;
  logic [BX_W-1:0] bx = '0;
  logic [7:0] gap_len;
  logic afifo_we, chan_a, rnd_force_ce, gap_refused;
  afifo_word_t afifo_wdata;
  logic [15:0] cnt_ce;
  int checks = 0, failures = 0, n_acc = 0, n_sync = 0, n_gap = 0;

  l0_handler dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int m_gap = 0, m_ev = 0;

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 20000; t++) begin
      logic s_err, e_acc, any, blk, acc, frc, e_raw;
      logic [15:0] exp_ce;
      @(negedge clk);
      ext_en      = ($urandom % 10) !== 0;
      ext_valid   = ($urandom % 4) !== 0;
      ext_word    = '{bcid: (($urandom % 8) === 0) ? 12'($urandom) : bx, spare: 2'b0,
                      frc: 1'($urandom), accept: ($urandom % 3) === 0};
      per_trig    = ($urandom % 20) === 0;
      rnd_trig    = ($urandom % 8) === 0;
      rnd_l1force = 1'($urandom);
      l0_inhibit  = ($urandom % 6) === 0;
      afifo_full  = ($urandom % 50) === 0;
      gap_len     = ((t / 2000) % 2) ? 8'(t / 4000) : 8'd0;
      ecr         = ($urandom % 500) === 0;
      // model
      e_raw = ext_en && ext_valid && ext_word.accept;
      s_err = ext_en && ext_valid && (ext_word.bcid !== bx);
      e_acc = e_raw && !s_err;
      any   = e_acc || per_trig || rnd_trig;
      blk   = l0_inhibit || (m_gap !== 0) || afifo_full;
      acc   = any && !blk;
      frc   = e_acc ? ext_word.frc : (per_trig ? 1'b1 : rnd_l1force);
      exp_ce = {1'b0, rnd_trig && !blk, rnd_trig, per_trig && !blk, per_trig,
                e_acc && ext_word.frc && !blk, e_acc && ext_word.frc, e_acc && !blk, e_acc,
                acc && frc, any && frc, acc, any, e_raw && s_err, s_err && !blk, s_err};
      @(posedge clk); #1;
      checks++;
      if (chan_a !== acc || afifo_we !== acc || cnt_ce !== exp_ce ||
          (acc && (afifo_wdata.frc !== frc || afifo_wdata.ext !== e_acc || afifo_wdata.evid !== 7'(m_ev))) ||
          rnd_force_ce !== (acc && !e_acc && !per_trig && rnd_l1force) ||
          gap_refused !== (any && m_gap !== 0)) begin
        failures++;
        $display("FAIL t=%0d acc=%b/%b ce=%h/%h word=%p ev=%0d", t, chan_a, acc, cnt_ce, exp_ce, afifo_wdata, m_ev);
      end
      if (acc) n_acc++;
      if (s_err) n_sync++;
      if (any && m_gap !== 0) n_gap++;
      if (acc) m_gap = gap_len; else if (m_gap !== 0) m_gap--;
      if (ecr) m_ev = 0; else if (acc) m_ev++;
      bx = (bx === BX_W'(BX_PER_ORBIT - 1)) ? '0 : bx + 1'b1;
    end
    checks++;
    if (n_acc === 0 || n_sync === 0 || n_gap === 0) begin failures++; $display("FAIL coverage"); end
    $display("accepts %0d sync errors %0d gap refusals %0d", n_acc, n_sync, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
