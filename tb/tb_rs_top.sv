`timescale 1ns/1ps
// tb_rs_top: end-to-end run of the Readout Supervisor at its default sizes
// (3564 crossings per turn, 8K-word FIFOs), configured over the local bus.
//
// Stimulus: an L0 decision unit model sends a word every crossing (random
// accepts and forces, a few deliberately wrong bunch IDs, one missing
// strobe); an L1 decision unit model answers every L0 accept seen on
// channel A, in order, with its event number (one deliberately wrong).
// External throttles are pulsed. Over several turns the configuration is
// changed: gap generator, random and periodic triggers, calibration,
// L1 spacing and a small L1 buffer, the internal L1 path, a turn with both
// trigger phasers on the falling clock edge (the decision units' timing
// moved to suit), and last the bunch counter synchronized to an external
// orbit signal, which then stops; then the counters are cleared by the
// clear strobe and by their node reset, and an ECS L0 inhibit holds off
// external triggers.
//
// Checks, all against quantities worked out here from the stimulus and the
// observed channels: channel B frames decoded (format, Hamming), a BCR in
// every turn at bunch 0 and one ECR, L1 trigger broadcasts in the order of
// the L0 accepts (event number LSBs) and in the same number, minimum L1
// broadcast spacing, calibration command and pulse, the TTC line decoded
// back into channels A and B, counters read over the bus against counts
// kept here (with their prescaling), and the JTAG chain through the
// selected PLDs, the bunch counter against the external orbit and the
// orbit presence flag. Each mechanism must occur at least once.
module tb_rs_top;
  import rs_pkg::*;

  logic clk = 0, clk4x = 0;
  logic lreset_n = 0, ads_n = 1, blast_n = 1, lw_r = 0, lhold = 0, usr_sw = 0;
  logic [31:0] lad_i = '0, lad_o;
  logic lad_oe, ready_n, lholda, usr_led_n, h_ext, sres_n;
  logic tms = 0, tdi = 0, tdo;
  logic [9:0] tms_x, tdi_x, tdo_x;
  logic l0_strobe = 0, l0_tested = 0, l1_strobe = 0, l1_tested = 0;
  logic [15:0] l0_data = '0;
  logic [7:0] l1_data = '0;
  logic ext_orbit = 0, ext_l0_throttle = 0, ext_l1_throttle = 0;
  logic chan_a, chan_b, ttc_out, cal_pulse, l0_inhibit, l1_inhibit, missing_strobe;
  logic [7:0] node_rst;
  logic [11:0] bx;
  logic [3:0] orbit_dly;
  logic ev_bcr, ev_ecr, ev_cmd, ev_postponed, gap_refused, derand_full, l1buf_full, ext_orbit_present;
  logic [13:0] afifo_count, tfifo_count;

  rs_top dut (
    .clk, .clk4x, .lreset_n, .ads_n, .blast_n, .lw_r, .lad_i, .lad_o, .lad_oe, .ready_n,
    .lhold, .lholda, .usr_sw, .usr_led_n, .h_ext, .sres_n, .tms, .tdi, .tdo, .tms_x, .tdi_x, .tdo_x,
    .l0_strobe, .l0_tested_strobe(l0_tested), .l0_data, .l1_strobe, .l1_tested_strobe(l1_tested),
    .l1_data, .ext_orbit, .ext_l0_throttle, .ext_l1_throttle, .chan_a, .chan_b, .ttc_out,
    .cal_pulse, .node_rst, .l0_inhibit, .l1_inhibit, .bx, .missing_strobe,
    .ev_bcr, .ev_ecr, .ev_cmd, .ev_postponed, .gap_refused, .derand_full, .l1buf_full,
    .ext_orbit_present, .afifo_count, .tfifo_count, .orbit_dly
  );

  always #12.5   clk   = ~clk;
  // 160 MHz clock whose rising edges include every rising bunch-clock edge
  initial begin #9.375; forever #3.125 clk4x = ~clk4x; end

  localparam int N = BX_PER_ORBIT;
  localparam int TURNS = 9;
  // crossings from the launch of an L0 word to its decision in l0_handler
  localparam int L0_LAT = 3;

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (bx %0d, t=%0t)", what, bx, $time); end
  endtask

  initial begin
    #(TURNS * N * 25.0 + 2000000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ local bus
  task automatic lb_write(input int tgt, input int r, input logic [31:0] d);
    @(negedge clk); ads_n = 0; lw_r = 1; lad_i = 32'((tgt << 7) | (r << 2));
    @(negedge clk); ads_n = 1; lad_i = d; blast_n = 0;
    @(negedge clk); blast_n = 1;
  endtask

  task automatic lb_read(input int tgt, input int r, output logic [31:0] d);
    @(negedge clk); ads_n = 0; lw_r = 0; lad_i = 32'((tgt << 7) | (r << 2));
    @(negedge clk); ads_n = 1; blast_n = 0;
    @(negedge clk);
    @(negedge clk); d = lad_o; blast_n = 1;
  endtask

  // ------------------------------------------------------------ L0 source
  int  n_l0_sent_acc = 0, n_bad_bcid = 0, n_thr_l0 = 0, n_thr_l1 = 0, cycles = 0;
  bit  l0_run = 0, skip_next = 0, bad_next = 0;
  real src_dly = 10.0;        // data change after the launching edge; the strobe follows 6 ns later
  int  skipped = 0;
  always @(posedge clk) if (l0_run) begin
    logic acc, frc, bad;
    logic [11:0] id;
    int launch;
    launch = int'(bx);
    acc = ($urandom % 10) === 0;
    frc = acc && (($urandom % 4) === 0);
    bad = bad_next; bad_next = 0;
    id  = 12'((launch + L0_LAT) % N);
    if (bad) begin id = id ^ 12'h5A5; n_bad_bcid++; end
    if (!skip_next) begin
      fork
        begin
          #(src_dly) l0_data = {id, 2'b00, frc, acc};
          #6    l0_strobe = 1; l0_tested = 1;
          #12.5 l0_strobe = 0;
          #5    l0_tested = 0;
        end
      join_none
    end else begin
      skip_next = 0; skipped++;
    end
  end

  // throttles and bunch clock count
  always @(posedge clk) if (l0_run) begin
    cycles++;
    if (ext_l0_throttle) n_thr_l0++;
    if (ext_l1_throttle) n_thr_l1++;
    #2;
    ext_l0_throttle = (($urandom % 500) === 0) ? 1'b1 : (ext_l0_throttle && ($urandom % 8) !== 0);
    ext_l1_throttle = (($urandom % 700) === 0) ? 1'b1 : (ext_l1_throttle && ($urandom % 8) !== 0);
  end

  // ------------------------------------------- event numbers of L0 accepts
  logic [6:0] pend_l1[$];     // awaiting an external L1 decision
  logic [6:0] exp_bc[$];      // expected order of L1 trigger broadcasts
  int   m_ev = 0, n_chan_a = 0;
  logic ecr_prev = 0;
  bit   l1_ext = 1;
  always @(posedge clk) begin
    #1;
    if (chan_a) begin
      n_chan_a++;
      exp_bc.push_back(7'(m_ev));
      if (l1_ext) pend_l1.push_back(7'(m_ev));
    end
    if (ecr_prev) m_ev = 0; else if (chan_a) m_ev++;
    ecr_prev = ev_ecr;
  end

  // ------------------------------------------------------------ L1 source
  int n_l1_sent = 0, n_bad_evid = 0;
  bit bad_evid_next = 0, l1_run = 1;
  always @(posedge clk) begin
    if (l1_run && pend_l1.size() !== 0 && ($urandom % 6) === 0) begin
      logic [6:0] e;
      e = pend_l1.pop_front();
      if (bad_evid_next) begin e = e ^ 7'h55; bad_evid_next = 0; n_bad_evid++; end
      n_l1_sent++;
      fork
        begin
          #(src_dly) l1_data = {e, 1'($urandom)};
          #6    l1_strobe = 1; l1_tested = 1;
          #12.5 l1_strobe = 0;
          #5    l1_tested = 0;
        end
      join_none
    end
  end

  // ------------------------------------------------------ channel B decoder
  int n_bcr = 0, n_ecr = 0, n_cmd = 0, n_trig = 0, n_pos = 0, n_order_err = 0;
  int last_trig_cycle = -1000, min_trig_gap = 1 << 30, gap_window = 0;
  int n_b_zero = 0;
  initial begin
    logic [15:0] f;
    forever begin
      @(posedge clk); #1;
      if (sres_n && chan_b === 1'b0) begin
        int start;
        start = cycles;
        f[15] = 1'b0;
        for (int k = 14; k >= 0; k--) begin @(posedge clk); #1; f[k] = chan_b; end
        chk(f[15:14] === 2'b00 && f[0] && f[5:1] === ttc_hamming(f[13:6]), "channel B frame");
        if (f[13] === 1'b1) begin
          logic [6:0] e;
          n_trig++;
          if (f[12]) n_pos++;
          e = exp_bc.size() ? exp_bc.pop_front() : 7'h7F;
          if (f[11:8] !== e[3:0]) n_order_err++;
          if (gap_window) min_trig_gap = (start - last_trig_cycle < min_trig_gap) ? start - last_trig_cycle : min_trig_gap;
          last_trig_cycle = start;
        end else if (f[13:8] === 6'b0) begin
          if (f[6]) n_bcr++;
          if (f[7]) n_ecr++;
        end else begin
          n_cmd++;
          chk(f[13:6] === 8'h04, "calibration command byte");
        end
      end
    end
  end
  always @(posedge clk) if (sres_n && !chan_b) n_b_zero++;

  // ---------------------------------------------------- TTC line decoder
  // Samples the encoded line after every 160 MHz edge and notes whether it
  // changed. The encoder's quarter counter (read hierarchically) tells
  // which quarter each edge closed: edges after quarters 0 and 2 start a
  // cell and must always change the line; a change after quarter 1 is an
  // A = 1, after quarter 3 a B = 1. Cell A must begin at the falling edge
  // of the bunch clock and cell B at its rising edge.
  int n_dec_a = 0, n_dec_b = 0, n_a_sent = 0, n_b_one = 0, n_no_cell_start = 0;
  int n_cell_phase_err = 0;
  initial begin
    logic prev;
    logic [1:0] qq;
    prev = 0;
    forever begin
      @(posedge clk4x);
      qq = dut.u_ttc.quarter;            // quarter closed by this edge
      #0.5;
      if (sres_n) begin
        if ((qq === 2'd0 || qq === 2'd2) && ttc_out === prev) n_no_cell_start++;
        if ((qq === 2'd0 && clk) || (qq === 2'd2 && !clk)) n_cell_phase_err++;
        if (qq === 2'd1 && ttc_out !== prev) n_dec_a++;
        if (qq === 2'd3 && ttc_out !== prev) n_dec_b++;
      end
      prev = ttc_out;
    end
  end
  always @(posedge clk) begin
    #1;
    if (sres_n && chan_a) n_a_sent++;
    if (sres_n && chan_b) n_b_one++;
  end

  // ------------------------------------------------------------ main
  int n_missing = 0, n_gap = 0, n_l0inh = 0, n_derand = 0, n_l1inh = 0, n_l1buf = 0;
  int n_post = 0, n_cal = 0, n_ev_cmd = 0, n_ev_bcr = 0, n_int_bc = 0;
  int n_ext_sync = 0, n_ext_lost = 0, n_bcr_before_ext = 0;
  int n_ecs_inh_leak = 0, n_clr = 0, n_missing_main = 0, n_missing_neg = 0, n_neg_phase = 0, n_chan_a_before = 0;
  logic [31:0] l0_sync_before, l1_sync_before;
  bit neg_phase_run = 0;
  always @(posedge clk) if (neg_phase_run && missing_strobe) n_missing_neg++;
  always @(posedge clk) if (l0_run) begin
    if (missing_strobe && cycles > 10) n_missing++;
    if (gap_refused) n_gap++;
    if (l0_inhibit) n_l0inh++;
    if (derand_full) n_derand++;
    if (l1_inhibit) n_l1inh++;
    if (l1buf_full) n_l1buf++;
    if (ev_postponed) n_post++;
    if (cal_pulse) n_cal++;
    if (ev_cmd) n_ev_cmd++;
  end
  always @(posedge clk) if (sres_n && ev_bcr) n_ev_bcr++;
  // crossings seen by the counter modules (out of reset and node reset)
  int n_bclk = 0;
  always @(posedge clk) if (sres_n && !node_rst[7]) n_bclk++;

  function automatic int ps4(input int n);
    return n / 4;
  endfunction

  initial begin
    logic [31:0] d;
    int turns_start, n_trig_before_int, n_bclk_at_read;
    repeat (4) @(posedge clk);
    lreset_n = 1;
    repeat (4) @(posedge clk);
    chk(sres_n, "system reset released");

    // JTAG: select PLDs 1, 4 and 7 and walk a bit through the chain
    lb_write(0, 0, 32'h092);
    tdo_x = 10'b0;
    #1 chk(tms_x === (10'b11_0110_1101 | (10'h092 & {10{tms}})), "TMS fan-out");
    tdi = 1; tdo_x = 10'h002; #1;
    chk(tdi_x[1] === 1 && tdi_x[4] === 1 && tdi_x[0] === 1, "chain head");
    tdo_x = 10'h000; #1;
    chk(tdi_x[4] === 0 && tdo === 0, "chain link 1->4");
    tdo_x = 10'h080; #1;
    chk(tdo === 1, "chain tail 7 -> TDO");

    // run configuration: L0 pipeline depth 0, prescale 4 on both modules
    l0_run = 1;
    repeat (100) @(posedge clk);
    @(negedge clk); skip_next = 1;       // one missing L0 strobe
    // ---- turn 1: external triggers only
    repeat (N / 2) @(posedge clk);
    bad_next = 1; repeat (7) @(posedge clk); bad_next = 1;
    repeat (N / 2) @(posedge clk);
    bad_evid_next = 1;
    // ---- turn 2: gap generator, ECR
    lb_write(1, 1, {4'd0, 12'd0, 8'd0, 8'd3});      // gap 3, BCR at bunch 0
    lb_write(1, 9, 32'h1);                           // ECR
    repeat (N) @(posedge clk);
    // ---- turn 3: random and periodic triggers, calibration each turn
    lb_write(1, 1, 32'hB000_0000);                   // orbit delay line setting 11
    chk(orbit_dly === 4'hB, "orbit delay line setting");
    lb_write(1, 1, 32'h0);
    lb_write(1, 2, {16'd16384, 16'd1024});           // random L0 1/64, L1 force 1/4
    lb_write(1, 0, 32'h0002_018B | 32'h10);          // + random enable, L1 mode 2
    lb_write(1, 3, {8'd0, 8'd0, 16'd700});           // periodic every 700
    lb_write(1, 4, {8'd20, 8'd1, 4'd0, 12'd1000});   // cal at bunch 1000, every turn, delay 20
    repeat (2 * N) @(posedge clk);
    // ---- turn 5: L1 spacing and a small L1 buffer
    lb_write(1, 4, 32'h0);
    lb_write(1, 3, {8'd0, 8'd40, 16'd0});            // spacing 40
    lb_write(1, 6, {16'd300, 8'd0, 8'd4});           // L1 buffer: 4 deep, drain 300
    repeat (10) @(posedge clk);
    gap_window = 1;
    repeat (N) @(posedge clk);
    gap_window = 0;
    lb_write(1, 3, 32'h0);
    lb_write(1, 6, {16'd1, 8'd0, 8'd255});
    // ---- turn 6: internal L1 path
    l1_run = 0;
    wait (pend_l1.size() === 0);
    repeat (20) @(posedge clk);
    l1_ext = 0;
    n_trig_before_int = n_trig;
    lb_write(1, 0, 32'h0002_0189 | 32'h10);          // L1 external path off
    repeat (N) @(posedge clk);
    n_int_bc = n_trig - n_trig_before_int;
    // ---- drain
    lb_write(1, 0, 32'h0000_0188);                   // external L0 off, random off
    lb_write(1, 3, 32'h0);
    repeat (3000) @(posedge clk);
    l0_run = 0;
    repeat (100) @(posedge clk);

    // ---------------------------------------------------------- results
    $display("crossings %0d, L0 accepts on channel A %0d, L1 broadcasts %0d (positive %0d)",
             cycles, n_chan_a, n_trig, n_pos);
    $display("BCR %0d ECR %0d commands %0d postponed %0d calibration pulses %0d",
             n_bcr, n_ecr, n_cmd, n_post, n_cal);
    $display("missing strobes %0d gap refusals %0d L0-inhibit cycles %0d (derandomizer full %0d)",
             n_missing, n_gap, n_l0inh, n_derand);
    $display("L1-inhibit cycles %0d (L1 buffer full %0d), internal-path broadcasts %0d, min L1 gap %0d",
             n_l1inh, n_l1buf, n_int_bc, min_trig_gap);
    chk(n_trig === n_chan_a && exp_bc.size() === 0, "one L1 broadcast per L0 accept");
    chk(n_order_err === 0, "L1 broadcasts in L0 accept order");
    chk(n_bcr >= cycles / N - 1 && n_bcr === n_ev_bcr, "BCR every turn");
    chk(n_ecr === 1, "one ECR");
    chk(n_cmd === n_ev_cmd && n_cmd === n_cal && n_cal >= 2, "calibration commands and pulses");
    chk(min_trig_gap > 40, "L1 broadcast spacing");
    chk(n_dec_a === n_a_sent, "TTC line channel A ones");
    chk(n_no_cell_start <= 1, "TTC line cell starts");
    chk(n_cell_phase_err === 0, "TTC cell A while the bunch clock is low");
    $display("TTC line: A ones %0d/%0d, B ones %0d/%0d", n_dec_a, n_a_sent, n_dec_b, n_b_one);
    // the period in progress when the counts are taken may not be decoded yet
    chk(n_dec_b === n_b_one || n_dec_b + 1 === n_b_one, "TTC line channel B ones");
    // counters over the bus
    lb_read(2, 0, d);  chk(d === 32'(n_bad_bcid), "counter 0: L0 sync errors");
    lb_read(2, 4, d);  chk(d === 32'(ps4(n_chan_a)), "counter 4: L0 accepts gated (/4)");
    @(negedge clk); ads_n = 0; lw_r = 0; lad_i = 32'((3 << 7) | (0 << 2));
    @(negedge clk); ads_n = 1; blast_n = 0;
    n_bclk_at_read = n_bclk;               // counter value is sampled in this cycle
    @(negedge clk);
    @(negedge clk); d = lad_o; blast_n = 1;
     chk(d === 32'(ps4(n_bclk_at_read)), "counter 16: bunch clock (/4)");
    lb_read(3, 3, d);  chk(d === 32'(n_bad_evid), "counter 19: L1 sync errors");
    lb_read(3, 10, d); chk(d === 32'(ps4(n_trig)), "counter 26: L1 broadcasts (/4)");
    lb_read(3, 12, d); chk(d === 32'(n_pos), "counter 28: positive L1 broadcasts");
    lb_read(3, 13, d); chk(d === 32'(cycles / N) || d === 32'(cycles / N + 1), "counter 29: turns");
    lb_read(3, 14, d); chk(d === 32'(n_thr_l0), "counter 30: L0 throttle");
    lb_read(1, 16, d); chk(d[0] === 1'b0, "status: no external orbit");

    // ---- falling-edge phase: the decision units now strobe 6.5 ns after the
    // rising edge, so the widened strobe is high at the falling edge and
    // gone at the next rising edge. Both phasers are switched to the falling
    // edge; sampling on the rising edge would lose every word.
    l0_run = 0;
    n_missing_main = n_missing;
    repeat (200) @(posedge clk);
    lb_read(2, 0, d);  l0_sync_before = d;
    lb_read(3, 3, d);  l1_sync_before = d;
    n_chan_a_before = n_chan_a;
    src_dly = 0.5;
    pend_l1.delete();                                // left from the internal-path turn
    l1_run = 1;
    lb_write(1, 0, 32'h0000_078B);                   // ext L0 and L1, both phases negative
    l0_run = 1; l1_ext = 1;
    repeat (20) @(posedge clk);
    neg_phase_run = 1;
    repeat (N) @(posedge clk);
    neg_phase_run = 0;
    l0_run = 0;
    repeat (3000) @(posedge clk);
    lb_read(2, 0, d);  chk(d === l0_sync_before, "falling-edge phase: no L0 sync error");
    lb_read(3, 3, d);  chk(d === l1_sync_before, "falling-edge phase: no L1 sync error");
    chk(n_missing_neg === 0, "falling-edge phase: no missing strobe");
    $display("falling-edge phase: %0d L0 accepts, %0d awaiting L1, %0d awaiting broadcast, order errors %0d",
             n_chan_a - n_chan_a_before, pend_l1.size(), exp_bc.size(), n_order_err);
    chk(n_chan_a > n_chan_a_before && pend_l1.size() === 0 && exp_bc.size() === 0 && n_order_err === 0,
        "falling-edge phase: every L0 accept answered and broadcast in order");
    if (n_chan_a > n_chan_a_before && n_missing_neg === 0) n_neg_phase++;

    // ---- external orbit: the bunch counter follows it, its presence is
    // reported, and its loss is seen two turns after the last pulse
    lb_write(1, 0, 32'h0000_018C);                   // external orbit selected
    wait (bx === 12'd1000);
    @(negedge clk); ext_orbit = 1;                   // out of phase with the counter
    @(negedge clk); ext_orbit = 0;
    chk(bx === 12'd0, "bunch counter restarted by the external orbit");
    if (bx === 12'd0) n_ext_sync++;
    n_bcr_before_ext = n_ev_bcr;
    for (int t = 0; t < 3; t++) begin
      repeat (N - 1) @(negedge clk);
      chk(bx === 12'(N - 1), "bunch counter in step with the external orbit");
      ext_orbit = 1;
      @(negedge clk); ext_orbit = 0;
      chk(bx === 12'd0, "bunch 0 after each external orbit");
    end
    lb_read(1, 16, d); chk(d[1:0] === 2'b11, "status: external orbit selected and present");
    chk(n_ev_bcr - n_bcr_before_ext >= 3, "BCR every turn with the external orbit");
    repeat (2 * N + 10) @(negedge clk);
    chk(!ext_orbit_present, "external orbit loss detected");
    lb_read(1, 16, d); chk(d[1:0] === 2'b10, "status: external orbit selected, absent");
    if (!ext_orbit_present) n_ext_lost++;

    // ---- counter clear strobe and the counters' node reset (register 9)
    lb_read(2, 0, d);  chk(d !== 32'd0, "counter 0 holds the sync errors before the clear");
    lb_write(1, 9, 32'h2);                           // clear all counters
    lb_read(2, 0, d);  chk(d === 32'd0, "counter 0 cleared");
    lb_read(3, 3, d);  chk(d === 32'd0, "counter 19 cleared");
    if (d === 32'd0) n_clr++;
    repeat (400) @(posedge clk);
    lb_read(3, 0, d);  chk(d >= 32'd95, "bunch clock counting again after the clear");
    lb_write(1, 9, 32'h8000);                        // node reset 7: counter modules
    lb_read(3, 0, d);  chk(d < 32'd5, "bunch clock counter restarted by its node reset");
    if (d < 32'd5) n_clr++;

    // ---- ECS L0 inhibit: external triggers run, nothing is accepted
    lb_write(1, 0, 32'h0000_07AB);                   // as the falling-edge turn, + ECS L0 inhibit
    n_chan_a_before = n_chan_a;
    l0_run = 1;
    repeat (500) @(posedge clk) if (!l0_inhibit) n_ecs_inh_leak++;
    l0_run = 0;
    repeat (10) @(posedge clk);
    chk(n_ecs_inh_leak === 0 && n_chan_a === n_chan_a_before, "ECS L0 inhibit holds off every trigger");
    lb_write(1, 0, 32'h0000_078B);
    // every mechanism seen
    chk(n_missing_main === 1, "missing strobe detected once");
    chk(n_gap > 0, "gap generator");
    chk(n_derand > 0 && n_l0inh > 0, "L0 de-randomizer inhibit");
    chk(n_thr_l0 > 0 && n_thr_l1 > 0, "throttles");
    chk(n_l1buf > 0 && n_l1inh > 0, "L1 buffer inhibit");
    chk(n_int_bc > 0, "internal L1 path");
    chk(n_post > 0, "command postponed");
    chk(n_bad_bcid === 2 && n_bad_evid === 1, "sync errors injected");
    chk(n_ext_sync > 0 && n_ext_lost > 0, "external orbit synchronization and loss");
    chk(n_neg_phase > 0, "falling-edge trigger phase");
    chk(n_clr === 2, "counter clear and counter node reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
