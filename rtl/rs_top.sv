// rs_top: Readout Supervisor.
//
// The Readout Supervisor of the LHCb Timing and Fast Control system decides,
// crossing by crossing, which L0 triggers are accepted, matches them with
// the L1 decisions, and broadcasts accepts, L1 decisions and commands to
// the front-ends over the two TTC channels. Data flow:
//
//   L0 decision unit -> l0_pipe (phase, strobe check, 16-stage pipeline)
//   l0_pipe + rnd_gen + cmd_gen triggers -> l0_handler -> channel A, AFIFO
//   AFIFO + L1 decision unit (via an L1 trig_phaser) -> l1_handler -> TFIFO
//   TFIFO -> t1b (rate control, inhibits, buffer emulators) -> gcs
//   cmd_gen commands, BCR/ECR, L1 trigger broadcasts -> gcs -> channel B
//   channels A and B -> ttc_encoder (160 MHz) -> ttc_out
//   PLX local bus -> iobus_if -> IOBUS: CS1 rs_csr, CS2/CS3 ucnt modules
//   iobus_if JTAG select -> jtag_dist (glue-board JTAG to NPLD PLDs)
//
// The module split and the connections follow the block diagram of the
// original board, where each module is a separate PLD. Here everything
// except the TTC encoder runs on one clock: clk is the 40.08 MHz bunch
// clock, and the local bus is assumed to be clocked by it too (a design
// choice; on the board the local bus has its own clock). clk4x is the
// 160 MHz encoding clock, rising together with clk. The PLL, the delay
// lines and the LVDS/PECL parts are outside: l0_tested_strobe and
// l1_tested_strobe are the strobes already or'ed with their delayed copy,
// and ext_orbit is the orbit already phased to clk by the external delay
// line, whose 16-step setting comes out on orbit_dly.
module rs_top
  import rs_pkg::*;
#(
  parameter int unsigned NPLD        = 10,
  parameter int unsigned FIFO_DEPTH  = 8192,
  parameter int unsigned BX_PER_TURN = BX_PER_ORBIT
) (
  input  logic            clk,
  input  logic            clk4x,
  // PLX 9080 local bus
  input  logic            lreset_n,
  input  logic            ads_n,
  input  logic            blast_n,
  input  logic            lw_r,
  input  logic [31:0]     lad_i,
  output logic [31:0]     lad_o,
  output logic            lad_oe,
  output logic            ready_n,
  input  logic            lhold,
  output logic            lholda,
  input  logic            usr_sw,
  output logic            usr_led_n,
  output logic            h_ext,
  output logic [3:0]      orbit_dly,
  output logic            sres_n,
  // JTAG distribution
  input  logic            tms,
  input  logic            tdi,
  output logic            tdo,
  output logic [NPLD-1:0] tms_x,
  output logic [NPLD-1:0] tdi_x,
  input  logic [NPLD-1:0] tdo_x,
  // external trigger inputs
  input  logic            l0_strobe,
  input  logic            l0_tested_strobe,
  input  logic [15:0]     l0_data,
  input  logic            l1_strobe,
  input  logic            l1_tested_strobe,
  input  logic [7:0]      l1_data,
  input  logic            ext_orbit,
  input  logic            ext_l0_throttle,
  input  logic            ext_l1_throttle,
  // outputs
  output logic            chan_a,
  output logic            chan_b,
  output logic            ttc_out,
  output logic            cal_pulse,
  output logic [7:0]      node_rst,
  output logic            l0_inhibit,
  output logic            l1_inhibit,
  output logic [BX_W-1:0] bx,
  output logic            missing_strobe,
  // activity flags of the internal mechanisms, for monitoring
  output logic            ev_bcr,
  output logic            ev_ecr,
  output logic            ev_cmd,
  output logic            ev_postponed,
  output logic            gap_refused,
  output logic            derand_full,
  output logic            l1buf_full,
  output logic            ext_orbit_present,
  output logic [$clog2(FIFO_DEPTH):0] afifo_count,
  output logic [$clog2(FIFO_DEPTH):0] tfifo_count
);

  // ---------------------------------------------------------------- IOBUS
  iobus_t      bus;
  logic [31:0] bus_rdata, csr_rdata, cnt0_rdata, cnt1_rdata;
  logic [NPLD-1:0] jtag_sel;
  cfg_t        cfg;
  logic        ecr_strobe, cnt_clr;
  logic [7:0]  rst_strobe;
  logic [31:0] status;
  wire         rst = !sres_n;

  iobus_if #(.NPLD(NPLD)) u_ioi (
    .clk, .lreset_n, .ads_n, .blast_n, .lw_r, .lad_i, .lad_o, .lad_oe, .ready_n,
    .lhold, .lholda, .bus, .bus_rdata, .jtag_sel, .h_ext, .usr_led_n, .usr_sw, .sres_n
  );

  jtag_dist #(.NPLD(NPLD)) u_jtag (
    .sel(jtag_sel), .tms, .tdi, .tdo, .tms_x, .tdi_x, .tdo_x
  );

  rs_csr #(.CS(1)) u_csr (
    .clk, .rst, .bus, .status, .rdata(csr_rdata), .cfg, .ecr_strobe, .cnt_clr, .rst_strobe
  );
  assign orbit_dly = cfg.orbit_dly;

  always_comb begin
    if (bus.cs[1])      bus_rdata = csr_rdata;
    else if (bus.cs[2]) bus_rdata = cnt0_rdata;
    else if (bus.cs[3]) bus_rdata = cnt1_rdata;
    else                bus_rdata = '0;
  end

  // ------------------------------------------------------- command side
  logic            orbit;
  logic            cmd_req, cmd_ack, ecr_req, per_trig;
  logic [7:0]      cmd_data;
  logic            trig_req, trig_ack;
  logic [7:0]      trig_data;

  cmd_gen #(.NRST(8)) u_cmd (
    .clk, .rst, .bx, .orbit, .cal_bx(cfg.cal_bx), .cal_turns(cfg.cal_turns),
    .cal_delay(cfg.cal_delay), .cal_cmd(cfg.cal_cmd), .per_period(cfg.per_period),
    .ecr_strobe, .rst_strobe, .cmd_req, .cmd_data, .cmd_ack, .per_trig, .cal_pulse,
    .ecr_req, .node_rst
  );

  // ------------------------------------------------------------- L0 path
  l0_word_t l0_q;
  logic     l0_q_valid, missing_seen;
  logic     rnd_trig, rnd_l1force;
  logic     afifo_we, afifo_re, afifo_empty, afifo_full, afifo_af;
  afifo_word_t afifo_wdata, afifo_rdata;
  logic [15:0] l0_ce;
  logic        rnd_force_ce;

  l0_pipe #(.W(16), .STAGES(16)) u_pipe (
    .clk, .rst(node_rst[0]), .strobe(l0_strobe), .data(l0_data), .tested_strobe(l0_tested_strobe),
    .phase_neg(cfg.l0_phase_neg), .depth(cfg.pipe_depth), .q(l0_q), .q_valid(l0_q_valid),
    .missing(missing_strobe), .missing_seen
  );

  rnd_gen u_rnd (
    .clk, .rst(node_rst[6]), .en(cfg.rnd_en), .l0_rate(cfg.rnd_l0_rate), .l1_mode(cfg.rnd_l1_mode),
    .l1_rate(cfg.rnd_l1_rate), .l0_trig(rnd_trig), .l1_force(rnd_l1force)
  );

  l0_handler u_l0 (
    .clk, .rst(node_rst[1]), .ecr(ev_ecr), .ext_en(cfg.l0_ext_en), .ext_valid(l0_q_valid),
    .ext_word(l0_q), .bx, .per_trig, .rnd_trig, .rnd_l1force, .l0_inhibit,
    .gap_len(cfg.gap_len), .afifo_full, .afifo_we, .afifo_wdata, .chan_a, .cnt_ce(l0_ce),
    .rnd_force_ce, .gap_refused
  );

  rs_fifo #(.DEPTH(FIFO_DEPTH), .W(9)) u_afifo (
    .clk, .rst(node_rst[2]), .we(afifo_we), .wdata(afifo_wdata), .re(afifo_re), .rdata(afifo_rdata),
    .empty(afifo_empty), .full(afifo_full), .almost_full(afifo_af), .count(afifo_count)
  );

  // ------------------------------------------------------------- L1 path
  l1_word_t    l1_q;
  logic        l1_valid;
  logic        tfifo_we, tfifo_re, tfifo_empty, tfifo_full, tfifo_af;
  tfifo_word_t tfifo_wdata, tfifo_rdata;
  logic [6:0]  l1_ce;
  logic [2:0]  t1b_ce;
  logic [4:0]  derand_occ;
  logic [7:0]  l1buf_occ;

  trig_phaser #(.W(8)) u_l1_phaser (
    .clk, .rst(node_rst[3]), .strobe(l1_strobe), .data(l1_data), .tested_strobe(l1_tested_strobe),
    .phase_neg(cfg.l1_phase_neg), .q(l1_q), .valid(l1_valid)
  );

  l1_handler u_l1 (
    .clk, .rst(node_rst[3]), .l1_ext_en(cfg.l1_ext_en), .l1_valid, .l1_word(l1_q), .afifo_rdata,
    .afifo_empty, .afifo_re, .tfifo_full, .tfifo_we, .tfifo_wdata, .cnt_ce(l1_ce)
  );

  rs_fifo #(.DEPTH(FIFO_DEPTH), .W(9)) u_tfifo (
    .clk, .rst(node_rst[4]), .we(tfifo_we), .wdata(tfifo_wdata), .re(tfifo_re), .rdata(tfifo_rdata),
    .empty(tfifo_empty), .full(tfifo_full), .almost_full(tfifo_af), .count(tfifo_count)
  );

  t1b u_t1b (
    .clk, .rst(node_rst[5]), .tfifo_rdata, .tfifo_empty, .tfifo_re, .trig_req, .trig_data, .trig_ack,
    .l1_spacing(cfg.l1_spacing), .l0_accept(chan_a), .ext_l0_throttle, .ext_l1_throttle,
    .thr_l0_en(cfg.thr_l0_en), .thr_l1_en(cfg.thr_l1_en), .ecs_l0_inh(cfg.ecs_l0_inh),
    .ecs_l1_inh(cfg.ecs_l1_inh), .afifo_af, .tfifo_af, .derand_thr(cfg.derand_thr),
    .readout_cycles(cfg.readout_cycles), .l1buf_thr(cfg.l1buf_thr), .l1_drain(cfg.l1_drain),
    .l0_inhibit, .l1_inhibit, .derand_full, .l1buf_full, .derand_occ, .l1buf_occ, .cnt_ce(t1b_ce)
  );

  // ------------------------------------------------------ command sender
  logic [15:0] status_in;
  assign status_in = {8'b0, l1buf_full, derand_full, tfifo_full, tfifo_empty,
                      afifo_full, afifo_empty, missing_seen, h_ext};

  gcs #(.BX_PER_TURN(BX_PER_TURN)) u_gcs (
    .clk, .rst, .use_ext_orbit(cfg.use_ext_orbit), .ext_orbit, .bcr_en(cfg.bcr_en),
    .bcr_bx(cfg.bcr_bx), .ecr_req, .cmd_req, .cmd_data, .cmd_ack, .trig_req, .trig_data,
    .trig_ack, .status_in, .bx, .orbit, .chan_b, .ext_orbit_present, .status,
    .ev_bcr, .ev_ecr, .ev_cmd, .ev_postponed
  );

  // ------------------------------------------------------------ counters
  logic [31:0] ce;
  always_comb begin
    ce[15:0]  = l0_ce;
    ce[16]    = 1'b1;              // bunch clock
    ce[17]    = l0_inhibit;
    ce[18]    = l1_inhibit;
    ce[19]    = l1_ce[0];
    ce[20]    = l1_ce[1];
    ce[21]    = 1'b0;              // reserved
    ce[22]    = rnd_force_ce;
    ce[23]    = l1_ce[4];
    ce[24]    = l1_ce[5];
    ce[25]    = l1_ce[6];
    ce[28:26] = t1b_ce;
    ce[29]    = orbit;             // number of turns
    ce[30]    = ext_l0_throttle;
    ce[31]    = ext_l1_throttle;
  end

  ucnt #(.N(16), .CW(32), .PS_W(10)) u_cnt0 (
    .clk, .rst(rst || node_rst[7]), .ce(ce[15:0]), .ps_factor(cfg.ps_factor0), .ps_mask(cfg.ps_mask[15:0]),
    .clr(cnt_clr), .sel(bus.radr[3:0]), .rdata(cnt0_rdata)
  );

  ucnt #(.N(16), .CW(32), .PS_W(10)) u_cnt1 (
    .clk, .rst(rst || node_rst[7]), .ce(ce[31:16]), .ps_factor(cfg.ps_factor1), .ps_mask(cfg.ps_mask[31:16]),
    .clr(cnt_clr), .sel(bus.radr[3:0]), .rdata(cnt1_rdata)
  );

  // derand_occ and l1buf_occ stay internal; status carries the full flags.

  // ------------------------------------------------------------ encoder
  ttc_encoder u_ttc (
    .clk4x, .rst, .a(chan_a), .b(chan_b), .q(ttc_out), .quarter()
  );

endmodule
