// rs_csr: general configuration and status registers on one IOBUS chip
// select.
//
// Registers (RADR): 0 control bits, 1 gap length / BCR bunch / orbit delay
// line setting, 2 random
// rates, 3 periodic period / L1 spacing, 4 calibration bunch, turns and
// delay, 5 calibration command / de-randomizer threshold / readout time,
// 6 L1 buffer threshold / drain time, 7 prescale factors of the two counter
// modules, 8 prescale mask, 9 write-only strobes (bit 0 ECR, bit 1 clear
// counters, bits 15:8 node resets), 16 general status (read only).
// Writes take effect at the clock edge of WR; reads are combinational.
// Reset values give a running system: external L0/L1 paths and throttles
// enabled, BCR at bunch 0, de-randomizer threshold 15 with 36-crossing
// readout, counter prescaling 4 on the counters Table 1 of the original
// documentation proposes for prescaling. The layout is this design's own.
module rs_csr
  import rs_pkg::*;
#(
  parameter int unsigned CS = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  iobus_t      bus,
  input  logic [31:0] status,
  output logic [31:0] rdata,
  output cfg_t        cfg,
  output logic        ecr_strobe,
  output logic        cnt_clr,
  output logic [7:0]  rst_strobe
);

  localparam int unsigned NREG = 9;
  localparam logic [31:0] PS_MASK_DEF = (32'h1 << 3) | (32'h1 << 4) | (32'h1 << 7) | (32'h1 << 8)
                                      | (32'h1 << 13) | (32'h1 << 14) | (32'h1 << 16) | (32'h1 << 17)
                                      | (32'h1 << 18) | (32'h1 << 24) | (32'h1 << 26);

  function automatic logic [31:0] reset_value(input int unsigned i);
    unique case (i)
      0:       return 32'h0000_018B;          // L0/L1 ext, BCR, both throttles
      5:       return {8'd0, 8'd36, 3'd0, 5'd15, 8'h04};
      6:       return {16'd1, 8'd0, 8'd255};
      7:       return {5'd0, 11'd4, 5'd0, 11'd4};
      8:       return PS_MASK_DEF;
      default: return 32'h0;
    endcase
  endfunction

  logic [31:0] r [NREG];
  wire sel = bus.cs[CS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) r[i] <= reset_value(i);
      ecr_strobe <= 1'b0;
      cnt_clr    <= 1'b0;
      rst_strobe <= '0;
    end else begin
      ecr_strobe <= 1'b0;
      cnt_clr    <= 1'b0;
      rst_strobe <= '0;
      if (sel && bus.wr) begin
        if (bus.radr < 5'(NREG)) r[bus.radr[3:0]] <= bus.wdata;
        if (bus.radr == 5'd9) begin
          ecr_strobe <= bus.wdata[0];
          cnt_clr    <= bus.wdata[1];
          rst_strobe <= bus.wdata[15:8];
        end
      end
    end
  end

  always_comb begin
    if (bus.radr < 5'(NREG))    rdata = r[bus.radr[3:0]];
    else if (bus.radr == 5'd16) rdata = status;
    else                        rdata = '0;

    cfg.l0_ext_en      = r[0][0];
    cfg.l1_ext_en      = r[0][1];
    cfg.use_ext_orbit  = r[0][2];
    cfg.bcr_en         = r[0][3];
    cfg.rnd_en         = r[0][4];
    cfg.ecs_l0_inh     = r[0][5];
    cfg.ecs_l1_inh     = r[0][6];
    cfg.thr_l0_en      = r[0][7];
    cfg.thr_l1_en      = r[0][8];
    cfg.l0_phase_neg   = r[0][9];
    cfg.l1_phase_neg   = r[0][10];
    cfg.pipe_depth     = r[0][15:12];
    cfg.rnd_l1_mode    = r[0][17:16];
    cfg.gap_len        = r[1][7:0];
    cfg.bcr_bx         = r[1][27:16];
    cfg.orbit_dly      = r[1][31:28];
    cfg.rnd_l0_rate    = r[2][15:0];
    cfg.rnd_l1_rate    = r[2][31:16];
    cfg.per_period     = r[3][15:0];
    cfg.l1_spacing     = r[3][23:16];
    cfg.cal_bx         = r[4][11:0];
    cfg.cal_turns      = r[4][23:16];
    cfg.cal_delay      = r[4][31:24];
    cfg.cal_cmd        = r[5][7:0];
    cfg.derand_thr     = r[5][12:8];
    cfg.readout_cycles = r[5][23:16];
    cfg.l1buf_thr      = r[6][7:0];
    cfg.l1_drain       = r[6][31:16];
    cfg.ps_factor0     = r[7][10:0];
    cfg.ps_factor1     = r[7][26:16];
    cfg.ps_mask        = r[8];
  end

endmodule
