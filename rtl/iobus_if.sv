// iobus_if: I/O interface and resets.
//
// Slave on the PLX 9080 local bus in J mode (address and data multiplexed
// on LAD[31:0]) that turns each local-bus access into an IOBUS access:
//   address phase: ADS# low latches LAD and LW/R#;
//   LAD[10:7] picks the target: 0 = this module's own CSR, 1..NCS = chip
//   select CS1..CSNCS (higher targets are ignored: no CS, no WR);
//   LAD[6:2] becomes RADR[4:0]. Assertions state the IOBUS rule: at most
//   one chip select, and WR only with one.
//   write data phase: BDAT = LAD, WR for one cycle, READYi# low.
//   read: one cycle with rd set collects the IOBUS read data, the next
//   cycle drives it on LAD with READYi# low.
// A burst (BLAST# high at READY) continues with the next register address.
// LHOLDA answers LHOLD one cycle later (this is the only local master).
// Own CSR: reg 0 = JTAG select bits, reg 1 = {USR_LED, soft reset, H_EXT},
// reg 2 (read) = USR_SW. /SRES is low while LRESETo# is low or the soft
// reset bit is set. All logic runs on the local-bus clock and resets with
// LRESETo#. The tasks (IOBUS chip selects and strobes, system reset, JTAG
// selection, H_EXT) follow the original design; the address map, timing
// and CSR layout are this design's choice.
module iobus_if
  import rs_pkg::*;
#(
  parameter int unsigned NPLD = 10
) (
  input  logic            clk,
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
  output iobus_t          bus,
  input  logic [31:0]     bus_rdata,
  output logic [NPLD-1:0] jtag_sel,
  output logic            h_ext,
  output logic            usr_led_n,
  input  logic            usr_sw,
  output logic            sres_n
);

  typedef enum logic [1:0] {IDLE, WDATA, RSAMPLE, RDATA} state_e;
  state_e state;

  logic [3:0]  tgt;
  logic [4:0]  radr;
  logic [31:0] rdata_q;
  logic        soft_rst, led;
  logic [31:0] local_rdata;

  wire rst = !lreset_n;

  always_comb begin
    unique case (radr)
      5'd0:    local_rdata = 32'(jtag_sel);
      5'd1:    local_rdata = {29'b0, led, soft_rst, h_ext};
      5'd2:    local_rdata = {31'b0, usr_sw};
      default: local_rdata = '0;
    endcase

    bus.cs    = '0;
    bus.radr  = radr;
    bus.wdata = lad_i;
    bus.wr    = 1'b0;
    bus.rd    = 1'b0;
    if (state != IDLE) begin
      for (int k = 1; k <= NCS; k++) bus.cs[k] = (tgt == 4'(k));
    end
    if (state == WDATA)   bus.wr = (tgt != 0 && 32'(tgt) <= NCS);
    if (state == RSAMPLE) bus.rd = (tgt != 0 && 32'(tgt) <= NCS);

    ready_n = !(state == WDATA || state == RDATA);
    lad_oe  = (state == RDATA);
    lad_o   = rdata_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      tgt      <= '0;
      radr     <= '0;
      rdata_q  <= '0;
      jtag_sel <= '0;
      h_ext    <= 1'b0;
      soft_rst <= 1'b0;
      led      <= 1'b0;
      lholda   <= 1'b0;
      sres_n   <= 1'b0;
    end else begin
      lholda <= lhold;
      sres_n <= !soft_rst;
      unique case (state)
        IDLE: if (!ads_n) begin
          tgt   <= lad_i[10:7];
          radr  <= lad_i[6:2];
          state <= lw_r ? WDATA : RSAMPLE;
        end
        WDATA: begin
          if (tgt == 0) begin
            if (radr == 5'd0) jtag_sel <= lad_i[NPLD-1:0];
            if (radr == 5'd1) {led, soft_rst, h_ext} <= lad_i[2:0];
          end
          radr <= radr + 1'b1;
          if (!blast_n) state <= IDLE;
        end
        RSAMPLE: begin
          rdata_q <= (tgt == 0) ? local_rdata : bus_rdata;
          state   <= RDATA;
        end
        RDATA: begin
          radr  <= radr + 1'b1;
          state <= blast_n ? RSAMPLE : IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign usr_led_n = !led;

  // IOBUS rule: at most one chip select at a time, and WR only with one
  assert property (@(posedge clk) disable iff (!lreset_n) $onehot0(bus.cs));
  assert property (@(posedge clk) disable iff (!lreset_n) bus.wr |-> $onehot(bus.cs));

endmodule
