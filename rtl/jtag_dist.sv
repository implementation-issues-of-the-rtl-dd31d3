// jtag_dist: on-board JTAG distribution of the I/O interface PLD.
//
// The glue board's JTAG port (TMS, TDI, TDO) is fanned out to NPLD PLDs.
// Each PLD x is selected by bit x of a CSR register. A selected PLD receives
// the glue board TMS and becomes a link in one closed chain: TDI feeds the
// first selected PLD, each selected PLD's TDO feeds the next selected PLD's
// TDI, and the last selected TDO goes back to the glue board. An unselected
// PLD has TMS_x and TDI_x held high and its TDO_x is ignored, so any set of
// PLDs, from none to all, can be programmed together. Purely combinational;
// TCK bypasses this logic. The chain runs in index order 0..NPLD-1, which is
// this design's choice; the selection rules follow the original design.
module jtag_dist #(
  parameter int unsigned NPLD = 10
) (
  input  logic [NPLD-1:0] sel,
  input  logic            tms,
  input  logic            tdi,
  output logic            tdo,
  output logic [NPLD-1:0] tms_x,
  output logic [NPLD-1:0] tdi_x,
  input  logic [NPLD-1:0] tdo_x
);

  always_comb begin
    logic link;  // data travelling along the chain
    link = tdi;
    for (int i = 0; i < NPLD; i++) begin
      tms_x[i] = sel[i] ? tms  : 1'b1;
      tdi_x[i] = sel[i] ? link : 1'b1;
      if (sel[i]) link = tdo_x[i];
    end
    tdo = link;
  end

endmodule
