// rs_fifo: synchronous FIFO, DEPTH words of W bits, one clock.
//
// Used for the L0 Accept FIFO and the L1 trigger de-randomizer, which on
// the original board are 8K x 9 synchronous FIFO chips. The head word is
// always visible on rdata (show-ahead): re pops it and the next word is
// visible after the clock edge. A write to a full FIFO and a read from an
// empty one are ignored. almost_full is set when 16 or fewer places are
// left. Size follows the original; show-ahead timing and the almost-full
// level are this design's choice.
module rs_fifo #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned W     = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] wdata,
  input  logic         re,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic         almost_full,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  wire do_wr = we && !full;
  wire do_rd = re && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assign rdata       = mem[rptr];
  assign empty       = (count == 0);
  assign full        = (count == (AW+1)'(DEPTH));
  assign almost_full = (count >= (AW+1)'(DEPTH - 16));

endmodule
