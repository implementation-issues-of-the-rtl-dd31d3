// l1_handler: L1 trigger handling.
//
// Every L0 accept left an entry {frc, ext, event number} in the L0 Accept
// FIFO (AFIFO). With the external L1 path enabled, each external L1
// decision (l1_valid with its word) pops the AFIFO head: the event numbers
// are compared (a mismatch, or an empty AFIFO, is an L1 sync error) and the
// final decision is external accept OR the entry's frc bit. With the
// external path blocked (l1_ext_en = 0) the entries are decided internally,
// one per cycle, by their frc bit alone, so forced internal triggers keep
// flowing. Each decision is written into the L1 de-randomizer (TFIFO) as
// {accept, frc, event number}; outputs are registered, one cycle after
// the pop. cnt_ce drives counters 19, 20, 23, 24, 25 (bits 0, 1, 4, 5, 6).
// The functions follow the original design; the word formats and matching
// rule are this design's choice.
module l1_handler
  import rs_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        l1_ext_en,
  input  logic        l1_valid,
  input  l1_word_t    l1_word,
  input  afifo_word_t afifo_rdata,
  input  logic        afifo_empty,
  output logic        afifo_re,
  input  logic        tfifo_full,
  output logic        tfifo_we,
  output tfifo_word_t tfifo_wdata,
  output logic [6:0]  cnt_ce
);

  logic take, sync_err, decide;

  always_comb begin
    if (l1_ext_en) begin
      take     = l1_valid && !afifo_empty;
      sync_err = l1_valid && (afifo_empty || (afifo_rdata.evid != l1_word.evid));
      decide   = l1_word.accept || afifo_rdata.frc;
    end else begin
      take     = !afifo_empty && !tfifo_full;
      sync_err = 1'b0;
      decide   = afifo_rdata.frc;
    end
    afifo_re = take;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tfifo_we    <= 1'b0;
      tfifo_wdata <= '0;
      cnt_ce      <= '0;
    end else begin
      tfifo_we    <= take;
      tfifo_wdata <= '{accept: decide, frc: afifo_rdata.frc, evid: afifo_rdata.evid};
      cnt_ce[0]   <= sync_err;
      cnt_ce[1]   <= l1_ext_en && l1_valid && l1_word.accept;
      cnt_ce[2]   <= 1'b0;
      cnt_ce[3]   <= 1'b0;
      cnt_ce[4]   <= take && afifo_rdata.frc;
      cnt_ce[5]   <= take;
      cnt_ce[6]   <= take && decide;
    end
  end

endmodule
