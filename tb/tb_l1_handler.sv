// tb_l1_handler: fills a queue model of the AFIFO with random entries,
// sends external L1 decisions (mostly matching, some with a wrong event
// number, some with the AFIFO empty), then blocks the external path; checks
// each TFIFO write (accept = external accept OR force, or force alone when
// blocked), the AFIFO pops, sync errors and count enables, one cycle after
// the decision.
module tb_l1_handler;
  import rs_pkg::*;
  logic clk = 0, rst = 1;
  logic l1_ext_en, l1_valid, afifo_re, tfifo_full = 0, tfifo_we;
  l1_word_t l1_word;
  afifo_word_t afifo_rdata, q[$];
  logic afifo_empty;
  tfifo_word_t tfifo_wdata;
  logic [6:0] cnt_ce;
  int checks = 0, failures = 0, n_sync = 0, n_int = 0;

  l1_handler dut (.*);
  always #5 clk = ~clk;

  // AFIFO model outputs, refreshed after every change of the queue
  function automatic void refresh();
    afifo_empty = (q.size() === 0);
    afifo_rdata = afifo_empty ? '0 : q[0];
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    refresh();
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 6000; t++) begin
      logic take, serr, dec;
      afifo_word_t head;
      @(negedge clk);
      if (($urandom % 3) === 0) q.push_back('{frc: ($urandom % 4) === 0, ext: 1'($urandom), evid: 7'($urandom)});
      refresh();
      l1_ext_en = (t < 4000);
      l1_valid  = ($urandom % 2) === 0;
      head      = afifo_rdata;
      l1_word   = '{evid: (($urandom % 10) === 0) ? 7'($urandom) : head.evid, accept: 1'($urandom)};
      #1;
      if (l1_ext_en) begin
        take = l1_valid && !afifo_empty;
        serr = l1_valid && (afifo_empty || head.evid !== l1_word.evid);
        dec  = l1_word.accept || head.frc;
      end else begin
        take = !afifo_empty; serr = 0; dec = head.frc;
      end
      checks++;
      if (afifo_re !== take) begin failures++; $display("FAIL t=%0d afifo_re", t); end
      @(posedge clk); #1;
      if (take) void'(q.pop_front());
      refresh();
      checks++;
      if (tfifo_we !== take || (take && tfifo_wdata !== tfifo_word_t'{accept: dec, frc: head.frc, evid: head.evid}) ||
          cnt_ce[0] !== serr || cnt_ce[5] !== take || cnt_ce[6] !== (take && dec) ||
          cnt_ce[4] !== (take && head.frc) || cnt_ce[1] !== (l1_ext_en && l1_valid && l1_word.accept)) begin
        failures++; $display("FAIL t=%0d we=%b/%b word=%p dec=%b ce=%b", t, tfifo_we, take, tfifo_wdata, dec, cnt_ce);
      end
      if (serr) n_sync++;
      if (take && !l1_ext_en) n_int++;
    end
    checks++;
    if (n_sync === 0 || n_int === 0) begin failures++; $display("FAIL coverage"); end
    $display("sync errors %0d internal decisions %0d", n_sync, n_int);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
