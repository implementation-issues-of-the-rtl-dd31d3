// tb_gcs: runs the command sender with a short turn (100 crossings),
// random command and trigger requests and occasional ECR requests, and
// decodes channel B independently (start bit, format bit, 8 data bits,
// Hamming bits recomputed here, stop bit). Checks: bunch counter and orbit
// pulse; a BCR frame at bcr_bx in every turn, carrying the ECR after an
// ECR request; every command sent at the bunch number of its request
// (possibly in a later turn; behind the BCR frame when requested in the
// window kept free for the BCR) and at least one postponed; every trigger
// byte delivered in order; external orbit restart and presence flag.
module tb_gcs;
  import rs_pkg::*;
  localparam int N = 100;
  logic clk = 0, rst = 1;
  logic use_ext_orbit = 0, ext_orbit = 0, bcr_en = 1, ecr_req = 0;
  logic [BX_W-1:0] bcr_bx = 12'd50;
  logic cmd_req = 0, cmd_ack, trig_req = 0, trig_ack;
  logic [7:0] cmd_data = '0, trig_data = '0;
  logic [15:0] status_in = 16'hBEEF;
  logic [BX_W-1:0] bx;
  logic orbit, chan_b, ext_orbit_present;
  logic [31:0] status;
  logic ev_bcr, ev_ecr, ev_cmd, ev_postponed;
  int checks = 0, failures = 0;

  gcs #(.BX_PER_TURN(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (bx %0d)", what, bx); end
  endtask

  // ---- expected traffic
  logic [7:0] trig_q[$], trig_sent[$];
  int cmd_bx_q[$]; logic [7:0] cmd_data_q[$];
  int n_bcr = 0, n_cmd = 0, n_trig = 0, n_post = 0, n_ecr_frames = 0;
  logic ecr_expected = 0;
  int cycle = 0;

  // ---- channel B decoder
  initial begin
    logic [15:0] f;
    int start_bx;
    forever begin
      @(posedge clk); #1;
      if (!rst && chan_b === 1'b0) begin
        start_bx = int'(bx);              // first bit is on the line this cycle
        f[15] = chan_b;
        for (int k = 14; k >= 0; k--) begin @(posedge clk); #1; f[k] = chan_b; end
        chk(f[15:14] === 2'b00 && f[0] === 1'b1, "frame format");
        chk(f[5:1] === ttc_hamming(f[13:6]), "hamming");
        // the frame was chosen in the cycle before its first bit
        start_bx = (start_bx + N - 1) % N;
        if (f[13:6] === 8'h01 || f[13:6] === 8'h03) begin
          n_bcr++;
          chk(start_bx === int'(bcr_bx), "BCR bunch");
          if (f[13:6] === 8'h03) begin n_ecr_frames++; chk(ecr_expected, "unexpected ECR"); ecr_expected = 0; end
        end else if (f[13] === 1'b1) begin
          n_trig++;
          chk(trig_sent.size() !== 0 && f[13:6] === trig_sent.pop_front(), "trigger order");
        end else begin
          int i;
          n_cmd++;
          i = -1;
          foreach (cmd_data_q[j]) if (cmd_data_q[j] === f[13:6] && i < 0) i = j;
          chk(i >= 0, "unknown command");
          if (i >= 0) begin
            chk(cmd_bx_q[i] === start_bx, "command bunch");
            cmd_bx_q.delete(i); cmd_data_q.delete(i);
          end
        end
      end
    end
  end

  always @(posedge clk) if (!rst) begin
    cycle++;
    if (ev_postponed) n_post++;
  end

  initial begin
    int k = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    // bunch counter
    for (int t = 0; t < 300; t++) begin
      int prev;
      prev = int'(bx);
      @(posedge clk); #1;
      chk(int'(bx) === (prev + 1) % N, "bx count");
      chk(orbit === (bx === 0), "orbit");
    end
    // traffic
    for (int t = 0; t < 30000; t++) begin
      @(negedge clk);
      if (cmd_ack) begin
        cmd_req = 0;
      end
      if (!cmd_req && ($urandom % 40) === 0) begin
        cmd_req = 1; k++;
        cmd_data = {2'b01, 6'(k)};
      end
      if (trig_ack) trig_req = 0;
      if (!trig_req && trig_q.size() !== 0) begin trig_req = 1; trig_data = trig_q.pop_front(); end
      if (($urandom % 25) === 0) trig_q.push_back({2'b10, 6'($urandom)});
      ecr_req = (t % 3000 === 1000);
      if (ecr_req) ecr_expected = 1;
      #1;
      if (cmd_req && cmd_ack) begin
        // inside the BCR guard window a command moves behind the BCR frame
        cmd_bx_q.push_back(((((int'(bcr_bx) - int'(bx) + N) % N) < 16) || (((int'(bx) - int'(bcr_bx) + N) % N) < 16))
                           ? (int'(bcr_bx) + 16) % N : int'(bx)); cmd_data_q.push_back(cmd_data); end
      if (trig_req && trig_ack) trig_sent.push_back(trig_data);
      @(posedge clk);
    end
    cmd_req = 0; trig_req = 0;
    repeat (3 * N) @(posedge clk);
    chk(n_bcr >= 30000 / N - 1, "BCR every turn");
    chk(n_ecr_frames === 10, "ECR frames");
    chk(cmd_data_q.size() <= 1, "commands all sent");
    chk(n_post > 0 && n_cmd > 0 && n_trig > 0, "coverage");
    chk(status[31:16] === 16'hBEEF, "status");
    $display("BCR %0d commands %0d postponed %0d triggers %0d", n_bcr, n_cmd, n_post, n_trig);
    // external orbit
    chk(!ext_orbit_present, "no external orbit yet");
    use_ext_orbit = 1;
    @(negedge clk); ext_orbit = 1; @(negedge clk); ext_orbit = 0;
    #1 chk(bx === 12'd0 && ext_orbit_present, "external orbit restart");
    repeat (2 * N + 5) @(posedge clk);
    #1 chk(!ext_orbit_present, "external orbit lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
