// ucnt: universal counter module, N counters of CW bits.
//
// Counter i increments on a clock edge where ce[i] is set. When ps_mask[i]
// is set the counter is prescaled: its own prescale sub-counter counts the
// enables and the main counter increments once every ps_factor enables
// (ps_factor 0 or 1 means no prescaling). The factor is common to all
// counters of the module. The counters are read through sel/rdata
// (combinational) and all cleared by clr. Sixteen 32-bit counters with a
// common prescale factor follow the original design; per-counter prescale
// enable and the read port are this design's choice.
module ucnt #(
  parameter int unsigned N    = 16,
  parameter int unsigned CW   = 32,
  parameter int unsigned PS_W = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         ce,
  input  logic [PS_W:0]        ps_factor,
  input  logic [N-1:0]         ps_mask,
  input  logic                 clr,
  input  logic [$clog2(N)-1:0] sel,
  output logic [CW-1:0]        rdata
);

  logic [CW-1:0] cnt [N];
  logic [PS_W:0] sub [N];

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      for (int i = 0; i < N; i++) begin
        cnt[i] <= '0;
        sub[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (ce[i]) begin
          if (!ps_mask[i] || ps_factor <= 1) begin
            cnt[i] <= cnt[i] + 1'b1;
          end else if (sub[i] >= ps_factor - 1'b1) begin
            sub[i] <= '0;
            cnt[i] <= cnt[i] + 1'b1;
          end else begin
            sub[i] <= sub[i] + 1'b1;
          end
        end
      end
    end
  end

  assign rdata = cnt[sel];

endmodule
