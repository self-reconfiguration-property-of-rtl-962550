// gain_calc: adaptive front-end gain selection. Over a window of WIN
// samples the block tracks the smallest and largest ADC code seen on the
// current channels; their difference is the peak-to-peak range R as seen
// through the present gain g. At the end of the window the new gain is
//     G = INT(W / R_true),  R_true = R / g,  W = 2^B (ADC range in codes),
// found as the largest G in 1..G_MAX with G * R <= W * g. Following the
// published strategy a lower gain is always applied (it avoids clipping)
// and a higher gain is applied only when the performance index says the
// target is missed ('athd_high'). A saturation report from the analog front
// end sets G = 1 at once. The window length (one minute, 1 500 000 samples
// at 25 kHz) follows the published example; the decision rule combining
// ATHD with Eq. G = INT(W/R), G_MAX and the handshake are this design's.
// Interface: 'in_valid' qualifies one set of raw ADC codes 'code'. A new
// gain is offered on 'req_gain' with 'req_valid', held until 'req_ready';
// the handshake also makes it the current gain 'gain' and restarts the
// window. 'saturations' and 'windows' count events for observation.
module gain_calc
  import msc_pkg::*;
#(
  parameter int unsigned WIN   = 1_500_000,
  parameter int unsigned NCH   = 6,
  parameter int unsigned B     = ADC_BITS,
  parameter int unsigned GMAX  = G_MAX
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [B-1:0]  code [NCH],
  input  logic          sat,
  input  logic          athd_high,
  output logic          req_valid,
  input  logic          req_ready,
  output gain_t         req_gain,
  output gain_t         gain
);
  localparam int unsigned WW = $clog2(WIN + 1);
  localparam int unsigned PW = B + GW + 1;

  logic [WW-1:0] wcnt;
  logic [B-1:0]  mn, mx;
  logic [B-1:0]  mn_d, mx_d;
  gain_t         g_new;

  // Running extremes including the samples now arriving.
  always_comb begin
    mn_d = mn;
    mx_d = mx;
    for (int c = 0; c < NCH; c++) begin
      if (code[c] < mn_d) mn_d = code[c];
      if (code[c] > mx_d) mx_d = code[c];
    end
  end

  // G = INT(W * g / R), clamped to 1..GMAX.
  always_comb begin
    logic [PW-1:0] r, lim;
    r     = PW'(mx_d) - PW'(mn_d);
    lim   = PW'(2 ** B) * PW'(gain);
    g_new = gain_t'(1);
    for (int g = 2; g <= int'(GMAX); g++)
      if (PW'(g) * r <= lim) g_new = gain_t'(g);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt      <= '0;
      mn        <= '1;
      mx        <= '0;
      gain      <= gain_t'(1);
      req_valid <= 1'b0;
      req_gain  <= gain_t'(1);
    end else begin
      if (req_valid && req_ready) begin
        req_valid <= 1'b0;
        gain      <= req_gain;
        wcnt      <= '0;
        mn        <= '1;
        mx        <= '0;
      end else if (!req_valid && sat && gain != gain_t'(1)) begin
        req_valid <= 1'b1;
        req_gain  <= gain_t'(1);
      end else if (!req_valid && in_valid) begin
        if (wcnt == WW'(WIN - 1)) begin
          wcnt <= '0;
          mn   <= '1;
          mx   <= '0;
          if (g_new < gain || (g_new > gain && athd_high)) begin
            req_valid <= 1'b1;
            req_gain  <= g_new;
          end
        end else begin
          wcnt <= wcnt + 1'b1;
          mn   <= mn_d;
          mx   <= mx_d;
        end
      end
    end
  end

  // An offered gain is held until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   req_valid && !req_ready |=> req_valid && $stable(req_gain));

endmodule
