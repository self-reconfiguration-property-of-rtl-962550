// pq_reference: reference compensating currents from the simplified
// three-phase instantaneous power (pq) theory,
//     i_c*(x) = i_L(x) - (p_avg / |v|^2) * v(x),   x = a, b, c,
// where p = va*iLa + vb*iLb + vc*iLc is the instantaneous power, p_avg its
// average over one fundamental period and |v|^2 = va^2 + vb^2 + vc^2.
// The formula is the published one; the fixed-point arithmetic is this
// design's own. p_avg is a moving average: a circular buffer of the last
// N_AVG values of p feeds a running sum (N_AVG = 500 samples = 20 ms, one
// 50 Hz cycle at 25 kHz). Until the buffer has filled, the missing samples
// count as zero. The ratio k = sum / (N_AVG * |v|^2) is formed once per
// sample by a sequential divider with F fractional bits and saturated to KW
// bits; then each phase reference is 2*iL - (k*v >> (F-1)), i.e. the output
// has one fractional bit (units of half an ADC LSB).
// Interface: 'in_valid' pulses with one set of offset-free samples; about
// NW+5 clocks later (56 at the defaults, far below the 800-clock sample
// period) 'out_valid' pulses with 'icref2', the power sum 'p_sum' and
// '|v|^2' 'v2' of that sample. Samples arriving while busy are ignored.
module pq_reference
  import msc_pkg::*;
#(
  parameter int unsigned N_AVG = 500,
  parameter int unsigned F     = 16,
  parameter int unsigned KW    = 32,
  parameter int unsigned B     = ADC_BITS,
  // derived widths
  parameter int unsigned PW    = 2 * B + 2,              // p = sum of 3 products
  parameter int unsigned SW    = PW + $clog2(N_AVG),     // running sum of p
  parameter int unsigned VW    = 2 * B,                  // |v|^2
  parameter int unsigned IW    = B + 3                   // reference, half LSB units
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [B-1:0]         v   [PHASES],
  input  logic signed [B-1:0]         il  [PHASES],
  output logic                        out_valid,
  output logic signed [IW-1:0]        icref2 [PHASES],
  output logic signed [SW-1:0]        p_sum,
  output logic        [VW-1:0]        v2
);
  localparam int unsigned NUMW = SW + F;
  localparam int unsigned DENW = VW + $clog2(N_AVG);
  localparam int unsigned AW   = $clog2(N_AVG);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DIV, S_OUT} state_e;
  state_e state;

  // Moving-average store of the instantaneous power.
  logic signed [PW-1:0] pbuf [N_AVG];
  logic [AW-1:0]        wptr;
  logic                 filled;

  logic signed [PW-1:0] p_now;
  logic        [VW-1:0] v2_now;
  logic signed [PW-1:0] p_old;
  logic signed [B-1:0]  v_q  [PHASES];
  logic signed [B-1:0]  il_q [PHASES];
  logic                 neg_q;

  always_comb begin
    p_now  = '0;
    v2_now = '0;
    for (int x = 0; x < PHASES; x++) begin
      p_now  += PW'(v[x]) * PW'(il[x]);
      v2_now += VW'($unsigned(PW'(v[x]) * PW'(v[x])));
    end
    p_old = filled ? pbuf[wptr] : '0;
  end

  // Divider for k = |sum| * 2^F / (N_AVG * |v|^2).
  logic            div_start, div_busy, div_done;
  logic [NUMW-1:0] div_num, div_quo;
  logic [DENW-1:0] div_den;
  logic [SW-1:0]   sum_mag;

  always_comb begin
    sum_mag = p_sum[SW-1] ? SW'(-p_sum) : SW'(p_sum);
    div_num = {sum_mag, F'(0)};
    div_den = DENW'(v2) * DENW'(N_AVG);
  end

  seq_div #(.NW(NUMW), .DW(DENW)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_quo), .rem()
  );

  // Saturated, signed ratio.
  localparam logic [NUMW-1:0] KMAX = NUMW'({1'b0, {(KW-1){1'b1}}});
  logic signed [KW-1:0] k;
  always_comb begin
    logic [KW-1:0] kmag;
    kmag = (div_quo > KMAX) ? KW'(KMAX) : KW'(div_quo);
    k    = neg_q ? -$signed(kmag) : $signed(kmag);
  end

  // Output stage: 2*iL - k*v / 2^(F-1), saturated to IW bits.
  localparam int unsigned MW = KW + B;
  function automatic logic signed [IW-1:0] sat_iw(input logic signed [MW:0] a);
    localparam logic signed [MW:0] HI = (MW+1)'(2 ** (IW - 1) - 1);
    localparam logic signed [MW:0] LO = -(MW+1)'(2 ** (IW - 1));
    if (a > HI)      sat_iw = IW'(HI);
    else if (a < LO) sat_iw = IW'(LO);
    else             sat_iw = IW'(a);
  endfunction

  always_ff @(posedge clk) begin
    if (state == S_IDLE && in_valid) pbuf[wptr] <= p_now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      wptr      <= '0;
      filled    <= 1'b0;
      p_sum     <= '0;
      v2        <= '0;
      neg_q     <= 1'b0;
      div_start <= 1'b0;
      out_valid <= 1'b0;
      for (int x = 0; x < PHASES; x++) begin
        v_q[x] <= '0; il_q[x] <= '0; icref2[x] <= '0;
      end
    end else begin
      div_start <= 1'b0;
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          p_sum <= p_sum + SW'(p_now) - SW'(p_old);
          v2    <= v2_now;
          v_q   <= v;
          il_q  <= il;
          if (wptr == AW'(N_AVG - 1)) begin
            wptr   <= '0;
            filled <= 1'b1;
          end else begin
            wptr <= wptr + 1'b1;
          end
          state <= S_START;
        end
        S_START: begin
          neg_q     <= p_sum[SW-1];
          div_start <= 1'b1;
          state     <= S_DIV;
        end
        S_DIV: if (div_done) state <= S_OUT;
        S_OUT: begin
          for (int x = 0; x < PHASES; x++) begin
            logic signed [MW:0] kv, r;
            kv = (MW+1)'(k) * (MW+1)'(v_q[x]);
            r  = ((MW+1)'(il_q[x]) <<< 1) - (kv >>> (F - 1));
            icref2[x] <= sat_iw(r);
          end
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A division is only started when the divider is idle.
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

endmodule
