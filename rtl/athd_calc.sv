// athd_calc: approximate total harmonic distortion (ATHD) of the compensated
// current. Under hysteresis control the ripple is approximated by a regular
// triangle of amplitude HB, whose rms value is HB/sqrt(3), so
//     ATHD = HB / (sqrt(3) * I1) = sqrt(2/3) * HB / I1p,
// with the fundamental active peak current I1p = sqrt(2) p_avg /(sqrt(3)|v|).
// Substituting gives the form computed here, ATHD = HB * |v| / p_avg; that
// identity and the fixed point are this design's reading of the published
// equations. In ADC units HB = hb/2 (hb is in half LSB) and
// p_avg = p_sum / N_AVG, so the result in units of 0.01 % is
//     athd = hb * sqrt(v2) * N_AVG * 5000 / p_sum.
// |v| comes from a sequential square root (B clocks), the quotient from a
// sequential divider (NUMW+1 clocks); 'athd_valid' pulses about 60 clocks
// after 'in_valid' at the defaults. A non-positive p_sum (no power drawn)
// or an overflow gives the maximum value 65535. 'athd_high' is set when
// athd exceeds TARGET, 16.00 % by default: the published safety-margin
// target for a 20 % THD limit.
module athd_calc
  import msc_pkg::*;
#(
  parameter int unsigned N_AVG  = 500,
  parameter int unsigned B      = ADC_BITS,
  parameter int unsigned HW     = 8,
  parameter int unsigned TARGET = 1600,
  parameter int unsigned SW     = 2 * B + 2 + $clog2(N_AVG),
  parameter int unsigned VW     = 2 * B
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic        [HW-1:0] hb,
  input  logic signed [SW-1:0] p_sum,
  input  logic        [VW-1:0] v2,
  output logic                 athd_valid,
  output logic        [15:0]   athd,
  output logic                 athd_high
);
  localparam int unsigned RW   = VW / 2;
  localparam int unsigned CW   = $clog2(N_AVG * 5000 + 1);
  localparam int unsigned NUMW = HW + RW + CW;

  typedef enum logic [1:0] {S_IDLE, S_SQRT, S_DIV} state_e;
  state_e state;

  logic [HW-1:0]        hb_q;
  logic signed [SW-1:0] ps_q;
  logic                 sq_done;
  logic [RW-1:0]        root;
  logic                 div_start, div_busy, div_done;
  logic [NUMW-1:0]      num, quo;
  logic [SW-1:0]        den;

  seq_isqrt #(.XW(VW)) u_sqrt (
    .clk, .rst_n, .start(state == S_IDLE && in_valid), .x(v2),
    .done(sq_done), .root(root)
  );

  always_comb begin
    num = NUMW'(hb_q) * NUMW'(root) * NUMW'(N_AVG * 5000);
    den = SW'($unsigned(ps_q));
  end

  seq_div #(.NW(NUMW), .DW(SW)) u_div (
    .clk, .rst_n, .start(div_start), .num(num), .den(den),
    .busy(div_busy), .done(div_done), .quo(quo), .rem()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; hb_q <= '0; ps_q <= '0; div_start <= 1'b0;
      athd_valid <= 1'b0; athd <= '0; athd_high <= 1'b0;
    end else begin
      div_start  <= 1'b0;
      athd_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          hb_q  <= hb;
          ps_q  <= p_sum;
          state <= S_SQRT;
        end
        S_SQRT: if (sq_done) begin
          if (ps_q <= 0) begin
            athd       <= 16'hFFFF;
            athd_high  <= 1'b1;
            athd_valid <= 1'b1;
            state      <= S_IDLE;
          end else begin
            div_start <= 1'b1;
            state     <= S_DIV;
          end
        end
        S_DIV: if (div_done) begin
          athd       <= (quo > NUMW'(16'hFFFF)) ? 16'hFFFF : quo[15:0];
          athd_high  <= (quo > NUMW'(TARGET));
          athd_valid <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
  // A division is only started when the divider is idle.
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

endmodule
