// hapf_plant_model: crude behavioural model of the three-phase four-wire
// hybrid active power filter and its load, for testbenches only. Every
// STEP_NS it advances time and produces sensor outputs in microvolts:
//   - phase voltages 110 V rms, 50 Hz, sensed at 7700 uV/V (1.2 V peak);
//   - a load current per phase of an active fundamental of 'load_pct' % of
//     6 A peak, a reactive part of 30 % of it and a 5th harmonic of 25 %;
//   - a compensator current per phase that ramps up at SLOPE A/s while
//     its leg's upper switch is on and down while it is off (an idealised
//     coupling inductor with constant driving voltage);
// currents are sensed at 200000 uV/A. It also reports the source current
// error: source current (load minus compensator) minus its ideal active
// sine, summed as squares for an rms figure. On 'thd_start' it measures the
// THD of the phase-a source current over exactly one 50 Hz period:
// THD = sqrt(I_rms^2 - I1_rms^2) / I1_rms, with I1 from a one-bin Fourier
// sum, so every harmonic and the switching ripple count.
module hapf_plant_model #(
  parameter int  STEP_NS = 2000,
  parameter real SLOPE   = 3000.0          // A/s: 0.12 A per 40 us sample
) (
  input  logic [2:0]         gate_hi,
  input  int                 load_pct,
  input  logic               thd_start,
  output logic               thd_done,
  output real                thd_pct,
  output logic signed [31:0] v_uv  [3],
  output logic signed [31:0] il_uv [3],
  output logic signed [31:0] ic_uv [3],
  output real                err_sq_sum,
  output int                 err_n,
  output real                i1p_amps
);
  real pi = 3.141592653589793;
  real t = 0.0;
  real ic [3] = '{0.0, 0.0, 0.0};

  localparam int PERIOD_STEPS = 20_000_000 / STEP_NS;
  int  thd_cnt = 0;
  real s2, sc, ss;

  always_comb i1p_amps = 6.0 * load_pct / 100.0;

  initial begin
    err_sq_sum = 0.0;
    err_n = 0;
    thd_done = 1'b0;
    thd_pct = 0.0;
    for (int x = 0; x < 3; x++) begin v_uv[x] = 0; il_uv[x] = 0; ic_uv[x] = 0; end
    forever begin
      #(STEP_NS * 1ns);
      t += STEP_NS * 1.0e-9;
      for (int x = 0; x < 3; x++) begin
        real ph, v, il, ia, is;
        ph = 2.0 * pi * 50.0 * t - x * 2.0 * pi / 3.0;
        v  = 155.56 * $sin(ph);
        ia = i1p_amps * $sin(ph);
        il = ia + 0.3 * i1p_amps * $cos(ph) + 0.25 * i1p_amps * $sin(5.0 * ph);
        ic[x] += (gate_hi[x] ? SLOPE : -SLOPE) * STEP_NS * 1.0e-9;
        is = il - ic[x];
        err_sq_sum += (is - ia) * (is - ia);
        err_n++;
        v_uv[x]  = $rtoi(v * 7700.0);
        il_uv[x] = $rtoi(il * 200000.0);
        ic_uv[x] = $rtoi(ic[x] * 200000.0);
        if (x == 0 && thd_cnt > 0) begin
          s2 += is * is;
          sc += is * $cos(ph);
          ss += is * $sin(ph);
        end
      end
      if (thd_start && thd_cnt == 0) begin
        thd_cnt = PERIOD_STEPS;
        s2 = 0.0; sc = 0.0; ss = 0.0;
        thd_done = 1'b0;
      end else if (thd_cnt > 0) begin
        thd_cnt--;
        if (thd_cnt == 0) begin
          real irms2, i1rms2;
          irms2  = s2 / PERIOD_STEPS;
          i1rms2 = 2.0 * ((sc / PERIOD_STEPS) ** 2 + (ss / PERIOD_STEPS) ** 2);
          thd_pct  = 100.0 * $sqrt((irms2 - i1rms2) / i1rms2);
          thd_done = 1'b1;
        end
      end
    end
  end
endmodule
