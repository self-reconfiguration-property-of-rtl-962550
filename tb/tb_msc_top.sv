// tb_msc_top: end-to-end run of the mixed signal controller on the plant
// model, with the gain window shortened to 1000 samples (40 ms) and all
// other parameters at their defaults. Scenario and checks:
//   1. 20 % load, gain 1, band hb = 160 (80 codes): once the power average
//      has filled, ATHD must read sqrt(2/3)*80/I1p (I1p in codes), about
//      19.9 %, above the 16 % target;
//   2. the window ends with a gain raise to INT(4096/R): the frame must be
//      taken by the current FPAA and refused by the voltage FPAA;
//   3. with the higher gain ATHD must drop by the gain factor and the rms
//      error of the source current must fall (the band in amperes shrinks);
//   4. a step to 90 % load clips the amplified signal: the FPAA reports
//      saturation and the gain returns to 1;
//   5. at 90 % load and gain 1 the target is met and the gain stays 1.
// Each mechanism (leg switching, ATHD above and below target, gain raise,
// saturation fallback, frame accepted, frame refused) is counted and must
// occur at least once.
module tb_msc_top;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] hb = 8'd160;
  logic signed [31:0] v_uv [3], il_uv [3], ic_uv [3];
  logic [2:0] gate_hi, gate_lo, toggles;
  logic [3:0] gain, fpaa_gain, fpaa_v_gain;
  logic [15:0] athd;
  logic athd_valid, athd_high, fpaa_sat, fpaa_v_sat, cfg_cs_n, cfg_data, cfg_done, ref_valid;
  logic [7:0] cfg_rejects_v, cfg_rejects_i;
  int load_pct = 20;
  real err_sq_sum, i1p_amps, thd_pct;
  logic thd_start = 1'b0, thd_done;
  int err_n;
  int checks = 0, failures = 0;

  msc_top #(.WIN(1000)) dut (
    .clk, .rst_n, .en, .hb, .v_uv, .il_uv, .ic_uv, .gate_hi, .gate_lo, .gain,
    .fpaa_gain, .fpaa_v_gain, .athd, .athd_valid, .athd_high, .fpaa_sat,
    .fpaa_v_sat, .cfg_rejects_v, .cfg_rejects_i, .ref_valid, .cfg_cs_n,
    .cfg_data, .cfg_done, .toggles);

  hapf_plant_model plant (.gate_hi, .load_pct, .thd_start, .thd_done, .thd_pct,
                          .v_uv, .il_uv, .ic_uv,
                          .err_sq_sum, .err_n, .i1p_amps);

  always #25 clk = ~clk;

  // event counters
  int n = 0, n_toggle = 0, n_hi = 0, n_lo = 0, n_raise = 0, n_sat = 0, n_frames = 0;
  logic [3:0] g_prev = 4'd1;
  always @(posedge clk) if (rst_n) begin
    if (ref_valid) n++;
    if (toggles != 0) n_toggle++;
    if (athd_valid && n > 520) begin
      if (athd_high) n_hi++; else n_lo++;
    end
    if (cfg_done) n_frames++;
    if (gain > g_prev) n_raise++;
    if (fpaa_sat && gain != 4'd1 && gain == g_prev) n_sat++;
    g_prev <= gain;
  end

  task automatic wait_samples(input int k);
    int target;
    target = n + k;
    while (n < target) @(posedge clk);
  endtask

  function automatic real rms_window(input real s0, input int n0);
    return $sqrt((err_sq_sum - s0) / (err_n - n0));
  endfunction

  task automatic check_athd(input real expect_pct, input string what);
    @(posedge clk iff athd_valid);
    checks++;
    if (real'(athd) < expect_pct * 100.0 * 0.95 || real'(athd) > expect_pct * 100.0 * 1.05) begin
      failures++;
      $display("FAIL %s: ATHD %0.2f %% expected %0.2f %%", what, real'(athd) / 100.0, expect_pct);
    end else
      $display("%s: ATHD %0.2f %% (expected %0.2f %%)", what, real'(athd) / 100.0, expect_pct);
  endtask

  initial begin
    real codes_per_amp, s0, r_g1, r_g;
    int n0, eg;
    codes_per_amp = 200000.0 * 4096.0 / 3.0e6;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    // 1. light load, gain 1
    wait_samples(600);
    s0 = err_sq_sum; n0 = err_n;
    wait_samples(300);
    r_g1 = rms_window(s0, n0);
    check_athd(100.0 * $sqrt(2.0 / 3.0) * 80.0 / (i1p_amps * codes_per_amp), "20% load, G=1");
    checks++;
    if (!athd_high) begin failures++; $display("FAIL target flag not set at light load"); end
    // 2. gain raise at the end of the window
    wait (gain != 4'd1);
    repeat (200) @(posedge clk);
    // load current peak-to-peak: 2 * 1.2 A * sqrt(1.09) + harmonic, see model
    eg = int'(gain);
    checks++;
    if (eg < 3 || eg > 5 || fpaa_gain != gain || fpaa_v_gain != 4'd1 ||
        cfg_rejects_v == 0 || cfg_rejects_i != 0) begin
      failures++;
      $display("FAIL raise: gain %0d fpaa %0d vfpaa %0d rejects %0d/%0d", gain, fpaa_gain,
               fpaa_v_gain, cfg_rejects_v, cfg_rejects_i);
    end
    // 3. settle one period with the new gain, then measure
    wait_samples(550);
    s0 = err_sq_sum; n0 = err_n;
    wait_samples(300);
    r_g = rms_window(s0, n0);
    check_athd(100.0 * $sqrt(2.0 / 3.0) * 80.0 / (eg * i1p_amps * codes_per_amp), "20% load, raised gain");
    $display("source current rms error: %0.4f A at G=1, %0.4f A at G=%0d", r_g1, r_g, eg);
    checks++;
    if (!(r_g < 0.8 * r_g1)) begin failures++; $display("FAIL ripple not reduced"); end
    // 4. full load: saturation, back to gain 1
    load_pct = 90;
    wait_samples(50);
    checks++;
    if (gain != 4'd1 || fpaa_gain != 4'd1) begin failures++; $display("FAIL no saturation fallback, gain %0d", gain); end
    // 5. gain stays 1 through a whole window at full load
    wait_samples(1100);
    checks++;
    if (gain != 4'd1) begin failures++; $display("FAIL gain %0d at full load", gain); end
    check_athd(100.0 * $sqrt(2.0 / 3.0) * 80.0 / (i1p_amps * codes_per_amp), "90% load, G=1");
    // mechanisms
    $display("samples %0d, leg switch events %0d, ATHD high %0d low %0d, raises %0d, saturations %0d, frames %0d, refused by voltage FPAA %0d",
             n, n_toggle, n_hi, n_lo, n_raise, n_sat, n_frames, cfg_rejects_v);
    checks++; if (n_toggle == 0) begin failures++; $display("FAIL no leg switching"); end
    checks++; if (n_hi == 0)     begin failures++; $display("FAIL ATHD never above target"); end
    checks++; if (n_lo == 0)     begin failures++; $display("FAIL ATHD never below target"); end
    checks++; if (n_raise == 0)  begin failures++; $display("FAIL no gain raise"); end
    checks++; if (n_sat == 0)    begin failures++; $display("FAIL no saturation fallback"); end
    checks++; if (n_frames < 2)  begin failures++; $display("FAIL %0d frames", n_frames); end
    checks++; if (cfg_rejects_v == 0) begin failures++; $display("FAIL no frame refused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
