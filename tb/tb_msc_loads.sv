// tb_msc_loads: the four loading cases (20, 50, 70 and 90 % of rated load)
// on the plant model, each from reset with hb = 160 (80 codes) and the gain
// window shortened to 1200 samples. For each case the ATHD and the rms error
// of the source current are measured at gain 1, and again after the first
// window has ended, and the THD of the phase-a source current is measured
// over one mains period each time. Expected, from ATHD = sqrt(2/3)*80/I1p with I1p in
// codes (273 codes per ampere, 6 A peak at full load):
//   - 20 % (19.9 % ATHD, above the 16 % target): the gain rises to
//     INT(4096/R) > 1, ATHD falls by that factor, and the measured THD
//     and error fall too, from above to below the 20 % THD limit;
//   - 50, 70, 90 % (8.0, 5.7, 4.4 %): the target is met, the gain stays 1.
module tb_msc_loads;
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

  msc_top #(.WIN(1200)) dut (
    .clk, .rst_n, .en, .hb, .v_uv, .il_uv, .ic_uv, .gate_hi, .gate_lo, .gain,
    .fpaa_gain, .fpaa_v_gain, .athd, .athd_valid, .athd_high, .fpaa_sat,
    .fpaa_v_sat, .cfg_rejects_v, .cfg_rejects_i, .ref_valid, .cfg_cs_n,
    .cfg_data, .cfg_done, .toggles);

  hapf_plant_model plant (.gate_hi, .load_pct, .thd_start, .thd_done, .thd_pct,
                          .v_uv, .il_uv, .ic_uv,
                          .err_sq_sum, .err_n, .i1p_amps);

  always #25 clk = ~clk;

  int n = 0;
  always @(posedge clk) if (ref_valid) n++;

  task automatic wait_samples(input int k);
    int target;
    target = n + k;
    while (n < target) @(posedge clk);
  endtask

  // ATHD, rms error and measured THD over one mains period (500 samples)
  task automatic measure(output real athd_pct, output real rms, output real thd);
    real s0;
    int n0;
    s0 = err_sq_sum; n0 = err_n;
    thd_start = 1'b1;
    #4us;                                    // two plant steps
    thd_start = 1'b0;
    wait (thd_done);
    rms = $sqrt((err_sq_sum - s0) / (err_n - n0));
    thd = thd_pct;
    @(posedge clk iff athd_valid);
    athd_pct = real'(athd) / 100.0;
  endtask

  initial begin
    int loads [4] = '{20, 50, 70, 90};
    real a1, r1, a2, r2, e1, t1, t2;
    int g;
    for (int c = 0; c < 4; c++) begin
      load_pct = loads[c];
      rst_n = 1'b0; en = 1'b0;
      repeat (5) @(posedge clk);
      rst_n = 1'b1; en = 1'b1;
      wait_samples(600);
      measure(a1, r1, t1);                   // samples 600..1100, gain 1
      wait_samples(100 + 520);               // window ends at 1200, settle
      g = int'(gain);
      measure(a2, r2, t2);
      e1 = 100.0 * $sqrt(2.0 / 3.0) * 80.0 / (i1p_amps * 200000.0 * 4096.0 / 3.0e6);
      $display("%0d %% load: G=1 ATHD %0.2f %% (expected %0.2f %%) THD %0.2f %% error %0.4f A | G=%0d ATHD %0.2f %% THD %0.2f %% error %0.4f A",
               load_pct, a1, e1, t1, r1, g, a2, t2, r2);
      checks++;
      if (a1 < e1 * 0.95 || a1 > e1 * 1.05) begin failures++; $display("FAIL ATHD at gain 1"); end
      checks++;
      if ((e1 > 16.0) != (g > 1) || fpaa_gain != gain) begin failures++; $display("FAIL gain decision"); end
      if (g > 1) begin
        checks++;
        if (a2 < e1 / g * 0.95 || a2 > e1 / g * 1.05) begin failures++; $display("FAIL ATHD after raise"); end
        checks++;
        if (!(r2 < 0.8 * r1)) begin failures++; $display("FAIL error not reduced"); end
        checks++;
        if (!(t2 < 0.8 * t1)) begin failures++; $display("FAIL THD not reduced"); end
        checks++;
        if (!(t1 > 20.0 && t2 < 20.0)) begin failures++; $display("FAIL 20 %% THD limit not crossed"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
