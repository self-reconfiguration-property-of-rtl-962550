// tb_msc_top_full: one complete control operation of the controller with
// every parameter at its default (25 kHz sampling, one-period power
// average of 500 samples, one-minute gain window). The plant runs at 50 %
// load for 0.2 s (ten mains cycles, 5000 control periods):
//   - the inverter legs switch and the source current stays close to the
//     ideal active sine (rms error below the band of 80 codes = 0.29 A);
//   - ATHD settles at sqrt(2/3)*80/I1p = 8.0 %, below the 16 % target;
//   - the gain stays 1 and no frame is sent, the one-minute window being
//     still open.
module tb_msc_top_full;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] hb = 8'd160;
  logic signed [31:0] v_uv [3], il_uv [3], ic_uv [3];
  logic [2:0] gate_hi, gate_lo, toggles;
  logic [3:0] gain, fpaa_gain, fpaa_v_gain;
  logic [15:0] athd;
  logic athd_valid, athd_high, fpaa_sat, fpaa_v_sat, cfg_cs_n, cfg_data, cfg_done, ref_valid;
  logic [7:0] cfg_rejects_v, cfg_rejects_i;
  int load_pct = 50;
  real err_sq_sum, i1p_amps, thd_pct;
  logic thd_start = 1'b0, thd_done;
  int err_n;
  int checks = 0, failures = 0;

  msc_top dut (
    .clk, .rst_n, .en, .hb, .v_uv, .il_uv, .ic_uv, .gate_hi, .gate_lo, .gain,
    .fpaa_gain, .fpaa_v_gain, .athd, .athd_valid, .athd_high, .fpaa_sat,
    .fpaa_v_sat, .cfg_rejects_v, .cfg_rejects_i, .ref_valid, .cfg_cs_n,
    .cfg_data, .cfg_done, .toggles);

  hapf_plant_model plant (.gate_hi, .load_pct, .thd_start, .thd_done, .thd_pct,
                          .v_uv, .il_uv, .ic_uv,
                          .err_sq_sum, .err_n, .i1p_amps);

  always #25 clk = ~clk;

  int n = 0, n_toggle = 0, n_frames = 0;
  always @(posedge clk) if (rst_n) begin
    if (ref_valid) n++;
    if (toggles != 0) n_toggle++;
    if (cfg_done) n_frames++;
  end

  initial begin
    real s0, rms, e;
    int n0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    while (n < 1000) @(posedge clk);
    s0 = err_sq_sum; n0 = err_n;
    while (n < 5000) @(posedge clk);
    rms = $sqrt((err_sq_sum - s0) / (err_n - n0));
    @(posedge clk iff athd_valid);
    e = 100.0 * $sqrt(2.0 / 3.0) * 80.0 / (i1p_amps * 200000.0 * 4096.0 / 3.0e6);
    $display("50%% load: ATHD %0.2f %% (expected %0.2f %%), source current rms error %0.4f A, %0d switch events",
             real'(athd) / 100.0, e, rms, n_toggle);
    checks++;
    if (real'(athd) < e * 95.0 || real'(athd) > e * 105.0 || athd_high) begin
      failures++; $display("FAIL ATHD");
    end
    checks++;
    if (rms > 0.29) begin failures++; $display("FAIL source current error %0.4f A", rms); end
    checks++;
    if (n_toggle == 0) begin failures++; $display("FAIL no switching"); end
    checks++;
    if (gain != 4'd1 || fpaa_gain != 4'd1 || n_frames != 0 || fpaa_sat) begin
      failures++; $display("FAIL gain %0d frames %0d", gain, n_frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
