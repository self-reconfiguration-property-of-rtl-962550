// tb_athd_calc: reproduces the approximate-THD grid of hysteresis band HB
// against fundamental peak current I1p (0.1 .. 1.0 per unit each, 1 pu =
// 100 ADC codes). The inputs are those of balanced sinusoidal operation
// (|v|^2 = 1.5 Vp^2 at every instant, p_avg = 1.5 Vp I1p); the expected
// value is sqrt(2/3) * HB / I1p, which gives e.g. 16.33 % for HB = 0.1,
// I1p = 0.5 and 81.65 % on the diagonal. Also checked: the 16 % target
// flag, the saturated result for non-positive power, and that a result
// takes less than one 800-clock sample period.
module tb_athd_calc;
  localparam int N = 500;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0] hb;
  logic signed [34:0] p_sum;
  logic [23:0] v2;
  logic athd_valid, athd_high;
  logic [15:0] athd;
  int checks = 0, failures = 0;

  athd_calc dut (.clk, .rst_n, .in_valid, .hb, .p_sum, .v2, .athd_valid, .athd, .athd_high);

  always #25 clk = ~clk;

  task automatic run(input int hbh, input longint ps, input longint vv, output int lat);
    @(negedge clk);
    hb = 8'(hbh); p_sum = 35'(ps); v2 = 24'(vv); in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!athd_valid) begin @(negedge clk); lat++; end
  endtask

  initial begin
    int lat;
    real expv, got;
    longint vp;
    vp = 2000;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int h = 1; h <= 10; h++) begin
      for (int i = 1; i <= 10; i++) begin
        // HB = 10h codes -> hb = 20h half-LSB; I1p = 10i codes
        run(20 * h, longint'(N) * 3 * vp * (10 * i) / 2, 3 * vp * vp / 2, lat);
        expv = $sqrt(2.0 / 3.0) * (10.0 * h) / (10.0 * i) * 10000.0;
        got  = real'(athd);
        checks++;
        if (expv > 65535.0) begin
          if (athd != 16'hFFFF) begin failures++; $display("FAIL h=%0d i=%0d no saturation", h, i); end
        end else if (got < expv * 0.999 - 2.0 || got > expv * 1.001 + 2.0) begin
          failures++;
          $display("FAIL HB=0.%0d I1p=0.%0d athd=%0d expected %0f", h, i, athd, expv);
        end
        checks++;
        if (athd_high != (expv > 1600.0)) begin failures++; $display("FAIL flag h=%0d i=%0d", h, i); end
        checks++;
        if (lat >= 800) begin failures++; $display("FAIL latency %0d", lat); end
      end
    end
    run(20, 0, 3 * vp * vp / 2, lat);
    checks++;
    if (athd != 16'hFFFF || !athd_high) begin failures++; $display("FAIL zero power"); end
    run(20, -1000000, 3 * vp * vp / 2, lat);
    checks++;
    if (athd != 16'hFFFF || !athd_high) begin failures++; $display("FAIL negative power"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
