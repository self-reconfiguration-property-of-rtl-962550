// tb_gain_calc: emulates the analog path around the gain selector. Six
// current channels carry a triangle of peak-to-peak range R_true codes,
// amplified by the gain the block has taken (the testbench plays the FPAA
// and the configuration link, accepting requests after a random delay).
// Expected gains are worked out as INT(4096 / R_true) clamped to 1..8:
//   - light load, target missed: the gain rises to INT(W/R);
//   - same load, target met:     no change;
//   - larger load that clips:    the clipping is reported as saturation
//                                and the gain falls to 1 at once;
//   - light load, target missed: the gain rises to the G_MAX clamp;
//   - a lone saturation report:  the gain falls to 1 at once.
// Windows are shortened to 40 samples.
module tb_gain_calc;
  localparam int WIN = 40;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [11:0] code [6];
  logic sat = 1'b0, athd_high = 1'b0, req_valid, req_ready = 1'b0;
  logic [3:0] req_gain, gain;
  int checks = 0, failures = 0;
  int rtrue = 400;
  int g_fpaa = 1;
  int nreq = 0;

  gain_calc #(.WIN(WIN)) dut (.clk, .rst_n, .in_valid, .code, .sat, .athd_high,
                              .req_valid, .req_ready, .req_gain, .gain);

  always #25 clk = ~clk;

  // configuration link: accept after 0..5 clocks
  always @(negedge clk) begin
    req_ready = 1'b0;
    if (req_valid && $urandom_range(0, 5) == 0) req_ready = 1'b1;
  end
  always @(posedge clk) if (req_valid && req_ready) begin
    g_fpaa = int'(req_gain);
    nreq++;
  end

  // one sample of every channel: triangle with period 8 samples
  int ph = 0;
  task automatic sample();
    int t, a;
    t = (ph < 4) ? ph : 8 - ph;          // 0..4..0
    ph = (ph + 1) % 8;
    a = (t * rtrue) / 4 - rtrue / 2;     // -R/2 .. +R/2
    @(negedge clk);
    for (int c = 0; c < 6; c++) begin
      int y;
      y = 2048 + g_fpaa * a + (c % 2);
      if (y > 4095) begin y = 4095; sat = 1'b1; end
      if (y < 0)    begin y = 0;    sat = 1'b1; end
      code[c] = 12'(y);
    end
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(negedge clk);
    sat = 1'b0;
  endtask

  function automatic int expect_g(input int r);
    int g;
    g = 4096 / (r + 1);                  // +1: the odd channels add one code
    if (g < 1) g = 1;
    if (g > 8) g = 8;
    return g;
  endfunction

  task automatic check_gain(input int e, input string what);
    checks++;
    if (int'(gain) != e || g_fpaa != e) begin
      failures++;
      $display("FAIL %s: gain %0d (link %0d) expected %0d", what, gain, g_fpaa, e);
    end
  endtask

  initial begin
    for (int c = 0; c < 6; c++) code[c] = 12'd2048;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // light load, ATHD above target
    athd_high = 1'b1;
    rtrue = 700;
    repeat (3 * WIN) sample();
    check_gain(expect_g(700), "raise at light load");
    // target met: no further change even with a smaller signal
    athd_high = 1'b0;
    rtrue = 300;
    repeat (3 * WIN) sample();
    check_gain(expect_g(700), "hold when target met");
    // load grows: the amplified signal clips, the gain must drop to 1
    rtrue = 1300;
    repeat (3 * WIN) sample();
    check_gain(1, "saturation on larger range");
    // light load again, raise to the clamp
    athd_high = 1'b1;
    rtrue = 200;
    repeat (3 * WIN) sample();
    check_gain(8, "clamp to G_MAX");
    // saturation
    @(negedge clk); sat = 1'b1;
    repeat (20) @(negedge clk);
    sat = 1'b0;
    check_gain(1, "saturation fallback");
    checks++;
    // a window that straddles the last load step may add one intermediate gain
    if (nreq < 4 || nreq > 5) begin failures++; $display("FAIL %0d requests, expected 4 or 5", nreq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
