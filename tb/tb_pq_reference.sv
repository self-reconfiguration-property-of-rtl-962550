// tb_pq_reference: drives balanced three-phase voltages with load currents
// made of an active fundamental, a reactive fundamental and a 5th harmonic.
// Each output is compared with (a) a bit-exact integer evaluation of
// i_c* = i_L - p_avg/|v|^2 * v written in the testbench, and (b) once the
// one-period average has filled, with the physical expectation that the
// reference equals the load current minus its active part, within a few
// LSB. It also checks that a result takes less than one 800-clock sample
// period.
module tb_pq_reference;
  localparam int N = 500, B = 12, F = 16;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [B-1:0]  v [3], il [3];
  logic signed [B+2:0]  icref2 [3];
  logic signed [2*B+2+$clog2(N)-1:0] p_sum;
  logic [2*B-1:0] v2;
  int checks = 0, failures = 0;

  pq_reference dut (.clk, .rst_n, .in_valid, .v, .il, .out_valid, .icref2, .p_sum, .v2);

  always #25 clk = ~clk;

  longint hist [$];
  longint sum_m = 0;
  real pi = 3.141592653589793;

  initial begin
    int lat;
    real th, ia;
    longint pm, v2m, q, k, kv, r, exp2;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1200; n++) begin
      th = 2.0 * pi * 50.0 * n / 25000.0;
      pm = 0; v2m = 0;
      for (int x = 0; x < 3; x++) begin
        real ph;
        ph = th - x * 2.0 * pi / 3.0;
        v[x]  = B'($rtoi(1500.0 * $sin(ph)));
        il[x] = B'($rtoi(600.0 * $sin(ph) + 200.0 * $cos(ph) + 150.0 * $sin(5.0 * ph)));
        pm  += longint'(v[x]) * longint'(il[x]);
        v2m += longint'(v[x]) * longint'(v[x]);
      end
      hist.push_back(pm);
      sum_m += pm;
      if (hist.size() > N) sum_m -= hist.pop_front();
      @(negedge clk); in_valid = 1'b1;
      @(negedge clk); in_valid = 1'b0;
      lat = 1;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat >= 800) begin failures++; $display("FAIL latency %0d", lat); end
      // bit-exact model
      q = ((sum_m < 0 ? -sum_m : sum_m) <<< F) / (longint'(N) * v2m);
      if (q > 64'sd2147483647) q = 64'sd2147483647;
      k = (sum_m < 0) ? -q : q;
      for (int x = 0; x < 3; x++) begin
        kv = k * longint'(v[x]);
        r  = (longint'(il[x]) <<< 1) - (kv >>> (F - 1));
        if (r > 16383) r = 16383;
        if (r < -16384) r = -16384;
        checks++;
        if (longint'(icref2[x]) != r) begin
          failures++;
          $display("FAIL n=%0d x=%0d icref2=%0d expected %0d", n, x, icref2[x], r);
        end
        // physical check after one full period
        if (n >= N + 5) begin
          real ph;
          ph = th - x * 2.0 * pi / 3.0;
          ia = 200.0 * $cos(ph) + 150.0 * $sin(5.0 * ph);
          checks++;
          if ((real'(icref2[x]) / 2.0 - ia) > 6.0 || (real'(icref2[x]) / 2.0 - ia) < -6.0) begin
            failures++;
            $display("FAIL n=%0d x=%0d non-active current %0f expected %0f", n, x, real'(icref2[x]) / 2.0, ia);
          end
        end
      end
      checks++;
      if (longint'(p_sum) != sum_m || longint'(v2) != v2m) begin
        failures++;
        $display("FAIL n=%0d p_sum %0d/%0d v2 %0d/%0d", n, p_sum, sum_m, v2, v2m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
