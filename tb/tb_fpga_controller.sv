// tb_fpga_controller: the testbench plays the ADC (answering each convert
// strobe with nine codes 1 us later) and the FPAA link. Phase voltages are
// balanced sines of 1500 codes peak, load currents purely active sines of
// 200 codes peak (ATHD 20.4 %), compensator currents random values clearly outside the
// hysteresis band. Checked:
//   - the convert strobe comes every 800 clocks (25 kHz at 20 MHz);
//   - the reference is ready well inside one sample period;
//   - each leg's gate follows the sign of the current error;
//   - ATHD equals sqrt(2/3) * HB / I1p once the average has filled;
//   - with ATHD above 16 %, the first window ends in a gain request of
//     INT(4096 / R) sent as one 88-clock frame carrying that gain;
//   - a saturation report brings the gain back to 1 with another frame.
// The gain window is shortened to 600 samples.
module tb_fpga_controller;
  localparam int WIN = 600;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [7:0] hb = 8'd100;                 // HB = 50 codes
  logic adc_convst, adc_drdy = 1'b0;
  logic [11:0] adc_code [9];
  logic fpaa_sat = 1'b0, cfg_cs_n, cfg_data;
  logic [2:0] gate_hi, gate_lo, toggles;
  logic [3:0] gain;
  logic athd_valid, athd_high, ref_valid, cfg_done;
  logic [15:0] athd;
  int checks = 0, failures = 0;

  fpga_controller #(.WIN(WIN)) dut (
    .clk, .rst_n, .en, .hb, .adc_convst, .adc_drdy, .adc_code, .fpaa_sat,
    .cfg_cs_n, .cfg_data, .gate_hi, .gate_lo, .gain, .athd_valid, .athd,
    .athd_high, .ref_valid, .toggles, .cfg_done);

  always #25 clk = ~clk;

  real pi = 3.141592653589793;
  int n = 0, cyc = 0, last_cs = -1, lat = 0;
  int ic_now [3];
  int imin = 4096, imax = 0;
  int nframes = 0;
  logic [87:0] rx;
  int nbits = 0;
  logic [3:0] last_payload;

  // ADC
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (adc_convst) begin
      checks++;
      if (last_cs >= 0 && cyc - last_cs != 800) begin
        failures++; $display("FAIL convst period %0d", cyc - last_cs);
      end
      last_cs = cyc;
      fork begin
        real th;
        repeat (20) @(posedge clk);
        th = 2.0 * pi * 50.0 * n / 25000.0;
        for (int x = 0; x < 3; x++) begin
          real ph;
          int c;
          ph = th - x * 2.0 * pi / 3.0;
          adc_code[x]     = 12'(2048 + $rtoi(1500.0 * $sin(ph)));
          c = 2048 + $rtoi(200.0 * $sin(ph));
          adc_code[x + 3] = 12'(c);
          ic_now[x] = ($urandom_range(0, 1) == 1) ? $urandom_range(60, 200) : -$urandom_range(60, 200);
          adc_code[x + 6] = 12'(2048 + ic_now[x]);
          if (n < WIN) begin
            if (c < imin) imin = c;
            if (c > imax) imax = c;
            if (2048 + ic_now[x] < imin) imin = 2048 + ic_now[x];
            if (2048 + ic_now[x] > imax) imax = 2048 + ic_now[x];
          end
        end
        n++;
        adc_drdy <= 1'b1;
        @(posedge clk);
        adc_drdy <= 1'b0;
        lat = 0;
      end join_none
    end
    lat++;
    if (ref_valid) begin
      checks++;
      if (lat >= 800) begin failures++; $display("FAIL reference latency %0d", lat); end
    end
  end

  // hysteresis: gate one clock after ref_valid; once the average has
  // filled the reference of a purely active load is close to zero
  always @(posedge clk) if (rst_n) begin
    logic rv;
    rv = ref_valid;
    @(negedge clk);
    if (rv && n > 505) for (int x = 0; x < 3; x++) begin
      checks++;
      if (gate_hi[x] != (ic_now[x] < 0) || gate_lo[x] != (ic_now[x] > 0)) begin
        failures++; $display("FAIL n=%0d leg %0d ic=%0d hi=%b", n, x, ic_now[x], gate_hi[x]);
      end
    end
  end

  // ATHD once the one-period average has filled
  always @(posedge clk) if (athd_valid && n > 510 && n < 520) begin
    real e;
    e = $sqrt(2.0 / 3.0) * 50.0 / 200.0 * 10000.0;
    checks++;
    if (real'(athd) < e * 0.98 || real'(athd) > e * 1.02) begin
      failures++; $display("FAIL athd %0d expected %0f", athd, e);
    end
  end

  // configuration link
  always @(posedge clk) begin
    if (!cfg_cs_n) begin rx = {rx[86:0], cfg_data}; nbits++; end
    if (cfg_done) begin
      checks++;
      if (nbits != 88 || rx[87:80] != 8'hD5) begin
        failures++; $display("FAIL frame of %0d bits, %h", nbits, rx);
      end
      last_payload = rx[27:24];
      nbits = 0;
      nframes++;
    end
  end

  initial begin
    int eg;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (nframes == 1);
    repeat (5) @(posedge clk);
    eg = 4096 / (imax - imin);
    if (eg > 8) eg = 8;
    checks++;
    if (gain != 4'(eg) || last_payload != 4'(eg)) begin
      failures++; $display("FAIL gain %0d frame %0d expected %0d (R=%0d)", gain, last_payload, eg, imax - imin);
    end
    fpaa_sat = 1'b1;
    wait (nframes == 2);
    fpaa_sat = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (gain != 4'd1 || last_payload != 4'd1) begin
      failures++; $display("FAIL gain %0d after saturation", gain);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
