// tb_hysteresis_pwm: random references, currents and bands; a leg must
// switch its upper device off when i_c > i_c* + HB, on when i_c < i_c* - HB
// and hold inside the band; the gates must be complementary with 'en' high,
// all off with 'en' low, and 'toggles' must flag exactly the legs that
// changed. The expected leg states are kept by the testbench.
module tb_hysteresis_pwm;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic [7:0] hb;
  logic signed [14:0] icref2 [3];
  logic signed [11:0] ic [3];
  logic [2:0] gate_hi, gate_lo, toggles;
  int checks = 0, failures = 0;
  logic [2:0] s_m;

  hysteresis_pwm dut (.clk, .rst_n, .en, .in_valid, .hb, .icref2, .ic, .gate_hi, .gate_lo, .toggles);

  always #25 clk = ~clk;

  initial begin
    logic [2:0] s_old;
    int e, nin = 0, nhi = 0, nlo = 0;
    hb = 8'd10;
    for (int x = 0; x < 3; x++) begin icref2[x] = '0; ic[x] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (gate_hi != 3'b000 || gate_lo != 3'b000) begin failures++; $display("FAIL gates on while disabled"); end
    en = 1'b1;
    s_m = 3'b000;
    for (int n = 0; n < 3000; n++) begin
      hb = 8'($urandom_range(1, 40));
      for (int x = 0; x < 3; x++) begin
        icref2[x] = 15'($signed($urandom_range(0, 4000)) - 2000);
        ic[x]     = 12'((int'(icref2[x]) / 2) + $signed($urandom_range(0, 60)) - 30);
      end
      s_old = s_m;
      for (int x = 0; x < 3; x++) begin
        e = 2 * int'(ic[x]) - int'(icref2[x]);
        if (e > int'(hb))       begin s_m[x] = 1'b0; nhi++; end
        else if (e < -int'(hb)) begin s_m[x] = 1'b1; nlo++; end
        else nin++;
      end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (gate_hi != s_m || gate_lo != ~s_m || toggles != (s_m ^ s_old)) begin
        failures++;
        $display("FAIL n=%0d hi=%b lo=%b tog=%b expected %b", n, gate_hi, gate_lo, toggles, s_m);
      end
      @(negedge clk);
    end
    checks++;
    if (nin == 0 || nhi == 0 || nlo == 0) begin failures++; $display("FAIL cases not all seen"); end
    en = 1'b0;
    @(negedge clk);
    checks++;
    if (gate_hi != 3'b000 || gate_lo != 3'b000) begin failures++; $display("FAIL gates on after disable"); end
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
