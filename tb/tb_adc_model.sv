// tb_adc_model: random input voltages, including out-of-range ones; codes
// must be floor(v * 4096 / 3 V) clamped to 0..4095, delivered with 'drdy'
// 20 clocks (1 us) after 'convst' and held until the next conversion.
module tb_adc_model;
  logic clk = 1'b0, rst_n = 1'b0, convst = 1'b0, drdy;
  logic signed [31:0] ain [3];
  logic [11:0] code [3];
  int checks = 0, failures = 0;

  adc_model #(.NCH(3)) dut (.clk, .rst_n, .convst, .ain, .drdy, .code);

  always #25 clk = ~clk;

  initial begin
    longint e [3];
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int c = 0; c < 3; c++) begin
        ain[c] = $signed($urandom_range(0, 3_400_000)) - 200_000;
        e[c] = (longint'(ain[c]) * 4096) / 3_000_000;
        if (ain[c] < 0) e[c] = 0;
        if (e[c] > 4095) e[c] = 4095;
      end
      convst = 1'b1;
      @(negedge clk);
      convst = 1'b0;
      for (int c = 0; c < 3; c++) ain[c] = 0;   // sampled value must be held
      lat = 1;
      while (!drdy) begin @(negedge clk); lat++; end
      checks++;
      // capture edge + 20 conversion clocks
      if (lat != 21) begin failures++; $display("FAIL latency %0d", lat); end
      repeat (5) @(negedge clk);
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (longint'(code[c]) != e[c]) begin
          failures++; $display("FAIL n=%0d c=%0d code %0d expected %0d", n, c, code[c], e[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
