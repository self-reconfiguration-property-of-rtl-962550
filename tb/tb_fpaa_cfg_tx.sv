// tb_fpaa_cfg_tx: sends every gain 1..8 and captures the serial line. Each
// frame must be exactly 88 clocks of chip select (11 bytes of 8 bits, 4.4 us
// at 20 MHz) and must equal the frame assembled here byte by byte:
// D5, id, id, 01, addr, addr, 02, g, ~g, 2A, xor of the ten bytes.
module tb_fpaa_cfg_tx;
  logic clk = 1'b0, rst_n = 1'b0, start_valid = 1'b0, start_ready;
  logic [3:0] gain;
  logic cfg_cs_n, cfg_data, done;
  int checks = 0, failures = 0;

  fpaa_cfg_tx #(.DEV_ID(16'hA55A), .GAIN_ADDR(16'h0123)) dut (
    .clk, .rst_n, .start_valid, .start_ready, .gain, .cfg_cs_n, .cfg_data, .done);

  always #25 clk = ~clk;

  logic [87:0] rx;
  int nbits, ndone;
  always @(posedge clk) begin
    if (!cfg_cs_n) begin rx = {rx[86:0], cfg_data}; nbits++; end
    if (done) ndone++;
  end

  initial begin
    logic [7:0] b [11];
    logic [87:0] want;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 1; g <= 8; g++) begin
      b[0] = 8'hD5; b[1] = 8'hA5; b[2] = 8'h5A; b[3] = 8'h01; b[4] = 8'h01;
      b[5] = 8'h23; b[6] = 8'h02; b[7] = 8'(g); b[8] = ~8'(g); b[9] = 8'h2A;
      b[10] = b[0] ^ b[1] ^ b[2] ^ b[3] ^ b[4] ^ b[5] ^ b[6] ^ b[7] ^ b[8] ^ b[9];
      for (int i = 0; i < 11; i++) want[87 - 8 * i -: 8] = b[i];
      @(negedge clk);
      checks++;
      if (!start_ready) begin failures++; $display("FAIL not ready"); end
      nbits = 0; ndone = 0;
      gain = 4'(g); start_valid = 1'b1;
      @(negedge clk);
      start_valid = 1'b0;
      checks++;
      if (start_ready) begin failures++; $display("FAIL ready while sending"); end
      wait (cfg_cs_n == 1'b1);
      repeat (3) @(negedge clk);
      checks++;
      if (nbits != 88) begin failures++; $display("FAIL g=%0d %0d clocks of chip select", g, nbits); end
      checks++;
      if (rx != want) begin failures++; $display("FAIL g=%0d frame %h expected %h", g, rx, want); end
      checks++;
      if (ndone != 1) begin failures++; $display("FAIL g=%0d done pulses %0d", g, ndone); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
