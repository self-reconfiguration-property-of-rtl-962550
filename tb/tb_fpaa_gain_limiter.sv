// tb_fpaa_gain_limiter: bit-bangs configuration frames into the FPAA model
// and checks the analog path. A correct frame for this device changes the
// gain; frames with a wrong device id, a bad checksum, a zero gain or a
// short length are refused and counted. Outputs must equal
// clamp(1.5 V + G * input, 0, 3 V) with 'sat' raised exactly when clamped.
module tb_fpaa_gain_limiter;
  logic clk = 1'b0, por_n = 1'b0, cfg_cs_n = 1'b1, cfg_data = 1'b0;
  logic signed [31:0] ain [2], aout [2];
  logic sat;
  logic [3:0] gain;
  logic [7:0] rejects;
  int checks = 0, failures = 0;

  fpaa_gain_limiter #(.NCH(2), .DEV_ID(16'h0002), .GAIN_ADDR(16'h0100)) dut (
    .clk, .por_n, .cfg_cs_n, .cfg_data, .ain, .aout, .sat, .gain, .rejects);

  always #25 clk = ~clk;

  task automatic send(input logic [15:0] id, input logic [7:0] g, input logic bad_sum, input int nbits);
    logic [7:0] b [11];
    b[0] = 8'hD5; b[1] = id[15:8]; b[2] = id[7:0]; b[3] = 8'h01; b[4] = 8'h01;
    b[5] = 8'h00; b[6] = 8'h02; b[7] = g; b[8] = ~g; b[9] = 8'h2A;
    b[10] = b[0] ^ b[1] ^ b[2] ^ b[3] ^ b[4] ^ b[5] ^ b[6] ^ b[7] ^ b[8] ^ b[9];
    if (bad_sum) b[10] = ~b[10];
    for (int i = 0; i < nbits; i++) begin
      @(negedge clk);
      cfg_cs_n = 1'b0;
      cfg_data = b[i / 8][7 - i % 8];
    end
    @(negedge clk);
    cfg_cs_n = 1'b1;
    repeat (3) @(negedge clk);
  endtask

  task automatic check_path(input int g);
    for (int n = 0; n < 200; n++) begin
      longint y [2];
      logic s;
      s = 1'b0;
      for (int c = 0; c < 2; c++) begin
        ain[c] = $signed($urandom_range(0, 3_000_000)) - 1_500_000;
        y[c] = 1_500_000 + longint'(g) * longint'(ain[c]);
        if (y[c] > 3_000_000) begin y[c] = 3_000_000; s = 1'b1; end
        if (y[c] < 0)         begin y[c] = 0;         s = 1'b1; end
      end
      #1;
      checks++;
      if (longint'(aout[0]) != y[0] || longint'(aout[1]) != y[1] || sat != s) begin
        failures++;
        $display("FAIL g=%0d in %0d -> %0d expected %0d sat %b/%b", g, ain[0], aout[0], y[0], sat, s);
      end
    end
  endtask

  initial begin
    ain[0] = 0; ain[1] = 0;
    repeat (3) @(posedge clk);
    por_n = 1'b1;
    checks++;
    if (gain != 4'd1) begin failures++; $display("FAIL power-on gain %0d", gain); end
    check_path(1);
    send(16'h0002, 8'd3, 1'b0, 88);
    checks++;
    if (gain != 4'd3 || rejects != 0) begin failures++; $display("FAIL gain %0d after frame", gain); end
    check_path(3);
    send(16'h0001, 8'd5, 1'b0, 88);   // other device
    send(16'h0002, 8'd5, 1'b1, 88);   // checksum
    send(16'h0002, 8'd0, 1'b0, 88);   // gain 0
    send(16'h0002, 8'd5, 1'b0, 80);   // short
    checks++;
    if (gain != 4'd3 || rejects != 8'd4) begin
      failures++; $display("FAIL bad frames: gain %0d rejects %0d", gain, rejects);
    end
    send(16'h0002, 8'd8, 1'b0, 88);
    checks++;
    if (gain != 4'd8) begin failures++; $display("FAIL gain %0d, expected 8", gain); end
    check_path(8);
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
