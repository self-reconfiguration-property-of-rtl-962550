// tb_sample_timer: checks that the sampling strobe comes every 800 clocks
// (20 MHz / 25 kHz), is one clock wide, and that the first strobe follows
// reset by one full period (800 clocks after the first
// clock edge with reset released).
module tb_sample_timer;
  logic clk = 1'b0, rst_n = 1'b0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = 0, nticks = 0;

  sample_timer dut (.clk, .rst_n, .tick);

  always #25 clk = ~clk;   // 20 MHz

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tick) begin
      checks++;
      // the first strobe is seen one clock after its register updates
      if (cyc - last != ((nticks == 0) ? 801 : 800)) begin
        failures++;
        $display("FAIL tick %0d after %0d clocks", nticks, cyc - last);
      end
      last = cyc;
      nticks++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (nticks == 6);
    @(posedge clk);
    checks++;
    if (tick) begin failures++; $display("FAIL tick wider than one clock"); end
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
