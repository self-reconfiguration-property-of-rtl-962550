// sample_timer: divides the system clock down to the ADC sampling strobe.
// A down-counter reloads every DIV clocks and emits a one-clock 'tick'; with
// the published 20 MHz clock and 25 kHz sample rate DIV is 800, i.e. one
// control period of 40 us. The first tick comes DIV clocks after reset.
// 'tick' is registered. The counter structure is this design's own choice.
module sample_timer #(
  parameter int unsigned DIV = msc_pkg::CLK_HZ / msc_pkg::SAMPLE_HZ
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = $clog2(DIV);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= CW'(DIV - 1);
      tick <= 1'b0;
    end else begin
      tick <= (cnt == '0);
      cnt  <= (cnt == '0) ? CW'(DIV - 1) : cnt - 1'b1;
    end
  end
endmodule
