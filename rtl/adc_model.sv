// adc_model: behavioural model of the multi-channel, simultaneously
// sampling A/D converter between the FPAA and the FPGA (the converter is a
// bought part, not logic of this design). Input voltages are signed
// integers in microvolts over a 0..3 V range; the output code is
// floor(v * 2^B / 3 V), clamped to 0..2^B-1. A 'convst' pulse samples every
// channel; 'drdy' pulses CONV_CLKS clocks later with all codes valid,
// which stay until the next conversion. The 3 V range is published; the
// 12-bit resolution and the 1 us conversion time are this model's choices.
module adc_model
  import msc_pkg::*;
#(
  parameter int unsigned NCH       = 9,
  parameter int unsigned B         = ADC_BITS,
  parameter int          FS_UV     = ADC_FS_UV,
  parameter int unsigned CONV_CLKS = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               convst,
  input  logic signed [31:0] ain  [NCH],
  output logic               drdy,
  output logic [B-1:0]       code [NCH]
);
  localparam int unsigned CW = $clog2(CONV_CLKS + 1);
  logic [CW-1:0] cnt;
  logic [B-1:0]  held [NCH];

  function automatic logic [B-1:0] quantise(input logic signed [31:0] v);
    longint q;
    q = (longint'(v) * longint'(2 ** B)) / longint'(FS_UV);
    if (q < 0)                    quantise = '0;
    else if (q > longint'(2 ** B - 1)) quantise = '1;
    else                          quantise = B'(q);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      drdy <= 1'b0;
      for (int c = 0; c < NCH; c++) begin
        held[c] <= '0;
        code[c] <= '0;
      end
    end else begin
      drdy <= 1'b0;
      if (convst && cnt == '0) begin
        for (int c = 0; c < NCH; c++) held[c] <= quantise(ain[c]);
        cnt <= CW'(CONV_CLKS);
      end else if (cnt != '0) begin
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          code <= held;
          drdy <= 1'b1;
        end
      end
    end
  end
endmodule
