// fpga_controller: the digital half of the mixed signal controller. Every
// 40 us (800 clocks of 20 MHz) it starts the ADC, and when the nine codes
// arrive (three phase voltages, three load currents, three compensator
// currents, in that order) it
//   1. removes the mid-scale offset (offset binary -> two's complement),
//   2. computes the pq-theory reference currents (pq_reference),
//   3. runs the hysteresis comparators that drive the inverter legs
//      (hysteresis_pwm) against the compensator currents of the same sample,
//   4. evaluates the approximate THD index of the compensated current
//      (athd_calc), and
//   5. tracks the current signal range to choose the FPAA gain (gain_calc),
//      sending every new gain to the FPAA over the serial link (fpaa_cfg_tx).
// The whole loop, ADC conversion included, ends well inside one sample
// period (about 80 clocks at the defaults), as the published design requires.
// The gain is applied to the current channels only; the voltages are
// conditioned at a fixed gain of 1 (this design's choice). Since reference
// and measured currents are scaled by the same gain, the fixed hysteresis
// band 'hb' (half-LSB units) shrinks in true amperes by 1/G: the mechanism
// by which a larger gain lowers the ripple at light load.
module fpga_controller
  import msc_pkg::*;
#(
  parameter int unsigned DIV       = CLK_HZ / SAMPLE_HZ,
  parameter int unsigned N_AVG     = 500,
  parameter int unsigned WIN       = 1_500_000,
  parameter int unsigned TARGET    = 1600,
  parameter logic [15:0] DEV_ID    = 16'h0002,
  parameter logic [15:0] GAIN_ADDR = 16'h0100,
  parameter int unsigned B         = ADC_BITS,
  parameter int unsigned HW        = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [HW-1:0]     hb,
  // ADC
  output logic              adc_convst,
  input  logic              adc_drdy,
  input  logic [B-1:0]      adc_code [9],
  // FPAA
  input  logic              fpaa_sat,
  output logic              cfg_cs_n,
  output logic              cfg_data,
  // inverter
  output logic [PHASES-1:0] gate_hi,
  output logic [PHASES-1:0] gate_lo,
  // status
  output gain_t             gain,
  output logic              athd_valid,
  output logic [15:0]       athd,
  output logic              athd_high,
  output logic              ref_valid,
  output logic [PHASES-1:0] toggles,
  output logic              cfg_done
);
  localparam int unsigned SW = 2 * B + 2 + $clog2(N_AVG);
  localparam int unsigned VW = 2 * B;
  localparam int unsigned IW = B + 3;

  sample_timer #(.DIV(DIV)) u_timer (.clk, .rst_n, .tick(adc_convst));

  logic signed [B-1:0] v [PHASES], il [PHASES], ic [PHASES], ic_q [PHASES];
  logic [B-1:0]        icode [6];

  always_comb begin
    for (int x = 0; x < PHASES; x++) begin
      v[x]  = $signed(adc_code[x]     ^ {1'b1, {(B-1){1'b0}}});
      il[x] = $signed(adc_code[x + 3] ^ {1'b1, {(B-1){1'b0}}});
      ic[x] = $signed(adc_code[x + 6] ^ {1'b1, {(B-1){1'b0}}});
    end
    for (int c = 0; c < 6; c++) icode[c] = adc_code[c + 3];
  end

  // Compensator currents of the sample the reference is computed from.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        for (int x = 0; x < PHASES; x++) ic_q[x] <= '0;
    else if (adc_drdy) ic_q <= ic;
  end

  logic signed [IW-1:0] icref2 [PHASES];
  logic signed [SW-1:0] p_sum;
  logic        [VW-1:0] v2;

  pq_reference #(.N_AVG(N_AVG), .B(B)) u_pq (
    .clk, .rst_n, .in_valid(adc_drdy), .v(v), .il(il),
    .out_valid(ref_valid), .icref2(icref2), .p_sum(p_sum), .v2(v2)
  );

  hysteresis_pwm #(.B(B), .IW(IW), .HW(HW)) u_hyst (
    .clk, .rst_n, .en, .in_valid(ref_valid), .hb, .icref2(icref2), .ic(ic_q),
    .gate_hi, .gate_lo, .toggles
  );

  athd_calc #(.N_AVG(N_AVG), .B(B), .HW(HW), .TARGET(TARGET)) u_athd (
    .clk, .rst_n, .in_valid(ref_valid), .hb, .p_sum, .v2,
    .athd_valid, .athd, .athd_high
  );

  logic  req_valid, req_ready;
  gain_t req_gain;

  gain_calc #(.WIN(WIN), .NCH(6), .B(B)) u_gain (
    .clk, .rst_n, .in_valid(adc_drdy), .code(icode), .sat(fpaa_sat),
    .athd_high, .req_valid, .req_ready, .req_gain, .gain
  );

  fpaa_cfg_tx #(.DEV_ID(DEV_ID), .GAIN_ADDR(GAIN_ADDR)) u_tx (
    .clk, .rst_n, .start_valid(req_valid), .start_ready(req_ready),
    .gain(req_gain), .cfg_cs_n, .cfg_data, .done(cfg_done)
  );
endmodule
