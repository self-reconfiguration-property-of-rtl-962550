// msc_top: the FPAA-FPGA mixed signal controller of a three-phase four-wire
// hybrid active power filter. Two FPAAs condition the sensor signals: the
// first the three phase voltages (fixed gain 1, device id 1), the second
// the three load and three compensator currents (adaptive gain G, device
// id 2). Both sit on one serial configuration bus driven by the FPGA, and
// each accepts only frames carrying its own id. A nine-channel ADC
// digitises the conditioned signals for the FPGA controller, which drives
// the three inverter legs with hysteresis control, evaluates the
// approximate THD and reprograms the current FPAA's gain on the fly.
// Analog quantities (sensor outputs) are signed integers in microvolts; the
// two FPAA and the ADC instances are behavioural models of analog parts.
// The partition into two FPAAs and one FPGA, the 20 MHz clock, 25 kHz
// sampling, 3 V limit and 11-byte frames are published; the channel
// assignment to the FPAAs and all widths are this design's choices.
module msc_top
  import msc_pkg::*;
#(
  parameter int unsigned DIV   = CLK_HZ / SAMPLE_HZ,
  parameter int unsigned N_AVG = 500,
  parameter int unsigned WIN   = 1_500_000
) (
  input  logic               clk,          // 20 MHz
  input  logic               rst_n,
  input  logic               en,           // enable compensation
  input  logic [7:0]         hb,           // hysteresis band, half ADC LSB
  input  logic signed [31:0] v_uv  [PHASES],   // voltage sensor outputs
  input  logic signed [31:0] il_uv [PHASES],   // load current sensor outputs
  input  logic signed [31:0] ic_uv [PHASES],   // compensator current sensors
  output logic [PHASES-1:0]  gate_hi,
  output logic [PHASES-1:0]  gate_lo,
  output gain_t              gain,         // gain the FPGA has selected
  output gain_t              fpaa_gain,    // gain in effect in the current FPAA
  output gain_t              fpaa_v_gain,  // gain in effect in the voltage FPAA
  output logic [15:0]        athd,         // 0.01 % units
  output logic               athd_valid,
  output logic               athd_high,
  output logic               fpaa_sat,     // current FPAA clipped
  output logic               fpaa_v_sat,   // voltage FPAA clipped
  output logic [7:0]         cfg_rejects_v,// frames the voltage FPAA refused
  output logic [7:0]         cfg_rejects_i,// frames the current FPAA refused
  output logic               ref_valid,
  output logic               cfg_cs_n,
  output logic               cfg_data,
  output logic               cfg_done,
  output logic [PHASES-1:0]  toggles
);
  logic signed [31:0] fv_in [3], fv_out [3];
  logic signed [31:0] fi_in [6], fi_out [6];
  logic signed [31:0] adc_in [9];
  logic [ADC_BITS-1:0] adc_code [9];
  logic adc_convst, adc_drdy;

  always_comb begin
    for (int x = 0; x < PHASES; x++) begin
      fv_in[x]     = v_uv[x];
      fi_in[x]     = il_uv[x];
      fi_in[x + 3] = ic_uv[x];
      adc_in[x]     = fv_out[x];
      adc_in[x + 3] = fi_out[x];
      adc_in[x + 6] = fi_out[x + 3];
    end
  end

  fpaa_gain_limiter #(.NCH(3), .DEV_ID(16'h0001)) u_fpaa_v (
    .clk, .por_n(rst_n), .cfg_cs_n, .cfg_data, .ain(fv_in), .aout(fv_out),
    .sat(fpaa_v_sat), .gain(fpaa_v_gain), .rejects(cfg_rejects_v)
  );

  fpaa_gain_limiter #(.NCH(6), .DEV_ID(16'h0002)) u_fpaa_i (
    .clk, .por_n(rst_n), .cfg_cs_n, .cfg_data, .ain(fi_in), .aout(fi_out),
    .sat(fpaa_sat), .gain(fpaa_gain), .rejects(cfg_rejects_i)
  );

  adc_model #(.NCH(9)) u_adc (
    .clk, .rst_n, .convst(adc_convst), .ain(adc_in), .drdy(adc_drdy), .code(adc_code)
  );

  fpga_controller #(.DIV(DIV), .N_AVG(N_AVG), .WIN(WIN), .DEV_ID(16'h0002)) u_fpga (
    .clk, .rst_n, .en, .hb,
    .adc_convst, .adc_drdy, .adc_code,
    .fpaa_sat, .cfg_cs_n, .cfg_data,
    .gate_hi, .gate_lo,
    .gain, .athd_valid, .athd, .athd_high, .ref_valid, .toggles, .cfg_done
  );
endmodule
