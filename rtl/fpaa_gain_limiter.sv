// fpaa_gain_limiter: behavioural model of the field-programmable analog
// array used as the adaptive signal-conditioning front end. It is not
// synthesizable logic in the real system (the part is analog); analog
// voltages are represented here as signed integers in microvolts.
// Each channel amplifies its sensor signal by the programmed gain G, adds
// a mid-scale offset so the bipolar signal fits the 0..3 V ADC input, and
// limits the output to 0..3 V (the ADC's maximum input). A channel that
// would exceed the limit is clipped and raises 'sat', the saturation
// detection the controller uses to fall back to G = 1. Gain, limit and
// saturation detection are the published functions; the offset, the
// integer representation and the frame check are this model's choices.
// Configuration: while 'cfg_cs_n' is low one bit of 'cfg_data' is taken per
// rising 'clk' edge; when 'cfg_cs_n' returns high after exactly 88 bits the
// frame is compared with msc_pkg::cfg_frame for this device's DEV_ID and
// GAIN_ADDR, and if it matches (sync, id, address, checksum, gain 1..G_MAX)
// the new gain takes effect at once. Any other frame is ignored and counted
// in 'rejects'. 'por_n' is the power-on configuration: gain 1.
module fpaa_gain_limiter
  import msc_pkg::*;
#(
  parameter int unsigned NCH       = 3,
  parameter logic [15:0] DEV_ID    = 16'h0002,
  parameter logic [15:0] GAIN_ADDR = 16'h0100,
  parameter int          FS_UV     = ADC_FS_UV
) (
  input  logic               clk,
  input  logic               por_n,
  input  logic               cfg_cs_n,
  input  logic               cfg_data,
  input  logic signed [31:0] ain  [NCH],
  output logic signed [31:0] aout [NCH],
  output logic               sat,
  output gain_t              gain,
  output logic [7:0]         rejects
);
  localparam int unsigned CW = $clog2(CFG_BITS + 2);
  logic [CFG_BITS-1:0] sh;
  logic [CW-1:0]       nbits;
  logic                cs_q;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      sh      <= '0;
      nbits   <= '0;
      cs_q    <= 1'b1;
      gain    <= gain_t'(1);
      rejects <= '0;
    end else begin
      cs_q <= cfg_cs_n;
      if (!cfg_cs_n) begin
        sh <= {sh[CFG_BITS-2:0], cfg_data};
        if (nbits != '1) nbits <= nbits + 1'b1;
      end else if (!cs_q) begin
        // end of a frame
        nbits <= '0;
        if (nbits == CW'(CFG_BITS) && sh[CFG_BITS-57 -: 8] >= 8'd1 &&
            sh[CFG_BITS-57 -: 8] <= 8'(G_MAX) &&
            sh == cfg_frame(DEV_ID, GAIN_ADDR, sh[CFG_BITS-57 -: 8]))
          gain <= gain_t'(sh[CFG_BITS-57 -: 8]);
        else
          rejects <= rejects + 1'b1;
      end
    end
  end

  // Analog path: gain, mid-scale offset, limiter, saturation detection.
  always_comb begin
    sat = 1'b0;
    for (int c = 0; c < NCH; c++) begin
      longint y;
      y = longint'(FS_UV) / 64'sd2 + longint'(gain) * longint'(ain[c]);
      if (y > longint'(FS_UV)) begin
        aout[c] = FS_UV;
        sat     = 1'b1;
      end else if (y < 0) begin
        aout[c] = 0;
        sat     = 1'b1;
      end else begin
        aout[c] = 32'(y);
      end
    end
  end
endmodule
