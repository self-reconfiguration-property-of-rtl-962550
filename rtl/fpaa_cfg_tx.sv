// fpaa_cfg_tx: serial dynamic-reconfiguration link from the FPGA to the
// FPAA. Each gain change is one frame of 11 bytes (88 bits) shifted out MSB
// first, one bit per 20 MHz clock, so a frame takes 88 clocks = 4.4 us,
// well inside the 40 us sample period: the control loop is not disturbed.
// Frame length and bit rate are the published figures. The FPAA vendor's
// byte layout is not reproduced; this design uses its own (see
// msc_pkg::cfg_frame): sync 0xD5, 16-bit device id, control byte, 16-bit
// gain register address, byte count, gain, inverted gain, end byte, and an
// XOR checksum of the first ten bytes.
// Interface: 'start_valid'/'start_ready' accept a gain; 'cfg_cs_n' is low
// for exactly CFG_BITS clocks while 'cfg_data' carries the frame (the
// receiver samples on the rising clock edge); 'done' pulses when the last
// bit has been sent.
module fpaa_cfg_tx
  import msc_pkg::*;
#(
  parameter logic [15:0] DEV_ID    = 16'h0002,
  parameter logic [15:0] GAIN_ADDR = 16'h0100
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start_valid,
  output logic  start_ready,
  input  gain_t gain,
  output logic  cfg_cs_n,
  output logic  cfg_data,
  output logic  done
);
  localparam int unsigned CW = $clog2(CFG_BITS + 1);
  logic [CFG_BITS-1:0] sh;
  logic [CW-1:0]       left;

  assign start_ready = (left == '0);
  assign cfg_data    = sh[CFG_BITS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh       <= '0;
      left     <= '0;
      cfg_cs_n <= 1'b1;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (left == '0) begin
        if (start_valid) begin
          sh       <= cfg_frame(DEV_ID, GAIN_ADDR, 8'(gain));
          left     <= CW'(CFG_BITS);
          cfg_cs_n <= 1'b0;
        end
      end else begin
        sh   <= {sh[CFG_BITS-2:0], 1'b0};
        left <= left - 1'b1;
        if (left == CW'(1)) begin
          cfg_cs_n <= 1'b1;
          done     <= 1'b1;
        end
      end
    end
  end
endmodule
