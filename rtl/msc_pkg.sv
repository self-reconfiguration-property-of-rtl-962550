// msc_pkg: constants shared by the blocks of the mixed signal power quality
// controller. The controller conditions the sensed three-phase voltages and
// currents in a programmable analog front end (FPAA), digitises them at
// 25 kHz and runs pq-theory reference generation, hysteresis current control,
// the approximate-THD performance index and the adaptive gain selection in
// the FPGA. The 20 MHz clock, the 25 kHz sampling rate and the 11-byte
// reconfiguration frame are the published figures; the 12-bit ADC width, the
// 3 V full scale in microvolts and the gain range are this design's choices.
package msc_pkg;

  // Clocking (20 MHz configuration/system clock, 25 kHz ADC sampling).
  localparam int unsigned CLK_HZ    = 20_000_000;
  localparam int unsigned SAMPLE_HZ = 25_000;

  // ADC resolution (bits) and its input full scale, 0 .. 3 V, in microvolts.
  localparam int unsigned ADC_BITS  = 12;
  localparam int          ADC_FS_UV = 3_000_000;

  // Number of phases switched by the centre-split inverter (a, b, c).
  localparam int unsigned PHASES    = 3;

  // Largest FPAA gain the controller will request.
  localparam int unsigned G_MAX     = 8;
  localparam int unsigned GW        = 4;     // width of a gain value

  // FPAA dynamic-reconfiguration frame: 11 bytes of 8 bits.
  localparam int unsigned CFG_BYTES = 11;
  localparam int unsigned CFG_BITS  = CFG_BYTES * 8;
  localparam logic [7:0]  CFG_SYNC  = 8'hD5;
  localparam logic [7:0]  CFG_CTRL  = 8'h01;   // "dynamic update" control byte
  localparam logic [7:0]  CFG_COUNT = 8'h02;   // payload bytes: gain, ~gain
  localparam logic [7:0]  CFG_END   = 8'h2A;

  typedef logic signed [ADC_BITS-1:0] sample_t;   // offset removed ADC code
  typedef logic [GW-1:0]              gain_t;

  // Frame assembly, shared by the transmitter and the FPAA model.
  function automatic logic [CFG_BITS-1:0] cfg_frame(input logic [15:0] dev_id,
                                                    input logic [15:0] addr,
                                                    input logic [7:0]  gain);
    logic [7:0] b [CFG_BYTES];
    logic [7:0] x;
    b[0]  = CFG_SYNC;
    b[1]  = dev_id[15:8];
    b[2]  = dev_id[7:0];
    b[3]  = CFG_CTRL;
    b[4]  = addr[15:8];
    b[5]  = addr[7:0];
    b[6]  = CFG_COUNT;
    b[7]  = gain;
    b[8]  = ~gain;
    b[9]  = CFG_END;
    x = 8'h00;
    for (int i = 0; i < CFG_BYTES - 1; i++) x ^= b[i];
    b[10] = x;
    cfg_frame = '0;
    for (int i = 0; i < CFG_BYTES; i++)
      cfg_frame[CFG_BITS-1-8*i -: 8] = b[i];
  endfunction

endpackage
