// hysteresis_pwm: hysteresis current control of the three inverter legs.
// For each phase the measured compensator current i_c is compared with its
// reference i_c*: when i_c exceeds the reference by more than the band HB
// the leg's upper switch is turned off (current falls), when it is below the
// reference by more than HB the upper switch is turned on (current rises),
// and inside the band the leg keeps its state. This is the published control
// law; the comparison is made once per ADC sample, as the controller sees
// the current only through the ADC.
// Both currents are in half-LSB units (ic is doubled here, icref2 arrives
// doubled) so that 'hb' can express the smallest band, half an ADC LSB
// (HB_min = W / 2^(B+1)), as hb = 1.
// Interface: on 'in_valid' the legs update and 'gate_hi'/'gate_lo' change on
// the next clock edge. 'en' low (and reset) turns every switch off; with
// 'en' high the two switches of a leg are complementary. 'toggles' pulses
// for each leg that changed state. No dead time is inserted.
module hysteresis_pwm
  import msc_pkg::*;
#(
  parameter int unsigned B  = ADC_BITS,
  parameter int unsigned IW = B + 3,
  parameter int unsigned HW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic        [HW-1:0] hb,
  input  logic signed [IW-1:0] icref2 [PHASES],
  input  logic signed [B-1:0]  ic     [PHASES],
  output logic [PHASES-1:0]    gate_hi,
  output logic [PHASES-1:0]    gate_lo,
  output logic [PHASES-1:0]    toggles
);
  localparam int unsigned EW = IW + 2;
  logic [PHASES-1:0] s_q, s_d;

  always_comb begin
    for (int x = 0; x < PHASES; x++) begin
      logic signed [EW-1:0] e;
      e = (EW'(ic[x]) <<< 1) - EW'(icref2[x]);
      s_d[x] = s_q[x];
      if (e > $signed(EW'(hb)))       s_d[x] = 1'b0;
      else if (e < -$signed(EW'(hb))) s_d[x] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q     <= '0;
      toggles <= '0;
    end else begin
      toggles <= '0;
      if (!en) begin
        s_q <= '0;
      end else if (in_valid) begin
        toggles <= s_q ^ s_d;
        s_q     <= s_d;
      end
    end
  end

  always_comb begin
    gate_hi = en ? s_q  : '0;
    gate_lo = en ? ~s_q : '0;
  end

  // The two switches of one leg are never on together.
  assert property (@(posedge clk) disable iff (!rst_n) (gate_hi & gate_lo) == '0);

endmodule
