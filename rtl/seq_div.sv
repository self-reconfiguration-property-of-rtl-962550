// seq_div: unsigned restoring divider, one quotient bit per clock.
// Pulse 'start' with numerator 'num' and denominator 'den'; 'done' pulses
// NW+1 clocks later with 'quo' = num / den and 'rem' = num % den. A zero
// denominator returns an all-ones quotient. Used wherever the controller
// divides (pq reference ratio, approximate THD); a helper of this design.
module seq_div #(
  parameter int unsigned NW = 32,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quo,
  output logic [DW-1:0] rem
);
  localparam int unsigned CW = $clog2(NW + 1);
  logic [NW-1:0] n_q;
  logic [DW-1:0] r_q;
  logic [DW-1:0] d_q;
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;

  // The shift register ends up holding the quotient; it is held until the
  // next start, so 'quo' and 'rem' stay valid after 'done'.
  assign quo = n_q;
  assign rem = r_q;

  // partial remainder shifted left by one bit, and the trial subtraction
  logic [DW:0]   shifted;
  always_comb begin
    shifted = {r_q, n_q[NW-1]};
    trial   = shifted - {1'b0, d_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q <= '0; r_q <= '0; d_q <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n_q  <= num;
        d_q  <= den;
        r_q  <= '0;
        cnt  <= CW'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (!trial[DW]) begin
          r_q <= trial[DW-1:0];
          n_q <= {n_q[NW-2:0], 1'b1};
        end else begin
          r_q <= shifted[DW-1:0];
          n_q <= {n_q[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
