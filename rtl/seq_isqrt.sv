// seq_isqrt: unsigned integer square root, one result bit per clock
// (digit-by-digit method). Pulse 'start' with 'x'; 'done' pulses XW/2 clocks
// later with 'root' = floor(sqrt(x)), held until the next start. Used for the
// voltage vector norm |v| of the approximate THD; a helper of this design.
module seq_isqrt #(
  parameter int unsigned XW = 32            // must be even
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [XW-1:0]   x,
  output logic            done,
  output logic [XW/2-1:0] root
);
  localparam int unsigned RW = XW / 2;
  localparam int unsigned CW = $clog2(RW + 1);
  logic [XW-1:0] x_q;
  logic [RW:0]   rem_q;
  logic [RW-1:0] root_q;
  logic [CW-1:0] cnt;
  logic          busy;
  logic [RW+2:0] rem_sh, sub;
  logic          fits;

  always_comb begin
    rem_sh = {rem_q, x_q[XW-1 -: 2]};
    sub    = {1'b0, root_q, 2'b01};
    fits   = (rem_sh >= sub);
  end

  assign root = root_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; rem_q <= '0; root_q <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x_q    <= x;
        rem_q  <= '0;
        root_q <= '0;
        cnt    <= CW'(RW);
        busy   <= 1'b1;
      end else if (busy) begin
        x_q <= {x_q[XW-3:0], 2'b00};
        if (fits) begin
          rem_q  <= (RW+1)'(rem_sh - sub);
          root_q <= {root_q[RW-2:0], 1'b1};
        end else begin
          rem_q  <= rem_sh[RW:0];
          root_q <= {root_q[RW-2:0], 1'b0};
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
