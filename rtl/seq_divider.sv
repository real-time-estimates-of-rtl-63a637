// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Computes quotient = dividend / divisor and the remainder for an NW-bit
// dividend and a DW-bit divisor. start (ignored while busy) latches both
// operands; done pulses NW + 1 clocks later with the results, which hold until
// the next done. A zero divisor gives an all-ones quotient. Used for the
// divisions of the amplitude, frequency and phase-correction equations.
// The method used vendor floating-point dividers; this integer divider, and
// sharing one divider for all the divisions, are this design's own choices.
module seq_divider #(
  parameter int unsigned NW = 64,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] q;
  logic [DW:0]   r;
  logic [DW-1:0] d;
  logic [CW-1:0] n;
  logic [DW:0]   r_shift;
  logic [DW:0]   r_sub;

  always_comb begin
    r_shift = {r[DW-1:0], q[NW-1]};
    r_sub   = r_shift - {1'b0, d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; r <= '0; d <= '0; n <= '0;
      busy <= 1'b0; done <= 1'b0; quotient <= '0; remainder <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          q    <= dividend;
          d    <= divisor;
          r    <= '0;
          n    <= CW'(NW);
        end
      end else if (n == '0) begin
        busy      <= 1'b0;
        done      <= 1'b1;
        quotient  <= q;
        remainder <= r[DW-1:0];
      end else begin
        n <= n - 1'b1;
        if (!r_sub[DW]) begin
          r <= r_sub;
          q <= {q[NW-2:0], 1'b1};
        end else begin
          r <= r_shift;
          q <= {q[NW-2:0], 1'b0};
        end
      end
    end
  end
endmodule
