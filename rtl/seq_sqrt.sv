// seq_sqrt: unsigned integer square root, one result bit per clock.
//
// root = floor(sqrt(radicand)) for an RW-bit radicand (RW even), by the
// digit-by-digit (shift-and-subtract) method. start (ignored while busy)
// latches the radicand; done pulses RW/2 + 1 clocks later and root holds until
// the next done. Used for the square root of the amplitude equation.
// The method used a vendor floating-point square root; this integer version
// is this design's own choice.
module seq_sqrt #(
  parameter int unsigned RW = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [RW-1:0]     radicand,
  output logic              busy,
  output logic              done,
  output logic [RW/2-1:0]   root
);
  localparam int unsigned QW = RW / 2;
  localparam int unsigned CW = $clog2(QW + 1);

  logic [RW-1:0] a;          // radicand bits still to bring down
  logic [QW+2:0] rem;        // partial remainder
  logic [QW-1:0] q;
  logic [CW-1:0] n;
  logic [QW+2:0] rem_sh, trial;

  always_comb begin
    rem_sh = {rem[QW:0], a[RW-1:RW-2]};
    trial  = rem_sh - (QW+3)'({q, 2'b01});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0; rem <= '0; q <= '0; n <= '0;
      busy <= 1'b0; done <= 1'b0; root <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          a    <= radicand;
          rem  <= '0;
          q    <= '0;
          n    <= CW'(QW);
        end
      end else if (n == '0) begin
        busy <= 1'b0;
        done <= 1'b1;
        root <= q;
      end else begin
        n <= n - 1'b1;
        a <= {a[RW-3:0], 2'b00};
        if (!trial[QW+2]) begin
          rem <= trial;
          q   <= {q[QW-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          q   <= {q[QW-2:0], 1'b0};
        end
      end
    end
  end
endmodule
