// cordic: sine and cosine of a binary angle by iterative CORDIC rotation.
//
// The angle is an unsigned W-bit fraction of a full turn (2^W = 360 degrees).
// Angles in the second and third quadrants are first turned by half a turn
// and the results negated, which brings every angle within +-90 degrees where
// CORDIC converges. Then W micro-rotations by +-atan(2^-i), one per clock,
// drive the residual angle to zero while rotating the vector (K, 0), K being
// the reciprocal CORDIC gain 0.60725, so that it ends at (cos, sin).
// Outputs are signed W-bit values with 1.0 = 2^(W-2); the error is a few LSBs.
// A sequential core is this design's own choice; only the use of a W = 32-bit
// CORDIC for sin and cos is given by the method.
// Interface: start (ignored while busy) latches angle; done pulses with the
// result W + 1 clocks later; sin/cos hold until the next done. W <= 32.
module cordic #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [W-1:0]        angle,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] sin_o,
  output logic signed [W-1:0] cos_o
);
  localparam int unsigned XW = W + 2;
  localparam int unsigned IW = $clog2(W + 1);

  // atan(2^-i) in units of 2^-32 turn
  function automatic logic [31:0] atan_tab(input int i);
    logic [31:0] t;
    case (i)
      0: t = 32'd536870912;   1: t = 32'd316933406;   2: t = 32'd167458907;
      3: t = 32'd85004756;    4: t = 32'd42667331;    5: t = 32'd21354465;
      6: t = 32'd10679838;    7: t = 32'd5340245;     8: t = 32'd2670163;
      9: t = 32'd1335087;     10: t = 32'd667544;     11: t = 32'd333772;
      12: t = 32'd166886;     13: t = 32'd83443;      14: t = 32'd41722;
      15: t = 32'd20861;      16: t = 32'd10430;      17: t = 32'd5215;
      18: t = 32'd2608;       19: t = 32'd1304;       20: t = 32'd652;
      21: t = 32'd326;        22: t = 32'd163;        23: t = 32'd81;
      24: t = 32'd41;         25: t = 32'd20;         26: t = 32'd10;
      27: t = 32'd5;          28: t = 32'd3;          29: t = 32'd1;
      30: t = 32'd1;          default: t = 32'd0;
    endcase
    return t;
  endfunction

  localparam logic [31:0] K_Q30 = 32'd652032874;   // 0.6072529350 * 2^30

  logic signed [XW-1:0] x, y, xs, ys;
  logic signed [W:0]    z;
  logic signed [W:0]    at;
  logic [IW-1:0]        i;
  logic                 neg;
  logic                 top;      // top bit of the angle after pre-rotation

  assign top = angle[W-2];        // angle[W-1] ^ (angle[W-1] ^ angle[W-2])

  always_comb begin
    xs = x >>> i;
    ys = y >>> i;
    at = $signed({1'b0, W'(atan_tab(int'(i)) >> (32 - W))});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; i <= '0; neg <= 1'b0;
      busy <= 1'b0; done <= 1'b0; sin_o <= '0; cos_o <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          i    <= '0;
          x    <= XW'(K_Q30 >> (32 - W));
          y    <= '0;
          // quadrants 2 and 3: subtract half a turn, negate the result
          neg  <= angle[W-1] ^ angle[W-2];
          // (flipping the top bit adds half a turn; the result is sign-extended)
          z    <= $signed({top, top, angle[W-2:0]});
        end
      end else if (i == IW'(W)) begin
        busy  <= 1'b0;
        done  <= 1'b1;
        cos_o <= neg ? W'(-x) : W'(x);
        sin_o <= neg ? W'(-y) : W'(y);
      end else begin
        if (!z[W]) begin
          x <= x - ys;
          y <= y + xs;
          z <= z - at;
        end else begin
          x <= x + ys;
          y <= y - xs;
          z <= z + at;
        end
        i <= i + 1'b1;
      end
    end
  end
endmodule
