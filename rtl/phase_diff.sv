// phase_diff: differential phase of the two channels and anomaly flag.
//
// Each channel delivers a corrected initial phase per block. When both
// results for the same block number have arrived (in either order), the
// difference phic_I - phic_Q is formed modulo one turn (binary angles,
// 2^32 = 360 degrees) and shown for one cycle on diff_valid/diff. The first
// difference after reset or after clear becomes the reference; every later
// difference is compared with it and anomaly is raised when it has drifted by
// more than threshold (in either direction, taking the shorter way around the
// circle). The threshold is an input so that it can be changed in operation.
// Taking the first block as reference is this design's own choice.
module phase_diff
  import phase_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              valid_i,
  input  phase_t            phic_i,
  input  logic [BLK_W-1:0]  blk_i,
  input  logic              valid_q,
  input  phase_t            phic_q,
  input  logic [BLK_W-1:0]  blk_q,
  input  phase_t            threshold,
  output logic              diff_valid,
  output phase_t            diff,
  output logic [BLK_W-1:0]  diff_blk,
  output logic              anomaly,
  output phase_t            drift
);
  logic             have_i, have_q, have_ref;
  phase_t           pi_r, pq_r, ref_r;
  logic [BLK_W-1:0] bi_r, bq_r;
  phase_t           d, dr, dr_abs;

  always_comb begin
    d      = pi_r - pq_r;
    dr     = d - ref_r;
    dr_abs = dr[PHASE_W-1] ? -dr : dr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_i <= 1'b0; have_q <= 1'b0; have_ref <= 1'b0;
      pi_r <= '0; pq_r <= '0; ref_r <= '0; bi_r <= '0; bq_r <= '0;
      diff_valid <= 1'b0; diff <= '0; diff_blk <= '0; anomaly <= 1'b0; drift <= '0;
    end else begin
      diff_valid <= 1'b0;
      if (clear) have_ref <= 1'b0;
      if (valid_i) begin have_i <= 1'b1; pi_r <= phic_i; bi_r <= blk_i; end
      if (valid_q) begin have_q <= 1'b1; pq_r <= phic_q; bq_r <= blk_q; end
      if (have_i && have_q && !valid_i && !valid_q) begin
        have_i <= 1'b0;
        have_q <= 1'b0;
        if (bi_r == bq_r) begin
          diff_valid <= 1'b1;
          diff       <= d;
          diff_blk   <= bi_r;
          if (!have_ref || clear) begin
            have_ref <= 1'b1;
            ref_r    <= d;
            drift    <= '0;
            anomaly  <= 1'b0;
          end else begin
            drift   <= dr;
            anomaly <= (dr_abs > threshold);
          end
        end
      end
    end
  end
endmodule
