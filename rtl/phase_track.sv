// phase_track: phase drift of one channel over the blocks of a FIFO load.
//
// Block m starts m * M samples after block 0, so even a perfectly stable tone
// gives each block a different starting phase. This stage removes that
// expected advance: phic1 = phic - m * block_step (mod one turn), where
// block_step is the phase the reference tone advances over one block,
// 2^32 * frac(M * f_ref / Fs) as a binary angle. For a stable signal phic1 is
// then the same for every block: the phase of the first sample of block 0.
// The phic1 of block 0 is kept as reference, and each later block reports
// drift = phic1 - reference and raises anomaly when |drift|, taken the short
// way round the circle, exceeds threshold.
// The alignment follows the method's block-to-block comparison; using the
// nominal tone frequency (an input, not the per-block estimate, whose small
// error would grow with m), taking block 0 of each load as reference, and the
// anomaly threshold are this design's own choices. The product is taken
// modulo 2^32, which is exactly modulo one turn.
// Interface: valid/blk/phic come from a channel's est_result_t; block_step and
// threshold are run-time inputs. Timing: res is registered, one clock after
// valid. A block other than 0 that arrives before any block 0 reports zero
// drift.
module phase_track
  import phase_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic [BLK_W-1:0]  blk,
  input  phase_t            phic,
  input  phase_t            block_step,
  input  phase_t            threshold,
  output track_result_t     res
);
  logic   have_ref;
  phase_t ref_r;
  phase_t aligned, dr, dr_abs;

  always_comb begin
    aligned = phic - PHASE_W'(PHASE_W'(blk) * block_step);
    dr      = aligned - ref_r;
    dr_abs  = dr[PHASE_W-1] ? -dr : dr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_ref <= 1'b0;
      ref_r    <= '0;
      res      <= '0;
    end else begin
      res.valid <= 1'b0;
      if (valid) begin
        res.valid <= 1'b1;
        res.blk   <= blk;
        res.phic1 <= aligned;
        if (blk == '0) begin
          have_ref    <= 1'b1;
          ref_r       <= aligned;
          res.drift   <= '0;
          res.anomaly <= 1'b0;
        end else if (have_ref) begin
          res.drift   <= dr;
          res.anomaly <= (dr_abs > threshold);
        end else begin
          res.drift   <= '0;
          res.anomaly <= 1'b0;
        end
      end
    end
  end
endmodule
