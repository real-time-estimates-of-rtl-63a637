// compute_arrays: one pass over a block that extracts what the estimator's
// closed-form equations need.
//
// While the block streams past (one sample per clock, requested from the
// read state machine), three things run in parallel:
//  * a three-point boxcar vb[j] = (v[j-1] + v[j] + v[j+1]) / 3, j = 1..M-2,
//    streamed out on vb/vb_valid;
//  * zero-transition detection on vb: a transition is counted at index j when
//    vb[j-1] and vb[j] lie on different sides of zero (vb >= 0 is the positive
//    side). The sign is taken from the undivided three-point sum, which is the
//    sign of the exact average. The count Nzero_v (saturating, 8 bits), the
//    first and last transition indices and the direction of the last one are
//    kept;
//  * the running sum of squares C2[j] = sum v[i]^2, i = 0..j (26 bits), whose
//    value at the last transition index is kept.
// Interface: start begins a pass; req asks the read state machine for the next
// sample; samples arrive on v_valid/v/v_idx/v_last; done pulses one clock
// after the last sample and res is then stable until the next start.
// Timing: M + 2 clocks from start to done.
// The three computations and running them in one pass follow the method; the
// sign rule, the 12-bit indices and keeping only the first and last
// transition are this design's own choices.
module compute_arrays
  import phase_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              req,
  input  logic              v_valid,
  input  sample_t           v,
  input  logic [IDX_W-1:0]  v_idx,
  input  logic              v_last,
  output logic              vb_valid,
  output sample_t           vb,
  output logic              done,
  output zc_result_t        res
);
  logic [IDX_W:0]   n_req;
  logic             active;
  sample_t          v_m1, v_m2;
  logic [C2_W-1:0]  c2_run;
  logic             prev_neg;
  logic signed [SAMPLE_W+1:0] s3;
  logic             s3_neg;
  logic [2*SAMPLE_W-1:0] v_sq;

  assign req    = active && (n_req < (IDX_W+1)'(M));
  assign s3     = (SAMPLE_W+2)'(v_m2) + (SAMPLE_W+2)'(v_m1) + (SAMPLE_W+2)'(v);
  assign s3_neg = s3[SAMPLE_W+1];
  assign v_sq   = (2*SAMPLE_W)'($signed(v) * $signed(v));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_req    <= '0;
      active   <= 1'b0;
      v_m1     <= '0;
      v_m2     <= '0;
      c2_run   <= '0;
      prev_neg <= 1'b0;
      vb_valid <= 1'b0;
      vb       <= '0;
      done     <= 1'b0;
      res      <= '0;
    end else begin
      vb_valid <= 1'b0;
      done     <= 1'b0;
      if (start) begin
        active <= 1'b1;
        n_req  <= '0;
        c2_run <= '0;
        res    <= '0;
      end else begin
        if (req) n_req <= n_req + 1'b1;
        if (v_valid && active) begin
          v_m2   <= v_m1;
          v_m1   <= v;
          c2_run <= c2_run + C2_W'(v_sq);
          if (v_idx >= IDX_W'(2)) begin
            // vb for centre index v_idx-1
            vb_valid <= 1'b1;
            vb       <= sample_t'(s3 / 10'sd3);
            prev_neg <= s3_neg;
            if (v_idx >= IDX_W'(3) && s3_neg != prev_neg) begin
              if (res.nzero == '0) res.jvz_first <= v_idx - 1'b1;
              if (res.nzero != '1) res.nzero <= res.nzero + 1'b1;
              res.jvz_last    <= v_idx - 1'b1;
              res.c2_last     <= c2_run;          // C2 up to index v_idx-1
              res.last_rising <= !s3_neg;
            end
          end
          if (v_last) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end
endmodule
