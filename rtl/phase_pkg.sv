// phase_pkg: sizes, number formats and result types shared by the differential
// phase estimator.
//
// The estimator measures amplitude, frequency and starting phase of a single
// tone sampled by two 8-bit ADCs at 3 GS/s, in blocks of M = 2400 samples.
// Sizes that come from the method's description: 8-bit samples, 4 ADC buses
// deserialized 1:8 into 256-bit words of 32 samples, a 1024-word input FIFO,
// a 2400 x 8 sample RAM, 26-bit sums of squares, 3 refinement passes and
// 32-bit integer results. Own choices: phases are binary angles (a full turn
// is 2^32, so wrap-around is free), amplitude is unsigned 16.16 in ADC LSBs,
// frequency is in Hz, and sample indices are 12 bits wide.
package phase_pkg;

  localparam int unsigned SAMPLE_W     = 8;
  localparam int unsigned LANES        = 4;     // Qd, Id, Q, I
  localparam int unsigned DESER        = 8;     // 1:8 deserializers
  localparam int unsigned WORD_SAMPLES = LANES * DESER;           // 32
  localparam int unsigned WORD_W       = WORD_SAMPLES * SAMPLE_W; // 256
  localparam int unsigned FIFO_DEPTH   = 1024;
  localparam int unsigned M_DEFAULT    = 2400;  // samples per block
  localparam int unsigned IDX_W        = 12;    // index into a block
  localparam int unsigned C2_W         = 26;    // running sum of v^2
  localparam int unsigned NZ_W         = 8;     // zero-transition count
  localparam int unsigned PHASE_W      = 32;    // binary angle
  localparam int unsigned N_ITER_DEFAULT = 3;
  localparam int unsigned BLK_W        = 8;     // block number
  localparam longint unsigned F_SAMP_HZ_DEFAULT = 64'd3_000_000_000;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [PHASE_W-1:0]          phase_t;

  // Results of one compute-arrays pass over a block.
  typedef struct packed {
    logic [NZ_W-1:0]  nzero;       // number of zero transitions of vb[]
    logic [IDX_W-1:0] jvz_first;   // index of the first transition
    logic [IDX_W-1:0] jvz_last;    // index of the last transition
    logic [C2_W-1:0]  c2_last;     // C2[jvz_last] = sum of v[i]^2, i = 0..jvz_last
    logic             last_rising; // last transition was negative-to-positive
  } zc_result_t;

  // Per-block estimator output.
  typedef struct packed {
    logic             valid;       // one-cycle strobe
    logic [BLK_W-1:0] blk;         // block number within the FIFO load
    logic [31:0]      amplitude;   // peak amplitude, unsigned 16.16, ADC LSB
    logic [31:0]      frequency;   // Hz
    phase_t           phii;        // initial estimate, Eq. (3)
    phase_t           phic;        // corrected initial phase after N_ITER passes
  } est_result_t;

  // Per-block output of the single-channel drift tracker.
  typedef struct packed {
    logic             valid;       // one-cycle strobe
    logic [BLK_W-1:0] blk;         // block number within the FIFO load
    phase_t           phic1;       // phic moved back to the start of block 0
    phase_t           drift;       // phic1 minus phic1 of block 0
    logic             anomaly;     // |drift| above the threshold
  } track_result_t;

  // Offset-binary ADC code to two's complement: subtract 127, saturate +128.
  function automatic sample_t adc_to_twos(input logic [SAMPLE_W-1:0] code);
    logic signed [SAMPLE_W:0] d;
    d = $signed({1'b0, code}) - 9'sd127;
    if (d > 9'sd127) return sample_t'(8'sd127);
    return sample_t'(d[SAMPLE_W-1:0]);
  endfunction

endpackage
