// data_fpga_top: two-channel differential phase monitor.
//
// Two identical estimator channels, one per ADC (I and Q), are started by the
// same trigger, fill their input FIFOs from the same instant and estimate,
// block by block, amplitude, frequency and corrected initial phase of the
// tone each ADC sees. The phase-difference stage subtracts the two phases of
// each block pair; a drift of that difference beyond diff_threshold raises
// anomaly, marking data worth a closer look. Everything runs on one clock.
// The two channels, the subtraction of their phases and the block alignment
// follow the method; the single clock, the references of both drift checks
// and their thresholds are this design's own choices.
// Interface: adc_i_lanes / adc_q_lanes carry one beat of the four ADC buses
// per clock; results per channel appear as one-cycle res_i.valid /
// res_q.valid strobes, the difference as diff_valid. diff_clear restarts the
// reference of the drift comparison.
// Each channel also has a drift tracker: block_step is the phase the
// reference tone advances over one block (binary angle), and trk_i / trk_q
// give each block's phase moved back to the start of block 0, its drift from
// block 0 and an anomaly flag against track_threshold, one clock after the
// channel's result.
module data_fpga_top
  import phase_pkg::*;
#(
  parameter int unsigned     M          = M_DEFAULT,
  parameter int unsigned     NUM_BLOCKS = (FIFO_DEPTH * WORD_SAMPLES) / M_DEFAULT,
  parameter int unsigned     FDEPTH     = FIFO_DEPTH,
  parameter int unsigned     N_ITER     = N_ITER_DEFAULT,
  parameter longint unsigned F_SAMP_HZ  = F_SAMP_HZ_DEFAULT
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [LANES-1:0][SAMPLE_W-1:0] adc_i_lanes,
  input  logic [LANES-1:0][SAMPLE_W-1:0] adc_q_lanes,
  input  logic                           trigger,
  input  phase_t                         diff_threshold,
  input  logic                           diff_clear,
  input  phase_t                         block_step,
  input  phase_t                         track_threshold,
  output est_result_t                    res_i,
  output est_result_t                    res_q,
  output logic                           busy,
  output logic                           diff_valid,
  output phase_t                         phase_diff_o,
  output logic [BLK_W-1:0]               diff_blk,
  output phase_t                         drift,
  output logic                           anomaly,
  output track_result_t                  trk_i,
  output track_result_t                  trk_q
);
  logic       busy_i, busy_q, full_i, full_q, zcv_i, zcv_q;
  zc_result_t zc_i, zc_q;

  phase_channel #(.M(M), .NUM_BLOCKS(NUM_BLOCKS), .FDEPTH(FDEPTH),
                  .N_ITER(N_ITER), .F_SAMP_HZ(F_SAMP_HZ)) u_ch_i (
    .clk, .rst_n, .lanes(adc_i_lanes), .trigger, .res(res_i), .busy(busy_i),
    .fifo_full(full_i), .zc_valid(zcv_i), .zc_res(zc_i));

  phase_channel #(.M(M), .NUM_BLOCKS(NUM_BLOCKS), .FDEPTH(FDEPTH),
                  .N_ITER(N_ITER), .F_SAMP_HZ(F_SAMP_HZ)) u_ch_q (
    .clk, .rst_n, .lanes(adc_q_lanes), .trigger, .res(res_q), .busy(busy_q),
    .fifo_full(full_q), .zc_valid(zcv_q), .zc_res(zc_q));

  phase_diff u_diff (
    .clk, .rst_n, .clear(diff_clear),
    .valid_i(res_i.valid), .phic_i(res_i.phic), .blk_i(res_i.blk),
    .valid_q(res_q.valid), .phic_q(res_q.phic), .blk_q(res_q.blk),
    .threshold(diff_threshold), .diff_valid(diff_valid), .diff(phase_diff_o),
    .diff_blk(diff_blk), .anomaly(anomaly), .drift(drift));

  phase_track u_trk_i (
    .clk, .rst_n, .valid(res_i.valid), .blk(res_i.blk), .phic(res_i.phic),
    .block_step, .threshold(track_threshold), .res(trk_i));

  phase_track u_trk_q (
    .clk, .rst_n, .valid(res_q.valid), .blk(res_q.blk), .phic(res_q.phic),
    .block_step, .threshold(track_threshold), .res(trk_q));

  assign busy = busy_i | busy_q;
endmodule
