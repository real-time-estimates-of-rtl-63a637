// tb_data_fpga_top: end-to-end test of the two-channel phase monitor at its
// full default size: one trigger, a 1024-word FIFO load (32,768 samples per
// channel) and 13 blocks of 2400 samples.
//
// Both ADCs see the same 62 MHz tone sampled at 3 GS/s, the Q ADC with a
// different phase (the I-Q difference is 29.22 degrees). In the Q channel
// DROP samples are skipped during the blocks DROP_LO..DROP_HI, which shifts
// its phase by DROP sample periods (7.44 degrees each) for exactly those
// blocks. Single-channel phase errors of up to about 4 degrees are inherent
// in the method: the frequency comes from zero-transition indices, which are
// quantised to whole samples, so the tolerances are 4.5 degrees per channel
// and 9 degrees for the difference, and the anomaly threshold is 11 degrees.
// After one trigger the testbench checks, for every block of both channels,
// amplitude, frequency and corrected phase against the values of the
// generated tone, the phase difference of every block pair, and that the
// anomaly flag is raised for the shifted blocks and only for them. The two
// drift trackers, given the tone's phase advance per block, must bring every
// block back to block 0's phase, and flag only the shifted Q blocks. It counts
// how often each mechanism happened (FIFO filled, compute-array passes,
// refinement passes, closed-form estimates, differences, anomalies) and fails
// if one never happened. It also checks the time per block against the
// 10.67 ms (640,200 clocks at 60 MHz) the method needs per block.
module tb_data_fpga_top;
  import phase_pkg::*;
  import tone_pkg::*;

  // the top runs with its default parameters; these mirror them
  localparam int unsigned NB       = (FIFO_DEPTH * WORD_SAMPLES) / M_DEFAULT;  // 13 blocks
  localparam int unsigned MM       = M_DEFAULT;
  localparam real         F_OVER_FS = 62.0e6 / 3.0e9;
  localparam real         AMP      = 100.0;
  localparam real         PH_I     = 55.03;
  localparam real         PH_Q     = 25.81;
  localparam int          DROP_LO  = 3;      // fourth and fifth block
  localparam int          DROP_HI  = 4;
  localparam int          DROP     = 3;
  localparam real         TOL_PH   = 4.5;    // degrees: +-1 sample of crossing jitter in Eq. (2)
  localparam longint      WATCHDOG = 64'd6_000_000;

  logic clk = 1'b0, rst_n = 1'b0, trigger = 1'b0, diff_clear = 1'b0;
  logic [LANES-1:0][SAMPLE_W-1:0] adc_i, adc_q;
  est_result_t res_i, res_q;
  logic busy, diff_valid, anomaly;
  phase_t phase_diff_o, drift;
  logic [BLK_W-1:0] diff_blk;
  track_result_t trk_i, trk_q;

  data_fpga_top dut (
    .clk, .rst_n, .adc_i_lanes(adc_i), .adc_q_lanes(adc_q), .trigger,
    .diff_threshold(deg_to_bam(11.0)), .diff_clear, .res_i, .res_q, .busy,
    .diff_valid, .phase_diff_o, .diff_blk, .drift, .anomaly,
    .block_step(deg_to_bam(360.0 * F_OVER_FS * real'(MM))), .track_threshold(deg_to_bam(11.0)),
    .trk_i, .trk_q);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint edge_cnt = 0;
  longint n0 = -1;

  // dropped sample: Q sample n is taken from n+1 inside the dropped blocks
  function automatic longint q_src(input longint n);
    longint b;
    if (n0 < 0) return n;
    b = (n - n0) / longint'(MM);
    if (n >= n0 && b >= DROP_LO && b <= DROP_HI) return n + DROP;
    return n;
  endfunction

  always @(posedge clk) begin
    edge_cnt <= edge_cnt + 1;
    for (int l = 0; l < LANES; l++) begin
      adc_i[l] <= tone_code(4 * (edge_cnt + 1) + l, AMP, F_OVER_FS, PH_I, 1);
      adc_q[l] <= tone_code(q_src(4 * (edge_cnt + 1) + l), AMP, F_OVER_FS, PH_Q, 1);
    end
    if (n0 < 0 && dut.u_ch_i.fifo_wr) n0 = 4 * (edge_cnt - 8);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real exp_phase(input longint blk, input real ph, input bit dropped);
    return wrap_deg(ph + 360.0 * F_OVER_FS * real'(n0 + MM * blk + (dropped ? DROP : 0)));
  endfunction

  // mechanism counters
  int n_full = 0, n_arrays = 0, n_passes = 0, n_phii = 0, n_res_i = 0, n_res_q = 0;
  int n_diff = 0, n_anom = 0, n_trk = 0, n_trk_anom = 0;
  logic full_d = 1'b0;
  longint last_done = 0;

  always @(posedge clk) begin
    full_d <= dut.u_ch_i.fifo_full;
    if (dut.u_ch_i.fifo_full && !full_d) n_full++;
    if (rst_n && dut.u_ch_i.zc_valid) n_arrays++;
    if (dut.u_ch_i.u_est.div_done && dut.u_ch_i.u_est.state == 4'd8) n_passes++;
    if (rst_n && dut.u_ch_i.u_est.phii_done) n_phii++;
    if (rst_n && res_i.valid) begin
      real e;
      n_res_i++;
      e = bam_diff_deg(res_i.phic, deg_to_bam(exp_phase(res_i.blk, PH_I, 0)));
      $display("I blk %0d: A=%f f=%0d Hz phii=%f phic=%f err=%f", res_i.blk,
               real'(res_i.amplitude) / 65536.0, res_i.frequency,
               bam_to_deg(res_i.phii), bam_to_deg(res_i.phic), e);
      check(e < TOL_PH && e > -TOL_PH, $sformatf("I phase blk %0d err %f", res_i.blk, e));
      check(real'(res_i.amplitude) / 65536.0 > AMP * 0.97 && real'(res_i.amplitude) / 65536.0 < AMP * 1.03,
            "I amplitude");
      check(res_i.frequency > 32'd61_950_000 && res_i.frequency < 32'd62_050_000, "I frequency");
      if (last_done != 0)
        check(edge_cnt - last_done <= 640200, "block time within 10.67 ms at 60 MHz");
      last_done = edge_cnt;
    end
    if (rst_n && res_q.valid) begin
      real e;
      bit dr;
      n_res_q++;
      dr = (res_q.blk >= DROP_LO && res_q.blk <= DROP_HI);
      e = bam_diff_deg(res_q.phic, deg_to_bam(exp_phase(res_q.blk, PH_Q, dr)));
      $display("Q blk %0d: A=%f f=%0d Hz phic=%f err=%f", res_q.blk,
               real'(res_q.amplitude) / 65536.0, res_q.frequency, bam_to_deg(res_q.phic), e);
      check(e < TOL_PH && e > -TOL_PH, $sformatf("Q phase blk %0d err %f", res_q.blk, e));
      check(real'(res_q.amplitude) / 65536.0 > AMP * 0.97 && real'(res_q.amplitude) / 65536.0 < AMP * 1.03,
            "Q amplitude");
    end
    if (rst_n && diff_valid) begin
      real expd, e;
      bit dr;
      n_diff++;
      dr = (diff_blk >= DROP_LO && diff_blk <= DROP_HI);
      expd = wrap_deg(PH_I - PH_Q - (dr ? 360.0 * F_OVER_FS * DROP : 0.0));
      e = bam_diff_deg(phase_diff_o, deg_to_bam(expd));
      $display("diff blk %0d: %f deg (expected %f) anomaly=%0d", diff_blk,
               bam_to_deg(phase_diff_o), expd, anomaly);
      check(e < 2.0 * TOL_PH && e > -2.0 * TOL_PH, "phase difference");
    end
  end

  // single-channel drift trackers: every block moved back to block 0 must show
  // block 0's true phase, and only the Q blocks with dropped samples may drift
  always @(posedge clk) begin
    if (rst_n && trk_i.valid) begin
      real e;
      n_trk++;
      e = bam_diff_deg(trk_i.phic1, deg_to_bam(exp_phase(0, PH_I, 0)));
      check(e < TOL_PH && e > -TOL_PH, $sformatf("I aligned phase blk %0d err %f", trk_i.blk, e));
      check(!trk_i.anomaly, $sformatf("I drift flag blk %0d", trk_i.blk));
    end
    if (rst_n && trk_q.valid) begin
      real e;
      bit dr;
      n_trk++;
      dr = (trk_q.blk >= DROP_LO && trk_q.blk <= DROP_HI);
      e = bam_diff_deg(trk_q.phic1, deg_to_bam(exp_phase(0, PH_Q, 0) + (dr ? 360.0 * F_OVER_FS * DROP : 0.0)));
      $display("Q track blk %0d: phic1=%f drift=%f anomaly=%0d", trk_q.blk,
               bam_to_deg(trk_q.phic1), bam_diff_deg(trk_q.drift, 0), trk_q.anomaly);
      check(e < TOL_PH && e > -TOL_PH, $sformatf("Q aligned phase blk %0d err %f", trk_q.blk, e));
      check(trk_q.anomaly == dr, $sformatf("Q drift flag blk %0d", trk_q.blk));
      if (trk_q.anomaly) n_trk_anom++;
    end
  end

  // anomaly is registered together with diff_valid; check it one cycle later
  logic dv_d = 1'b0;
  logic [BLK_W-1:0] db_d;
  always @(posedge clk) begin
    dv_d <= diff_valid;
    db_d <= diff_blk;
    if (rst_n && dv_d) begin
      bit dr;
      dr = (db_d >= DROP_LO && db_d <= DROP_HI);
      if (anomaly) n_anom++;
      check(anomaly == dr, $sformatf("anomaly flag blk %0d", db_d));
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (13) @(posedge clk);
    trigger <= 1'b1;
    @(posedge clk);
    trigger <= 1'b0;
    wait (n_res_i == NB && n_res_q == NB);
    repeat (10) @(posedge clk);
    check(n_diff == NB, "one difference per block");
    check(n_full == 1, "FIFO filled once");
    check(n_arrays == NB, "one compute-arrays pass per block");
    check(n_phii == NB, "one closed-form estimate per block");
    check(n_passes == 3 * NB, "three refinement passes per block");
    check(n_anom > 0, "anomaly raised at least once");
    check(n_trk == 2 * NB, "one drift-tracker result per block and channel");
    check(n_trk_anom > 0, "single-channel drift flag raised at least once");
    check(!busy, "idle after the last block");
    $display("mechanisms: fifo_full=%0d arrays=%0d phii=%0d passes=%0d diffs=%0d anomalies=%0d tracked=%0d track_anomalies=%0d",
             n_full, n_arrays, n_phii, n_passes, n_diff, n_anom, n_trk, n_trk_anom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
