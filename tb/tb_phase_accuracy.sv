// tb_phase_accuracy: phase accuracy of the complete channel against block
// length and signal-to-noise ratio.
//
// Three channels with block lengths of 2^8, 2^10 and 2^12 samples (FIFO sized
// for NBLK blocks each) see the same kind of input: a 62 MHz tone of
// amplitude 100 LSB sampled at 3 GS/s, plus white Gaussian noise (Box-Muller
// from $urandom) for an SNR of 20, 10 and 5 dB, SNR = A^2 / (2 sigma^2). Each
// SNR is one trigger of all three channels. For every block the testbench
// compares phic with the true phase of the block's first sample and prints
// the RMS error next to the bound 1/sqrt(M * SNR) radians of an ideal
// estimator with known frequency.
// The checks are what this design guarantees: every block is processed in
// every run, and at 20 dB every block's phase is within 8 degrees (crossing
// indices off by up to two samples) and its frequency within 0.5 %. At lower SNR the boxcar-filtered zero crossings
// multiply, the frequency estimate breaks down, and the errors are only
// reported.
module tb_phase_accuracy;
  import phase_pkg::*;
  import tone_pkg::*;

  localparam int unsigned NBLK  = 8;
  localparam int unsigned NM    = 3;
  localparam int unsigned MS [NM] = '{256, 1024, 4096};
  localparam int unsigned NSNR  = 3;
  localparam real         SNRS [NSNR] = '{20.0, 10.0, 5.0};
  localparam real         F_OVER_FS = 62.0e6 / 3.0e9;
  localparam real         AMP   = 100.0;
  localparam real         PH    = 55.03;
  localparam int          WATCHDOG = 20_000_000;

  logic clk = 1'b0, rst_n = 1'b0, trigger = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  longint edge_cnt = 0;
  always @(posedge clk) edge_cnt <= edge_cnt + 1;

  int  snr_idx = 0;
  real sigma = 0.0;

  // one standard normal value
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hFFFF_FFFE)) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic logic [7:0] noisy_code(input longint n);
    real x;
    int  c;
    x = 127.0 + AMP * $cos(2.0 * PI * F_OVER_FS * real'(n) + PH * PI / 180.0) + sigma * gauss();
    c = int'($floor(x + 0.5));
    if (c < 0) c = 0;
    if (c > 255) c = 255;
    return 8'(c);
  endfunction

  real sumsq [NM][NSNR];
  real maxerr [NM][NSNR];
  int  nres [NM][NSNR];

  for (genvar g = 0; g < NM; g++) begin : g_m
    localparam int unsigned MG = MS[g];
    logic [LANES-1:0][SAMPLE_W-1:0] lanes;
    est_result_t res;
    zc_result_t  zc;
    logic busy, full, zcv;
    longint n0 = -1;

    phase_channel #(.M(MG), .NUM_BLOCKS(NBLK), .FDEPTH(NBLK * MG / WORD_SAMPLES)) u_ch (
      .clk, .rst_n, .lanes, .trigger, .res, .busy, .fifo_full(full), .zc_valid(zcv), .zc_res(zc));

    always @(posedge clk) begin
      for (int l = 0; l < LANES; l++) lanes[l] <= noisy_code(4 * (edge_cnt + 1) + longint'(l));
      if (trigger) n0 = -1;
      else if (n0 < 0 && u_ch.fifo_wr) n0 = 4 * (edge_cnt - 8);
      if (rst_n && res.valid) begin
        real e, fr;
        e  = bam_diff_deg(res.phic, deg_to_bam(wrap_deg(PH + 360.0 * F_OVER_FS *
                                                        real'(n0 + longint'(MG) * longint'(res.blk)))));
        fr = real'(res.frequency) / 62.0e6 - 1.0;
        sumsq[g][snr_idx] += e * e;
        if ((e < 0 ? -e : e) > maxerr[g][snr_idx]) maxerr[g][snr_idx] = (e < 0 ? -e : e);
        nres[g][snr_idx]++;
        if (snr_idx == 0) begin
          check(e < 8.0 && e > -8.0, $sformatf("M=%0d 20 dB blk %0d phase err %f", MG, res.blk, e));
          check(fr < 0.005 && fr > -0.005, $sformatf("M=%0d 20 dB blk %0d frequency %0d", MG, res.blk, res.frequency));
        end
      end
    end
  end

  function automatic bit all_idle();
    return !g_m[0].busy && !g_m[1].busy && !g_m[2].busy;
  endfunction

  initial begin
    for (int g = 0; g < NM; g++)
      for (int s = 0; s < NSNR; s++) begin sumsq[g][s] = 0.0; maxerr[g][s] = 0.0; nres[g][s] = 0; end
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (13) @(posedge clk);
    for (int s = 0; s < NSNR; s++) begin
      snr_idx = s;
      sigma   = AMP / $sqrt(2.0 * $pow(10.0, SNRS[s] / 10.0));
      @(posedge clk);
      trigger <= 1'b1;
      @(posedge clk);
      trigger <= 1'b0;
      repeat (4) @(posedge clk);
      do @(posedge clk); while (!all_idle());
      repeat (4) @(posedge clk);
    end
    for (int s = 0; s < NSNR; s++)
      for (int g = 0; g < NM; g++) begin
        real rms, bound;
        rms   = (nres[g][s] > 0) ? $sqrt(sumsq[g][s] / real'(nres[g][s])) : 0.0;
        bound = 180.0 / PI / $sqrt(real'(MS[g]) * $pow(10.0, SNRS[s] / 10.0));
        $display("SNR %4.1f dB  M = %4d (2^%0d): blocks %0d  rms error %7.3f deg  max %7.3f deg  ideal %6.3f deg",
                 SNRS[s], MS[g], $clog2(MS[g]), nres[g][s], rms, maxerr[g][s], bound);
        check(nres[g][s] == NBLK, $sformatf("all blocks processed, M=%0d SNR %f", MS[g], SNRS[s]));
      end
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
