// tb_phase_channel: one estimator channel from ADC buses to results, reduced
// to 2 blocks per trigger and a 160-word FIFO. The channel is triggered twice
// on a 62 MHz tone; for every block the amplitude, frequency and corrected
// phase must match the tone (phase within 4.5 degrees, the bound set by whole-
// sample zero-transition indices), block numbers must count 0, 1, and the
// channel must return to idle and accept the second trigger.
module tb_phase_channel;
  import phase_pkg::*;
  import tone_pkg::*;

  localparam int NB = 2;
  localparam int MM = 2400;
  localparam real FO = 62.0 / 3000.0;
  localparam real PH = 123.4;

  logic clk = 1'b0, rst_n = 1'b0, trigger = 1'b0;
  logic [LANES-1:0][SAMPLE_W-1:0] lanes;
  est_result_t res;
  logic busy, fifo_full, zc_valid;
  zc_result_t zc_res;

  phase_channel #(.NUM_BLOCKS(NB), .FDEPTH(160)) dut (
    .clk, .rst_n, .lanes, .trigger, .res, .busy, .fifo_full, .zc_valid, .zc_res);

  always #5 clk = ~clk;

  longint edge_cnt = 0, n0 = -1;
  int checks = 0, failures = 0, n_res = 0, exp_blk = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    edge_cnt <= edge_cnt + 1;
    for (int l = 0; l < LANES; l++)
      lanes[l] <= tone_code(4 * (edge_cnt + 1) + l, 90.0, FO, PH, 1);
    if (rst_n && dut.fifo_wr && dut.fifo_count == 0) n0 = 4 * (edge_cnt - 8);
    if (rst_n && res.valid) begin
      real e, a;
      e = bam_diff_deg(res.phic, deg_to_bam(wrap_deg(PH + 360.0 * FO * real'(n0 + MM * longint'(res.blk)))));
      a = real'(res.amplitude) / 65536.0;
      $display("blk %0d: A=%f f=%0d phic=%f err=%f", res.blk, a, res.frequency, bam_to_deg(res.phic), e);
      check(e < 4.5 && e > -4.5, "phase");
      check(a > 87.3 && a < 92.7, "amplitude");
      check(res.frequency > 32'd61_950_000 && res.frequency < 32'd62_050_000, "frequency");
      check(int'(res.blk) == exp_blk, "block number");
      exp_blk = (exp_blk + 1) % NB;
      n_res++;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 2; t++) begin
      repeat (7 + t) @(posedge clk);
      trigger <= 1'b1;
      @(posedge clk);
      trigger <= 1'b0;
      @(posedge clk);
      check(busy, "busy after trigger");
      wait (!busy);
      @(posedge clk);
      check(n_res == NB * (t + 1), "all blocks reported");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
