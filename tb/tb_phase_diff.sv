// tb_phase_diff: directed tests of the phase-difference stage: results of a
// block pair arriving in either order and at once, wrap-around of the
// difference across 0/360 degrees, the first difference taken as reference,
// the anomaly flag for drifts above and below the threshold in both
// directions, mismatched block numbers (no output) and clear.
module tb_phase_diff;
  import phase_pkg::*;
  import tone_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic valid_i = 1'b0, valid_q = 1'b0;
  phase_t phic_i = '0, phic_q = '0, diff, drift;
  logic [BLK_W-1:0] blk_i = '0, blk_q = '0, diff_blk;
  logic diff_valid, anomaly;
  phase_t threshold;

  phase_diff dut (.clk, .rst_n, .clear, .valid_i, .phic_i, .blk_i, .valid_q, .phic_q, .blk_q,
                  .threshold, .diff_valid, .diff, .diff_blk, .anomaly, .drift);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // order: 0 = I first, 1 = Q first, 2 = together
  task automatic pair(input real pi_deg, input real pq_deg, input int b, input int order,
                      input bit exp_out, input real exp_diff, input bit exp_anom);
    int seen;
    real e;
    if (order == 0 || order == 2) begin valid_i <= 1'b1; phic_i <= deg_to_bam(pi_deg); blk_i <= BLK_W'(b); end
    if (order == 1 || order == 2) begin valid_q <= 1'b1; phic_q <= deg_to_bam(pq_deg); blk_q <= BLK_W'(b); end
    @(posedge clk);
    valid_i <= 1'b0; valid_q <= 1'b0;
    if (order != 2) repeat (3) @(posedge clk);
    if (order == 0) begin valid_q <= 1'b1; phic_q <= deg_to_bam(pq_deg); blk_q <= BLK_W'(b); end
    if (order == 1) begin valid_i <= 1'b1; phic_i <= deg_to_bam(pi_deg); blk_i <= BLK_W'(b + (exp_out ? 0 : 1)); end
    if (order != 2) begin @(posedge clk); valid_i <= 1'b0; valid_q <= 1'b0; end
    seen = 0;
    repeat (4) begin
      @(posedge clk);
      if (diff_valid) begin
        seen++;
        e = bam_diff_deg(diff, deg_to_bam(exp_diff));
        check(e < 1e-6 && e > -1e-6, $sformatf("difference %f expected %f", bam_to_deg(diff), exp_diff));
        check(anomaly == exp_anom, $sformatf("anomaly %0d expected %0d", anomaly, exp_anom));
        check(int'(diff_blk) == b, "block number");
      end
    end
    check(seen == (exp_out ? 1 : 0), $sformatf("block %0d: %0d outputs", b, seen));
  endtask

  initial begin
    threshold = deg_to_bam(5.0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    pair(55.0, 25.0, 0, 0, 1, 30.0, 0);      // reference 30
    pair(58.0, 26.0, 1, 1, 1, 32.0, 0);      // drift +2
    pair(70.0, 30.0, 2, 2, 1, 40.0, 1);      // drift +10
    pair(10.0, 350.0, 3, 0, 1, 20.0, 1);     // wraps: 20, drift -10
    pair(5.0, 333.0, 4, 1, 1, 32.0, 0);      // wraps: 32, drift +2
    pair(5.0, 300.0, 5, 1, 0, 0.0, 0);       // block numbers differ: no output
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    pair(100.0, 0.0, 6, 0, 1, 100.0, 0);     // new reference
    pair(103.0, 0.0, 7, 2, 1, 103.0, 0);     // drift +3
    pair(97.0, 0.0, 8, 1, 1, 97.0, 0);       // drift -3
    pair(96.0, 2.0, 9, 0, 1, 94.0, 1);       // drift -6
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
