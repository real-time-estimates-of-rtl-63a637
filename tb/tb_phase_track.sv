// tb_phase_track: checks the single-channel drift tracker with generated
// block results.
//
// Each load is a run of blocks 0..NB-1 whose phases advance by a random
// block step, as a stable tone's would, plus a small random scatter; some
// blocks get an extra phase jump. The testbench recomputes the aligned phase,
// the drift from block 0 and the anomaly flag in real arithmetic and compares
// them with the outputs, one clock after each input. It also covers wrap-around
// of the aligned phase, a block before any block 0 and a new reference at the
// next block 0.
module tb_phase_track;
  import phase_pkg::*;
  import tone_pkg::*;

  localparam int NB = 13;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [BLK_W-1:0] blk = '0;
  phase_t phic = '0, block_step = '0, threshold;
  track_result_t res;

  assign threshold = deg_to_bam(11.0);

  phase_track dut (.clk, .rst_n, .valid, .blk, .phic, .block_step, .threshold, .res);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_anom = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one block result; expected values from real arithmetic
  task automatic send(input int b, input real ph_deg, input real step_deg,
                      input bit exp_ref, input real ref_deg);
    real al, e, d;
    valid <= 1'b1;
    blk   <= BLK_W'(b);
    phic  <= deg_to_bam(ph_deg);
    @(posedge clk);
    valid <= 1'b0;
    @(negedge clk);
    al = wrap_deg(ph_deg - real'(b) * step_deg);
    check(res.valid, "valid one clock after input");
    check(res.blk == BLK_W'(b), "block number");
    e = bam_diff_deg(res.phic1, deg_to_bam(al));
    check(e < 1.0e-5 && e > -1.0e-5, $sformatf("aligned phase blk %0d err %f", b, e));
    d = exp_ref ? wrap_deg(al - ref_deg) : 0.0;
    e = bam_diff_deg(res.drift, deg_to_bam(d));
    check(e < 1.0e-5 && e > -1.0e-5, $sformatf("drift blk %0d err %f", b, e));
    check(res.anomaly == (d > 11.0 || d < -11.0), $sformatf("anomaly blk %0d", b));
    if (res.anomaly) n_anom++;
    @(negedge clk);
    check(!res.valid, "valid lasts one clock");
  endtask

  initial begin
    real step, ph0, jump, ref_deg;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // block 5 before any block 0: no reference, no drift
    block_step <= deg_to_bam(216.0);
    @(posedge clk);
    send(5, 40.0, bam_to_deg(deg_to_bam(216.0)), 1'b0, 0.0);
    for (int load = 0; load < 6; load++) begin
      step = real'($urandom_range(359_999)) / 1000.0;
      if (load == 0) step = 216.0;   // 62 MHz, 2400 samples at 3 GS/s
      block_step <= deg_to_bam(step);
      step = bam_to_deg(deg_to_bam(step));
      ph0 = real'($urandom_range(359_999)) / 1000.0;
      @(posedge clk);
      ref_deg = wrap_deg(ph0);
      for (int b = 0; b < NB; b++) begin
        real scatter, ph;
        scatter = (real'($urandom_range(8000)) - 4000.0) / 1000.0;   // +-4 degrees
        if (b == 0) scatter = 0.0;
        jump = 0.0;
        if (b == 3 || b == 4) jump = (load % 2 == 0) ? 22.3 : -22.3;
        if (b == 7) jump = (load % 2 == 0) ? 10.0 : -10.5;             // just below
        if (b == 9 && load == 5) jump = 180.0;                          // opposite side
        ph = ph0 + real'(b) * step + scatter + jump;
        send(b, wrap_deg(ph), step, 1'b1, ref_deg);
        if (b == 0) ref_deg = wrap_deg(ph0);
      end
    end
    check(n_anom >= 12, "anomalies raised");
    $display("anomalies=%0d", n_anom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
