// tb_estimator: checks the estimator alone on generated blocks.
//
// For each test the testbench writes a block of M two's-complement samples of
// a tone with known amplitude, frequency and phase (with +-1 LSB noise) into
// its own memory, which answers the estimator's sample requests one clock
// later, as the read state machine does. It computes the compute-arrays
// results itself (boxcar sign changes, first/last index, sum of squares) and
// then compares amplitude, frequency and corrected phase with the generated
// tone. It also checks the cycle budget: the closed-form part must finish
// within 22,200 clocks and the refinement within 618,000 clocks (0.37 ms and
// 10.3 ms at 60 MHz).
module tb_estimator;
  import phase_pkg::*;
  import tone_pkg::*;

  localparam int unsigned MM = 2400;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  zc_result_t zc;
  logic rd_start, req, v_valid = 1'b0, busy, phii_done, done;
  sample_t v;
  logic [31:0] amplitude, frequency;
  phase_t phii, phic, phase_inc;

  estimator #(.M(MM)) dut (
    .clk, .rst_n, .start, .zc, .rd_start, .req, .v_valid, .v, .busy,
    .phii_done, .done, .amplitude, .frequency, .phii, .phic, .phase_inc);

  always #5 clk = ~clk;

  sample_t mem [MM];
  int rd_ptr = 0;
  int n_rd_starts = 0;

  always @(posedge clk) begin
    v_valid <= 1'b0;
    if (rd_start) begin rd_ptr <= 0; n_rd_starts++; end
    else if (req) begin
      v       <= mem[rd_ptr];
      v_valid <= 1'b1;
      rd_ptr  <= rd_ptr + 1;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_one(input real amp, input real fo, input real ph, input int noise);
    int nz, jf, jl, s_prev, s3;
    longint c2, c2_at;
    bit rising;
    longint t0, t_phii, t_done;
    real e, ea, ef;
    for (int n = 0; n < MM; n++)
      mem[n] = sample_t'(int'(tone_code(n, amp, fo, ph, noise)) - 127);
    // reference compute-arrays results
    nz = 0; jf = 0; jl = 0; c2 = 0; c2_at = 0; rising = 0; s_prev = 0;
    for (int j = 0; j < MM; j++) begin
      c2 += longint'(mem[j]) * longint'(mem[j]);
      if (j >= 1 && j <= MM - 2) begin
        s3 = int'(mem[j-1]) + int'(mem[j]) + int'(mem[j+1]);
        if (j >= 2 && ((s3 < 0) != (s_prev < 0))) begin
          if (nz == 0) jf = j;
          nz++;
          jl = j;
          c2_at = c2;
          rising = (s3 >= 0);
        end
        s_prev = s3;
      end
    end
    zc.nzero = 8'(nz); zc.jvz_first = 12'(jf); zc.jvz_last = 12'(jl);
    zc.c2_last = 26'(c2_at); zc.last_rising = rising;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t0 = $time;
    @(posedge clk iff phii_done);
    t_phii = ($time - t0) / 10;
    @(posedge clk iff done);
    t_done = ($time - t0) / 10;
    e  = bam_diff_deg(phic, deg_to_bam(ph));
    ea = real'(amplitude) / 65536.0 / amp - 1.0;
    ef = real'(frequency) / (fo * 3.0e9) - 1.0;
    $display("A=%f f=%0d phii=%f phic=%f (true %f) err=%f cycles %0d/%0d",
             real'(amplitude) / 65536.0, frequency, bam_to_deg(phii), bam_to_deg(phic), ph, e,
             t_phii, t_done);
    check(e < 0.5 && e > -0.5, $sformatf("phase error %f deg", e));
    check(ea < 0.03 && ea > -0.03, "amplitude within 3%");
    check(ef < 0.002 && ef > -0.002, "frequency within 0.2%");
    check(t_phii <= 22200, "phii within 0.37 ms at 60 MHz");
    check(t_done - t_phii <= 618000, "phic within 10.3 ms at 60 MHz");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run_one(100.0, 62.0e6 / 3.0e9, 55.03, 1);
    run_one(100.0, 62.0e6 / 3.0e9, 235.0, 1);
    run_one(60.0, 62.0e6 / 3.0e9, 300.0, 1);
    run_one(120.0, 50.0e6 / 3.0e9, 10.0, 0);
    check(n_rd_starts == 4 * 3, "three sample passes per block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
