// tb_compute_arrays: one pass of the compute arrays over generated blocks
// (tones of several phases and frequencies with noise, and a random block).
// The testbench serves samples on request like the read state machine and
// works out the expected results itself: the boxcar stream vb, the number of
// sign changes of the three-point average, first and last change index,
// direction of the last change and the sum of squares up to it. The pass must
// take M + 2 clocks.
module tb_compute_arrays;
  import phase_pkg::*;
  import tone_pkg::*;

  localparam int MM = 2400;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic req, v_valid = 1'b0, v_last = 1'b0, vb_valid, done;
  sample_t v = '0, vb;
  logic [IDX_W-1:0] v_idx = '0;
  zc_result_t res;

  compute_arrays dut (.clk, .rst_n, .start, .req, .v_valid, .v, .v_idx, .v_last,
                      .vb_valid, .vb, .done, .res);

  always #5 clk = ~clk;

  sample_t mem [MM];
  int ptr = 0, vb_n = 1;
  int checks = 0, failures = 0;

  always @(posedge clk) begin
    v_valid <= 1'b0;
    if (start) begin ptr <= 0; vb_n <= 1; end
    else if (req) begin
      v <= mem[ptr]; v_idx <= IDX_W'(ptr); v_last <= (ptr == MM - 1); v_valid <= 1'b1;
      ptr <= ptr + 1;
    end
    if (vb_valid) begin
      int s3;
      s3 = int'(mem[vb_n-1]) + int'(mem[vb_n]) + int'(mem[vb_n+1]);
      checks++;
      if (int'(vb) != s3 / 3) begin failures++; $display("FAIL vb[%0d] = %0d, expected %0d", vb_n, vb, s3 / 3); end
      if (!start) vb_n <= vb_n + 1;
    end
  end

  task automatic run_block();
    int nz, jf, jl, s_prev, s3, cyc;
    longint c2, c2_at;
    bit rising;
    nz = 0; jf = 0; jl = 0; c2 = 0; c2_at = 0; rising = 0; s_prev = 0;
    for (int j = 0; j < MM; j++) begin
      c2 += longint'(mem[j]) * longint'(mem[j]);
      if (j >= 1 && j <= MM - 2) begin
        s3 = int'(mem[j-1]) + int'(mem[j]) + int'(mem[j+1]);
        if (j >= 2 && ((s3 < 0) != (s_prev < 0))) begin
          if (nz == 0) jf = j;
          nz++; jl = j; c2_at = c2; rising = (s3 >= 0);
        end
        s_prev = s3;
      end
    end
    if (nz > 255) nz = 255;

    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    @(posedge clk);
    $display("nzero %0d jf %0d jl %0d c2 %0d rising %0d", res.nzero, res.jvz_first, res.jvz_last,
             res.c2_last, res.last_rising);
    checks++;
    if (int'(res.nzero) != nz || int'(res.jvz_first) != jf || int'(res.jvz_last) != jl ||
        longint'(res.c2_last) != c2_at || res.last_rising != rising) begin
      failures++;
      $display("FAIL expected nzero %0d jf %0d jl %0d c2 %0d rising %0d", nz, jf, jl, c2_at, rising);
    end
    checks++;
    if (cyc != MM + 2) begin failures++; $display("FAIL pass took %0d clocks", cyc); end
    checks++;
    if (vb_n != MM - 1) begin failures++; $display("FAIL %0d boxcar outputs", vb_n - 1); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (mem[n]) mem[n] = sample_t'(int'(tone_code(n, 100.0, 62.0 / 3000.0, 55.03, 1)) - 127);
    run_block();
    foreach (mem[n]) mem[n] = sample_t'(int'(tone_code(n, 127.0, 62.0 / 3000.0, 200.0, 2)) - 127);
    run_block();
    foreach (mem[n]) mem[n] = sample_t'(int'(tone_code(n, 40.0, 17.0 / 3000.0, 90.0, 0)) - 127);
    run_block();
    foreach (mem[n]) mem[n] = sample_t'($urandom_range(255) - 128);
    run_block();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
