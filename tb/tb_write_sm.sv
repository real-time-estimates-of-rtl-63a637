// tb_write_sm: the write state machine with a FIFO model (one-clock read
// latency) and the 32:1 mux. Two blocks of 2400 random ADC codes (including
// the extreme codes 0, 127 and 255) are written; every RAM write is checked
// for address order and for the converted value code - 127 (255 saturating to
// +127), and each block must take M + 1 clocks from start to done.
module tb_write_sm;
  import phase_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, fifo_rd_en, ram_we;
  logic [4:0] sel;
  logic [7:0] sample;
  logic [IDX_W-1:0] ram_addr;
  sample_t ram_wdata;
  logic [255:0] fifo_q = '0;

  write_sm dut (.clk, .rst_n, .start, .busy, .done, .fifo_rd_en, .sel, .sample,
                .ram_we, .ram_addr, .ram_wdata);
  sample_mux u_mux (.word(fifo_q), .sel, .sample);

  always #5 clk = ~clk;

  logic [7:0] codes [2 * 2400];
  int rd_word = 0, n_wr = 0;
  int checks = 0, failures = 0;

  always @(posedge clk) begin
    if (fifo_rd_en) begin
      for (int k = 0; k < 32; k++) fifo_q[8*k +: 8] <= codes[32 * rd_word + k];
      rd_word <= rd_word + 1;
    end
    if (ram_we) begin
      int c, e;
      c = int'(codes[n_wr]);
      e = (c - 127 > 127) ? 127 : c - 127;
      checks++;
      if (int'(ram_addr) != n_wr % 2400 || int'(ram_wdata) != e) begin
        failures++;
        $display("FAIL write %0d: addr %0d data %0d expected %0d", n_wr, ram_addr, ram_wdata, e);
      end
      n_wr <= n_wr + 1;
    end
  end

  initial begin
    for (int i = 0; i < 2 * 2400; i++) codes[i] = 8'($urandom);
    codes[5] = 8'd0; codes[6] = 8'd127; codes[7] = 8'd255; codes[2500] = 8'd255;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < 2; b++) begin
      int cyc;
      @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; end
      checks++;
      if (cyc != 2400 + 2) begin failures++; $display("FAIL block took %0d clocks", cyc); end
      @(posedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
    end
    checks++;
    if (n_wr != 4800 || rd_word != 150) begin failures++; $display("FAIL %0d writes %0d words", n_wr, rd_word); end
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
