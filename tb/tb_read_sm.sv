// tb_read_sm: the read state machine with a RAM model. Two passes over a
// block of 2400 random samples, one requesting every clock and one at a
// random pace; each handed-over sample must carry the right data and index,
// last must mark index 2399, and requests after the end must be ignored.
module tb_read_sm;
  import phase_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, req = 1'b0;
  logic ram_re, valid, last;
  logic [IDX_W-1:0] ram_addr, idx;
  sample_t ram_rdata, data;

  read_sm dut (.clk, .rst_n, .start, .req, .ram_re, .ram_addr, .ram_rdata,
               .valid, .data, .idx, .last);

  always #5 clk = ~clk;

  sample_t mem [2400];
  always @(posedge clk) if (ram_re) ram_rdata <= mem[ram_addr];

  int checks = 0, failures = 0, expect_idx = 0, n_valid = 0;

  always @(posedge clk) begin
    if (valid && rst_n) begin
      checks++;
      n_valid++;
      if (int'(idx) != expect_idx || data != mem[expect_idx] || last != (expect_idx == 2399)) begin
        failures++;
        $display("FAIL t=%0t sample %0d: idx %0d data %0d last %0d", $time, expect_idx, idx, data, last);
      end
      expect_idx++;
    end
  end

  initial begin
    for (int i = 0; i < 2400; i++) mem[i] = sample_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      @(posedge clk);
      start <= 1'b1;
      expect_idx = 0;
      n_valid = 0;
      @(posedge clk);
      start <= 1'b0;
      for (int i = 0; i < 2450; i++) begin   // 50 requests too many
        req <= (pass == 0) ? 1'b1 : 1'($urandom);
        @(posedge clk);
        if (pass == 1 && req == 1'b0) i--;
      end
      req <= 1'b0;
      repeat (3) @(posedge clk);
      checks++;
      if (n_valid != 2400) begin failures++; $display("FAIL pass %0d gave %0d samples", pass, n_valid); end
    end
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
