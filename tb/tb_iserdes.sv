// tb_iserdes: feeds random bytes to the 1:8 deserializer and checks that every
// eighth clock it presents the last eight beats, oldest in the low byte, with
// a one-cycle valid strobe and nothing in between.
module tb_iserdes;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] din = '0;
  logic [63:0] dout;
  logic dout_valid;

  iserdes dut (.clk, .rst_n, .din, .dout, .dout_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] hist [$];
  int beats = 0, words = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dout_valid) begin
        logic [63:0] expw;
        for (int k = 0; k < 8; k++) expw[8*k +: 8] = hist[hist.size() - 8 + k];
        checks++;
        words++;
        if (dout !== expw) begin failures++; $display("FAIL word %h expected %h", dout, expw); end
        checks++;
        if (beats % 8 != 0) begin failures++; $display("FAIL valid after %0d beats", beats); end
      end
      hist.push_back(din);
      beats++;
      din <= 8'($urandom);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (8 * 50 + 3) @(posedge clk);
    checks++;
    if (words != 50) begin failures++; $display("FAIL %0d words", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
