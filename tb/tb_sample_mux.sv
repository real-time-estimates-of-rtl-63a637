// tb_sample_mux: random 256-bit words; every select value must return the
// byte at bits 8*sel +: 8.
module tb_sample_mux;
  logic [255:0] word;
  logic [4:0] sel;
  logic [7:0] sample;

  sample_mux dut (.word, .sel, .sample);

  int checks = 0, failures = 0;

  initial begin
    for (int it = 0; it < 20; it++) begin
      for (int k = 0; k < 8; k++) word[32*k +: 32] = $urandom;
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s);
        #1;
        checks++;
        if (sample !== word[8*s +: 8]) begin failures++; $display("FAIL sel %0d", s); end
      end
    end
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
