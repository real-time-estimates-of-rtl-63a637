// tb_scrambler: random lane words; checks that sample n of the output word is
// beat n/4 of lane n%4 (lanes Qd, Id, Q, I in time order).
module tb_scrambler;
  logic [3:0][63:0] lanes;
  logic [255:0] word;

  scrambler dut (.lanes, .word);

  int checks = 0, failures = 0;

  initial begin
    for (int it = 0; it < 50; it++) begin
      for (int l = 0; l < 4; l++) lanes[l] = {$urandom, $urandom};
      #1;
      for (int n = 0; n < 32; n++) begin
        checks++;
        if (word[8*n +: 8] !== lanes[n % 4][8*(n / 4) +: 8]) begin
          failures++;
          $display("FAIL sample %0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
