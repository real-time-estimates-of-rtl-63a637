// tb_sample_ram: writes random bytes to all 2400 locations, reads them back in
// a scrambled order and checks each value arrives one clock after re.
module tb_sample_ram;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [11:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;

  sample_ram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] model [2400];

  initial begin
    for (int a = 0; a < 2400; a++) begin
      model[a] = 8'($urandom);
      we <= 1'b1; waddr <= 12'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 1'b0;
    for (int i = 0; i < 2400; i++) begin
      int a;
      a = (i * 7) % 2400;
      re <= 1'b1; raddr <= 12'(a);
      @(posedge clk);
      re <= 1'b0;
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d", a); end
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
