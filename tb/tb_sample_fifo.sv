// tb_sample_fifo: fills the full-size 1024 x 256 FIFO with random words
// (interleaving some reads), checks full, empty and count, drains it
// comparing every word with a queue model, and checks that flush empties it.
module tb_sample_fifo;
  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [255:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [10:0] count;

  sample_fifo dut (.clk, .rst_n, .flush, .wr_en, .wr_data, .rd_en, .rd_data, .full, .empty, .count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [255:0] model [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [255:0] rnd();
    logic [255:0] w;
    for (int k = 0; k < 8; k++) w[32*k +: 32] = $urandom;
    return w;
  endfunction

  task automatic pop_check();
    logic [255:0] e;
    rd_en <= 1'b1;
    @(posedge clk);
    rd_en <= 1'b0;
    e = model.pop_front();
    @(posedge clk);
    check(rd_data == e, "read data");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 1024; i++) begin
      logic [255:0] w;
      w = rnd();
      model.push_back(w);
      wr_en   <= 1'b1;
      wr_data <= w;
      @(posedge clk);
      if (i == 100) begin
        wr_en <= 1'b0;
        pop_check();
        pop_check();
      end
    end
    wr_en <= 1'b0;
    @(posedge clk);
    check(count == 11'(model.size()), "count");
    check(!full, "not full with two words read");
    for (int i = 0; i < 2; i++) begin
      logic [255:0] w;
      w = rnd();
      model.push_back(w);
      wr_en <= 1'b1; wr_data <= w;
      @(posedge clk);
    end
    wr_en <= 1'b0;
    @(posedge clk);
    check(full && count == 11'd1024, "full at 1024 words");
    while (model.size() > 0) pop_check();
    check(empty, "empty after draining");
    for (int i = 0; i < 5; i++) begin
      wr_en <= 1'b1; wr_data <= rnd();
      @(posedge clk);
    end
    wr_en <= 1'b0;
    flush <= 1'b1;
    @(posedge clk);
    flush <= 1'b0;
    @(posedge clk);
    check(empty && count == 0, "flush empties");
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
