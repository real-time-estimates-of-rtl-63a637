// tb_cordic: checks the CORDIC sine/cosine unit against the simulator's real
// $sin/$cos for angles around the circle, including the quadrant edges and
// random angles, and checks that each result takes W + 1 clocks (done seen W + 2 edges after the start edge).
module tb_cordic;
  import tone_pkg::*;

  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [W-1:0] angle;
  logic signed [W-1:0] sin_o, cos_o;

  cordic #(.W(W)) dut (.clk, .rst_n, .start, .angle, .busy, .done, .sin_o, .cos_o);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real max_err = 0.0;

  task automatic one(input logic [W-1:0] a);
    real rs, rc, es, ec, ang;
    int cyc;
    angle <= a;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    ang = real'(a) / 4294967296.0 * 2.0 * PI;
    rs = real'(sin_o) / 1073741824.0;
    rc = real'(cos_o) / 1073741824.0;
    es = rs - $sin(ang);
    ec = rc - $cos(ang);
    if (es < 0) es = -es;
    if (ec < 0) ec = -ec;
    if (es > max_err) max_err = es;
    if (ec > max_err) max_err = ec;
    checks++;
    if (es > 1e-6 || ec > 1e-6) begin
      failures++;
      $display("FAIL angle %f deg: sin %f cos %f", bam_to_deg(a), rs, rc);
    end
    checks++;
    if (cyc != W + 2) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int q = 0; q < 16; q++) one(32'(q) << 28);
    one(32'h3fff_ffff); one(32'h4000_0001); one(32'hbfff_ffff); one(32'hc000_0001);
    one(32'hffff_ffff);
    for (int i = 0; i < 200; i++) one($urandom);
    $display("max error %e", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
