// sample_ram: the block memory v[] of DEPTH two's-complement samples.
//
// Simple dual-port RAM: one synchronous write port used by the write state
// machine, one synchronous read port used by the read state machine. rdata
// holds the word at raddr one clock after re; it keeps its value otherwise.
// Default size 2400 x 8, one block of M samples in adjacent locations.
// The 2400 x 8 size follows the method; the registered read with read enable
// is this design's own choice, made so that the array maps onto block RAM.
module sample_ram #(
  parameter int unsigned DEPTH = 2400,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
