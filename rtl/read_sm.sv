// read_sm: hands the samples of the current block to the compute stage.
//
// After start, each req reads the next RAM address (0, 1, ..., M-1); the
// sample arrives on data one clock later together with valid, its index idx
// and last (set for index M-1). Requests beyond M-1 are ignored until the
// next start. Both consumers - the compute-arrays pass and each refinement
// pass of the estimator - use this same path, one pass per start; requests
// may come every clock or at any slower pace.
// Handing the samples to the compute stage follows the method; the
// request/valid handshake and the one-clock latency are this design's own.
// data is the RAM's registered read data, passed on unchanged.
module read_sm
  import phase_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              req,
  output logic              ram_re,
  output logic [IDX_W-1:0]  ram_addr,
  input  sample_t           ram_rdata,
  output logic              valid,
  output sample_t           data,
  output logic [IDX_W-1:0]  idx,
  output logic              last
);
  logic [IDX_W-1:0] addr;
  logic             active;

  assign ram_re   = req && active;
  assign ram_addr = addr;
  assign data     = ram_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr   <= '0;
      active <= 1'b0;
      valid  <= 1'b0;
      idx    <= '0;
      last   <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        addr   <= '0;
        active <= 1'b1;
      end else if (ram_re) begin
        valid <= 1'b1;
        idx   <= addr;
        last  <= (addr == IDX_W'(M-1));
        addr  <= addr + 1'b1;
        if (addr == IDX_W'(M-1)) active <= 1'b0;
      end
    end
  end
endmodule
