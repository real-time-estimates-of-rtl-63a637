// iserdes: 1:8 deserializer for one 8-bit ADC data bus.
//
// The ADC delivers each of its four buses as a double-data-rate stream; this
// block collects RATIO consecutive beats into one word so that the rest of the
// design runs at 1/RATIO of the beat rate. The FPGA primitive used for this in
// the original system is replaced by a shift register: one beat is taken per
// clock (the clock stands for both edges of the bus clock), and every RATIO
// beats the collected word is presented with a one-cycle dout_valid strobe.
// The oldest beat sits in the lowest SAMPLE_W bits of dout. The beat counter
// starts at reset, so lanes reset together stay word-aligned (no bitslip).
// Timing: dout and dout_valid are registered and appear in the cycle after the
// RATIO-th beat of a word.
module iserdes #(
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned RATIO    = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [SAMPLE_W-1:0]          din,
  output logic [RATIO*SAMPLE_W-1:0]    dout,
  output logic                         dout_valid
);
  logic [RATIO*SAMPLE_W-1:0]  shreg;
  logic [$clog2(RATIO)-1:0]   cnt;
  logic [RATIO*SAMPLE_W-1:0]  next_word;

  // new beat enters at the top, older beats move down towards bit 0
  assign next_word = {din, shreg[RATIO*SAMPLE_W-1:SAMPLE_W]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      cnt        <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      shreg      <= next_word;
      dout_valid <= 1'b0;
      if (cnt == $clog2(RATIO)'(RATIO - 1)) begin
        cnt        <= '0;
        dout       <= next_word;
        dout_valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
