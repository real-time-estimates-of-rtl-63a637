// sample_mux: 32:1 selector that picks one sample out of a FIFO word.
//
// The write state machine steps sel through 0..N-1 to split a 256-bit FIFO
// word into its 32 eight-bit samples; sample k occupies bits
// k*SAMPLE_W +: SAMPLE_W. Purely combinational.
// The 32:1 selection follows the method; sample order within the word (oldest
// sample in the lowest bits) is this design's own choice, set by the
// scrambler.
module sample_mux #(
  parameter int unsigned N        = 32,
  parameter int unsigned SAMPLE_W = 8
) (
  input  logic [N*SAMPLE_W-1:0]  word,
  input  logic [$clog2(N)-1:0]   sel,
  output logic [SAMPLE_W-1:0]    sample
);
  always_comb sample = word[sel*SAMPLE_W +: SAMPLE_W];
endmodule
