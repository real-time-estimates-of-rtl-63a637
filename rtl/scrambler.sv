// scrambler: rebuilds time-ordered sample words from the four deserialized
// ADC buses.
//
// In its interleaved mode the ADC spreads consecutive samples over its four
// output buses, so after 1:8 deserialization each lane word holds every fourth
// sample. This purely combinational block reorders the LANES x RATIO samples
// into one word in time order, oldest sample in bits SAMPLE_W-1:0. Sample
// t*LANES + l is beat t of lane l. The lane order (lane 0 oldest) follows the
// order in which the buses are listed for this design - Qd, Id, Q, I - and is
// this design's own reading; a different ADC wiring only changes the index
// map below.
// Interface: lanes[l] is the deserialized word of lane l (beat t in bits
// t*SAMPLE_W +: SAMPLE_W). No clock; no latency.
module scrambler #(
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned LANES    = 4,
  parameter int unsigned RATIO    = 8
) (
  input  logic [LANES-1:0][RATIO*SAMPLE_W-1:0] lanes,
  output logic [LANES*RATIO*SAMPLE_W-1:0]       word
);
  always_comb begin
    for (int t = 0; t < RATIO; t++) begin
      for (int l = 0; l < LANES; l++) begin
        word[(t*LANES + l)*SAMPLE_W +: SAMPLE_W] = lanes[l][t*SAMPLE_W +: SAMPLE_W];
      end
    end
  end
endmodule
