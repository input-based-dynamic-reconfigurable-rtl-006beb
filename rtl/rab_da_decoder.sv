// rab_da_decoder: degree-of-approximation decoder.
//
// Turns a DA control word into one APP select per bit position of an adder.
// The DA is the number of least significant bit positions that run in
// approximate mode: app[i] = 1 exactly when i < ctrl. A DA of W or more
// approximates every position. Error is thus always confined to the low
// end of the word, where it costs least. That the selects come from a small
// decoder of a control word follows the design; the thermometer coding of
// the DA is this design's own choice. Purely combinational.
module rab_da_decoder #(
  parameter int unsigned W      = 8,  // bit positions to select
  parameter int unsigned CTRL_W = 4   // width of the DA word
) (
  input  logic [CTRL_W-1:0] ctrl,     // degree of approximation
  output logic [W-1:0]      app       // 1 = position i approximate
);

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      app[i] = (i < 32'(ctrl));
    end
  end

endmodule
