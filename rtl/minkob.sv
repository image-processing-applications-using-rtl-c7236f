// minkob: five-input, one-output block that merges the five MINKOWSKI terms
// into the dilation result of one pixel (a five-input OR).
// The document names the block and gives its five-input, one-output shape; the
// function (merging the five term blocks) is this design's reading of it.
// Purely combinational.
module minkob (
  input  logic [4:0] m,  // outputs of the five MINKOWSKI blocks
  output logic       y
);
  always_comb y = |m;
endmodule
