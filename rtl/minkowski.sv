// minkowski: one five-input, one-output term block of the dilation section.
//
// It handles a pair of window positions placed symmetrically about the centre,
// k and 8-k, with their pixels n_k, n_r and structuring-element bits s_k, s_r.
// Dilation (erode = 0) takes the pixel opposite each SE element, since the
// Minkowski sum reads A(p - b):  (s_k & n_r) | (s_r & n_k).
// With erode = 1 the pixels are complemented and the SE is rotated through
// 180 degrees, so each SE bit meets the pixel at its own position:
// (s_k & ~n_k) | (s_r & ~n_r). That is the complement of the erosion; the CORE's
// output XOR restores it. The centre position is served by the same block with
// both halves fed from the centre pixel.
// The split into five-input blocks follows the document; the exact pairing of
// the window positions is this design's choice. Purely combinational.
module minkowski (
  input  logic n_k,    // pixel at window position k
  input  logic n_r,    // pixel at the reflected position 8-k
  input  logic s_k,    // SE bit k
  input  logic s_r,    // SE bit 8-k
  input  logic erode,  // 1: complement pixels and rotate the SE
  output logic y
);
  always_comb begin
    if (erode) y = (s_k & ~n_k) | (s_r & ~n_r);
    else       y = (s_k &  n_r) | (s_r &  n_k);
  end
endmodule
