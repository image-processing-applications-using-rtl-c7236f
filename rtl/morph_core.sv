// morph_core: the CORE block, the per-pixel processing logic of the binary
// morphology configuration. Each FPGA holds eight of them.
//
// Four sections work side by side on the 3x3 window around the centre pixel:
//   dilation  - five MINKOWSKI term blocks merged by MINKOB;
//   copy      - the centre pixel;
//   maximum   - centre pixel OR the pixel of a second image (aux);
//   translate - the window pixel picked by the 4-bit direction index tdir.
// ENDEC supplies one-hot section enables; an OR gate merges the enabled
// section, and a final XOR with `inv` turns dilation, copy and maximum into
// erosion, complement and minimum. For the minimum, the maximum section's
// inputs are complemented too (De Morgan); for erosion, the MINKOWSKI blocks
// complement the pixels and rotate the SE through 180 degrees.
// The sections, the input inversion and the final XOR follow the document; the
// translate encoding (a neighbour index) is this design's choice.
// Window indexing: win[3*r + c], r = 0 top row, c = 0 left column; win[4] is
// the centre. Purely combinational.
module morph_core (
  input  logic [8:0] win,      // 3x3 window of the current image
  input  logic       aux,      // same pixel of the second image (maximum)
  input  logic [8:0] se,       // structuring element
  input  logic [3:0] tdir,     // translate: neighbour index 0..8
  input  logic       inv,      // invert inputs and output
  input  logic       en_dil,   // section enables from ENDEC (one-hot)
  input  logic       en_copy,
  input  logic       en_max,
  input  logic       en_trans,
  output logic       y
);
  localparam logic BORDER = zelig_pkg::BORDER_PIX;

  logic [4:0] mt;
  logic       dil, cpy, mx, tr;

  // Symmetric pairs (0,8) (1,7) (2,6) (3,5), and the centre (4,4).
  for (genvar i = 0; i < 5; i++) begin : g_mink
    minkowski u_mink (
      .n_k  (win[i]),
      .n_r  (win[8-i]),
      .s_k  (se[i]),
      .s_r  (se[8-i]),
      .erode(inv),
      .y    (mt[i])
    );
  end

  minkob u_minkob (.m(mt), .y(dil));

  always_comb begin
    cpy = win[4];
    mx  = (win[4] ^ inv) | (aux ^ inv);
    tr  = (tdir <= 4'd8) ? win[tdir] : BORDER;
    y   = ((en_dil & dil) | (en_copy & cpy) | (en_max & mx) | (en_trans & tr)) ^ inv;
  end

endmodule
