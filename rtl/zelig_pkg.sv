// zelig_pkg: types and constants shared by the Zelig binary-morphology logic surface.
//
// The logic surface is 32 FPGA nodes, each owning a 64K x 8 node SRAM, so one
// node-memory word is 256 bits wide and holds 256 horizontally adjacent pixels.
// A 512 x 512 binary image is stored as two 256-column swaths of 512 rows, one
// word per swath row: word = image*1024 + swath*512 + row. Pixel column
// swath*256 + fpga*8 + bit is bit `bit` of FPGA `fpga`'s SRAM byte. The sizes
// are the document's; the address layout is this design's own choice.
//
// Structuring element (SE): a nine-bit integer. Bit k = 3*r + c weights the
// element in row r (0 = top) and column c (0 = left) of the 3x3 window, so the
// cross {010,111,010} is 2+8+16+32+128 = 186, as in the document's example.
package zelig_pkg;

  // Sections of the CORE block, selected by the global register.
  typedef enum logic [1:0] {
    SEC_DILATE = 2'd0,  // Minkowski dilation over the 3x3 window
    SEC_COPY   = 2'd1,  // centre pixel
    SEC_MAX    = 2'd2,  // OR of centre pixel and the second (aux) image
    SEC_TRANS  = 2'd3   // one neighbour, picked by the translate direction
  } section_e;

  // Host-level primitive operations; each is a section plus the invert flag.
  typedef enum logic [2:0] {
    OP_DILATE    = 3'd0,
    OP_ERODE     = 3'd1,
    OP_COPY      = 3'd2,
    OP_COMP      = 3'd3,
    OP_MAX       = 3'd4,
    OP_MIN       = 3'd5,
    OP_TRANSLATE = 3'd6
  } morph_op_e;

  // Contents of GLOBREG, loaded over the 16-bit global bus.
  typedef struct packed {
    logic [3:0] tdir;     // translate: index (0..8) of the neighbour copied
    logic       inv;      // invert inputs (dilate/max paths) and output
    section_e   sec;      // CORE section enabled
    logic [8:0] se;       // structuring element
  } glob_t;  // 4+1+2+9 = 16 bits

  // Command broadcast by the data address generator to every FPGA each cycle;
  // ENDEC decodes it into enables.
  typedef enum logic [2:0] {
    CMD_NOP   = 3'd0,
    CMD_LOADG = 3'd1,  // load GLOBREG from the global bus
    CMD_CLEAR = 3'd2,  // fill the pipeline store with border pixels
    CMD_SHIFT = 3'd3,  // shift the row on the memory data bus into the store
    CMD_SHBRD = 3'd4,  // shift a row of border pixels into the store
    CMD_WRITE = 3'd5   // drive the CORE results onto the memory write bus
  } cmd_e;

  // Pixel value assumed outside the image (and outside each swath).
  localparam logic BORDER_PIX = 1'b0;

  function automatic glob_t op_to_glob(morph_op_e op, logic [8:0] se, logic [3:0] tdir);
    glob_t g;
    g.se    = se;
    g.tdir  = tdir;
    unique case (op)
      OP_DILATE:    begin g.sec = SEC_DILATE; g.inv = 1'b0; end
      OP_ERODE:     begin g.sec = SEC_DILATE; g.inv = 1'b1; end
      OP_COPY:      begin g.sec = SEC_COPY;   g.inv = 1'b0; end
      OP_COMP:      begin g.sec = SEC_COPY;   g.inv = 1'b1; end
      OP_MAX:       begin g.sec = SEC_MAX;    g.inv = 1'b0; end
      OP_MIN:       begin g.sec = SEC_MAX;    g.inv = 1'b1; end
      default:      begin g.sec = SEC_TRANS;  g.inv = 1'b0; end
    endcase
    return g;
  endfunction

endpackage
