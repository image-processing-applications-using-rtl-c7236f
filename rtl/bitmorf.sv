// bitmorf: one FPGA of the logic surface in the binary-morphology
// configuration. CFG selects the document's three variants: BITMORFA for
// FPGA 0, BITMORFB for FPGAs 1 to 30 and BITMORFC for FPGA 31; they differ
// only in how the end columns of the pipeline store are loaded (see
// endneighbours).
//
// Inside: ENDEC decodes the broadcast command, GLOBREG holds the operation
// set-up, NEIGHBOURS and two ENDNEIGHBOURS form a 3 x (PIX+2) pipeline store,
// and PIX copies of CORE each compute one output pixel from its 3x3 window.
// So the 32 FPGAs update 256 pixels in parallel, as in the document.
//
// Timing, per image row y (driven by the data address generator):
//   SHIFT  : mem_rdata carries row y+1; it enters the store. Adjacent FPGAs
//            exchange their edge pixels of that row through left_*/right_*.
//   WRITE  : CORE results for row y appear on mem_wdata (combinational from
//            the store, GLOBREG and mem_rdata, which then carries row y of the
//            second image for the maximum section); mem_we_o is high.
// left_out / right_out are plain wires from the memory data bus: the edge
// pixels pass to the adjacent FPGAs in the same cycle they are loaded here.
// Synchronous active-high reset.
module bitmorf
  import zelig_pkg::*;
#(
  parameter int unsigned PIX = 8,
  parameter bit          LEFT_END  = 1'b0,  // 1 for BITMORFA (FPGA 0)
  parameter bit          RIGHT_END = 1'b0   // 1 for BITMORFC (last FPGA)
) (
  input  logic           clk,
  input  logic           rst,
  input  cmd_e           cmd,        // broadcast command
  input  glob_t          gbus,       // broadcast global bus
  input  logic [PIX-1:0] mem_rdata,  // from this FPGA's node SRAM
  output logic [PIX-1:0] mem_wdata,  // to this FPGA's node SRAM
  output logic           mem_we_o,   // results are valid on mem_wdata
  input  logic           left_in,    // pixel loaded by the left FPGA (its bit PIX-1)
  input  logic           right_in,   // pixel loaded by the right FPGA (its bit 0)
  output logic           left_out,   // this FPGA's bit 0, to the left FPGA
  output logic           right_out   // this FPGA's bit PIX-1, to the right FPGA
);
  glob_t g;
  logic glob_load, st_clear, st_shift, st_border, out_en;
  logic en_dil, en_copy, en_max, en_trans;
  logic [PIX-1:0] rows [3];
  logic lcol [3];
  logic rcol [3];

  endec u_endec (
    .cmd, .sec(g.sec), .glob_load, .st_clear, .st_shift, .st_border, .out_en,
    .en_dil, .en_copy, .en_max, .en_trans
  );

  globreg u_globreg (.clk, .rst, .load(glob_load), .d(gbus), .q(g));

  neighbours #(.PIX(PIX)) u_neigh (
    .clk, .rst, .clear(st_clear), .shift(st_shift), .border(st_border),
    .d(mem_rdata), .q(rows)
  );

  endneighbours #(.OUTER(LEFT_END)) u_left (
    .clk, .rst, .clear(st_clear), .shift(st_shift), .border(st_border),
    .d(left_in), .q(lcol)
  );

  endneighbours #(.OUTER(RIGHT_END)) u_right (
    .clk, .rst, .clear(st_clear), .shift(st_shift), .border(st_border),
    .d(right_in), .q(rcol)
  );

  always_comb begin
    left_out  = mem_rdata[0];
    right_out = mem_rdata[PIX-1];
    mem_we_o  = out_en;
  end

  for (genvar i = 0; i < PIX; i++) begin : g_px
    logic [8:0] win;
    always_comb begin
      for (int r = 0; r < 3; r++) begin
        win[3*r]     = (i == 0)       ? lcol[r] : rows[r][(i == 0) ? 0 : i-1];
        win[3*r + 1] = rows[r][i];
        win[3*r + 2] = (i == PIX - 1) ? rcol[r] : rows[r][(i == PIX - 1) ? i : i+1];
      end
    end
    morph_core u_core (
      .win, .aux(mem_rdata[i]), .se(g.se), .tdir(g.tdir), .inv(g.inv),
      .en_dil, .en_copy, .en_max, .en_trans, .y(mem_wdata[i])
    );
  end
endmodule
