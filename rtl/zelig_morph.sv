// zelig_morph: the Zelig logic surface configured for binary image morphology.
//
// N_FPGA FPGA nodes (BITMORFA, BITMORFB ... BITMORFB, BITMORFC) each own a
// node SRAM of 2**ADDR_W x PIX bits; all SRAMs share one address bus and write
// enable, so the node memory is one 64K x 256 memory whose word is a row of
// 256 pixels. The data address generator (DAG) sweeps an image through the
// FPGAs one row per step; each FPGA keeps a three-row pipeline store and sees
// the edge pixels of its two neighbours, and its eight CORE copies write one
// output row, 256 pixels per step across the surface. Node memory holds 64
// images of 512 x 512 pixels; image 0 is free for use as a working image by
// compound operations (OPEN = ERODE into image 0, then DILATE).
//
// Interfaces:
//   operation : start (one-cycle pulse while busy = 0) with op, se, tdir and
//               the image numbers src, aux (second operand of MAX/MIN) and
//               dst; busy is high from the cycle after start up
//               to and including the done pulse, 2 + SWATHS*(3*IMG_ROWS + 2)
//               cycles (3078 cycles, 307.8 us, for 512 x 512).
//   host port : while busy = 0 the host (the master processor in the machine)
//               reads and writes whole node-memory words: host_we writes
//               host_wdata at host_addr; otherwise host_rdata shows the word at
//               the host_addr of the previous cycle. This covers the FILL and
//               PEEK commands. While busy the DAG owns the memory.
// Structure, sizes and the per-FPGA split follow the document. The memory
// layout, the host port and the treatment of pixels beyond a 256-column swath
// as border pixels (value 0) are this design's choices.
// Synchronous active-high reset; memory contents are not reset.
// The left link of FPGA 0 and the right link of the last FPGA lead nowhere:
// the outer edges of the surface have no neighbour, so lo[0] and
// ro[N_FPGA-1] are unused.
module zelig_morph
  import zelig_pkg::*;
#(
  parameter int unsigned N_FPGA   = 32,
  parameter int unsigned PIX      = 8,
  parameter int unsigned ADDR_W   = 16,
  parameter int unsigned IMG_ROWS = 512,
  parameter int unsigned IMG_COLS = 512,
  localparam int unsigned W       = N_FPGA * PIX,
  localparam int unsigned SWATHS  = IMG_COLS / W,
  localparam int unsigned IMG_W   = ADDR_W - $clog2(IMG_ROWS * SWATHS)
) (
  input  logic              clk,
  input  logic              rst,
  // operation
  input  logic              start,
  input  morph_op_e         op,
  input  logic [8:0]        se,
  input  logic [3:0]        tdir,
  input  logic [IMG_W-1:0]  src,
  input  logic [IMG_W-1:0]  aux,
  input  logic [IMG_W-1:0]  dst,
  output logic              busy,
  output logic              done,
  // host access to node memory
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [W-1:0]      host_wdata,
  output logic [W-1:0]      host_rdata
);
  cmd_e              cmd;
  glob_t             gbus;
  logic [ADDR_W-1:0] dag_addr, mem_addr;
  logic              dag_we, mem_we;
  logic [W-1:0]      rdata, res, mem_wdata;
  logic [N_FPGA-1:0] we_o, lo, ro;

  dag #(.ADDR_W(ADDR_W), .ROWS(IMG_ROWS), .SWATHS(SWATHS)) u_dag (
    .clk, .rst, .start, .op, .se, .tdir, .src, .aux, .dst,
    .busy, .done, .cmd, .gbus, .mem_addr(dag_addr), .mem_we(dag_we)
  );

  always_comb begin
    mem_addr   = busy ? dag_addr : host_addr;
    mem_we     = busy ? dag_we   : host_we;
    mem_wdata  = busy ? res      : host_wdata;
    host_rdata = rdata;
  end

  for (genvar f = 0; f < N_FPGA; f++) begin : g_node
    node_sram #(.DEPTH(2 ** ADDR_W), .WIDTH(PIX)) u_sram (
      .clk, .we(mem_we), .addr(mem_addr),
      .wdata(mem_wdata[f*PIX +: PIX]), .rdata(rdata[f*PIX +: PIX])
    );

    bitmorf #(.PIX(PIX), .LEFT_END(f == 0), .RIGHT_END(f == N_FPGA - 1)) u_fpga (
      .clk, .rst, .cmd, .gbus,
      .mem_rdata(rdata[f*PIX +: PIX]),
      .mem_wdata(res[f*PIX +: PIX]),
      .mem_we_o (we_o[f]),
      .left_in  ((f == 0)          ? 1'b0 : ro[(f == 0) ? 0 : f-1]),
      .right_in ((f == N_FPGA - 1) ? 1'b0 : lo[(f == N_FPGA - 1) ? f : f+1]),
      .left_out (lo[f]),
      .right_out(ro[f])
    );
  end

  // Every FPGA decodes the same broadcast command, so they agree on writes.
  assert property (@(posedge clk) disable iff (rst) busy |-> (we_o == {N_FPGA{dag_we}}));
  initial assert (IMG_COLS % W == 0 && SWATHS >= 1)
    else $error("IMG_COLS must be a multiple of N_FPGA*PIX");
endmodule
