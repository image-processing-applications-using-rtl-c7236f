// endneighbours: one end column of an FPGA's pipeline store: the three pixels
// (rows y-1, y, y+1) of the column just outside the FPGA's eight, which lives
// in the adjacent FPGA. It shifts in step with NEIGHBOURS, taking the pixel the
// adjacent FPGA is loading at the same moment, so the 3x3 windows of the two
// edge pixels are complete without reading memory again.
// At the outer edge of the logic surface (the left side of FPGA 0, BITMORFA,
// and the right side of FPGA 31, BITMORFC) there is no adjacent FPGA: with
// OUTER = 1 the column holds border pixels only. That loading difference is
// what separates the end configurations in the document; holding border
// pixels there is this design's choice.
// q[0] top (oldest), q[1] middle, q[2] bottom. Synchronous active-high reset.
module endneighbours #(
  parameter bit OUTER = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  input  logic shift,
  input  logic border,
  input  logic d,        // pixel being loaded by the adjacent FPGA
  output logic q [3]
);
  localparam logic B = zelig_pkg::BORDER_PIX;
  logic din;

  always_comb din = (OUTER || border) ? B : d;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      q[0] <= B;
      q[1] <= B;
      q[2] <= B;
    end else if (shift) begin
      q[0] <= q[1];
      q[1] <= q[2];
      q[2] <= din;
    end
  end
endmodule
