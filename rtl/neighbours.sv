// neighbours: the inner part of one FPGA's pipeline store, three rows of the
// FPGA's own PIX pixel columns. Rows move through it one per shift: the row on
// the memory data bus enters as the bottom row, the bottom row becomes the
// middle one and the middle one the top. After the shift that brings in row
// y+1, the store holds rows y-1, y and y+1, the vertical extent of every 3x3
// window of row y. With the two ENDNEIGHBOURS columns it forms the document's
// 3 x 10 store around the eight pixels being updated.
// `clear` fills it with border pixels; `border` makes a shift bring in a row
// of border pixels (above the first and below the last image row).
// Rows: q[0] top (oldest), q[1] middle, q[2] bottom (newest).
// Synchronous active-high reset, which clears to border pixels as well.
module neighbours #(
  parameter int unsigned PIX = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           clear,
  input  logic           shift,
  input  logic           border,
  input  logic [PIX-1:0] d,
  output logic [PIX-1:0] q [3]
);
  localparam logic [PIX-1:0] BROW = {PIX{zelig_pkg::BORDER_PIX}};

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      q[0] <= BROW;
      q[1] <= BROW;
      q[2] <= BROW;
    end else if (shift) begin
      q[0] <= q[1];
      q[1] <= q[2];
      q[2] <= border ? BROW : d;
    end
  end
endmodule
