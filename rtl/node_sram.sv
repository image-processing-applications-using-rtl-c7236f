// node_sram: the static RAM attached to each FPGA, 64K words of 8 bits
// (DEPTH x WIDTH). The 32 of them together form the 64K x 256 node memory.
// Modelled as a single-port synchronous RAM: the address is registered on the
// clock edge and rdata shows the word read on the following cycle; a write
// (we = 1) stores wdata and leaves rdata unchanged. One access per 100 ns
// memory cycle in the machine. The document gives the size; the synchronous
// single-port timing is this design's model of the asynchronous part.
// Contents are not reset.
module node_sram #(
  parameter int unsigned DEPTH  = 65536,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end
endmodule
