// globreg: the global register of one FPGA. It holds the operation set-up
// broadcast by the data address generator: the nine-bit structuring element,
// the CORE section, the invert flag and the translate direction.
// Loaded from the 16-bit global bus in the cycle `load` is high (ENDEC decodes
// it); cleared by the synchronous active-high reset. The document names the
// block; its contents and bus width are this design's choice.
module globreg
  import zelig_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  glob_t d,
  output glob_t q
);
  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end
endmodule
