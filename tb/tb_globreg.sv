// tb_globreg: the global register loads only when `load` is high, holds its
// value otherwise and clears on reset. Compared with a shadow copy kept here.
module tb_globreg;
  import zelig_pkg::*;
  logic clk = 0, rst, load;
  glob_t d, q, shadow;
  int checks = 0, failures = 0;

  globreg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; d = '0;
    @(posedge clk); #1;
    rst = 0; shadow = '0;
    for (int i = 0; i < 500; i++) begin
      d    = glob_t'($urandom);
      load = ($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      if (load) shadow = d;
      checks++;
      if (q !== shadow) begin failures++; $display("FAIL i=%0d q=%h exp=%h", i, q, shadow); end
    end
    rst = 1; @(posedge clk); #1; rst = 0;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
