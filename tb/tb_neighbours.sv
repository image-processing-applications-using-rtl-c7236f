// tb_neighbours: drives random clear / shift / border-shift / idle cycles into
// the three-row pipeline store and compares all three rows every cycle with a
// row history kept here: after a shift the rows are the last three rows
// shifted in, oldest on top; border shifts and clears bring in zero rows.
module tb_neighbours;
  localparam int unsigned PIX = 8;
  logic clk = 0, rst, clear, shift, border;
  logic [PIX-1:0] d;
  logic [PIX-1:0] q [3];
  logic [PIX-1:0] hist [3];
  int checks = 0, failures = 0;

  neighbours #(.PIX(PIX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clear = 0; shift = 0; border = 0; d = '0;
    @(posedge clk); #1;
    rst = 0;
    hist[0] = '0; hist[1] = '0; hist[2] = '0;
    for (int i = 0; i < 2000; i++) begin
      int r;
      r = $urandom_range(0, 19);
      clear  = (r == 0);
      shift  = (r >= 4);
      border = (r >= 4) && (r < 7);
      d      = PIX'($urandom);
      @(posedge clk); #1;
      if (clear) begin
        hist[0] = '0; hist[1] = '0; hist[2] = '0;
      end else if (shift) begin
        hist[0] = hist[1]; hist[1] = hist[2]; hist[2] = border ? '0 : d;
      end
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (q[k] !== hist[k]) begin failures++; $display("FAIL i=%0d row %0d q=%h exp=%h", i, k, q[k], hist[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
