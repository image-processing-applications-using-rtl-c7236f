// tb_endneighbours: an inner end column (OUTER = 0) must follow the pixels the
// adjacent FPGA loads, three deep; an outer one (OUTER = 1, the edge of the
// logic surface) must hold border pixels whatever is offered. Both are driven
// with the same random clear / shift / border-shift sequence and compared with
// a history kept here.
module tb_endneighbours;
  logic clk = 0, rst, clear, shift, border, d;
  logic qi [3];
  logic qo [3];
  logic hist [3];
  int checks = 0, failures = 0;

  endneighbours #(.OUTER(1'b0)) dut_inner (.clk, .rst, .clear, .shift, .border, .d, .q(qi));
  endneighbours #(.OUTER(1'b1)) dut_outer (.clk, .rst, .clear, .shift, .border, .d, .q(qo));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clear = 0; shift = 0; border = 0; d = 0;
    @(posedge clk); #1;
    rst = 0;
    hist[0] = 0; hist[1] = 0; hist[2] = 0;
    for (int i = 0; i < 2000; i++) begin
      int r;
      r = $urandom_range(0, 19);
      clear  = (r == 0);
      shift  = (r >= 4);
      border = (r >= 4) && (r < 6);
      d      = 1'($urandom);
      @(posedge clk); #1;
      if (clear) begin
        hist[0] = 0; hist[1] = 0; hist[2] = 0;
      end else if (shift) begin
        hist[0] = hist[1]; hist[1] = hist[2]; hist[2] = border ? 1'b0 : d;
      end
      for (int k = 0; k < 3; k++) begin
        checks += 2;
        if (qi[k] !== hist[k]) begin failures++; $display("FAIL inner i=%0d row %0d", i, k); end
        if (qo[k] !== 1'b0)    begin failures++; $display("FAIL outer i=%0d row %0d", i, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
