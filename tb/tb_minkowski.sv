// tb_minkowski: exhaustive check of the MINKOWSKI term block. All 32 input
// combinations are applied and compared with the term written from the
// definitions: dilation pairs each SE bit with the pixel opposite it, erosion
// (complement form) pairs each SE bit with the complemented pixel at its own
// position.
module tb_minkowski;
  logic n_k, n_r, s_k, s_r, erode, y;
  int checks = 0, failures = 0;

  minkowski dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 32; v++) begin
      {erode, s_r, s_k, n_r, n_k} = 5'(v);
      #1;
      if (!erode) exp = (n_r && s_k) || (n_k && s_r);
      else        exp = (!n_k && s_k) || (!n_r && s_r);
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL v=%b y=%b exp=%b", 5'(v), y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
