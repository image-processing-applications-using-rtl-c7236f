// tb_minkob: exhaustive check of MINKOB, the five-input merge of the
// MINKOWSKI terms: the output is 1 exactly when some term is 1.
module tb_minkob;
  logic [4:0] m;
  logic y;
  int checks = 0, failures = 0;

  minkob dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      m = 5'(v);
      #1;
      checks++;
      if (y !== (v != 0)) begin
        failures++;
        $display("FAIL m=%b y=%b", m, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
