// tb_endec: every command code with every CORE section; each enable is
// compared with the table of which command asserts it.
module tb_endec;
  import zelig_pkg::*;
  cmd_e cmd;
  section_e sec;
  logic glob_load, st_clear, st_shift, st_border, out_en, en_dil, en_copy, en_max, en_trans;
  int checks = 0, failures = 0;

  endec dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] exp, got;
    for (int c = 0; c < 6; c++) begin
      for (int s = 0; s < 4; s++) begin
        cmd = cmd_e'(c);
        sec = section_e'(s);
        #1;
        exp = '0;
        exp[8] = (c == 1);
        exp[7] = (c == 2);
        exp[6] = (c == 3) || (c == 4);
        exp[5] = (c == 4);
        exp[4] = (c == 5);
        exp[3] = (c == 5) && (s == 0);
        exp[2] = (c == 5) && (s == 1);
        exp[1] = (c == 5) && (s == 2);
        exp[0] = (c == 5) && (s == 3);
        got = {glob_load, st_clear, st_shift, st_border, out_en, en_dil, en_copy, en_max, en_trans};
        checks++;
        if (got !== exp) begin failures++; $display("FAIL cmd=%0d sec=%0d got=%b exp=%b", c, s, got, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
