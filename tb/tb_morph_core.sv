// tb_morph_core: checks the CORE block for every primitive operation on random
// 3x3 windows and structuring elements, against results written from the
// textbook definitions in morph_ref_pkg.
// It also checks the cross structuring element 186 on two known windows.
module tb_morph_core;
  import zelig_pkg::*;
  import morph_ref_pkg::*;
  logic [8:0] win, se;
  logic aux, inv, en_dil, en_copy, en_max, en_trans, y;
  logic [3:0] tdir;
  int checks = 0, failures = 0;

  morph_core dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(morph_op_e op);
    glob_t g;
    g = op_to_glob(op, se, tdir);
    inv      = g.inv;
    en_dil   = (g.sec == SEC_DILATE);
    en_copy  = (g.sec == SEC_COPY);
    en_max   = (g.sec == SEC_MAX);
    en_trans = (g.sec == SEC_TRANS);
    #1;
    checks++;
    if (y !== ref_op(op, win, aux, se, tdir)) begin
      failures++;
      $display("FAIL op=%s win=%b se=%b aux=%b tdir=%0d y=%b", op.name(), win, se, aux, tdir, y);
    end
  endtask

  initial begin
    // Cross SE 186: dilation of a lone pixel above the centre reaches the centre,
    // one at a corner does not; erosion needs all five cross pixels.
    se = 9'd186; aux = 0; tdir = 0;
    win = 9'b000_000_010; apply(OP_DILATE);
    if (y !== 1'b1) begin failures++; $display("FAIL cross dilation"); end
    win = 9'b000_000_001; apply(OP_DILATE);
    if (y !== 1'b0) begin failures++; $display("FAIL cross dilation corner"); end
    win = 9'b010_111_010; apply(OP_ERODE);
    if (y !== 1'b1) begin failures++; $display("FAIL cross erosion"); end
    win = 9'b010_111_000; apply(OP_ERODE);
    if (y !== 1'b0) begin failures++; $display("FAIL cross erosion missing"); end
    checks += 4;
    for (int i = 0; i < 4000; i++) begin
      win  = 9'($urandom);
      se   = 9'($urandom);
      aux  = 1'($urandom);
      tdir = 4'($urandom_range(0, 8));
      apply(morph_op_e'($urandom_range(0, 6)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
