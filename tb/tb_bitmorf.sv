// tb_bitmorf: three FPGA nodes side by side, BITMORFA, BITMORFB and BITMORFC,
// process a 24-column image of ROWS rows. The testbench plays the data address
// generator and the node memory: it broadcasts the command sequence of one
// sweep, puts row y+1 on the read buses at each SHIFT and row y-1 of the
// second image at each WRITE, and collects the write buses. Every output pixel
// of every operation is compared with morph_ref_pkg, pixels outside the image
// being 0. Windows at the FPGA boundaries need the exchanged edge pixels, and
// those at the outer edges the border columns of the end configurations.
module tb_bitmorf;
  import zelig_pkg::*;
  import morph_ref_pkg::*;
  localparam int unsigned PIX = 8, NF = 3, COLS = NF * PIX, ROWS = 12;

  logic clk = 0, rst;
  cmd_e cmd;
  glob_t gbus;
  logic [COLS-1:0] rd, wd;
  logic [NF-1:0] we_o, lo, ro;
  logic [COLS-1:0] img [ROWS];
  logic [COLS-1:0] im2 [ROWS];
  logic [COLS-1:0] res [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bitmorf #(.PIX(PIX), .LEFT_END(1'b1), .RIGHT_END(1'b0)) u_a (
    .clk, .rst, .cmd, .gbus, .mem_rdata(rd[0 +: PIX]), .mem_wdata(wd[0 +: PIX]), .mem_we_o(we_o[0]),
    .left_in(1'b1), .right_in(lo[1]), .left_out(lo[0]), .right_out(ro[0]));
  bitmorf #(.PIX(PIX)) u_b (
    .clk, .rst, .cmd, .gbus, .mem_rdata(rd[PIX +: PIX]), .mem_wdata(wd[PIX +: PIX]), .mem_we_o(we_o[1]),
    .left_in(ro[0]), .right_in(lo[2]), .left_out(lo[1]), .right_out(ro[1]));
  bitmorf #(.PIX(PIX), .LEFT_END(1'b0), .RIGHT_END(1'b1)) u_c (
    .clk, .rst, .cmd, .gbus, .mem_rdata(rd[2*PIX +: PIX]), .mem_wdata(wd[2*PIX +: PIX]), .mem_we_o(we_o[2]),
    .left_in(ro[1]), .right_in(1'b1), .left_out(lo[2]), .right_out(ro[2]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic pix(int r, int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return 1'b0;
    return img[r][c];
  endfunction

  task automatic step(cmd_e c, logic [COLS-1:0] data);
    cmd = c; rd = data;
    @(posedge clk); #1;
  endtask

  task automatic sweep(morph_op_e op, logic [8:0] se, logic [3:0] tdir);
    gbus = op_to_glob(op, se, tdir);
    step(CMD_LOADG, '0);
    step(CMD_CLEAR, '0);
    step(CMD_SHIFT, img[0]);
    for (int y = 1; y <= ROWS; y++) begin
      if (y < ROWS) step(CMD_SHIFT, img[y]);
      else          step(CMD_SHBRD, ~'0);     // data ignored on a border shift
      cmd = CMD_WRITE; rd = im2[y-1];
      #1;
      checks++;
      if (we_o !== '1) begin failures++; $display("FAIL write enables %b", we_o); end
      res[y-1] = wd;
      @(posedge clk); #1;
      cmd = CMD_NOP;
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        logic [8:0] w;
        for (int k = 0; k < 9; k++) w[k] = pix(r + k / 3 - 1, c + k % 3 - 1);
        checks++;
        if (res[r][c] !== ref_op(op, w, im2[r][c], se, tdir)) begin
          failures++;
          if (failures < 10) $display("FAIL %s se=%b r=%0d c=%0d got=%b", op.name(), se, r, c, res[r][c]);
        end
      end
  endtask

  initial begin
    rst = 1; cmd = CMD_NOP; gbus = '0; rd = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int t = 0; t < 12; t++) begin
      for (int r = 0; r < ROWS; r++) begin
        img[r] = COLS'($urandom) | COLS'($urandom);   // about 3/4 ones, so erosion leaves some
        im2[r] = COLS'($urandom);
        if (t % 3 == 0) img[r] = COLS'($urandom) & COLS'($urandom);
      end
      sweep(morph_op_e'(t % 7), (t < 2) ? 9'd186 : 9'($urandom), 4'($urandom_range(0, 8)));
    end
    sweep(OP_DILATE, 9'h1ff, 0);
    sweep(OP_ERODE, 9'h1ff, 0);
    for (int d = 0; d < 9; d++) sweep(OP_TRANSLATE, 0, 4'(d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
