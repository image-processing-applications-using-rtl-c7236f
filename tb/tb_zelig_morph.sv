// tb_zelig_morph: end-to-end test of the whole logic surface at its full size
// (32 FPGAs x 8 pixels, 64K-word node memory, 512 x 512 images), with no
// parameter overridden.
//
// The host port loads random images into node memory; then primitive
// operations run through the data address generator and every result image is
// read back over the host port and compared, pixel by pixel, with
// morph_ref_pkg. Pixels outside the image and outside the pixel's own
// 256-column swath count as 0, as the design specifies. The sequence covers
// all seven primitives, the cross structuring element 186, an OPEN built from
// ERODE into working image 0 followed by DILATE, an in-place operation, and a
// start pulse while busy (ignored). Each operation's busy time is checked
// against 2 + SWATHS*(3*ROWS + 2) = 3078 cycles (done cycle included).
//
// Mechanisms counted (each must occur): store clears, border-row shifts,
// pixels passed between adjacent FPGAs, aux reads used by MAX/MIN, inverted
// operations, each CORE section, in-place operations, ignored starts.
module tb_zelig_morph;
  import zelig_pkg::*;
  import morph_ref_pkg::*;
  localparam int unsigned N = 512, W = 256, SW = N / W, WPI = N * SW;

  logic clk = 0, rst, start, busy, done, host_we;
  morph_op_e op;
  logic [8:0] se;
  logic [3:0] tdir;
  logic [5:0] src, aux, dst;
  logic [15:0] host_addr;
  logic [W-1:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;

  zelig_morph dut (.*);
  always #50 clk = ~clk;   // 100 ns memory cycle

  // Images kept by the testbench, indexed [image][row][column].
  logic [N-1:0] img [64][N];

  int n_clear, n_shbrd, n_edge, n_aux, n_inv, n_inplace, n_ignored;
  int n_sec [4];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, from the broadcast command and the edge links.
  always @(posedge clk) if (!rst) begin
    if (dut.cmd == CMD_CLEAR) n_clear++;
    if (dut.cmd == CMD_SHBRD) n_shbrd++;
    if (dut.cmd == CMD_SHIFT) begin
      for (int f = 0; f < 31; f++) if (dut.ro[f] || dut.lo[f+1]) n_edge++;
    end
  end

  function automatic logic pix(int im, int r, int c, int sw);
    if (r < 0 || r >= N || c < sw * W || c >= (sw + 1) * W) return 1'b0;
    return img[im][r][c];
  endfunction

  task automatic host_write_image(int im);
    for (int s = 0; s < SW; s++)
      for (int r = 0; r < N; r++) begin
        host_we = 1; host_addr = 16'(im * WPI + s * N + r); host_wdata = img[im][r][s*W +: W];
        @(posedge clk); #1;
      end
    host_we = 0;
  endtask

  task automatic check_image(int im, string what);
    int bad = 0;
    host_we = 0;
    for (int s = 0; s < SW; s++)
      for (int r = 0; r < N; r++) begin
        host_addr = 16'(im * WPI + s * N + r);
        @(posedge clk); #1;
        checks++;
        if (host_rdata !== img[im][r][s*W +: W]) begin
          bad++;
          if (bad < 4) $display("FAIL %s image %0d row %0d swath %0d:\n got %h\n exp %h", what, im, r, s,
                                host_rdata, img[im][r][s*W +: W]);
        end
      end
    if (bad) failures++;
    $display("%s: %0d of %0d rows wrong", what, bad, N * SW);
  endtask

  // Reference result into image d (computed before it is overwritten).
  task automatic reference(morph_op_e o, int s_im, int a_im, int d_im, logic [8:0] e, logic [3:0] t);
    logic [N-1:0] out [N];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        logic [8:0] w;
        int sw;
        sw = c / W;
        for (int k = 0; k < 9; k++) w[k] = pix(s_im, r + k / 3 - 1, c + k % 3 - 1, sw);
        out[r][c] = ref_op(o, w, img[a_im][r][c], e, t);
      end
    img[d_im] = out;
  endtask

  task automatic run(morph_op_e o, int s_im, int a_im, int d_im, logic [8:0] e, logic [3:0] t);
    int cyc;
    glob_t g;
    reference(o, s_im, a_im, d_im, e, t);
    g = op_to_glob(o, e, t);
    n_sec[g.sec]++;
    if (g.inv) n_inv++;
    if (g.sec == SEC_MAX) n_aux++;
    if (s_im == d_im) n_inplace++;
    op = o; se = e; tdir = t; src = 6'(s_im); aux = 6'(a_im); dst = 6'(d_im);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    while (!done) begin
      if (cyc == 100) begin
        start = 1; src = 6'(a_im); n_ignored++;     // ignored while busy
      end else start = 0;
      @(posedge clk); #1;
      cyc++;
    end
    start = 0;
    @(posedge clk); #1;
    cyc++;
    checks++;
    if (busy || cyc != 2 + SW * (3 * N + 2)) begin
      failures++;
      $display("FAIL busy time %0d cycles", cyc);
    end
    check_image(d_im, o.name());
  endtask

  initial begin
    rst = 1; start = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    op = OP_COPY; se = 0; tdir = 0; src = 0; aux = 0; dst = 0;
    n_clear = 0; n_shbrd = 0; n_edge = 0; n_aux = 0; n_inv = 0; n_inplace = 0; n_ignored = 0;
    n_sec = '{0, 0, 0, 0};
    repeat (3) @(posedge clk); #1;
    rst = 0;
    // Image 1: blobs (3/4 dense); image 2: sparse dots.
    for (int r = 0; r < N; r++) begin
      for (int k = 0; k < N / 32; k++) begin
        img[1][r][k*32 +: 32] = $urandom | $urandom;
        img[2][r][k*32 +: 32] = $urandom & $urandom & $urandom;
      end
    end
    host_write_image(1);
    host_write_image(2);
    check_image(1, "host load");

    run(OP_DILATE,    2, 2, 3, 9'd186, 0);
    run(OP_ERODE,     1, 1, 4, 9'd186, 0);
    run(OP_DILATE,    2, 2, 5, 9'($urandom), 0);
    run(OP_ERODE,     1, 1, 6, 9'($urandom), 0);
    run(OP_COPY,      1, 1, 7, 0, 0);
    run(OP_COMP,      1, 1, 8, 0, 0);
    run(OP_MAX,       1, 2, 9, 0, 0);
    run(OP_MIN,       1, 2, 10, 0, 0);
    run(OP_TRANSLATE, 2, 2, 11, 0, 4'd5);
    // OPEN = ERODE into working image 0, then DILATE; 3x3 square element.
    run(OP_ERODE,     1, 1, 0, 9'h1ff, 0);
    run(OP_DILATE,    0, 0, 63, 9'h1ff, 0);
    // In place.
    run(OP_DILATE,    5, 5, 5, 9'd186, 0);

    $display("mechanisms: clear=%0d border_shift=%0d edge_pixels=%0d aux=%0d inverted=%0d inplace=%0d ignored_start=%0d",
             n_clear, n_shbrd, n_edge, n_aux, n_inv, n_inplace, n_ignored);
    $display("sections: dilate=%0d copy=%0d max=%0d translate=%0d", n_sec[0], n_sec[1], n_sec[2], n_sec[3]);
    foreach (n_sec[i]) begin checks++; if (n_sec[i] == 0) failures++; end
    checks += 7;
    if (n_clear == 0) failures++;
    if (n_shbrd == 0) failures++;
    if (n_edge == 0) failures++;
    if (n_aux == 0) failures++;
    if (n_inv == 0) failures++;
    if (n_inplace == 0) failures++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
