// tb_dag: runs the data address generator for a small image (8 rows, two
// swaths) and compares every cycle of its output (command, address, write
// enable, busy, done) with a trace built here from the sweep described in the
// DAG's header. Also checks the busy time 2 + SWATHS*(3*ROWS + 2), that the
// global bus carries the requested operation at LOADG, and that start is
// ignored while busy.
module tb_dag;
  import zelig_pkg::*;
  localparam int unsigned ROWS = 8, SWATHS = 2, ADDR_W = 16;
  localparam int unsigned IMG_W = ADDR_W - $clog2(ROWS * SWATHS);

  logic clk = 0, rst, start, busy, done, mem_we;
  morph_op_e op;
  logic [8:0] se;
  logic [3:0] tdir;
  logic [IMG_W-1:0] src, aux, dst;
  cmd_e cmd;
  glob_t gbus;
  logic [ADDR_W-1:0] mem_addr;
  int checks = 0, failures = 0;

  typedef struct { cmd_e c; logic [ADDR_W-1:0] a; logic we; logic dn; } step_t;
  step_t exp_q[$];

  dag #(.ADDR_W(ADDR_W), .ROWS(ROWS), .SWATHS(SWATHS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ADDR_W-1:0] w(int img, int s, int row);
    return ADDR_W'(img * ROWS * SWATHS + s * ROWS + row);
  endfunction

  task automatic build(int s_img, int a_img, int d_img);
    exp_q.delete();
    exp_q.push_back('{CMD_LOADG, '0, 0, 0});
    for (int s = 0; s < SWATHS; s++) begin
      exp_q.push_back('{CMD_CLEAR, '0, 0, 0});
      exp_q.push_back('{CMD_NOP, w(s_img, s, 0), 0, 0});
      exp_q.push_back('{CMD_SHIFT, '0, 0, 0});
      for (int y = 1; y < ROWS; y++) begin
        exp_q.push_back('{CMD_NOP, w(s_img, s, y), 0, 0});
        exp_q.push_back('{CMD_SHIFT, w(a_img, s, y - 1), 0, 0});
        exp_q.push_back('{CMD_WRITE, w(d_img, s, y - 1), 1, 0});
      end
      exp_q.push_back('{CMD_SHBRD, w(a_img, s, ROWS - 1), 0, 0});
      exp_q.push_back('{CMD_WRITE, w(d_img, s, ROWS - 1), 1, 0});
    end
    exp_q.push_back('{CMD_NOP, '0, 0, 1});
  endtask

  task automatic run(morph_op_e o, int s_img, int a_img, int d_img);
    int n;
    glob_t g;
    op = o; se = 9'($urandom); tdir = 4'($urandom_range(0, 8));
    src = IMG_W'(s_img); aux = IMG_W'(a_img); dst = IMG_W'(d_img);
    g = op_to_glob(o, se, tdir);
    build(s_img, a_img, d_img);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    // Change the operands: the DAG must use the values latched at start.
    se = ~se; src = src + 1'b1;
    n = 0;
    foreach (exp_q[i]) begin
      checks++;
      if (!busy || cmd !== exp_q[i].c || mem_addr !== exp_q[i].a || mem_we !== exp_q[i].we
          || done !== exp_q[i].dn) begin
        failures++;
        $display("FAIL step %0d: busy=%b cmd=%s addr=%h we=%b done=%b  exp cmd=%s addr=%h we=%b done=%b",
                 i, busy, cmd.name(), mem_addr, mem_we, done, exp_q[i].c.name(), exp_q[i].a,
                 exp_q[i].we, exp_q[i].dn);
      end
      if (exp_q[i].c == CMD_LOADG) begin
        checks++;
        if (gbus !== g) begin failures++; $display("FAIL gbus=%h exp=%h", gbus, g); end
      end
      if (i == 5) start = 1;        // must be ignored while busy
      n++;
      @(posedge clk); #1;
      start = 0;
    end
    checks++;
    if (busy || n != 2 + SWATHS * (3 * ROWS + 2)) begin
      failures++;
      $display("FAIL busy=%b busy time %0d", busy, n);
    end
  endtask

  initial begin
    rst = 1; start = 0; op = OP_COPY; se = 0; tdir = 0; src = 0; aux = 0; dst = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    @(posedge clk); #1;
    run(OP_DILATE, 3, 5, 7);
    run(OP_MAX, 255, 0, 4095);
    run(OP_ERODE, 1, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
