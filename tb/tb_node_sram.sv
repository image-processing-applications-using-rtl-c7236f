// tb_node_sram: random writes and reads of the full 64K x 8 node SRAM,
// compared with an associative-array copy. Checks the one-cycle read latency
// and that a write cycle leaves rdata unchanged.
module tb_node_sram;
  logic clk = 0, we;
  logic [15:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [int];
  int checks = 0, failures = 0;

  node_sram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] last;
    we = 0; addr = 0; wdata = 0;
    // Fill a spread of addresses including both ends.
    for (int i = 0; i < 3000; i++) begin
      we = 1;
      addr = (i == 0) ? 16'h0000 : (i == 1) ? 16'hffff : 16'($urandom);
      wdata = 8'($urandom);
      model[int'(addr)] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    foreach (model[a]) begin
      addr = 16'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr=%h rd=%h exp=%h", addr, rdata, model[a]); end
      last = rdata;
      // A write cycle must not disturb rdata.
      if ((a & 15) == 0) begin
        we = 1; addr = 16'(a); wdata = ~model[a]; model[a] = wdata;
        @(posedge clk); #1;
        we = 0;
        checks++;
        if (rdata !== last) begin failures++; $display("FAIL rdata changed on write"); end
        @(posedge clk); #1;
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL rewrite addr=%h", addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
