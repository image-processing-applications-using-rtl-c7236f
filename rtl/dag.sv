// dag: data address generator. For one primitive morphology operation it
// drives the shared node-memory address bus and write enable and broadcasts a
// command to every FPGA each cycle, sweeping the source image down each
// 256-column swath one row (one memory word) at a time.
//
// Sequence (one memory access per cycle, the document's memory cycle):
//   LOADG           load every GLOBREG with the operation set-up (1 cycle)
//   per swath:
//     CLEAR         store := border pixels                        (1)
//     READ, SHIFT   row 0 enters the store                        (2)
//     per y = 1 .. ROWS-1:
//       READ        address source row y
//       SHIFT       row y enters the store; address aux row y-1
//       WRITE       result row y-1 written to the destination     (3 each)
//     SHBRD, WRITE  border row enters; last row written           (2)
//   DONE            one-cycle done pulse
// busy is high for 2 + SWATHS * (3*ROWS + 2) cycles, the done cycle included:
// 3078 cycles (307.8 us at 100 ns) for a 512 x 512 image. The store keeps copies of rows y-1..y+1, so
// the destination may be the source image itself.
// The document says the DAG generates the addresses and sequencing in further
// reconfigurable logic; this sequence, the memory layout (zelig_pkg) and the
// start/done handshake are this design's choices. Synchronous active-high
// reset. `start` is taken only while idle (busy = 0).
module dag
  import zelig_pkg::*;
#(
  parameter int unsigned ADDR_W   = 16,
  parameter int unsigned ROWS     = 512,   // image rows
  parameter int unsigned SWATHS   = 2,     // image columns / 256
  parameter int unsigned IMG_W    = ADDR_W - $clog2(ROWS * SWATHS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  morph_op_e         op,
  input  logic [8:0]        se,
  input  logic [3:0]        tdir,
  input  logic [IMG_W-1:0]  src,     // image numbers
  input  logic [IMG_W-1:0]  aux,
  input  logic [IMG_W-1:0]  dst,
  output logic              busy,
  output logic              done,
  output cmd_e              cmd,
  output glob_t             gbus,
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_we
);
  localparam int unsigned ROW_W = $clog2(ROWS + 1);
  localparam int unsigned SW_W  = (SWATHS > 1) ? $clog2(SWATHS) : 1;
  localparam int unsigned OFF_W = $clog2(ROWS * SWATHS);

  typedef enum logic [2:0] {S_IDLE, S_LOADG, S_CLEAR, S_READ, S_SHIFT, S_SHBRD, S_WRITE, S_DONE} state_e;

  state_e            st;
  logic [ROW_W-1:0]  y;       // row being brought into the store
  logic [SW_W-1:0]   sw;
  morph_op_e         op_q;
  logic [8:0]        se_q;
  logic [3:0]        tdir_q;
  logic [IMG_W-1:0]  src_q, aux_q, dst_q;

  function automatic logic [ADDR_W-1:0] word(logic [IMG_W-1:0] img, logic [SW_W-1:0] s,
                                             logic [ROW_W-1:0] row);
    logic [OFF_W-1:0] off;
    off = OFF_W'(s * ROWS + row);
    return {img, off};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE;
      y  <= '0;
      sw <= '0;
    end else begin
      unique case (st)
        S_IDLE:  if (start) st <= S_LOADG;
        S_LOADG: begin sw <= '0; st <= S_CLEAR; end
        S_CLEAR: begin y <= '0; st <= S_READ; end
        S_READ:  st <= S_SHIFT;
        S_SHIFT: if (y == 0) begin y <= 1; st <= S_READ; end
                 else st <= S_WRITE;
        S_SHBRD: st <= S_WRITE;
        S_WRITE: begin
          if (y == ROW_W'(ROWS)) begin
            if (sw == SW_W'(SWATHS - 1)) st <= S_DONE;
            else begin sw <= sw + 1'b1; st <= S_CLEAR; end
          end else begin
            y  <= y + 1'b1;
            st <= (y == ROW_W'(ROWS - 1)) ? S_SHBRD : S_READ;
          end
        end
        S_DONE:  st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == S_IDLE && start) begin
      op_q <= op; se_q <= se; tdir_q <= tdir;
      src_q <= src; aux_q <= aux; dst_q <= dst;
    end
  end

  always_comb begin
    busy     = (st != S_IDLE);
    done     = (st == S_DONE);
    cmd      = CMD_NOP;
    gbus     = op_to_glob(op_q, se_q, tdir_q);
    mem_addr = '0;
    mem_we   = 1'b0;
    unique case (st)
      S_LOADG: cmd = CMD_LOADG;
      S_CLEAR: cmd = CMD_CLEAR;
      S_READ:  mem_addr = word(src_q, sw, y);
      S_SHIFT: begin
        cmd = CMD_SHIFT;
        if (y != 0) mem_addr = word(aux_q, sw, y - 1'b1);
      end
      S_SHBRD: begin cmd = CMD_SHBRD; mem_addr = word(aux_q, sw, y - 1'b1); end
      S_WRITE: begin cmd = CMD_WRITE; mem_addr = word(dst_q, sw, y - 1'b1); mem_we = 1'b1; end
      default: ;
    endcase
  end

  // A write only ever follows a shift.
  property p_write_after_shift;
    @(posedge clk) disable iff (rst) (st == S_WRITE) |-> $past(st == S_SHIFT || st == S_SHBRD);
  endproperty
  assert property (p_write_after_shift);
endmodule
