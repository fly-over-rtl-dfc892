// flit_fifo: input buffer of one virtual channel.
//
// A circular buffer of DEPTH flits (6 in the evaluated router). Write and read may
// happen in the same cycle. The head entry is visible combinationally on rd_flit. The
// upstream router never writes into a full buffer because it holds one credit per free
// slot; the assertion below checks that rule. rd_flit_next shows the entry behind the
// head, for a router that schedules the next read while the head is being read. `count` is the fill level, used by the
// router to tell flits already scheduled for reading from those still waiting.
module flit_fifo
  import flov_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_en,
  input  flit_t      wr_flit,
  input  logic       rd_en,
  output flit_t      rd_flit,
  output flit_t      rd_flit_next,   // entry behind the head
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic       empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t         mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr_en) wptr <= incr(wptr);
      if (rd_en) rptr <= incr(rptr);
      count <= count + ($bits(count))'(wr_en) - ($bits(count))'(rd_en);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr] <= wr_flit;
  end

  assign rd_flit      = mem[rptr];
  assign rd_flit_next = mem[incr(rptr)];
  assign empty   = (count == '0);

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(wr_en && !rd_en && count == ($clog2(DEPTH+1))'(DEPTH))) else $error("flit_fifo overflow");
      assert (!(rd_en && empty)) else $error("flit_fifo underflow");
    end
  end
endmodule
