// tb_flit_fifo: random writes and reads against a reference queue. Writes respect the
// credit rule (never into a full buffer). Checks the head flit, the flit behind it, the
// fill count and the empty flag every cycle.
`timescale 1ns/1ps
module tb_flit_fifo;
  import flov_pkg::*;
  localparam int unsigned DEPTH = BUF_DEPTH;

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;

  logic  wr_en, rd_en, empty;
  flit_t wr_flit, rd_flit, rd_flit_next;
  logic [$clog2(DEPTH+1)-1:0] count;
  int unsigned checks = 0, failures = 0;
  flit_t model[$];

  flit_fifo #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    wr_en = 0; rd_en = 0; wr_flit = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // compare state
      checks++;
      if (count != model.size() || empty != (model.size() == 0)) begin
        failures++;
        $display("FAIL: count %0d expected %0d", count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_flit != model[0]) begin failures++; $display("FAIL: head flit mismatch"); end
      end
      if (model.size() > 1) begin
        checks++;
        if (rd_flit_next != model[1]) begin failures++; $display("FAIL: next flit mismatch"); end
      end
      rd_en = (model.size() > 0) && ($urandom % 3 != 0);
      wr_en = ((model.size() < DEPTH) || rd_en) && ($urandom % 2 == 0);
      wr_flit = '0;
      wr_flit.valid = 1;
      wr_flit.head = $urandom;
      wr_flit.payload = $urandom;
      wr_flit.dst_x = $urandom;
      @(posedge clk);
      #0;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_flit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
