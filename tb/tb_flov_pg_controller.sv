// tb_flov_pg_controller: the power-gating handshake of one router.
// Checks the sequence ON -> DRAIN (stop shown, no gating while the router still holds
// traffic) -> OFF (pg shown, muxes at 1, baseline router off) -> WAKE (stop shown, muxes
// still at 1 while fly-over buffers hold traffic) -> ON, the abort of a drain when the
// core wakes, and that no switch starts while a neighbour shows stop.
`timescale 1ns/1ps
module tb_flov_pg_controller;
  import flov_pkg::*;

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic core_active, router_quiet, flov_idle, sel, router_off, gate_event, wake_event;
  pg_status_t nbr_status [4];
  pg_status_t status;
  int unsigned checks = 0, failures = 0, gates = 0, wakes = 0;

  logic [COORD_W-1:0] my_x = 1, my_y = 2;
  flov_pg_controller dut (.*);

  always @(posedge clk) begin
    if (gate_event) gates++;
    if (wake_event) wakes++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  task automatic expect_state(bit pg, bit stop, string msg);
    check(status.pg == pg && status.stop == stop && sel == pg && router_off == pg, msg);
  endtask

  initial begin
    core_active = 1; router_quiet = 0; flov_idle = 1;
    foreach (nbr_status[d]) nbr_status[d] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    expect_state(0, 0, "on after reset");
    // a neighbour is switching: no drain may start
    nbr_status[2].stop = 1;
    core_active = 0;
    repeat (6) begin @(negedge clk); expect_state(0, 0, "held while neighbour switches"); end
    nbr_status[2].stop = 0;
    repeat (3) @(negedge clk);
    expect_state(0, 1, "drain: stop shown");
    repeat (5) begin @(negedge clk); expect_state(0, 1, "drain waits for quiet router"); end
    // core wakes during drain: abort
    core_active = 1;
    @(negedge clk);
    expect_state(0, 0, "drain aborted");
    core_active = 0;
    repeat (3) @(negedge clk);
    expect_state(0, 1, "drain again");
    router_quiet = 1;
    @(negedge clk);
    expect_state(1, 0, "gated");
    check(gates == 1, "one gate event");
    repeat (5) @(negedge clk);
    expect_state(1, 0, "stays gated");
    // wake-up with traffic in the fly-over buffers
    flov_idle = 0;
    core_active = 1;
    repeat (3) @(negedge clk);
    expect_state(1, 1, "wake: stop shown, fly-over still on");
    repeat (5) begin @(negedge clk); expect_state(1, 1, "wake waits for fly-over buffers"); end
    flov_idle = 1;
    @(negedge clk);
    expect_state(0, 0, "back on");
    check(wakes == 1, "one wake event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
