// tb_flov_router: one FLOV router at (2,2), the testbench playing its neighbours.
// Checks:
//   * powered on, it routes like the baseline router (head out 5 cycles after in),
//   * when its core sleeps during a packet, it shows stop, lets the packet finish and
//     only then power-gates (pg shown),
//   * gated, flits fly straight over (W->E, E->W, N->S, S->N), leave one cycle after
//     they arrive, in the escape VC, and a credit goes back upstream for each,
//   * gated, a flit is held when the downstream escape VC has no credit,
//   * on wake-up it shows stop until the fly-over buffers are empty, then routes again.
`timescale 1ns/1ps
module tb_flov_router;
  import flov_pkg::*;

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;

  logic [COORD_W-1:0] my_x = 2, my_y = 2;
  logic       core_active;
  flit_t      in_flit    [NUM_PORTS];
  credit_t    out_credit [NUM_PORTS];
  flit_t      out_flit   [NUM_PORTS];
  credit_t    in_credit  [NUM_PORTS];
  pg_status_t nbr_status [4];
  pg_status_t status;
  logic gate_event, wake_event, timeout_event, flyover_event;

  flov_router #(.MX(8)) dut (.*);

  int unsigned checks = 0, failures = 0, cycle = 0, flyovers = 0;
  flit_t       rxq [NUM_PORTS][$];
  int unsigned rxt [NUM_PORTS][$];
  int          upc [NUM_PORTS];     // credits seen by upstream, per input port
  bit          hold [NUM_PORTS];
  logic [VC_W-1:0] owed [NUM_PORTS][$];   // credits withheld while hold is set

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cycle); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (flyover_event) flyovers++;
    for (int o = 0; o < NUM_PORTS; o++) begin
      in_credit[o] <= '0;
      if (out_credit[o].valid) upc[o]++;
      if (out_flit[o].valid) begin
        rxq[o].push_back(out_flit[o]);
        rxt[o].push_back(cycle);
        if (!hold[o]) in_credit[o] <= '{valid: 1'b1, vc: out_flit[o].vc};
        else          owed[o].push_back(out_flit[o].vc);
      end else if (!hold[o] && owed[o].size() > 0) begin
        in_credit[o] <= '{valid: 1'b1, vc: owed[o].pop_front()};
      end
    end
  end

  task automatic drive(int p, int v, bit head, bit tail, int dx, int dy, int data);
    @(negedge clk);
    in_flit[p] = '0;
    in_flit[p].valid = 1; in_flit[p].head = head; in_flit[p].tail = tail;
    in_flit[p].vc = VC_W'(v); in_flit[p].dst_x = COORD_W'(dx); in_flit[p].dst_y = COORD_W'(dy);
    in_flit[p].payload = data;
    @(posedge clk);
    #0.1 in_flit[p] = '0;
  endtask

  task automatic wait_rx(int o, int n, int limit);
    int g;
    g = 0;
    while (rxq[o].size() < n && g < limit) begin @(posedge clk); g++; end
  endtask

  initial begin
    int unsigned t0;
    flit_t f;
    core_active = 1;
    foreach (in_flit[p]) in_flit[p] = '0;
    foreach (in_credit[p]) in_credit[p] = '0;
    foreach (nbr_status[d]) nbr_status[d] = '0;
    foreach (upc[p]) upc[p] = 0;
    foreach (hold[p]) hold[p] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);

    // on: West -> East worm of 2 flits
    t0 = cycle + 1;
    drive(P_W, 0, 1, 0, 6, 2, 'h10);
    drive(P_W, 0, 0, 1, 6, 2, 'h11);
    wait_rx(P_E, 2, 50);
    check(rxq[P_E].size() == 2 && rxq[P_E][0].payload == 'h10 && rxq[P_E][1].payload == 'h11, "powered-on routing");
    check(rxt[P_E][0] - t0 == 5 - 1 + 1, $sformatf("powered-on head latency %0d", rxt[P_E][0] - t0));
    rxq[P_E].delete(); rxt[P_E].delete();

    // core sleeps in the middle of a packet: stop first, gate only after the tail
    drive(P_N, 1, 1, 0, 2, 6, 'h20);
    core_active = 0;
    repeat (4) @(posedge clk);
    check(status.stop && !status.pg, "draining: stop shown, not yet gated");
    drive(P_N, 1, 0, 0, 2, 6, 'h21);
    repeat (6) @(posedge clk);
    check(!status.pg, "not gated with a packet half through");
    drive(P_N, 1, 0, 1, 2, 6, 'h22);
    wait_rx(P_S, 3, 50);
    check(rxq[P_S].size() == 3 && rxq[P_S][2].payload == 'h22, "packet finished before gating");
    repeat (10) @(posedge clk);
    check(status.pg && !status.stop, "gated after drain");
    rxq[P_S].delete(); rxt[P_S].delete();

    // gated: fly-over in all four directions
    foreach (upc[p]) upc[p] = 0;
    for (int d = 0; d < 4; d++) begin
      int o;
      o = (d + 2) % 4;
      t0 = cycle + 1;
      drive(d, ESC_VC, 1, 1, 7, 7, 'h30 + d);
      wait_rx(o, 1, 10);
      check(rxq[o].size() == 1, $sformatf("fly-over from side %0d", d));
      if (rxq[o].size() == 1) begin
        f = rxq[o].pop_front();
        check(f.payload == 'h30 + d && f.vc == VC_W'(ESC_VC), "fly-over flit intact, escape VC");
        check(rxt[o].pop_front() - t0 == 1, "fly-over takes one cycle");
      end
      check(upc[d] == 1, "credit back upstream");
    end
    check(flyovers == 4, "four fly-over events");
    check(rxq[P_L].size() == 0, "nothing ejected while gated");

    // gated, no downstream credit: the flit waits (East escape VC has 6 credits; use 7)
    hold[P_E] = 1;
    for (int i = 0; i < 7; i++) begin
      while (upc[P_W] == 0) @(negedge clk);
      upc[P_W]--;
      drive(P_W, ESC_VC, i == 0, i == 6, 7, 2, 'h40 + i);
    end
    repeat (5) @(posedge clk);
    check(rxq[P_E].size() == 6, $sformatf("6 flits pass, 7th held (got %0d)", rxq[P_E].size()));

    // wake-up while a flit is still in the fly-over buffer
    core_active = 1;
    repeat (6) @(posedge clk);
    check(status.pg && status.stop, "waking: stop shown while fly-over buffer holds a flit");
    hold[P_E] = 0;
    repeat (20) @(posedge clk);
    check(!status.pg && !status.stop, "back on after fly-over drained");
    check(rxq[P_E].size() == 7, "held flit delivered");
    rxq[P_E].delete(); rxt[P_E].delete();

    // routes again: ejection
    drive(P_E, 0, 1, 1, 2, 2, 'h50);
    wait_rx(P_L, 1, 50);
    check(rxq[P_L].size() == 1 && rxq[P_L][0].payload == 'h50, "ejection after wake-up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
