// tb_flov_baseline_router: one router at (2,2) of an 8x8 mesh, the testbench playing
// all five neighbours (it returns credits two cycles after a flit arrives unless told
// to hold them). Checks:
//   * head latency through the router: out 5 cycles after in (RC, VA, SA, ST + link),
//     and a 4-flit packet leaves as a contiguous, ordered worm in one VC,
//   * routing to the right port and VC class with neighbours on, a gated straight
//     neighbour (fly-over, escape VC), the Y turn candidate gated (X taken, regular),
//     both candidates gated (East, escape VC), and an escape packet staying in escape,
//   * no new packet to a neighbour that shows stop, release afterwards,
//   * credit flow control: never more flits in flight than the downstream VC holds,
//   * VA time-out: with all regular VCs towards North blocked, a waiting packet falls
//     back to the escape VC after TIMEOUT cycles,
//   * quiet once all traffic has left and all credits are back.
`timescale 1ns/1ps
module tb_flov_baseline_router;
  import flov_pkg::*;
  localparam int unsigned TO = 16;

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;

  logic [COORD_W-1:0] my_x = 2, my_y = 2;
  flit_t      in_flit    [NUM_PORTS];
  credit_t    out_credit [NUM_PORTS];
  flit_t      out_flit   [NUM_PORTS];
  credit_t    in_credit  [NUM_PORTS];
  pg_status_t nbr_status [4];
  logic       quiet, timeout_event;

  flov_baseline_router #(.MX(8), .DEPTH(BUF_DEPTH), .TIMEOUT(TO)) dut (.*);

  int unsigned checks = 0, failures = 0, cycle = 0, timeouts = 0;
  flit_t       rxq   [NUM_PORTS][$];
  int unsigned rxt   [NUM_PORTS][$];
  int          inflight [NUM_PORTS][NUM_VC];
  bit          hold  [NUM_PORTS];
  int          up_cred [NUM_PORTS][NUM_VC];
  credit_t     pend  [NUM_PORTS][$];
  int unsigned pend_t[NUM_PORTS][$];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cycle); end
  endtask

  function automatic int cap(int o, int v);
    if (o == int'(P_L)) return BUF_DEPTH;
    if (nbr_status[o].pg) return (v == ESC_VC) ? 1 : 0;
    return BUF_DEPTH;
  endfunction

  // Downstream models and upstream credit bookkeeping
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (timeout_event) timeouts++;
    for (int o = 0; o < NUM_PORTS; o++) begin
      in_credit[o] <= '0;
      if (!rst && out_credit[o].valid) up_cred[o][out_credit[o].vc]++;
      if (!rst && out_flit[o].valid) begin
        rxq[o].push_back(out_flit[o]);
        rxt[o].push_back(cycle);
        inflight[o][out_flit[o].vc]++;
        checks++;
        if (inflight[o][out_flit[o].vc] > cap(o, out_flit[o].vc)) begin
          failures++;
          $display("FAIL: port %0d vc %0d overrun", o, out_flit[o].vc);
        end
        pend[o].push_back('{valid: 1'b1, vc: out_flit[o].vc});
        pend_t[o].push_back(cycle + 2);
      end
      if (!hold[o] && pend[o].size() > 0 && pend_t[o][0] <= cycle) begin
        in_credit[o] <= pend[o].pop_front();
        void'(pend_t[o].pop_front());
        inflight[o][in_credit[o].vc] = inflight[o][in_credit[o].vc];
      end
    end
  end
  always @(posedge clk) begin
    for (int o = 0; o < NUM_PORTS; o++) if (in_credit[o].valid) inflight[o][in_credit[o].vc]--;
  end

  // Send a packet into input port p, VC v; returns the cycle of the head flit
  task automatic send(int p, int v, int dx, int dy, int len, int tag, output int unsigned t0);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      while (up_cred[p][v] == 0) @(negedge clk);
      in_flit[p] = '0;
      in_flit[p].valid = 1;
      in_flit[p].head = (i == 0);
      in_flit[p].tail = (i == len - 1);
      in_flit[p].vc = VC_W'(v);
      in_flit[p].dst_x = COORD_W'(dx);
      in_flit[p].dst_y = COORD_W'(dy);
      in_flit[p].payload = (tag << 8) | i;
      up_cred[p][v]--;
      if (i == 0) t0 = cycle;
      @(posedge clk);
      #0.1 in_flit[p] = '0;
    end
  endtask

  task automatic wait_rx(int o, int n);
    int unsigned g;
    g = 0;
    while (rxq[o].size() < n && g < 400) begin @(posedge clk); g++; end
    check(rxq[o].size() >= n, $sformatf("port %0d received %0d flits, expected %0d", o, rxq[o].size(), n));
  endtask

  // Pop a packet from output o and check it
  task automatic expect_pkt(int o, int len, int tag, bit esc, int unsigned t0, int lat);
    flit_t f;
    int unsigned t, vc;
    wait_rx(o, len);
    for (int i = 0; i < len && rxq[o].size() > 0; i++) begin
      f = rxq[o].pop_front();
      t = rxt[o].pop_front();
      if (i == 0) begin
        vc = f.vc;
        check(esc ? (f.vc == VC_W'(ESC_VC)) : (f.vc != VC_W'(ESC_VC)),
              $sformatf("packet %0d on port %0d in %s VC (got %0d)", tag, o, esc ? "escape" : "regular", f.vc));
        if (lat >= 0) check(t - t0 == unsigned'(lat), $sformatf("head latency %0d, expected %0d", t - t0, lat));
      end else begin
        check(f.vc == VC_W'(vc), "worm stays in one VC");
      end
      check(f.payload == ((tag << 8) | i) && f.head == (i == 0) && f.tail == (i == len - 1),
            $sformatf("packet %0d flit %0d order/content", tag, i));
    end
  endtask

  int unsigned t0, t1;

  initial begin
    foreach (in_flit[p]) in_flit[p] = '0;
    foreach (in_credit[p]) in_credit[p] = '0;
    foreach (nbr_status[d]) nbr_status[d] = '0;
    foreach (hold[p]) hold[p] = 0;
    foreach (up_cred[p, v]) up_cred[p][v] = BUF_DEPTH;
    foreach (inflight[p, v]) inflight[p][v] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (2) @(posedge clk);

    // 1. latency and worm: local -> East (5,2), 4 flits
    send(P_L, 0, 5, 2, 4, 1, t0);
    expect_pkt(P_E, 4, 1, 0, t0, 5);
    // 2. section 0 with all on: North first (Y before X)
    send(P_W, 1, 4, 0, 2, 2, t0);
    expect_pkt(P_N, 2, 2, 0, t0, 5);
    // 3. straight East over a gated neighbour: escape VC
    repeat (4) @(posedge clk);
    nbr_status[P_E].pg = 1;
    repeat (2) @(posedge clk);
    send(P_L, 0, 6, 2, 3, 3, t0);
    expect_pkt(P_E, 3, 3, 1, t0, -1);
    // 4. section 6 (SE), South gated, East gated: East in escape
    nbr_status[P_S].pg = 1;
    repeat (2) @(posedge clk);
    send(P_N, 2, 4, 5, 1, 4, t0);
    expect_pkt(P_E, 1, 4, 1, t0, -1);
    // 5. section 4 (SW), South gated, West on: West regular
    send(P_E, 0, 0, 4, 2, 5, t0);
    expect_pkt(P_W, 2, 5, 0, t0, -1);
    // 6. section 2 (NW), both North and West gated: East in escape
    nbr_status[P_N].pg = 1;
    nbr_status[P_W].pg = 1;
    repeat (2) @(posedge clk);
    send(P_S, 0, 0, 0, 2, 6, t0);
    expect_pkt(P_E, 2, 6, 1, t0, -1);
    // all back on
    repeat (6) @(posedge clk);
    foreach (nbr_status[d]) nbr_status[d] = '0;
    repeat (2) @(posedge clk);
    // 7. an escape packet (arrives in VC 3) for section 2 goes East, stays escape
    send(P_S, ESC_VC, 0, 0, 2, 7, t0);
    expect_pkt(P_E, 2, 7, 1, t0, -1);
    // 8. ejection: to (2,2) itself
    send(P_W, 0, 2, 2, 3, 8, t0);
    expect_pkt(P_L, 3, 8, 0, t0, 5);
    // 9. stop: North neighbour switching, packet waits; released after
    nbr_status[P_N].stop = 1;
    send(P_S, 1, 2, 0, 1, 9, t0);
    repeat (10) @(posedge clk);
    check(rxq[P_N].size() == 0, "no new packet to a switching neighbour");
    nbr_status[P_N].stop = 0;
    expect_pkt(P_N, 1, 9, 0, t0, -1);
    // 10. time-out: hold North credits, fill the 3 regular VCs, the 4th falls to escape
    repeat (10) @(posedge clk);
    hold[P_N] = 1;
    for (int k = 0; k < 3; k++) begin
      send(P_S, k, 2, 0, 1, 10 + k, t0);
    end
    for (int k = 0; k < 3; k++) expect_pkt(P_N, 1, 10 + k, 0, t0, -1);
    send(P_L, 1, 2, 0, 1, 13, t0);
    repeat (TO - 4) @(posedge clk);
    check(rxq[P_N].size() == 0, "blocked packet waits before time-out");
    expect_pkt(P_N, 1, 13, 1, t0, -1);
    check(timeouts >= 1, "time-out event seen");
    hold[P_N] = 0;
    repeat (30) @(posedge clk);
    check(quiet, "router quiet after traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
