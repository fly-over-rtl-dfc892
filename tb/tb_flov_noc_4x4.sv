// tb_flov_noc_4x4: end-to-end test of the FLOV mesh on a 4x4 mesh (3+1 VCs, 6-flit
// buffers); the same test as tb_flov_noc, scaled down so that it builds and runs quickly.
//
// The testbench plays the network interface of every node. Each active core sends
// packets of 1..4 flits to random active destinations (Bernoulli injection at a
// programmable rate, flits per node per cycle). Every ejected flit is checked: it must
// arrive at its destination, in order within its packet, with an intact payload, and
// every packet must arrive exactly once.
//
// Phases:
//   1. latency probes on an idle, fully powered network: a head flit needs 5 cycles
//      per powered-on router (4 pipeline stages + link), 1 per gated router, plus one
//      cycle on the injection link from the network interface,
//   2. uniform random traffic, all cores active,
//   3. cores go to sleep while traffic runs; their routers drain and power-gate,
//   4. traffic with about 40% of the processor cores asleep (fly-over and escape use),
//   5. a latency probe across a gated router,
//   6. some cores wake and others sleep, under traffic,
//   7. hot-spot traffic towards one node to provoke VA time-outs,
//   8. drain and final scoreboard check.
// Each mechanism (power gating, wake-up, fly-over traversal, escape delivery, time-out,
// a mode switch under load) must occur at least once.
`timescale 1ns/1ps
module tb_flov_noc_4x4;
  import flov_pkg::*;

  localparam int unsigned MX = 4;
  localparam int unsigned MY = 4;
  localparam int unsigned NN = MX * MY;
  localparam int unsigned MAXSEQ = 4096;
  localparam int unsigned WATCHDOG = 400000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic       core_active   [NN];
  flit_t      inj_flit      [NN];
  credit_t    inj_credit    [NN];
  flit_t      ej_flit       [NN];
  credit_t    ej_credit     [NN];
  pg_status_t router_status [NN];
  logic       gate_event    [NN];
  logic       wake_event    [NN];
  logic       timeout_event [NN];
  logic       flyover_event [NN];

  flov_noc #(.MX(MX), .MY(MY)) dut (.*);

  // ------------------------------------------------------------------ bookkeeping
  int unsigned checks = 0, failures = 0;
  int unsigned cycle = 0;

  // NI injection state
  int          inj_cred   [NN][NUM_VC];
  logic        sending    [NN];
  int unsigned snd_dst    [NN];
  int unsigned snd_len    [NN];
  int unsigned snd_idx    [NN];
  int unsigned snd_vc     [NN];
  int unsigned snd_seq    [NN];
  int unsigned next_seq   [NN];
  int unsigned inj_cycle  [NN][MAXSEQ];

  // Traffic control
  logic        avail_node [NN];   // may send and receive
  logic        sleep_req  [NN];
  int unsigned rate_ppm   = 0;    // flits/node/cycle * 1e6 (converted to packets below)
  int          hotspot    = -1;
  int unsigned outstanding_to [NN];
  int unsigned total_sent = 0, total_recv = 0;

  // Ejection state
  logic        delivered  [NN][MAXSEQ];
  logic        rx_open    [NN][NUM_VC];
  int unsigned rx_src     [NN][NUM_VC];
  int unsigned rx_seq     [NN][NUM_VC];
  int unsigned rx_len     [NN][NUM_VC];
  int unsigned rx_idx     [NN][NUM_VC];
  int unsigned last_latency = 0;
  int unsigned lat_sum = 0, lat_cnt = 0;

  // Mechanism counters
  int unsigned n_gate = 0, n_wake = 0, n_flyover = 0, n_escape = 0, n_timeout = 0;
  int unsigned n_stop_under_load = 0;

  function automatic logic [PAYLOAD_W-1:0] body_word(int unsigned src, int unsigned seq, int unsigned idx);
    return {8'(src), 16'(seq), 8'(idx)};
  endfunction

  function automatic int unsigned mc_col(int unsigned n);
    return n % MX;
  endfunction

  // ------------------------------------------------------------------ NI: injection
  always @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < NN; n++) begin
        inj_flit[n] <= '0;
        sending[n]  <= 1'b0;
        for (int v = 0; v < NUM_VC; v++) inj_cred[n][v] <= DEPTH_NI();
      end
    end else begin
      for (int n = 0; n < NN; n++) begin
        flit_t f;
        f = '0;
        if (inj_credit[n].valid) inj_cred[n][inj_credit[n].vc] = inj_cred[n][inj_credit[n].vc] + 1;
        if (!sending[n] && avail_node[n] && !sleep_req[n] && want_packet(n)) begin
          int unsigned d;
          d = pick_dst(n);
          if (d != n) begin
            sending[n] = 1'b1;
            snd_dst[n] = d;
            snd_len[n] = 1 + ($urandom % 4);
            snd_idx[n] = 0;
            snd_vc[n]  = $urandom % ESC_VC;    // regular VC for injection
            snd_seq[n] = next_seq[n];
            next_seq[n] = next_seq[n] + 1;
            outstanding_to[d] = outstanding_to[d] + 1;
            total_sent = total_sent + 1;
          end
        end
        if (sending[n] && inj_cred[n][snd_vc[n]] > 0) begin
          f.valid   = 1'b1;
          f.head    = (snd_idx[n] == 0);
          f.tail    = (snd_idx[n] == snd_len[n] - 1);
          f.vc      = VC_W'(snd_vc[n]);
          f.dst_x   = COORD_W'(snd_dst[n] % MX);
          f.dst_y   = COORD_W'(snd_dst[n] / MX);
          f.payload = f.head ? {8'(n), 16'(snd_seq[n]), 8'(snd_len[n])}
                             : body_word(n, snd_seq[n], snd_idx[n]);
          if (f.head) inj_cycle[n][snd_seq[n] % MAXSEQ] = cycle;
          inj_cred[n][snd_vc[n]] = inj_cred[n][snd_vc[n]] - 1;
          snd_idx[n] = snd_idx[n] + 1;
          if (f.tail) sending[n] = 1'b0;
        end
        inj_flit[n] <= f;
      end
    end
  end

  function automatic int DEPTH_NI();
    return BUF_DEPTH;
  endfunction

  // Bernoulli source: rate_ppm flits/node/cycle with 2.5 flits per packet on average
  function automatic logic want_packet(int unsigned n);
    if (rate_ppm == 0) return 1'b0;
    return ($urandom % 1000000) < (rate_ppm * 2 / 5);
  endfunction

  function automatic int unsigned pick_dst(int unsigned n);
    if (hotspot >= 0) begin
      if (hotspot != int'(n) && avail_node[hotspot]) return unsigned'(hotspot);
      return n;
    end
    for (int tries = 0; tries < 16; tries++) begin
      int unsigned d;
      d = $urandom % NN;
      if (d != n && avail_node[d] && !sleep_req[d]) return d;
    end
    return n;
  endfunction

  // ------------------------------------------------------------------ NI: ejection
  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      ej_credit[n] <= '0;
      if (!rst && ej_flit[n].valid) begin
        flit_t f;
        int unsigned v;
        f = ej_flit[n];
        v = f.vc;
        ej_credit[n] <= '{valid: 1'b1, vc: f.vc};
        checks++;
        if (f.dst_x != COORD_W'(n % MX) || f.dst_y != COORD_W'(n / MX)) begin
          failures++;
          $display("FAIL: node %0d got a flit for (%0d,%0d)", n, f.dst_x, f.dst_y);
        end
        if (f.head) begin
          int unsigned s, q;
          if (rx_open[n][v]) begin
            failures++;
            $display("FAIL: node %0d vc %0d head inside an open packet", n, v);
          end
          s = f.payload[31:24];
          q = f.payload[23:8];
          rx_src[n][v] = s;
          rx_seq[n][v] = q;
          rx_len[n][v] = f.payload[7:0];
          rx_idx[n][v] = 0;
          rx_open[n][v] = 1'b1;
          if (v == ESC_VC) n_escape++;
          last_latency = cycle - inj_cycle[s][q % MAXSEQ];
          lat_sum += last_latency;
          lat_cnt++;
        end else begin
          if (!rx_open[n][v] ||
              f.payload != body_word(rx_src[n][v], rx_seq[n][v], rx_idx[n][v])) begin
            failures++;
            $display("FAIL: node %0d vc %0d body flit out of order or corrupt (%h)", n, v, f.payload);
          end
        end
        if (f.tail != (rx_idx[n][v] == rx_len[n][v] - 1)) begin
          failures++;
          $display("FAIL: node %0d vc %0d tail flag wrong", n, v);
        end
        if (f.tail) begin
          int unsigned s, q;
          s = rx_src[n][v];
          q = rx_seq[n][v];
          rx_open[n][v] = 1'b0;
          if (delivered[s][q % MAXSEQ]) begin
            failures++;
            $display("FAIL: packet %0d.%0d delivered twice", s, q);
          end
          delivered[s][q % MAXSEQ] = 1'b1;
          outstanding_to[n] = outstanding_to[n] - 1;
          total_recv++;
        end
        rx_idx[n][v] = rx_idx[n][v] + 1;
      end
    end
  end

  // ------------------------------------------------------------------ event counters
  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      for (int n = 0; n < NN; n++) begin
        if (gate_event[n])    n_gate++;
        if (wake_event[n])    n_wake++;
        if (flyover_event[n]) n_flyover++;
        if (timeout_event[n]) n_timeout++;
        if (router_status[n].stop && total_sent != total_recv) n_stop_under_load++;
      end
    end
  end

  // ------------------------------------------------------------------ helpers
  task automatic run(int unsigned cycles);
    repeat (cycles) @(posedge clk);
  endtask

  task automatic drain();
    int unsigned guard;
    guard = 0;
    while ((total_sent != total_recv || any_sending()) && guard < 50000) begin
      @(posedge clk);
      guard++;
    end
    checks++;
    if (total_sent != total_recv) begin
      failures++;
      $display("FAIL: network did not drain: sent %0d received %0d", total_sent, total_recv);
    end
  endtask

  function automatic logic any_sending();
    for (int n = 0; n < NN; n++) if (sending[n]) return 1'b1;
    return 1'b0;
  endfunction

  // Put the listed cores to sleep: stop using them, wait until nothing is in flight to
  // or from them, then lower core_active and wait for their routers to gate.
  task automatic sleep_cores(logic mask [NN]);
    int unsigned guard;
    for (int n = 0; n < NN; n++) if (mask[n]) sleep_req[n] = 1'b1;
    guard = 0;
    forever begin
      logic busy;
      busy = 1'b0;
      for (int n = 0; n < NN; n++) begin
        if (mask[n] && (outstanding_to[n] != 0 || sending[n])) busy = 1'b1;
      end
      if (!busy || guard > 20000) break;
      @(posedge clk);
      guard++;
    end
    for (int n = 0; n < NN; n++) begin
      if (mask[n]) begin
        avail_node[n]  = 1'b0;
        core_active[n] = 1'b0;
      end
    end
    guard = 0;
    forever begin
      logic done;
      done = 1'b1;
      for (int n = 0; n < NN; n++) if (mask[n] && !(router_status[n].pg && !router_status[n].stop)) done = 1'b0;
      if (done || guard > 20000) break;
      @(posedge clk);
      guard++;
    end
    for (int n = 0; n < NN; n++) begin
      if (mask[n]) begin
        checks++;
        if (!(router_status[n].pg && !router_status[n].stop)) begin
          failures++;
          $display("FAIL: router %0d did not power-gate", n);
        end
      end
    end
  endtask

  task automatic wake_cores(logic mask [NN]);
    int unsigned guard;
    for (int n = 0; n < NN; n++) if (mask[n]) core_active[n] = 1'b1;
    guard = 0;
    forever begin
      logic done;
      done = 1'b1;
      for (int n = 0; n < NN; n++) if (mask[n] && (router_status[n].pg || router_status[n].stop)) done = 1'b0;
      if (done || guard > 20000) break;
      @(posedge clk);
      guard++;
    end
    for (int n = 0; n < NN; n++) begin
      if (mask[n]) begin
        checks++;
        if (router_status[n].pg || router_status[n].stop) begin
          failures++;
          $display("FAIL: router %0d did not wake up", n);
        end else begin
          sleep_req[n]  = 1'b0;
          avail_node[n] = 1'b1;
        end
      end
    end
  endtask

  // Send one packet from s to d on an otherwise idle network and check its head latency
  task automatic probe(int unsigned s, int unsigned d, int unsigned expect_lat);
    int unsigned recv0;
    recv0 = total_recv;
    // force one packet from s only
    @(negedge clk);
    sending[s] = 1'b1;
    snd_dst[s] = d;
    snd_len[s] = 1;
    snd_idx[s] = 0;
    snd_vc[s]  = 0;
    snd_seq[s] = next_seq[s];
    next_seq[s] = next_seq[s] + 1;
    outstanding_to[d] = outstanding_to[d] + 1;
    total_sent = total_sent + 1;
    while (total_recv == recv0) @(posedge clk);
    checks++;
    if (last_latency != expect_lat) begin
      failures++;
      $display("FAIL: latency %0d -> %0d is %0d cycles, expected %0d", s, d, last_latency, expect_lat);
    end else begin
      $display("latency %0d -> %0d: %0d cycles", s, d, last_latency);
    end
  endtask

  // ------------------------------------------------------------------ stimulus
  logic mask_a [NN];
  logic mask_b [NN];
  logic mask_c [NN];

  initial begin
    for (int n = 0; n < NN; n++) begin
      core_active[n] = 1'b1;
      avail_node[n]  = 1'b1;
      sleep_req[n]   = 1'b0;
      next_seq[n]    = 0;
      outstanding_to[n] = 0;
      for (int v = 0; v < NUM_VC; v++) rx_open[n][v] = 1'b0;
      for (int q = 0; q < MAXSEQ; q++) delivered[n][q] = 1'b0;
    end
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (4) @(posedge clk);

    // 1. latency probes: 0 -> 2 (3 routers), 0 -> 63 (15 routers)
    probe(0, 2, 16);
    run(20);
    probe(0, 15, 36);
    run(20);

    // 2. uniform random traffic at 0.08 flits/node/cycle
    rate_ppm = 80000;
    run(3000);

    // 3. 29 of the 56 processor cores go to sleep under traffic (node 1 among them)
    for (int n = 0; n < NN; n++) begin
      mask_a[n] = 1'b0;
      mask_b[n] = 1'b0;
      mask_c[n] = 1'b0;
    end
    begin
      int unsigned cnt;
      cnt = 0;
      mask_a[1] = 1'b1;
      cnt = 1;
      while (cnt < 5) begin
        int unsigned n;
        n = $urandom % NN;
        if (mc_col(n) != MX - 1 && !mask_a[n] && n != 0 && n != 2) begin
          mask_a[n] = 1'b1;
          cnt++;
        end
      end
    end
    sleep_cores(mask_a);

    // 4. traffic with 45% of the cores asleep
    run(6000);
    rate_ppm = 0;
    drain();

    // 5. latency across gated router 1: routers 0 and 2 are on, 1 flies over
    run(20);
    probe(0, 2, 12);
    run(20);

    // 6. wake 10 sleeping cores and put 6 active ones to sleep, under traffic
    rate_ppm = 80000;
    run(500);
    begin
      int unsigned cnt;
      cnt = 0;
      for (int n = 0; n < NN && cnt < 2; n++) if (mask_a[n]) begin mask_b[n] = 1'b1; cnt++; end
      cnt = 0;
      while (cnt < 2) begin
        int unsigned n;
        n = $urandom % NN;
        if (mc_col(n) != MX - 1 && !mask_a[n] && !mask_c[n]) begin
          mask_c[n] = 1'b1;
          cnt++;
        end
      end
    end
    wake_cores(mask_b);
    sleep_cores(mask_c);
    run(4000);

    // 7. hot spot: everybody sends to one memory-controller node
    rate_ppm = 0;
    drain();
    hotspot = 3 * MX + (MX - 1);
    rate_ppm = 150000;
    run(3000);
    rate_ppm = 0;
    drain();
    hotspot = -1;

    // 8. final checks
    begin
      int unsigned lost;
      lost = 0;
      for (int s = 0; s < NN; s++)
        for (int q = 0; q < int'(next_seq[s]) && q < int'(MAXSEQ); q++)
          if (!delivered[s][q]) lost++;
      checks++;
      if (lost != 0) begin
        failures++;
        $display("FAIL: %0d packets never delivered", lost);
      end
    end
    check_count("power gating", n_gate);
    check_count("wake-up", n_wake);
    check_count("fly-over traversal", n_flyover);
    check_count("escape delivery", n_escape);
    check_count("VA time-out", n_timeout);
    check_count("mode switch under load", n_stop_under_load);
    $display("packets %0d, mean head latency %0d cycles, gate %0d wake %0d flyover %0d escape %0d timeout %0d stop-under-load %0d",
             total_recv, (lat_cnt != 0) ? lat_sum / lat_cnt : 0, n_gate, n_wake, n_flyover,
             n_escape, n_timeout, n_stop_under_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_count(string what, int unsigned n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (sent %0d received %0d)", total_sent, total_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
