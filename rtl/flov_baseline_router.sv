// flov_baseline_router: the 4-stage wormhole virtual-channel router inside each FLOV
// router, running the FLOV dynamic routing algorithm.
//
// Five input and five output ports (N, E, S, W, local); NUM_VC virtual channels per
// input port, each a DEPTH-flit FIFO; the highest VC is the escape VC. Credit-based
// flow control. A head flit goes through four stages, one cycle each:
//   RC  route computation (flov_route_compute) from the destination and the 4-bit
//       power status of the neighbours,
//   VA  allocation of a downstream VC of the class RC asked for (vc_allocator),
//   SA  switch allocation (switch_allocator), which also takes one downstream credit,
//   ST  buffer read and crossbar traversal into the output register,
// and the flit then spends one cycle on the link (LT) before the next router writes
// it into its buffer. Body and tail flits skip RC and VA and use the VC the head got.
//
// Escape sub-network: a packet that arrives in the escape VC of a mesh port stays in
// escape VCs. A regular packet is moved to an escape VC when routing asks for it (a
// fly-over over a gated neighbour, or both turn candidates gated), or when it has
// waited TIMEOUT cycles in VA (deadlock recovery, the escape network being deadlock
// free by its turn model).
//
// Towards a power-gated neighbour only its single fly-over flit buffer can be used, so
// that output has one escape credit and no regular credits. The credit counters of an
// output are reloaded when the neighbour's gated flag changes; the power-gating
// handshake guarantees that all credits are home at that moment. A neighbour that
// shows `stop` (mode switch in progress) gets no new packets: VA to it is held, and a
// head that won VA just before the neighbour began to switch waits in SA. If the
// neighbour's mode has changed by then, the head gives its output VC back and is
// routed again, so no head is ever sent on a route computed for the old mode.
//
// This design's own choices: output VCs are allocated atomically (only when the
// downstream VC is empty and free), local-port injections count as regular packets,
// packets leave on the ejection port in a VC of their class (escape or regular), a
// head whose neighbour status changes while it waits in VA goes back to RC, and the
// time-out threshold is a parameter. The router's coordinates are input pins tied to
// constants by the mesh, so every router is the same module. `quiet` tells the
// power-gating controller that the router holds no flit, has no open packet on any
// input and all credits are home.
module flov_baseline_router
  import flov_pkg::*;
#(
  parameter int unsigned MX      = MESH_X,     // mesh columns
  parameter int unsigned DEPTH   = BUF_DEPTH,  // flits per VC
  parameter int unsigned TIMEOUT = 64          // VA wait before escape (own choice)
) (
  input  logic        clk,
  input  logic        rst,                     // reset, also held while power-gated
  input  logic [COORD_W-1:0] my_x,             // this router's column (strapped)
  input  logic [COORD_W-1:0] my_y,             // this router's row (strapped)
  input  flit_t       in_flit    [NUM_PORTS],
  output credit_t     out_credit [NUM_PORTS],  // to the upstream of each input
  output flit_t       out_flit   [NUM_PORTS],
  input  credit_t     in_credit  [NUM_PORTS],  // from the downstream of each output
  input  pg_status_t  nbr_status [4],          // neighbours N, E, S, W
  output logic        quiet,
  output logic        timeout_event            // a packet was moved to escape by time-out
);
  localparam int unsigned P   = NUM_PORTS;
  localparam int unsigned V   = NUM_VC;
  localparam int unsigned NI  = P * V;
  localparam int unsigned PW  = $clog2(P);
  localparam int unsigned OW  = $clog2(NI);
  localparam int unsigned CW  = $clog2(DEPTH + 1);
  localparam int unsigned TW  = $clog2(TIMEOUT + 1);

  // Input VC states. The RC stage is the first cycle a head spends at the front of an
  // idle VC; VC_RC repeats it when a waiting head must be routed again.
  typedef enum logic [1:0] {VC_IDLE, VC_RC, VC_VA, VC_ACTIVE} vc_state_e;

  // ---------------------------------------------------------------- neighbour status
  logic [3:0] nbr_pg, nbr_stop;
  always_comb begin
    for (int d = 0; d < 4; d++) begin
      nbr_pg[d]   = nbr_status[d].pg;
      nbr_stop[d] = nbr_status[d].stop;
    end
  end

  // Credits an output VC holds when everything downstream is empty
  function automatic logic [CW-1:0] capacity(int unsigned o, int unsigned v, logic [3:0] pg);
    if (o == int'(P_L)) return CW'(DEPTH);
    if (pg[o])          return (v == ESC_VC) ? CW'(1) : CW'(0);
    return CW'(DEPTH);
  endfunction

  // ---------------------------------------------------------------- input buffers
  flit_t          fifo_head [P][V];
  flit_t          fifo_next [P][V];
  logic [CW-1:0]  fifo_cnt  [P][V];
  logic           fifo_wr   [P][V];
  logic           fifo_rd   [P][V];

  for (genvar p = 0; p < P; p++) begin : g_port
    for (genvar v = 0; v < V; v++) begin : g_vc
      assign fifo_wr[p][v] = in_flit[p].valid && (in_flit[p].vc == VC_W'(v));
      flit_fifo #(.DEPTH(DEPTH)) u_fifo (
        .clk(clk), .rst(rst),
        .wr_en(fifo_wr[p][v]), .wr_flit(in_flit[p]),
        .rd_en(fifo_rd[p][v]), .rd_flit(fifo_head[p][v]), .rd_flit_next(fifo_next[p][v]),
        .count(fifo_cnt[p][v]), .empty()
      );
    end
  end

  // ---------------------------------------------------------------- per input VC state
  vc_state_e      st_q      [P][V];
  port_e          rt_port   [P][V];   // RC result
  logic           rt_esc    [P][V];
  logic [3:0]     rt_snap   [P][V];   // neighbour status the route was computed with
  logic [VC_W-1:0] ovc_q    [P][V];   // downstream VC granted in VA
  logic           forced_esc[P][V];   // moved to escape by the time-out
  logic [TW-1:0]  wait_cnt  [P][V];
  logic           open_pkt  [P][V];   // head written, tail not yet written

  // ST stage registers (one per input port)
  logic           st_valid [P];
  logic [VC_W-1:0] st_vc   [P];
  port_e          st_out   [P];
  logic [VC_W-1:0] st_ovc  [P];

  // Output side
  logic [CW-1:0]  credits  [P][V];
  logic           alloc    [P][V];
  logic [3:0]     pg_prev;
  // Per output VC: allocated in VA this cycle, credit used by SA, released by a tail
  logic           out_set  [P][V];
  logic           out_dec  [P][V];
  logic           out_clr  [P][V];

  // Flits of an input VC not yet scheduled for reading
  function automatic logic [CW-1:0] avail(int unsigned p, int unsigned v);
    logic pend;
    pend = st_valid[p] && (st_vc[p] == VC_W'(v));
    return fifo_cnt[p][v] - (pend ? CW'(1) : CW'(0));
  endfunction

  // ---------------------------------------------------------------- RC
  port_e    rc_port [P][V];
  logic     rc_esc  [P][V];
  section_e rc_sec  [P][V];
  logic     in_escape [P][V];

  for (genvar p = 0; p < P; p++) begin : g_rc_p
    for (genvar v = 0; v < V; v++) begin : g_rc_v
      assign in_escape[p][v] = ((p != int'(P_L)) && (v == int'(ESC_VC))) || forced_esc[p][v];
      flov_route_compute #(.MX(MX)) u_rc (
        .cur_x(my_x), .cur_y(my_y),
        .dst_x(fifo_head[p][v].dst_x), .dst_y(fifo_head[p][v].dst_y),
        .in_escape(in_escape[p][v]), .nbr_pg(nbr_pg),
        .out_port(rc_port[p][v]), .out_escape(rc_esc[p][v]), .section(rc_sec[p][v])
      );
    end
  end

  // ---------------------------------------------------------------- VA
  logic [NI-1:0]  va_req;
  logic [OW-1:0]  va_ovc [NI];
  logic [NI-1:0]  va_gnt;

  always_comb begin
    for (int unsigned p = 0; p < P; p++) begin
      for (int unsigned v = 0; v < V; v++) begin
        int unsigned i, o;
        logic        found;
        logic [VC_W-1:0] pick;
        i     = p * V + v;
        o     = int'(rt_port[p][v]);
        found = 1'b0;
        pick  = '0;
        if (rt_esc[p][v]) begin
          if (!alloc[o][ESC_VC] && credits[o][ESC_VC] == capacity(o, ESC_VC, nbr_pg)
              && capacity(o, ESC_VC, nbr_pg) != 0) begin
            found = 1'b1;
            pick  = VC_W'(ESC_VC);
          end
        end else begin
          for (int unsigned w = 0; w < ESC_VC; w++) begin
            if (!found && !alloc[o][w] && capacity(o, w, nbr_pg) != 0
                && credits[o][w] == capacity(o, w, nbr_pg)) begin
              found = 1'b1;
              pick  = VC_W'(w);
            end
          end
        end
        va_req[i] = (st_q[p][v] == VC_VA) && found && (rt_snap[p][v] == nbr_pg)
                    && !((o != int'(P_L)) && nbr_stop[o]);
        va_ovc[i] = OW'(o * V) + OW'(pick);
      end
    end
  end

  vc_allocator #(.NIN(NI), .NOUT(NI)) u_va (
    .clk(clk), .rst(rst), .req(va_req), .req_ovc(va_ovc), .gnt(va_gnt)
  );

  // ---------------------------------------------------------------- SA
  logic [V-1:0]  sa_req  [P];
  logic [PW-1:0] sa_port [P][V];
  logic [V-1:0]  sa_gnt  [P];
  logic [P-1:0]  sa_out_busy;
  logic [PW-1:0] sa_out_sel [P];
  flit_t         sa_flit [P][V];   // flit SA would send for each VC
  logic          head_hold [P][V]; // head not sent yet and its neighbour is switching
  logic          head_redo [P][V]; // head not sent yet and its route is out of date

  always_comb begin
    for (int unsigned p = 0; p < P; p++) begin
      for (int unsigned v = 0; v < V; v++) begin
        logic pend;
        pend = st_valid[p] && (st_vc[p] == VC_W'(v));
        sa_flit[p][v] = pend ? fifo_next[p][v] : fifo_head[p][v];
        sa_port[p][v] = PW'(rt_port[p][v]);
        // A head that won VA just before its neighbour began to switch mode waits; if
        // the neighbour's mode has changed since RC, the head is routed again.
        head_hold[p][v] = (st_q[p][v] == VC_ACTIVE) && (avail(p, v) != '0) && sa_flit[p][v].head
                          && (rt_port[p][v] != P_L)
                          && (nbr_stop[rt_port[p][v][1:0]] || rt_snap[p][v] != nbr_pg);
        head_redo[p][v] = head_hold[p][v] && (rt_snap[p][v] != nbr_pg);
        sa_req[p][v]  = (st_q[p][v] == VC_ACTIVE) && (avail(p, v) != '0) && !head_hold[p][v]
                        && (credits[rt_port[p][v]][ovc_q[p][v]] != '0);
      end
    end
  end

  switch_allocator #(.P(P), .V(V)) u_sa (
    .clk(clk), .rst(rst), .req(sa_req), .req_port(sa_port),
    .gnt(sa_gnt), .out_busy(sa_out_busy), .out_sel(sa_out_sel)
  );

  // ---------------------------------------------------------------- ST
  flit_t xb_in  [P];
  flit_t xb_out [P];
  logic [P-1:0]  st_en;
  logic [PW-1:0] st_sel [P];

  always_comb begin
    for (int unsigned p = 0; p < P; p++) begin
      xb_in[p]    = fifo_head[p][st_vc[p]];
      xb_in[p].vc = st_ovc[p];
      for (int unsigned v = 0; v < V; v++) begin
        fifo_rd[p][v] = st_valid[p] && (st_vc[p] == VC_W'(v));
      end
      out_credit[p].valid = st_valid[p];
      out_credit[p].vc    = st_vc[p];
    end
    for (int unsigned o = 0; o < P; o++) begin
      st_en[o]  = 1'b0;
      st_sel[o] = '0;
      for (int unsigned p = 0; p < P; p++) begin
        if (st_valid[p] && st_out[p] == port_e'(o)) begin
          st_en[o]  = 1'b1;
          st_sel[o] = PW'(p);
        end
      end
    end
  end

  crossbar #(.P(P)) u_xbar (.in_flit(xb_in), .out_en(st_en), .out_sel(st_sel), .out_flit(xb_out));

  always_ff @(posedge clk) begin
    for (int unsigned o = 0; o < P; o++) begin
      if (rst) out_flit[o] <= '0;
      else     out_flit[o] <= xb_out[o];
    end
  end

  // ---------------------------------------------------------------- sequential state
  logic [P*V-1:0] to_events;

  always_ff @(posedge clk) begin
    if (rst) begin
      pg_prev <= nbr_pg;
      for (int unsigned p = 0; p < P; p++) begin
        st_valid[p] <= 1'b0;
        st_vc[p]    <= '0;
        st_out[p]   <= P_L;
        st_ovc[p]   <= '0;
        for (int unsigned v = 0; v < V; v++) begin
          st_q[p][v]       <= VC_IDLE;
          rt_port[p][v]    <= P_L;
          rt_esc[p][v]     <= 1'b0;
          rt_snap[p][v]    <= '0;
          ovc_q[p][v]      <= '0;
          forced_esc[p][v] <= 1'b0;
          wait_cnt[p][v]   <= '0;
          open_pkt[p][v]   <= 1'b0;
          credits[p][v]    <= capacity(p, v, nbr_pg);
          alloc[p][v]      <= 1'b0;
        end
      end
    end else begin
      pg_prev <= nbr_pg;
      // ST stage: capture the SA winners
      for (int unsigned p = 0; p < P; p++) begin
        st_valid[p] <= 1'b0;
        for (int unsigned v = 0; v < V; v++) begin
          if (sa_gnt[p][v]) begin
            st_valid[p] <= 1'b1;
            st_vc[p]    <= VC_W'(v);
            st_out[p]   <= rt_port[p][v];
            st_ovc[p]   <= ovc_q[p][v];
          end
        end
      end

      for (int unsigned p = 0; p < P; p++) begin
        for (int unsigned v = 0; v < V; v++) begin
          // open packet bookkeeping on the write side
          if (fifo_wr[p][v]) begin
            if (in_flit[p].tail)      open_pkt[p][v] <= 1'b0;
            else if (in_flit[p].head) open_pkt[p][v] <= 1'b1;
          end

          unique case (st_q[p][v])
            VC_IDLE: begin
              // RC: the head is at the front of the buffer (not behind a tail
              // that is being read this cycle)
              forced_esc[p][v] <= 1'b0;
              if (fifo_cnt[p][v] != '0 && !(st_valid[p] && st_vc[p] == VC_W'(v))) begin
                rt_port[p][v]  <= rc_port[p][v];
                rt_esc[p][v]   <= rc_esc[p][v];
                rt_snap[p][v]  <= nbr_pg;
                wait_cnt[p][v] <= '0;
                st_q[p][v]     <= VC_VA;
              end
            end
            VC_RC: begin
              // route again (time-out or neighbour status change while in VA)
              rt_port[p][v]  <= rc_port[p][v];
              rt_esc[p][v]   <= rc_esc[p][v];
              rt_snap[p][v]  <= nbr_pg;
              wait_cnt[p][v] <= '0;
              st_q[p][v]     <= VC_VA;
            end
            VC_VA: begin
              if (va_gnt[p * V + v]) begin
                ovc_q[p][v] <= va_ovc[p * V + v][VC_W-1:0];
                st_q[p][v]  <= VC_ACTIVE;
              end else if (rt_snap[p][v] != nbr_pg) begin
                st_q[p][v] <= VC_RC;            // neighbourhood changed: route again
              end else if (!in_escape[p][v] && wait_cnt[p][v] >= TW'(TIMEOUT)) begin
                forced_esc[p][v] <= 1'b1;       // time-out: fall back to escape routing
                st_q[p][v]       <= VC_RC;
              end else begin
                wait_cnt[p][v] <= wait_cnt[p][v] + 1'b1;
              end
            end
            VC_ACTIVE: begin
              if (head_redo[p][v]) st_q[p][v] <= VC_RC;
              if (sa_gnt[p][v] && sa_flit[p][v].tail) st_q[p][v] <= VC_IDLE;
            end
            default: st_q[p][v] <= VC_IDLE;
          endcase
        end
      end

      // Output VC allocation flags and credit counters
      for (int unsigned o = 0; o < P; o++) begin
        for (int unsigned w = 0; w < V; w++) begin
          logic inc;
          inc = in_credit[o].valid && (in_credit[o].vc == VC_W'(w));
          if (o != int'(P_L) && nbr_pg[o] != pg_prev[o]) begin
            credits[o][w] <= capacity(o, w, nbr_pg);   // neighbour changed mode
          end else begin
            credits[o][w] <= credits[o][w] + CW'(inc) - CW'(out_dec[o][w]);
          end
          if (out_set[o][w])      alloc[o][w] <= 1'b1;
          else if (out_clr[o][w]) alloc[o][w] <= 1'b0;
        end
      end
    end
  end


  always_comb begin
    for (int unsigned o = 0; o < P; o++) begin
      for (int unsigned w = 0; w < V; w++) begin
        out_set[o][w] = 1'b0;
        out_dec[o][w] = 1'b0;
        out_clr[o][w] = 1'b0;
      end
    end
    for (int unsigned i = 0; i < NI; i++) begin
      if (va_gnt[i]) out_set[va_ovc[i] / V][va_ovc[i] % V] = 1'b1;
      if (head_redo[i / V][i % V]) out_clr[rt_port[i / V][i % V]][ovc_q[i / V][i % V]] = 1'b1;
    end
    for (int unsigned o = 0; o < P; o++) begin
      if (sa_out_busy[o]) begin
        for (int unsigned v = 0; v < V; v++) begin
          if (sa_gnt[sa_out_sel[o]][v]) begin
            out_dec[o][ovc_q[sa_out_sel[o]][v]] = 1'b1;
            out_clr[o][ovc_q[sa_out_sel[o]][v]] = sa_flit[sa_out_sel[o]][v].tail;
          end
        end
      end
    end
  end

  // Time-out events, for statistics
  always_comb begin
    for (int unsigned p = 0; p < P; p++) begin
      for (int unsigned v = 0; v < V; v++) begin
        to_events[p * V + v] = (st_q[p][v] == VC_VA) && !va_gnt[p * V + v]
                               && (rt_snap[p][v] == nbr_pg)
                               && !in_escape[p][v] && wait_cnt[p][v] >= TW'(TIMEOUT);
      end
    end
  end
  assign timeout_event = |to_events;

  // ---------------------------------------------------------------- quiet detection
  always_comb begin
    quiet = 1'b1;
    for (int unsigned p = 0; p < P; p++) begin
      if (st_valid[p] || out_flit[p].valid || in_flit[p].valid) quiet = 1'b0;
      for (int unsigned v = 0; v < V; v++) begin
        if (fifo_cnt[p][v] != '0 || open_pkt[p][v] || alloc[p][v]) quiet = 1'b0;
        if (p != int'(P_L) && credits[p][v] != capacity(p, v, nbr_pg)) quiet = 1'b0;
      end
    end
  end

  // A flit arriving in an idle VC must be a head flit
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int unsigned p = 0; p < P; p++) begin
        for (int unsigned v = 0; v < V; v++) begin
          if ((st_q[p][v] == VC_RC) || (st_q[p][v] == VC_IDLE && fifo_cnt[p][v] != '0
              && !(st_valid[p] && st_vc[p] == VC_W'(v))))
            assert (fifo_head[p][v].head)
              else $error("router (%0d,%0d): non-head flit at the front of idle VC", my_x, my_y);
        end
      end
    end
  end
endmodule
