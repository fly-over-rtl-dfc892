// flov_flit_buffer: the single-flit buffer of one fly-over link.
//
// A FLOV router has four of these, one per straight-through direction (W->E, E->W,
// N->S, S->N). They work only while the router is power-gated (active = 1): a flit
// arriving from upstream is stored without any routing or arbitration and in the next
// cycle is sent on, in the same direction, into the escape VC of the downstream router
// (or of the next fly-over buffer, if that router is gated too).
//
// Flow control is credit based on both sides. Upstream sees this buffer as an escape
// VC of depth 1: the buffer returns one credit (escape VC) each time its flit leaves.
// Downstream, the buffer keeps its own credit counter for the next router's escape VC,
// loaded with that VC's depth (DEPTH if the next router is on, 1 if it is gated) while
// the buffer is inactive and whenever the next router changes mode; the power-gating
// handshake guarantees that no credit is in flight at those moments. A head flit is held
// while the next router shows `stop` (it is switching mode); flits of a packet already
// under way keep moving.
//
// While inactive the buffer is empty and drives nothing. `idle` is high when it holds
// no flit, no packet is half-way through it and all downstream credits are home.
module flov_flit_buffer
  import flov_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH   // depth of a router's escape VC
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        active,      // router is power-gated: fly-over link in use
  input  flit_t       in_flit,     // from upstream
  output credit_t     up_credit,   // to upstream
  output flit_t       out_flit,    // to downstream
  input  credit_t     dn_credit,   // from downstream
  input  pg_status_t  dn_status,   // downstream router's power status
  output logic        idle
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t         buf_q;
  logic          full;
  logic [CW-1:0] cnt;
  logic          open_pkt;
  logic          dn_pg_prev;
  logic          send;
  logic [CW-1:0] cap;

  assign cap  = dn_status.pg ? CW'(1) : CW'(DEPTH);
  assign send = active && full && (cnt != '0) && !(buf_q.head && dn_status.stop);

  always_comb begin
    out_flit       = '0;
    if (send) begin
      out_flit     = buf_q;
      out_flit.vc  = VC_W'(ESC_VC);
    end
    up_credit.valid = send;
    up_credit.vc    = VC_W'(ESC_VC);
  end

  always_ff @(posedge clk) begin
    if (rst || !active) begin
      buf_q      <= '0;
      full       <= 1'b0;
      open_pkt   <= 1'b0;
      cnt        <= cap;
      dn_pg_prev <= dn_status.pg;
    end else begin
      dn_pg_prev <= dn_status.pg;
      if (in_flit.valid) begin
        buf_q <= in_flit;
        full  <= 1'b1;
        if (in_flit.tail)      open_pkt <= 1'b0;
        else if (in_flit.head) open_pkt <= 1'b1;
      end else if (send) begin
        full  <= 1'b0;
      end
      if (dn_status.pg != dn_pg_prev) begin
        cnt <= cap - CW'(send);              // all credits are home at a mode change
      end else begin
        cnt <= cnt + CW'(dn_credit.valid) - CW'(send);
      end
    end
  end

  assign idle = !full && !open_pkt && (cnt == cap) && !in_flit.valid;

  // Upstream holds one credit for this buffer, so it never overwrites a waiting flit
  always_ff @(posedge clk) begin
    if (!rst && active) begin
      assert (!(in_flit.valid && full && !send)) else $error("fly-over buffer overrun");
      assert (!dn_credit.valid || dn_credit.vc == VC_W'(ESC_VC)) else $error("fly-over credit on a regular VC");
      assert (dn_status.pg != dn_pg_prev || cnt <= cap) else $error("fly-over buffer credit overflow");
    end
  end
endmodule
