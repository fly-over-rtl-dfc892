// flov_router: a FLOV router, the baseline router plus fly-over links.
//
// Around the baseline router sit, on every one of the four mesh sides, a mux on the
// incoming link and a demux on the outgoing link, and four single-flit fly-over buffers
// (flov_flit_buffer), one per straight-through direction. With select 0 the links
// (flits and credits) connect to the baseline router and the buffers are idle; with
// select 1 the baseline router is power-gated and each incoming link feeds the buffer
// that leads to the opposite side, so a flit entering from the West leaves to the
// East, and so on. The local (core) port always connects to the baseline router; the
// core sends and receives nothing while its router is gated.
//
// The select, the baseline router's power-gating (modelled as holding it in reset, so
// it loses its state) and the status shown to the neighbours come from
// flov_pg_controller, driven by core_active. Timing: the baseline router takes 4 cycles
// per hop plus one on the link; a gated router adds one cycle (buffer) plus the link.
module flov_router
  import flov_pkg::*;
#(
  parameter int unsigned MX      = MESH_X,
  parameter int unsigned DEPTH   = BUF_DEPTH,
  parameter int unsigned TIMEOUT = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [COORD_W-1:0] my_x,   // router coordinates (strapped)
  input  logic [COORD_W-1:0] my_y,
  input  logic        core_active,
  input  flit_t       in_flit    [NUM_PORTS],
  output credit_t     out_credit [NUM_PORTS],
  output flit_t       out_flit   [NUM_PORTS],
  input  credit_t     in_credit  [NUM_PORTS],
  input  pg_status_t  nbr_status [4],
  output pg_status_t  status,
  output logic        gate_event,
  output logic        wake_event,
  output logic        timeout_event,
  output logic        flyover_event     // a flit left a fly-over buffer this cycle
);
  logic sel, router_off, router_quiet, flov_idle;

  flit_t   br_in_flit    [NUM_PORTS];
  credit_t br_out_credit [NUM_PORTS];
  flit_t   br_out_flit   [NUM_PORTS];
  credit_t br_in_credit  [NUM_PORTS];

  flit_t   fb_in   [4];   // indexed by the side the buffer sends to
  credit_t fb_upc  [4];
  flit_t   fb_out  [4];
  credit_t fb_dnc  [4];
  logic [3:0] fb_idle;

  // Muxes on incoming links, demuxes on outgoing links
  always_comb begin
    for (int unsigned d = 0; d < 4; d++) begin
      port_e od;
      od = opposite(port_e'(d));
      br_in_flit[d]   = sel ? flit_t'('0) : in_flit[d];
      fb_in[od[1:0]]  = sel ? in_flit[d] : flit_t'('0);
      out_flit[d]     = sel ? fb_out[d] : br_out_flit[d];
      out_credit[d]   = sel ? fb_upc[od[1:0]] : br_out_credit[d];
      br_in_credit[d] = sel ? credit_t'('0) : in_credit[d];
      fb_dnc[d]       = sel ? in_credit[d] : credit_t'('0);
    end
    br_in_flit[P_L]   = in_flit[P_L];
    out_flit[P_L]     = br_out_flit[P_L];
    out_credit[P_L]   = br_out_credit[P_L];
    br_in_credit[P_L] = in_credit[P_L];
  end

  flov_baseline_router #(.MX(MX), .DEPTH(DEPTH), .TIMEOUT(TIMEOUT)) u_base (
    .clk(clk), .rst(rst || router_off), .my_x(my_x), .my_y(my_y),
    .in_flit(br_in_flit), .out_credit(br_out_credit),
    .out_flit(br_out_flit), .in_credit(br_in_credit),
    .nbr_status(nbr_status), .quiet(router_quiet), .timeout_event(timeout_event)
  );

  for (genvar d = 0; d < 4; d++) begin : g_fb
    flov_flit_buffer #(.DEPTH(DEPTH)) u_fb (
      .clk(clk), .rst(rst), .active(sel),
      .in_flit(fb_in[d]), .up_credit(fb_upc[d]),
      .out_flit(fb_out[d]), .dn_credit(fb_dnc[d]),
      .dn_status(nbr_status[d]), .idle(fb_idle[d])
    );
  end

  assign flov_idle = &fb_idle;

  always_comb begin
    flyover_event = 1'b0;
    for (int d = 0; d < 4; d++) if (fb_out[d].valid) flyover_event = 1'b1;
  end

  flov_pg_controller u_pg (
    .clk(clk), .rst(rst), .my_x(my_x), .my_y(my_y), .core_active(core_active), .nbr_status(nbr_status),
    .router_quiet(router_quiet), .flov_idle(flov_idle),
    .status(status), .sel(sel), .router_off(router_off),
    .gate_event(gate_event), .wake_event(wake_event)
  );
endmodule
