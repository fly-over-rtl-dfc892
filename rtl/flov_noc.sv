// flov_noc: the FLOV network-on-chip, a MESH_X x MESH_Y mesh (8x8 by default).
//
// Routers are numbered row by row from the north-west corner (id = y*MESH_X + x). The
// last column (x = MESH_X-1) is attached to the memory controllers and is never
// power-gated, so it uses plain baseline routers. Every other node has a FLOV router
// that power-gates itself when its core goes to sleep (core_active low) and then lets
// traffic fly over it. The power status (gated, switching) of every router is wired to
// its four neighbours; no signal spans more than one hop.
//
// Each node's local port is brought out as a network-interface link: injected flits
// with the credits the router returns for them, and ejected flits with the credits the
// network interface returns. The NI side holds a DEPTH-flit buffer per VC for ejection
// and must inject only into VCs it holds credits for (DEPTH per VC after reset). A core
// that is asleep must neither send nor be sent packets. All links are one flit wide and
// take one cycle.
module flov_noc
  import flov_pkg::*;
#(
  parameter int unsigned MX      = MESH_X,     // columns
  parameter int unsigned MY      = MESH_Y,     // rows
  parameter int unsigned DEPTH   = BUF_DEPTH,  // flits per VC
  parameter int unsigned TIMEOUT = 64,         // regular-VC wait before escape
  localparam int unsigned NN     = MX * MY
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        core_active   [NN],  // ignored in the last column
  input  flit_t       inj_flit      [NN],
  output credit_t     inj_credit    [NN],
  output flit_t       ej_flit       [NN],
  input  credit_t     ej_credit     [NN],
  output pg_status_t  router_status [NN],
  output logic        gate_event    [NN],
  output logic        wake_event    [NN],
  output logic        timeout_event [NN],
  output logic        flyover_event [NN]
);
  flit_t      r_in_flit    [NN][NUM_PORTS];
  credit_t    r_out_credit [NN][NUM_PORTS];
  flit_t      r_out_flit   [NN][NUM_PORTS];
  credit_t    r_in_credit  [NN][NUM_PORTS];
  pg_status_t r_nbr        [NN][4];
  pg_status_t r_status     [NN];

  // Mesh wiring: what a router receives on side d is what its neighbour on side d
  // sends on the opposite side.
  always_comb begin
    for (int unsigned y = 0; y < MY; y++) begin
      for (int unsigned x = 0; x < MX; x++) begin
        int unsigned n;
        n = y * MX + x;
        for (int unsigned d = 0; d < 4; d++) begin
          int  nx, ny;
          int unsigned m, od;
          nx = int'(x) + ((d == int'(P_E)) ? 1 : (d == int'(P_W)) ? -1 : 0);
          ny = int'(y) + ((d == int'(P_S)) ? 1 : (d == int'(P_N)) ? -1 : 0);
          od = (d + 2) % 4;
          if (nx >= 0 && nx < int'(MX) && ny >= 0 && ny < int'(MY)) begin
            m = unsigned'(ny) * MX + unsigned'(nx);
            r_in_flit[n][d]   = r_out_flit[m][od];
            r_in_credit[n][d] = r_out_credit[m][od];
            r_nbr[n][d]       = r_status[m];
          end else begin
            r_in_flit[n][d]   = '0;
            r_in_credit[n][d] = '0;
            r_nbr[n][d]       = '0;
          end
        end
        r_in_flit[n][P_L]   = inj_flit[n];
        r_in_credit[n][P_L] = ej_credit[n];
        inj_credit[n]       = r_out_credit[n][P_L];
        ej_flit[n]          = r_out_flit[n][P_L];
        router_status[n]    = r_status[n];
      end
    end
  end

  for (genvar y = 0; y < MY; y++) begin : g_row
    for (genvar x = 0; x < MX; x++) begin : g_col
      localparam int unsigned N = y * MX + x;
      if (x == MX - 1) begin : g_mc
        // Memory-controller column: always-on baseline router
        flov_baseline_router #(.MX(MX), .DEPTH(DEPTH), .TIMEOUT(TIMEOUT)) u_rtr (
          .clk(clk), .rst(rst), .my_x(COORD_W'(x)), .my_y(COORD_W'(y)),
          .in_flit(r_in_flit[N]), .out_credit(r_out_credit[N]),
          .out_flit(r_out_flit[N]), .in_credit(r_in_credit[N]),
          .nbr_status(r_nbr[N]), .quiet(), .timeout_event(timeout_event[N])
        );
        assign r_status[N]      = '0;
        assign gate_event[N]    = 1'b0;
        assign wake_event[N]    = 1'b0;
        assign flyover_event[N] = 1'b0;
      end else begin : g_flov
        flov_router #(.MX(MX), .DEPTH(DEPTH), .TIMEOUT(TIMEOUT)) u_rtr (
          .clk(clk), .rst(rst), .my_x(COORD_W'(x)), .my_y(COORD_W'(y)),
          .core_active(core_active[N]),
          .in_flit(r_in_flit[N]), .out_credit(r_out_credit[N]),
          .out_flit(r_out_flit[N]), .in_credit(r_in_credit[N]),
          .nbr_status(r_nbr[N]), .status(r_status[N]),
          .gate_event(gate_event[N]), .wake_event(wake_event[N]),
          .timeout_event(timeout_event[N]), .flyover_event(flyover_event[N])
        );
      end
    end
  end
endmodule
