// flov_pkg: types and constants shared by the Fly-Over (FLOV) network.
//
// The network is a 2D mesh of wormhole routers with credit-based flow control. Each
// input port has NUM_VC virtual channels: the lower ones are regular VCs and the highest
// one is the escape VC. Packets that have travelled over a power-gated router (a
// fly-over link) stay in escape VCs until they are delivered.
//
// Coordinates: x grows towards East, y grows towards South; router id = y*MESH_X + x, so
// router 0 is the north-west corner and the last column (x = MESH_X-1) holds the
// memory-controller routers, which are never power-gated.
//
// Port numbering, VC count (3 regular + 1 escape), buffer depth (6 flits) and the 8x8
// mesh follow the evaluated configuration. Flit layout, payload width and the
// time-out threshold are this design's own choices.
package flov_pkg;

  // Mesh size and router resources (evaluated configuration: 8x8, 3+1 VCs, 6-flit buffers)
  localparam int unsigned MESH_X    = 8;
  localparam int unsigned MESH_Y    = 8;
  localparam int unsigned NUM_VC    = 4;                 // 3 regular + 1 escape
  localparam int unsigned ESC_VC    = NUM_VC - 1;        // escape VC index
  localparam int unsigned BUF_DEPTH = 6;                 // flits per VC
  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned PAYLOAD_W = 32;                // flit payload bits (own choice)
  localparam int unsigned COORD_W   = 3;                 // bits of one coordinate
  localparam int unsigned VC_W      = $clog2(NUM_VC);
  localparam int unsigned CNT_W     = $clog2(BUF_DEPTH + 1);

  // Port indices. The four mesh directions come first so that a direction can index
  // the neighbour-status vectors directly.
  typedef enum logic [2:0] {
    P_N = 3'd0,
    P_E = 3'd1,
    P_S = 3'd2,
    P_W = 3'd3,
    P_L = 3'd4
  } port_e;

  // Partition sections of the destination relative to the current router:
  //   2 1 0
  //   3 * 7
  //   4 5 6
  typedef enum logic [3:0] {
    SEC_NE   = 4'd0,
    SEC_N    = 4'd1,
    SEC_NW   = 4'd2,
    SEC_W    = 4'd3,
    SEC_SW   = 4'd4,
    SEC_S    = 4'd5,
    SEC_SE   = 4'd6,
    SEC_E    = 4'd7,
    SEC_HERE = 4'd8
  } section_e;

  // One flit as it travels on a link. dst_x/dst_y are meaningful in head flits; body
  // and tail flits carry them too so that every flit is self-describing.
  typedef struct packed {
    logic                 valid;
    logic                 head;
    logic                 tail;
    logic [VC_W-1:0]      vc;
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // Credit returned upstream when a flit leaves an input buffer.
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  // Power status a router shows its four neighbours.
  //   pg   : the router is power-gated, its fly-over links are active
  //   stop : the router is switching mode; neighbours must not start new packets to it
  typedef struct packed {
    logic pg;
    logic stop;
  } pg_status_t;

  // Opposite direction of a mesh port (N<->S, E<->W)
  function automatic port_e opposite(port_e p);
    case (p)
      P_N:     return P_S;
      P_S:     return P_N;
      P_E:     return P_W;
      P_W:     return P_E;
      default: return P_L;
    endcase
  endfunction

endpackage
