// flov_pg_controller: the distributed power-gating handshake of one FLOV router.
//
// Each router decides alone, from its own core's state, when to gate itself:
//   ON    baseline router working, muxes/demuxes at 0.
//   DRAIN the core went to sleep: show `stop` so that neighbours start no new packets
//         here; packets already under way finish; wait until the baseline router holds
//         no flit, has no half-received packet and has all its credits back.
//   OFF   baseline router power-gated (held in reset), muxes/demuxes at 1, the four
//         fly-over buffers carry traffic straight through; `pg` shown to neighbours.
//   WAKE  the core woke up: show `stop` again, let packets already on the fly-over
//         links finish, wait until the fly-over buffers are empty and their credits are
//         home, then switch the muxes back to 0 and resume as ON.
// If the core wakes again during DRAIN nothing has changed yet and the router returns
// to ON.
//
// The status bits (pg, stop) go to the four neighbours; pg is the 1-bit-per-neighbour
// state every router tracks, stop is the "do not start new packets" signal.
//
// This design's own choice: two neighbouring routers never switch mode at the same
// time. A router starts a switch only when no neighbour shows `stop` and only on its
// own phase of a local toggle flop reset to (X+Y) mod 2; neighbours have opposite
// phases, so they cannot start in the same cycle and each sees the other's `stop`
// before its own next chance to start. This keeps two draining neighbours from
// waiting on each other.
module flov_pg_controller
  import flov_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [COORD_W-1:0] my_x,     // router coordinates (strapped)
  input  logic [COORD_W-1:0] my_y,
  input  logic        core_active,     // the attached core is powered on
  input  pg_status_t  nbr_status [4],  // neighbours N, E, S, W
  input  logic        router_quiet,    // baseline router empty, credits home
  input  logic        flov_idle,       // all fly-over buffers empty, credits home
  output pg_status_t  status,          // shown to the neighbours
  output logic        sel,             // mux/demux select: 1 = fly-over links
  output logic        router_off,      // power-gate (and reset) the baseline router
  output logic        gate_event,      // pulses when the router power-gates
  output logic        wake_event       // pulses when the router is back on
);
  typedef enum logic [1:0] {S_ON, S_DRAIN, S_OFF, S_WAKE} pg_state_e;

  pg_state_e state;
  logic      phase;
  logic      may_start;

  always_comb begin
    may_start = !phase;
    for (int d = 0; d < 4; d++) begin
      if (nbr_status[d].stop) may_start = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_ON;
      phase <= my_x[0] ^ my_y[0];   // (x + y) mod 2
    end else begin
      phase <= ~phase;
      unique case (state)
        S_ON:    if (!core_active && may_start) state <= S_DRAIN;
        S_DRAIN: if (core_active)               state <= S_ON;
                 else if (router_quiet)         state <= S_OFF;
        S_OFF:   if (core_active && may_start)  state <= S_WAKE;
        S_WAKE:  if (flov_idle)                 state <= S_ON;
        default:                                state <= S_ON;
      endcase
    end
  end

  assign status.pg   = (state == S_OFF) || (state == S_WAKE);
  assign status.stop = (state == S_DRAIN) || (state == S_WAKE);
  assign sel         = status.pg;
  assign router_off  = status.pg;
  assign gate_event  = !rst && (state == S_DRAIN) && !core_active && router_quiet;
  assign wake_event  = !rst && (state == S_WAKE) && flov_idle;
endmodule
