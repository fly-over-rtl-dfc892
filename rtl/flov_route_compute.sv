// flov_route_compute: FLOV partition-based dynamic routing (the RC stage logic).
//
// The router at (cur_x, cur_y) divides the mesh into eight sections around itself:
//
//     2 1 0
//     3 * 7        (north is up, east is right)
//     4 5 6
//
// Regular-VC packets:
//   * sections 1/3/5/7 (same row or column): go straight N/W/S/E. If that neighbour is
//     power-gated the packet crosses it on the fly-over link, so it must take the
//     escape VC (out_escape = 1).
//   * sections 0/2/4/6 (a turn is needed): go in Y first if the Y neighbour towards the
//     destination is powered on, else in X if that X neighbour is powered on, else go
//     East in the escape VC, towards the always-on last column.
// Escape-VC packets (already in the escape sub-network):
//   * sections 1/3/5/7: go straight N/W/S/E.
//   * sections 0/2/4/6: go East; in the last column, where there is no East, turn
//     North or South towards the destination row.
// The escape rules only use the turns E->N, E->S, N->W and S->W, which is deadlock free.
// Routing is purely combinational: a function of the destination, the current position,
// the packet's class and the 4-bit power status of the neighbours. A destination equal to
// the current router selects the local (ejection) port.
module flov_route_compute
  import flov_pkg::*;
#(
  parameter int unsigned MX = MESH_X   // mesh columns; column MX-1 is never gated
) (
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  logic               in_escape,   // packet already travels in the escape sub-network
  input  logic [3:0]         nbr_pg,      // power-gated flag of neighbour N, E, S, W
  output port_e              out_port,
  output logic               out_escape,  // the packet must use the downstream escape VC
  output section_e           section
);
  logic last_col;
  assign last_col = (cur_x == COORD_W'(MX - 1));

  always_comb begin
    if (dst_x == cur_x) begin
      if (dst_y == cur_y)     section = SEC_HERE;
      else if (dst_y < cur_y) section = SEC_N;
      else                    section = SEC_S;
    end else if (dst_x > cur_x) begin
      if (dst_y == cur_y)     section = SEC_E;
      else if (dst_y < cur_y) section = SEC_NE;
      else                    section = SEC_SE;
    end else begin
      if (dst_y == cur_y)     section = SEC_W;
      else if (dst_y < cur_y) section = SEC_NW;
      else                    section = SEC_SW;
    end
  end

  // gated flag of the neighbour in direction d (d is one of N, E, S, W)
  function automatic logic gated(logic [3:0] pg, port_e d);
    return pg[d[1:0]];
  endfunction

  port_e ydir, xdir;   // turn candidates for sections 0/2/4/6

  always_comb begin
    ydir = (section == SEC_NE || section == SEC_NW) ? P_N : P_S;
    xdir = (section == SEC_NE || section == SEC_SE) ? P_E : P_W;
  end

  always_comb begin
    out_port   = P_L;
    out_escape = in_escape;
    unique case (section)
      SEC_HERE: begin out_port = P_L; out_escape = in_escape; end
      SEC_N:    begin out_port = P_N; out_escape = in_escape | gated(nbr_pg, P_N); end
      SEC_E:    begin out_port = P_E; out_escape = in_escape | gated(nbr_pg, P_E); end
      SEC_S:    begin out_port = P_S; out_escape = in_escape | gated(nbr_pg, P_S); end
      SEC_W:    begin out_port = P_W; out_escape = in_escape | gated(nbr_pg, P_W); end
      SEC_NE, SEC_NW, SEC_SW, SEC_SE: begin
        if (in_escape) begin
          out_escape = 1'b1;
          out_port   = last_col ? ydir : P_E;
        end else if (!gated(nbr_pg, ydir)) begin
          out_port   = ydir;
          out_escape = 1'b0;
        end else if (!gated(nbr_pg, xdir)) begin
          out_port   = xdir;
          out_escape = 1'b0;
        end else begin
          out_port   = last_col ? ydir : P_E;
          out_escape = 1'b1;
        end
      end
      default: begin out_port = P_L; out_escape = in_escape; end
    endcase
  end
endmodule
