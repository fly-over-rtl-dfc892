// switch_allocator: separable input-first switch allocation (SA stage).
//
// Stage 1: at every input port a round-robin arbiter picks one of its VCs that has a
// flit ready and a downstream credit. Stage 2: at every output port a round-robin
// arbiter picks one of the input ports whose stage-1 winner wants that output. An input
// VC is granted when it wins both stages; at most one flit leaves each input port and
// enters each output port per cycle. Arbiter priorities advance only for final grants.
// Combinational, with arbiter state updated on the clock edge.
module switch_allocator
  import flov_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS,
  parameter int unsigned V = NUM_VC
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [V-1:0]         req      [P],   // VC v of input p has a flit ready
  input  logic [$clog2(P)-1:0] req_port [P][V],// output port that VC wants
  output logic [V-1:0]         gnt      [P],   // one-hot VC granted at input p (or 0)
  output logic [P-1:0]         out_busy,       // output o receives a flit
  output logic [$clog2(P)-1:0] out_sel  [P]    // input port that output o takes
);
  localparam int unsigned PW = $clog2(P);

  logic [V-1:0]  s1_gnt [P];
  logic [P-1:0]  s1_any;
  logic [PW-1:0] s1_port [P];
  logic [P-1:0]  s2_req [P];
  logic [P-1:0]  s2_gnt [P];
  logic [P-1:0]  s2_any;
  logic [P-1:0]  in_won;

  for (genvar p = 0; p < P; p++) begin : g_in
    rr_arbiter #(.N(V)) u_in (
      .clk(clk), .rst(rst), .req(req[p]), .advance(in_won[p]),
      .gnt(s1_gnt[p]), .any_gnt(s1_any[p])
    );
  end

  always_comb begin
    for (int unsigned p = 0; p < P; p++) begin
      s1_port[p] = '0;
      for (int unsigned v = 0; v < V; v++) begin
        if (s1_gnt[p][v]) s1_port[p] = req_port[p][v];
      end
    end
    for (int unsigned o = 0; o < P; o++) begin
      for (int unsigned p = 0; p < P; p++) begin
        s2_req[o][p] = s1_any[p] && (s1_port[p] == PW'(o));
      end
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_out
    rr_arbiter #(.N(P)) u_out (
      .clk(clk), .rst(rst), .req(s2_req[o]), .advance(1'b1),
      .gnt(s2_gnt[o]), .any_gnt(s2_any[o])
    );
  end

  always_comb begin
    in_won = '0;
    for (int unsigned o = 0; o < P; o++) begin
      out_busy[o] = s2_any[o];
      out_sel[o]  = '0;
      for (int unsigned p = 0; p < P; p++) begin
        if (s2_gnt[o][p]) begin
          out_sel[o] = PW'(p);
          in_won[p]  = 1'b1;
        end
      end
    end
    for (int unsigned p = 0; p < P; p++) begin
      gnt[p] = in_won[p] ? s1_gnt[p] : '0;
    end
  end
endmodule
