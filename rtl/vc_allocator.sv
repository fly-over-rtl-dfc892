// vc_allocator: virtual-channel allocation (VA stage).
//
// Each of the NIN input VCs that holds a routed head flit asks for one specific output
// VC (output port * NUM_VC + VC index); the router has already picked a free output VC
// of the right class (regular or escape) for it. One round-robin arbiter per output VC
// then grants it to one of the input VCs asking for it. Requests and grants are
// combinational within the cycle; arbiter priorities move only when a grant is given.
// The separable request/grant split is this design's choice: the router's VA stage is
// described only by what it does.
module vc_allocator
  import flov_pkg::*;
#(
  parameter int unsigned NIN  = NUM_PORTS * NUM_VC,
  parameter int unsigned NOUT = NUM_PORTS * NUM_VC
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [NIN-1:0]           req,
  input  logic [$clog2(NOUT)-1:0]  req_ovc [NIN],
  output logic [NIN-1:0]           gnt
);
  logic [NIN-1:0] ovc_req [NOUT];
  logic [NIN-1:0] ovc_gnt [NOUT];
  logic [NOUT-1:0] ovc_any;

  always_comb begin
    for (int unsigned o = 0; o < NOUT; o++) begin
      for (int unsigned i = 0; i < NIN; i++) begin
        ovc_req[o][i] = req[i] && (req_ovc[i] == ($clog2(NOUT))'(o));
      end
    end
  end

  for (genvar o = 0; o < NOUT; o++) begin : g_arb
    rr_arbiter #(.N(NIN)) u_arb (
      .clk(clk), .rst(rst), .req(ovc_req[o]), .advance(1'b1),
      .gnt(ovc_gnt[o]), .any_gnt(ovc_any[o])
    );
  end

  always_comb begin
    gnt = '0;
    for (int unsigned o = 0; o < NOUT; o++) gnt |= ovc_gnt[o];
  end
endmodule
