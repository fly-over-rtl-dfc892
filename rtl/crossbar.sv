// crossbar: the router's P x P crossbar switch (ST stage).
//
// Output o carries the flit of input out_sel[o] when out_en[o] is high and an empty
// (all-zero, invalid) flit otherwise. The switch allocator guarantees that each output
// takes at most one input and each input feeds at most one output. Purely
// combinational; the router registers the outputs.
module crossbar
  import flov_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS
) (
  input  flit_t                in_flit [P],
  input  logic [P-1:0]         out_en,
  input  logic [$clog2(P)-1:0] out_sel [P],
  output flit_t                out_flit [P]
);
  always_comb begin
    for (int unsigned o = 0; o < P; o++) begin
      out_flit[o] = out_en[o] ? in_flit[out_sel[o]] : '0;
    end
  end
endmodule
