// rr_arbiter: round-robin arbiter used by the VC and switch allocators.
//
// Grants at most one of N requests per cycle. The search starts just after the last
// granted requester, so every requester that keeps asking is served within N grants.
// The pointer moves only when `advance` is high (the grant was actually used), which
// lets a two-stage allocator keep a first-stage choice that lost in the second stage.
// Combinational request-to-grant; the pointer is updated on the clock edge.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic         any_gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;   // index with the highest priority this cycle
  logic [IW-1:0] winner;

  always_comb begin
    gnt     = '0;
    any_gnt = 1'b0;
    winner  = ptr;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!any_gnt && req[idx]) begin
        any_gnt  = 1'b1;
        gnt[idx] = 1'b1;
        winner   = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
    end else if (advance && any_gnt) begin
      ptr <= (winner == IW'(N - 1)) ? '0 : winner + 1'b1;
    end
  end

  // A grant is one-hot and only given to a requester
  always_ff @(posedge clk) begin
    if (!rst) assert ($onehot0(gnt) && ((gnt & ~req) == '0)) else $error("arbiter grant error");
  end
endmodule
