// tb_switch_allocator: random VC requests on a 5-port, 4-VC router. Checks that every
// grant matches a request, that each input sends at most one flit and each output takes
// at most one, that out_sel names the granted input, and that some flit is granted
// whenever any VC requests.
`timescale 1ns/1ps
module tb_switch_allocator;
  import flov_pkg::*;
  localparam int unsigned P = NUM_PORTS, V = NUM_VC, PW = $clog2(P);

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic [V-1:0]  req [P];
  logic [PW-1:0] req_port [P][V];
  logic [V-1:0]  gnt [P];
  logic [P-1:0]  out_busy;
  logic [PW-1:0] out_sel [P];
  int unsigned checks = 0, failures = 0, grants = 0;

  switch_allocator #(.P(P), .V(V)) dut (.*);

  initial begin
    foreach (req[p]) begin req[p] = '0; foreach (req_port[p][v]) req_port[p][v] = '0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 5000; c++) begin
      int out_cnt [P];
      bit any_req;
      @(negedge clk);
      any_req = 0;
      for (int p = 0; p < P; p++)
        for (int v = 0; v < V; v++) begin
          req[p][v] = ($urandom % 4) == 0;
          req_port[p][v] = PW'($urandom % P);
          any_req |= req[p][v];
        end
      #0.5;
      foreach (out_cnt[o]) out_cnt[o] = 0;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (!$onehot0(gnt[p]) || (gnt[p] & ~req[p]) != '0) begin failures++; $display("FAIL: input %0d bad grant", p); end
        for (int v = 0; v < V; v++) if (gnt[p][v]) begin
          int o;
          o = req_port[p][v];
          out_cnt[o]++;
          grants++;
          checks++;
          if (!out_busy[o] || out_sel[o] != PW'(p)) begin failures++; $display("FAIL: output %0d select", o); end
        end
      end
      for (int o = 0; o < P; o++) begin
        checks++;
        if (out_cnt[o] != (out_busy[o] ? 1 : 0)) begin failures++; $display("FAIL: output %0d count %0d", o, out_cnt[o]); end
      end
      checks++;
      if (any_req && out_busy == '0) begin failures++; $display("FAIL: requests but no grant"); end
    end
    $display("grants: %0d", grants);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
