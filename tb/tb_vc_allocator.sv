// tb_vc_allocator: random request patterns (each input VC asks for one output VC).
// Checks every cycle that grants go only to requesters, that each output VC is granted
// to at most one input VC, that every requested output VC is granted to someone, and
// that the round-robin order serves a persistent requester within NIN cycles.
`timescale 1ns/1ps
module tb_vc_allocator;
  import flov_pkg::*;
  localparam int unsigned NI = NUM_PORTS * NUM_VC;
  localparam int unsigned OW = $clog2(NI);

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic [NI-1:0] req, gnt;
  logic [OW-1:0] req_ovc [NI];
  int unsigned checks = 0, failures = 0;

  vc_allocator #(.NIN(NI), .NOUT(NI)) dut (.*);

  task automatic check_cycle();
    int owner [NI];
    bit asked [NI];
    foreach (owner[o]) begin owner[o] = -1; asked[o] = 0; end
    for (int i = 0; i < NI; i++) begin
      if (req[i]) asked[req_ovc[i]] = 1;
      if (gnt[i]) begin
        checks++;
        if (!req[i]) begin failures++; $display("FAIL: grant without request %0d", i); end
        if (owner[req_ovc[i]] != -1) begin failures++; $display("FAIL: output VC %0d granted twice", req_ovc[i]); end
        owner[req_ovc[i]] = i;
      end
    end
    for (int o = 0; o < NI; o++) begin
      checks++;
      if (asked[o] && owner[o] == -1) begin failures++; $display("FAIL: output VC %0d requested, not granted", o); end
    end
  endtask

  initial begin
    req = '0;
    foreach (req_ovc[i]) req_ovc[i] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        req[i] = ($urandom % 3) == 0;
        req_ovc[i] = OW'($urandom % 4);   // crowd four output VCs
      end
      #0.5 check_cycle();
    end
    // fairness: all inputs ask for output VC 5 permanently; each must win within NI cycles
    begin
      int last_win [NI];
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin req[i] = 1; req_ovc[i] = 5; last_win[i] = 0; end
      for (int c = 1; c <= 4 * NI; c++) begin
        #0.5;
        for (int i = 0; i < NI; i++) if (gnt[i]) last_win[i] = c;
        @(negedge clk);
      end
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (last_win[i] <= 3 * NI) begin failures++; $display("FAIL: input %0d starved", i); end
      end
    end
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
