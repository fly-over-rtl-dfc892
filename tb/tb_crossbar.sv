// tb_crossbar: random permutations and partial connections through the 5x5 crossbar;
// each enabled output must carry its selected input, every other output must be idle.
`timescale 1ns/1ps
module tb_crossbar;
  import flov_pkg::*;
  localparam int unsigned P = NUM_PORTS, PW = $clog2(P);
  flit_t in_flit [P], out_flit [P];
  logic [P-1:0] out_en;
  logic [PW-1:0] out_sel [P];
  int unsigned checks = 0, failures = 0;

  crossbar #(.P(P)) dut (.*);

  initial begin
    for (int c = 0; c < 2000; c++) begin
      for (int p = 0; p < P; p++) begin
        in_flit[p] = '0;
        in_flit[p].valid = 1;
        in_flit[p].payload = $urandom;
        in_flit[p].dst_x = $urandom;
        out_en[p] = $urandom;
        out_sel[p] = PW'($urandom % P);
      end
      #1;
      for (int o = 0; o < P; o++) begin
        checks++;
        if (out_en[o] ? (out_flit[o] != in_flit[out_sel[o]]) : (out_flit[o] != '0)) begin
          failures++;
          $display("FAIL: output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
