// tb_flov_route_compute: exhaustive check of the FLOV routing function on an 8x8 mesh,
// for every router, destination, 4-bit neighbour power status and packet class,
// against a reference written from the routing rules, plus the four worked examples
// of the routing algorithm on a 4x4 mesh (routers 3, 7, 11, 15 never gated).
`timescale 1ns/1ps
module tb_flov_route_compute;
  import flov_pkg::*;

  int unsigned checks = 0, failures = 0;

  logic [COORD_W-1:0] cx, cy, dx, dy, cx4, cy4, dx4, dy4;
  logic in_esc, in_esc4;
  logic [3:0] pg, pg4;
  port_e out_port, out_port4;
  logic  out_esc, out_esc4;
  section_e sec, sec4;

  flov_route_compute #(.MX(8)) dut (
    .cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .in_escape(in_esc), .nbr_pg(pg),
    .out_port(out_port), .out_escape(out_esc), .section(sec));
  flov_route_compute #(.MX(4)) dut4 (
    .cur_x(cx4), .cur_y(cy4), .dst_x(dx4), .dst_y(dy4), .in_escape(in_esc4), .nbr_pg(pg4),
    .out_port(out_port4), .out_escape(out_esc4), .section(sec4));

  // Reference model. Directions: 0 N, 1 E, 2 S, 3 W, 4 local.
  task automatic ref_route(int x, int y, int tx, int ty, bit esc, bit [3:0] g, int mx,
                           output int port, output bit oesc);
    int ddx, ddy, ydir, xdir;
    ddx = tx - x;
    ddy = ty - y;
    if (ddx == 0 && ddy == 0) begin port = 4; oesc = esc; return; end
    if (ddx == 0 || ddy == 0) begin
      port = (ddx == 0) ? ((ddy < 0) ? 0 : 2) : ((ddx > 0) ? 1 : 3);
      oesc = esc || g[port];
      return;
    end
    ydir = (ddy < 0) ? 0 : 2;
    xdir = (ddx > 0) ? 1 : 3;
    if (esc || (g[ydir] && g[xdir])) begin
      oesc = 1;
      port = (x == mx - 1) ? ydir : 1;
    end else if (!g[ydir]) begin
      oesc = 0; port = ydir;
    end else begin
      oesc = 0; port = xdir;
    end
  endtask

  // One routing step on the 4x4 mesh of the examples; gated: set of gated routers
  task automatic step4(int node, int dst, bit esc, bit gated [16], output int port, output bit oesc);
    int x, y;
    bit [3:0] g;
    x = node % 4; y = node / 4;
    g[0] = (y > 0) ? gated[node - 4] : 0;
    g[1] = (x < 3) ? gated[node + 1] : 0;
    g[2] = (y < 3) ? gated[node + 4] : 0;
    g[3] = (x > 0) ? gated[node - 1] : 0;
    cx4 = COORD_W'(x); cy4 = COORD_W'(y);
    dx4 = COORD_W'(dst % 4); dy4 = COORD_W'(dst / 4);
    in_esc4 = esc; pg4 = g;
    #1;
    port = int'(out_port4);
    oesc = out_esc4;
  endtask

  // Follow a packet through the 4x4 mesh, flying over gated routers, and compare the
  // sequence of powered-on routers it visits with the expected one
  task automatic walk(string name, int src, int dst, int gl[], int expect_path[], int expect_esc_from);
    bit gated [16];
    int node, port, hops, idx, esc_at;
    bit esc, oesc;
    int path[$];
    foreach (gated[i]) gated[i] = 0;
    foreach (gl[i]) gated[gl[i]] = 1;
    node = src; esc = 0; hops = 0; esc_at = -1;
    path.push_back(node);
    while (node != dst && hops < 20) begin
      step4(node, dst, esc, gated, port, oesc);
      if (oesc && !esc) esc_at = node;
      esc = oesc;
      // move, flying over gated routers
      do begin
        case (port)
          0: node -= 4;
          1: node += 1;
          2: node += 4;
          default: node -= 1;
        endcase
        hops++;
      end while (gated[node] && node != dst && hops < 20);
      path.push_back(node);
    end
    checks++;
    if (path.size() != expect_path.size()) begin
      failures++;
      $display("FAIL: %s path length %0d expected %0d", name, path.size(), expect_path.size());
    end else begin
      foreach (expect_path[i]) if (path[i] != expect_path[i]) begin
        failures++;
        $display("FAIL: %s hop %0d at router %0d expected %0d", name, i, path[i], expect_path[i]);
        break;
      end
    end
    checks++;
    if (esc_at != expect_esc_from) begin
      failures++;
      $display("FAIL: %s enters escape at %0d expected %0d", name, esc_at, expect_esc_from);
    end
  endtask

  initial begin
    // exhaustive 8x8
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++)
        for (int tx = 0; tx < 8; tx++)
          for (int ty = 0; ty < 8; ty++)
            for (int e = 0; e < 2; e++)
              for (int gi = 0; gi < 16; gi++) begin
                int rp;
                bit re;
                bit [3:0] g;
                g = 4'(gi);
                if (x == 7) g[1] = 0;         // no East neighbour
                if (y > 0 && x == 7) g[0] = 0; // last column is never gated
                if (x == 7) g[2] = 0;
                cx = COORD_W'(x); cy = COORD_W'(y); dx = COORD_W'(tx); dy = COORD_W'(ty);
                in_esc = e[0]; pg = g;
                #1;
                ref_route(x, y, tx, ty, e[0], g, 8, rp, re);
                checks++;
                if (int'(out_port) != rp || out_esc != re) begin
                  failures++;
                  if (failures < 10)
                    $display("FAIL: (%0d,%0d)->(%0d,%0d) esc=%0d pg=%b: port %0d/%0d esc %0d/%0d",
                             x, y, tx, ty, e, g, out_port, rp, out_esc, re);
                end
              end
    // sections as drawn: 2 1 0 / 3 * 7 / 4 5 6
    cx = 3; cy = 3;
    dx = 5; dy = 1; #1; checks++; if (sec != SEC_NE) failures++;
    dx = 3; dy = 0; #1; checks++; if (sec != SEC_N)  failures++;
    dx = 0; dy = 0; #1; checks++; if (sec != SEC_NW) failures++;
    dx = 1; dy = 3; #1; checks++; if (sec != SEC_W)  failures++;
    dx = 1; dy = 6; #1; checks++; if (sec != SEC_SW) failures++;
    dx = 3; dy = 7; #1; checks++; if (sec != SEC_S)  failures++;
    dx = 6; dy = 6; #1; checks++; if (sec != SEC_SE) failures++;
    dx = 7; dy = 3; #1; checks++; if (sec != SEC_E)  failures++;

    // worked examples: (a) 5 -> 7 over gated 6; (b) 5 -> 10, 9 gated;
    // (c) 9 -> 2, 1 and 6 gated; (d) 8 -> 2, 9 and 4 gated, packet starts in escape
    walk("example a", 5, 7, '{6}, '{5, 7}, 5);
    walk("example b", 5, 10, '{9}, '{5, 6, 10}, -1);
    walk("example c", 9, 2, '{1, 6}, '{9, 5, 7, 3, 2}, 5);
    walk("example d", 8, 2, '{4, 9}, '{8, 10, 6, 2}, 8);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
