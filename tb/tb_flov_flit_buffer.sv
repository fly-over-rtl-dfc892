// tb_flov_flit_buffer: the single-flit fly-over buffer.
// Acts as the upstream router (one credit for the buffer) and the downstream router
// (escape VC of depth 6, credits returned under test control) and checks:
//   * a stored flit leaves in the next cycle, in the escape VC, unchanged otherwise,
//   * one upstream credit comes back per flit that leaves,
//   * the buffer stops when the downstream escape VC has no credit and resumes when
//     a credit returns,
//   * a head flit is held while downstream shows `stop`, a body flit is not,
//   * after downstream power-gates, only one flit is sent per returned credit,
//   * `idle` and the inactive state (no output while the router is on).
`timescale 1ns/1ps
module tb_flov_flit_buffer;
  import flov_pkg::*;

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  logic active;
  flit_t in_flit, out_flit;
  credit_t up_credit, dn_credit;
  pg_status_t dn_status;
  logic idle;
  int unsigned checks = 0, failures = 0;
  int up_cred;          // upstream's credit for the buffer
  int dn_used;          // flits sent downstream and not yet credited

  flov_flit_buffer #(.DEPTH(BUF_DEPTH)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  function automatic flit_t mk(bit head, bit tail, int unsigned data);
    flit_t f;
    f = '0;
    f.valid = 1; f.head = head; f.tail = tail; f.vc = 0;
    f.dst_x = 3; f.dst_y = 5; f.payload = data;
    return f;
  endfunction

  // Send one flit and check that it leaves one cycle later (if it can)
  task automatic send_expect(flit_t f, int delay);
    @(negedge clk);
    check(up_cred == 1, "upstream has its credit");
    in_flit = f;
    up_cred--;
    @(negedge clk);
    in_flit = '0;
    repeat (delay) begin
      check(!out_flit.valid, "flit held");
      @(negedge clk);
    end
    check(out_flit.valid && out_flit.payload == f.payload && out_flit.head == f.head
          && out_flit.tail == f.tail && out_flit.dst_x == f.dst_x, "flit forwarded next cycle");
    check(out_flit.vc == VC_W'(ESC_VC), "forwarded in escape VC");
    check(up_credit.valid && up_credit.vc == VC_W'(ESC_VC), "credit returned upstream");
  endtask

  always @(posedge clk) begin
    if (up_credit.valid) up_cred <= up_cred + 1;
    if (out_flit.valid) dn_used <= dn_used + 1;
  end

  initial begin
    active = 0; in_flit = '0; dn_credit = '0; dn_status = '0; up_cred = 1; dn_used = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    check(!out_flit.valid && !up_credit.valid && idle, "inactive buffer is silent");
    active = 1;
    @(negedge clk);
    // six flits go, the seventh waits for a downstream credit
    for (int i = 0; i < 6; i++) send_expect(mk(i == 0, 0, 100 + i), 0);
    @(negedge clk);
    in_flit = mk(0, 0, 200); up_cred--;
    @(negedge clk);
    in_flit = '0;
    repeat (5) begin check(!out_flit.valid, "no downstream credit: hold"); @(negedge clk); end
    check(!idle, "buffer not idle while holding");
    dn_credit = '{valid: 1, vc: VC_W'(ESC_VC)};
    @(negedge clk);
    dn_credit = '0;
    check(out_flit.valid && out_flit.payload == 200, "released by the returned credit");
    // return the remaining credits
    repeat (6) begin dn_credit = '{valid: 1, vc: VC_W'(ESC_VC)}; @(negedge clk); end
    dn_credit = '0;
    @(negedge clk);
    // stop: body passes, head is held
    dn_status.stop = 1;
    send_expect(mk(0, 1, 300), 0);
    dn_credit = '{valid: 1, vc: VC_W'(ESC_VC)};
    @(negedge clk);
    dn_credit = '0;
    in_flit = mk(1, 1, 400); up_cred--;
    @(negedge clk);
    in_flit = '0;
    repeat (4) begin check(!out_flit.valid, "head held while downstream switches"); @(negedge clk); end
    dn_status.stop = 0;
    #0.5;
    check(out_flit.valid && out_flit.payload == 400, "head released after stop");
    @(negedge clk);
    dn_credit = '{valid: 1, vc: VC_W'(ESC_VC)};
    @(negedge clk);
    dn_credit = '0;
    repeat (2) @(negedge clk);
    check(idle, "idle when empty with all credits home");
    // downstream power-gates: only one credit downstream
    dn_status.pg = 1;
    repeat (2) @(negedge clk);
    send_expect(mk(1, 0, 500), 0);
    @(negedge clk);
    in_flit = mk(0, 1, 501); up_cred--;
    @(negedge clk);
    in_flit = '0;
    repeat (3) begin check(!out_flit.valid, "gated downstream: one flit per credit"); @(negedge clk); end
    dn_credit = '{valid: 1, vc: VC_W'(ESC_VC)};
    @(negedge clk);
    dn_credit = '0;
    check(out_flit.valid && out_flit.payload == 501, "second flit after credit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
