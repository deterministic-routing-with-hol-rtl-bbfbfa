// tb_iodet_route -- exhaustive check of the IODET routing function.
//
// Three instances: an 8 x 8 mesh and an 8 x 8 torus with 2 VCs (the
// evaluated networks), and a 5 x 5 x 5 torus with 3 VCs (a radix that is
// not a power of two and a VC count that is not either). For every
// current/destination pair the output port and VC are compared with a
// reference written here: the lowest differing dimension, its direction
// (mesh: toward the destination; torus: the shorter way, + on a tie) and
// VC = destination coordinate mod V.
module tb_iodet_route;
  import iodet_pkg::*;

  int checks = 0, failures = 0;

  // reference: returns {port, vc}
  function automatic void ref_route(input int k, input int n, input int v,
                                    input bit torus, input int c[3], input int d[3],
                                    output int port, output int vc);
    port = 0;
    vc   = 0;
    for (int i = 0; i < n; i++) begin
      if (c[i] != d[i]) begin
        int up, down;
        up   = (d[i] - c[i] + k) % k;    // hops going +
        down = (c[i] - d[i] + k) % k;    // hops going -
        if (torus) port = (up <= down) ? 1 + 2 * i : 2 + 2 * i;
        else       port = (d[i] > c[i]) ? 1 + 2 * i : 2 + 2 * i;
        vc = d[i] % v;
        return;
      end
    end
  endfunction

  logic [5:0] cur2, dst2;
  logic [2:0] pm, pt;
  logic [VC_W-1:0] vm, vt;
  iodet_route #(.K(8), .N(2), .V(2), .TORUS(1'b0)) u_mesh  (.cur(cur2), .dst(dst2), .port(pm), .vc(vm));
  iodet_route #(.K(8), .N(2), .V(2), .TORUS(1'b1)) u_torus (.cur(cur2), .dst(dst2), .port(pt), .vc(vt));

  logic [8:0] cur3, dst3;
  logic [2:0] p3;
  logic [VC_W-1:0] v3;
  iodet_route #(.K(5), .N(3), .V(3), .TORUS(1'b1)) u_t3 (.cur(cur3), .dst(dst3), .port(p3), .vc(v3));

  task automatic check(input string what, input int got_p, input int got_v,
                       input int exp_p, input int exp_v);
    checks++;
    if (got_p != exp_p || got_v != exp_v) begin
      failures++;
      if (failures < 10)
        $display("%s: got port %0d vc %0d, expected port %0d vc %0d",
                 what, got_p, got_v, exp_p, exp_v);
    end
  endtask

  initial begin
    int c[3], d[3], ep, ev;
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        c = '{a % 8, a / 8, 0};
        d = '{b % 8, b / 8, 0};
        cur2 = 6'(a);
        dst2 = 6'(b);
        #1;
        ref_route(8, 2, 2, 1'b0, c, d, ep, ev);
        check($sformatf("mesh %0d->%0d", a, b), int'(pm), int'(vm), ep, ev);
        ref_route(8, 2, 2, 1'b1, c, d, ep, ev);
        check($sformatf("torus %0d->%0d", a, b), int'(pt), int'(vt), ep, ev);
      end
    for (int a = 0; a < 125; a++)
      for (int b = 0; b < 125; b++) begin
        c = '{a % 5, (a / 5) % 5, a / 25};
        d = '{b % 5, (b / 5) % 5, b / 25};
        cur3 = {3'(c[2]), 3'(c[1]), 3'(c[0])};
        dst3 = {3'(d[2]), 3'(d[1]), 3'(d[0])};
        #1;
        ref_route(5, 3, 3, 1'b1, c, d, ep, ev);
        check($sformatf("5-ary 3-cube %0d->%0d", a, b), int'(p3), int'(v3), ep, ev);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
