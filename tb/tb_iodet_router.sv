// tb_iodet_router -- one switch with modelled neighbours.
//
// Switch at node (1,1) of a 4 x 4 mesh, 2 VCs, 4-flit packets, routing time
// R = 3. The bench plays the four neighbours and the node: it sends packets
// into every input port (only destinations that dimension-order routing
// could bring to that port, on the VC IODET would have chosen upstream),
// honours the switch's credits, drains the switch's outputs at random and
// returns credits a cycle later. Checked: a first packet on an idle switch
// leaves R + 2 cycles after it arrived (head on in_link to head on
// out_link); every packet leaves on the port and VC that dimension-order
// routing and IODET give (reference computed here), complete, its flits in
// order and not mixed with another packet on the same VC; no link sends a
// head without room downstream; every packet sent is delivered.
module tb_iodet_router;
  import iodet_pkg::*;

  localparam int K = 4, N = 2, V = 2, PKT = 4, R = 3, NP = 5, DEPTH = 2 * PKT;
  localparam int MX = 1, MY = 1;
  localparam int NPK = 40;          // packets per input VC

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t   [NP-1:0] in_link, out_link;
  credit_t [NP-1:0] credit_out, in_credit;
  logic inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t inj_flit, ej_flit;

  iodet_router #(.K(K), .N(N), .V(V), .TORUS(1'b0), .PKT(PKT), .ROUTE_CYCLES(R)) dut (
    .clk, .rst_n, .my_id(4'({2'(MY), 2'(MX)})), .in_link, .credit_out, .out_link, .in_credit,
    .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .ej_ready);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%0t: %s", $time, msg);
    end
  endtask

  // reference route from (MX,MY)
  function automatic void ref_route(input int dx, input int dy, output int op, output int ov);
    if (dx != MX)      begin op = (dx > MX) ? 1 : 2; ov = dx % V; end
    else if (dy != MY) begin op = (dy > MY) ? 3 : 4; ov = dy % V; end
    else               begin op = 0; ov = 0; end
  endfunction

  // a destination dimension-order routing can bring in on port ip
  task automatic pick_dst(input int ip, output int dx, output int dy, output int vc);
    do begin
      dx = $urandom_range(K - 1);
      dy = $urandom_range(K - 1);
    end while ((ip == 0 && dx == MX && dy == MY) ||
               (ip == 1 && dx < MX) || (ip == 2 && dx > MX) ||
               (ip == 3 && (dx != MX || dy < MY)) || (ip == 4 && (dx != MX || dy > MY)) ||
               ((ip == 3 || ip == 4) && dy == MY && $urandom_range(1) == 0));
    vc = (ip == 1 || ip == 2) ? dx % V : (ip == 0 ? 0 : dy % V);
  endtask

  // sources, one per input VC
  int s_left [NP][V], s_flit [NP][V], s_dx [NP][V], s_dy [NP][V], s_id [NP][V];
  int s_cred [NP][V];
  int next_id;
  // sinks, one per output VC
  int d_occ [NP][V];
  int o_cur [NP][V], o_flit [NP][V];
  credit_t cred_next [NP];
  int expect_port [int], expect_vc [int];
  int delivered, total, cyc, t_first;
  bit first_done;

  initial begin
    in_link = '0; in_credit = '0; inj_valid = 0; inj_flit = '0; ej_ready = 0;
    next_id = 0; delivered = 0; total = 0; cyc = 0; first_done = 0;
    for (int p = 0; p < NP; p++) begin
      cred_next[p] = '0;
      for (int v = 0; v < V; v++) begin
        s_left[p][v] = (p == 0 && v > 0) ? 0 : NPK;
        total += s_left[p][v];
        s_flit[p][v] = -1; s_cred[p][v] = DEPTH;
        d_occ[p][v] = 0; o_cur[p][v] = -1; o_flit[p][v] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  function automatic flit_t mk(input int id, input int k, input int dx, input int dy);
    flit_t f;
    f.head = (k == 0);
    f.tail = (k == PKT - 1);
    f.data = (k == 0) ? {16'(id), 12'h0, 2'(dy), 2'(dx)} : {16'(id), 8'h5a, 8'(k)};
    return f;
  endfunction

  always @(negedge clk) if (rst_n) begin
    cyc++;
    // ---- outputs: network links ----
    for (int p = 1; p < NP; p++) begin
      in_credit[p] = cred_next[p];
      cred_next[p] = '0;
      if (out_link[p].valid) check_out(p, int'(out_link[p].vc), out_link[p].flit, 1'b1);
      for (int v = 0; v < V; v++)
        if (d_occ[p][v] > 0 && $urandom_range(2) == 0) begin
          d_occ[p][v]--;
          cred_next[p][v] = 1'b1;
        end
    end
    // ---- ejection ----
    ej_ready = ($urandom_range(3) != 0);
    if (ej_valid && ej_ready) check_out(0, 0, ej_flit, 1'b0);
    // ---- credits back from the switch's input queues ----
    for (int p = 1; p < NP; p++)
      for (int v = 0; v < V; v++) if (credit_out[p][v]) s_cred[p][v]++;
    // ---- sources ----
    inj_valid = 0;
    for (int p = 1; p < NP; p++) begin
      int v;
      in_link[p] = '0;
      v = $urandom_range(V - 1);
      if (cyc < 10) v = (p == 1) ? 1 : -1;       // directed first packet
      if (v >= 0) drive(p, v);
    end
    if (cyc >= 10) drive(0, 0);
    if (delivered == total) begin
      $display("delivered %0d packets in %0d cycles", delivered, cyc);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic drive(input int p, input int v);
    if (s_flit[p][v] < 0 && s_left[p][v] > 0) begin
      int vc, op, ov;
      if (cyc < 10) begin s_dx[p][v] = 3; s_dy[p][v] = 1; end     // (3,1): port 1, VC 1
      else pick_dst(p, s_dx[p][v], s_dy[p][v], vc);
      s_id[p][v] = next_id++;
      ref_route(s_dx[p][v], s_dy[p][v], op, ov);
      expect_port[s_id[p][v]] = op;
      expect_vc[s_id[p][v]] = ov;
      s_flit[p][v] = 0;
      s_left[p][v]--;
    end
    if (s_flit[p][v] < 0) return;
    if (p == 0) begin
      inj_valid = 1;
      inj_flit  = mk(s_id[0][0], s_flit[0][0], s_dx[0][0], s_dy[0][0]);
      if (!inj_ready) return;
    end else begin
      int vcx;
      // arriving VC: what the upstream switch chose for this dimension
      vcx = (p <= 2) ? s_dx[p][v] % V : s_dy[p][v] % V;
      if (vcx != v) begin            // re-file the packet on the right VC next time
        s_flit[p][v] = -1; s_left[p][v]++; next_id--; return;
      end
      if (s_cred[p][v] == 0 || (s_flit[p][v] == 0 && s_cred[p][v] < PKT)) return;
      in_link[p] = '{valid: 1'b1, vc: VC_W'(v),
                     flit: mk(s_id[p][v], s_flit[p][v], s_dx[p][v], s_dy[p][v])};
      s_cred[p][v]--;
      if (s_id[p][v] == 0 && s_flit[p][v] == 0) t_first = cyc;
    end
    if (s_flit[p][v] == PKT - 1) s_flit[p][v] = -1;
    else s_flit[p][v]++;
  endtask

  task automatic check_out(input int p, input int v, input flit_t f, input bit net);
    if (net) begin
      if (f.head) chk(DEPTH - d_occ[p][v] >= PKT, "head sent without room");
      chk(d_occ[p][v] < DEPTH, "downstream overflow");
      d_occ[p][v]++;
    end
    if (f.head) begin
      int id;
      id = int'(f.data[31:16]);
      chk(o_cur[p][v] < 0, $sformatf("port %0d vc %0d: head inside a packet", p, v));
      chk(expect_port.exists(id) && expect_port[id] == p && expect_vc[id] == v,
          $sformatf("packet %0d left on port %0d vc %0d", id, p, v));
      o_cur[p][v] = id;
      o_flit[p][v] = 1;
      if (id == 0 && !first_done) begin
        first_done = 1;
        chk(cyc - t_first == R + 2, $sformatf("first packet took %0d cycles", cyc - t_first));
      end
    end else begin
      chk(o_cur[p][v] >= 0 && int'(f.data[31:16]) == o_cur[p][v] &&
          int'(f.data[7:0]) == o_flit[p][v] && f.data[15:8] == 8'h5a,
          $sformatf("port %0d vc %0d: bad body flit %h", p, v, f.data));
      chk(f.tail == (o_flit[p][v] == PKT - 1), "tail mark");
      if (f.tail) begin
        o_cur[p][v] = -1;
        delivered++;
      end else o_flit[p][v]++;
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired, delivered %0d of %0d", delivered, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
