// tb_xbar_harness -- drives one iodet_xbar_alloc (N = 2, V = 2, 4-flit
// packets) with model input and output units, and checks it.
//
// Every input VC holds a stream of packets to random outputs that the IODET
// rule allows; input VC (3,1) instead keeps asking for a connection the rule
// forbids (dimension 1 back to dimension 0), which must never be granted.
// Output queues drain at random. Checked every cycle: a grant goes only to a
// requester whose output VC is free and has room for one packet (two when a
// torus packet enters a ring); grant and head pop coincide; a bound output
// VC takes exactly the flits its input VC offers, in order, until the tail;
// no flit is written anywhere else. At the end every legal packet must have
// crossed. Counts how often several inputs wanted the same output VC and,
// in a torus, how often the bubble rule held a packet back.
module tb_xbar_harness
  import iodet_pkg::*;
#(
  parameter bit TORUS = 1'b0,
  parameter int SEED  = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   contention,
  output int   bubble_holds,
  output logic done
);
  localparam int N = 2, V = 2, PKT = 4, NP = 5, PW = 3, FW = $clog2(2 * PKT + 1);
  localparam int NPKTS = 30;

  logic  [NP-1:0][V-1:0]           req_valid, front_valid, grant, pop, out_push;
  logic  [NP-1:0][V-1:0][PW-1:0]   req_port;
  logic  [NP-1:0][V-1:0][VC_W-1:0] req_vc;
  flit_t [NP-1:0][V-1:0]           front, out_flit;
  logic  [NP-1:0][V-1:0][FW-1:0]   out_free;

  iodet_xbar_alloc #(.N(N), .V(V), .TORUS(TORUS), .PKT(PKT)) dut (
    .clk, .rst_n, .req_valid, .req_port, .req_vc, .front, .front_valid,
    .grant, .pop, .out_free, .out_push, .out_flit);

  // input model
  int  in_left [NP][V];     // packets still to send
  int  in_flit [NP][V];     // flit index of current packet
  int  in_op   [NP][V], in_ov [NP][V];
  bit  in_bound[NP][V];
  // output model
  int  occ     [NP][V];
  bit  o_bound [NP][V];
  int  o_src_p [NP][V], o_src_v [NP][V];
  int  delivered, total;

  function automatic bit legal_in(input int ip, input int iv);
    return (ip == 0) ? (iv == 0) : !(ip == 3 && iv == 1);
  endfunction

  task automatic new_packet(input int ip, input int iv);
    int op, ov;
    do begin
      op = $urandom_range(NP - 1);
      ov = $urandom_range(V - 1);
    end while (!xbar_allowed(ip, iv, op, ov));
    in_op[ip][iv] = op;
    in_ov[ip][iv] = ov;
    in_flit[ip][iv] = 0;
  endtask

  function automatic flit_t mkflit(input int ip, input int iv, input int k, input int left);
    flit_t f;
    f.head = (k == 0);
    f.tail = (k == PKT - 1);
    f.data = {8'(ip), 8'(iv), 8'(left), 8'(k)};
    return f;
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%0t xbar(TORUS=%0d): %s", $time, TORUS, msg);
    end
  endtask

  initial begin
    checks = 0; failures = 0; contention = 0; bubble_holds = 0; done = 0;
    delivered = 0; total = 0;
    void'($urandom(SEED));
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < V; v++) begin
        in_left[p][v] = legal_in(p, v) ? NPKTS : 0;
        total += in_left[p][v];
        in_bound[p][v] = 0; occ[p][v] = 0; o_bound[p][v] = 0;
        if (legal_in(p, v)) new_packet(p, v);
      end
    req_valid = '0; front_valid = '0; front = '0; req_port = '0; req_vc = '0; out_free = '0;
  end

  always @(negedge clk) if (rst_n && !done) begin
    int want [NP][V];
    // ---- drive inputs ----
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < V; v++) begin
        want[p][v] = 0;
        if (p == 3 && v == 1) begin            // forbidden requester
          req_valid[p][v]   = 1'b1;
          req_port[p][v]    = PW'(1);
          req_vc[p][v]      = '0;
          front_valid[p][v] = 1'b1;
          front[p][v]       = mkflit(p, v, 0, 99);
        end else if (in_left[p][v] > 0) begin
          req_valid[p][v]   = !in_bound[p][v];
          req_port[p][v]    = PW'(in_op[p][v]);
          req_vc[p][v]      = VC_W'(in_ov[p][v]);
          front_valid[p][v] = !in_bound[p][v] || ($urandom_range(3) != 0);
          front[p][v]       = mkflit(p, v, in_flit[p][v], in_left[p][v]);
        end else begin
          req_valid[p][v] = 1'b0; front_valid[p][v] = 1'b0;
        end
      end
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < V; v++) out_free[p][v] = FW'(2 * PKT - occ[p][v]);
    #1;
    // ---- events ----
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < V; v++)
        if (req_valid[p][v] && !(p == 3 && v == 1)) want[in_op[p][v]][in_ov[p][v]]++;
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < V; v++) if (want[p][v] > 1) contention++;
    // ---- check grants ----
    chk(!grant[3][1] && !pop[3][1], "forbidden connection granted");
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < V; v++) begin
        if (p == 3 && v == 1) continue;
        if (req_valid[p][v]) begin
          int op, ov, need;
          op = in_op[p][v]; ov = in_ov[p][v];
          need = (TORUS && op != 0 && op != p) ? 2 * PKT : PKT;
          if (!o_bound[op][ov] && 2 * PKT - occ[op][ov] >= PKT &&
              2 * PKT - occ[op][ov] < need) bubble_holds++;
          if (grant[p][v]) begin
            chk(!o_bound[op][ov], "grant to a bound output VC");
            chk(2 * PKT - occ[op][ov] >= need, $sformatf("grant without room: free %0d need %0d",
                                                         2 * PKT - occ[op][ov], need));
            chk(pop[p][v], "grant without head pop");
            o_bound[op][ov] = 1; o_src_p[op][ov] = p; o_src_v[op][ov] = v;
            in_bound[p][v] = 1;
          end
        end else begin
          chk(!grant[p][v], "grant without request");
        end
      end
    // ---- check datapath ----
    for (int op = 0; op < NP; op++)
      for (int ov = 0; ov < V; ov++) begin
        bit exp_push;
        int sp, sv;
        exp_push = 0;
        if (o_bound[op][ov]) begin
          sp = o_src_p[op][ov]; sv = o_src_v[op][ov];
          exp_push = front_valid[sp][sv];
        end
        chk(out_push[op][ov] == exp_push, $sformatf("push %0d/%0d is %0d expected %0d",
                                                    op, ov, out_push[op][ov], exp_push));
        if (exp_push && out_push[op][ov]) begin
          chk(out_flit[op][ov] == front[sp][sv], "wrong flit crossed");
          chk(pop[sp][sv], "flit crossed without pop");
          occ[op][ov]++;
          in_flit[sp][sv]++;
          if (in_flit[sp][sv] == PKT) begin
            o_bound[op][ov] = 0;
            in_bound[sp][sv] = 0;
            in_left[sp][sv]--;
            delivered++;
            if (in_left[sp][sv] > 0) new_packet(sp, sv);
          end
        end
      end
    // ---- output queues drain ----
    for (int op = 0; op < NP; op++)
      for (int ov = 0; ov < V; ov++)
        if (occ[op][ov] > 0 && $urandom_range(2) == 0) occ[op][ov]--;
    if (delivered == total) done = 1'b1;
  end
endmodule
