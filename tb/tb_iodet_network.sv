// tb_iodet_network -- end-to-end test of the network, mesh and torus.
//
// Two reduced networks side by side: a 4 x 4 mesh and a 4 x 4 torus, both
// with 2 VCs, 4-flit packets and a 3-cycle routing time (the design defaults
// are 8 x 8, 32 flits, 20 cycles; see tb_iodet_network_full). tb_traffic
// checks zero-load latency, packet integrity, in-order delivery and that
// everything sent arrives. This bench also counts how often each mechanism
// of the switch was exercised and fails if one never was:
//   both VCs carrying flits on network links (IODET classification),
//   two input VCs asking for the same output VC in one cycle (allocation),
//   a source refused by a full injection queue (back-pressure),
//   a head flit held at an output queue for lack of credits (cut-through),
//   an ejection port stalled by the node,
//   a wraparound link used (torus only),
//   a packet entering a ring held back by the two-packet bubble rule while
//   one packet of room was free (torus only).
module tb_iodet_network;
  import iodet_pkg::*;

  localparam int K = 4, N = 2, V = 2, PKT = 4, R = 3;
  localparam int NN = K ** N, NP = 2 * N + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks_m, failures_m, stalls_m, checks_t, failures_t, stalls_t;
  logic done_m, done_t;

  // ---------------- mesh ----------------
  logic [NN-1:0] iv_m, ir_m, ev_m, er_m;
  flit_t [NN-1:0] if_m, ef_m;
  iodet_network #(.K(K), .N(N), .V(V), .TORUS(1'b0), .PKT(PKT), .ROUTE_CYCLES(R)) dut_m (
    .clk, .rst_n, .inj_valid(iv_m), .inj_flit(if_m), .inj_ready(ir_m),
    .ej_valid(ev_m), .ej_flit(ef_m), .ej_ready(er_m));
  tb_traffic #(.K(K), .N(N), .TORUS(1'b0), .PKT(PKT), .R(R), .NPKT(40),
               .RATE_PCT(60), .STALL_PCT(30), .SEED(11)) trf_m (
    .clk, .rst_n, .inj_valid(iv_m), .inj_flit(if_m), .inj_ready(ir_m),
    .ej_valid(ev_m), .ej_flit(ef_m), .ej_ready(er_m),
    .checks(checks_m), .failures(failures_m), .inj_stalls(stalls_m), .done(done_m),
    .lat_sum(), .lat_cnt());

  // ---------------- torus ----------------
  logic [NN-1:0] iv_t, ir_t, ev_t, er_t;
  flit_t [NN-1:0] if_t, ef_t;
  iodet_network #(.K(K), .N(N), .V(V), .TORUS(1'b1), .PKT(PKT), .ROUTE_CYCLES(R)) dut_t (
    .clk, .rst_n, .inj_valid(iv_t), .inj_flit(if_t), .inj_ready(ir_t),
    .ej_valid(ev_t), .ej_flit(ef_t), .ej_ready(er_t));
  tb_traffic #(.K(K), .N(N), .TORUS(1'b1), .PKT(PKT), .R(R), .NPKT(40),
               .RATE_PCT(60), .STALL_PCT(30), .SEED(23)) trf_t (
    .clk, .rst_n, .inj_valid(iv_t), .inj_flit(if_t), .inj_ready(ir_t),
    .ej_valid(ev_t), .ej_flit(ef_t), .ej_ready(er_t),
    .checks(checks_t), .failures(failures_t), .inj_stalls(stalls_t), .done(done_t),
    .lat_sum(), .lat_cnt());

  // ---------------- mechanism counters ----------------
  int vc_flits [2][V];        // [mesh/torus][vc]
  int contention [2];
  int credit_hold [2];
  int ej_stall [2];
  int wrap_used;
  int bubble_hold;

  for (genvar i = 0; i < NN; i++) begin : g_probe
    always @(negedge clk) if (rst_n) begin
      for (int p = 1; p < NP; p++) begin
        if (dut_m.out_link[i][p].valid) vc_flits[0][dut_m.out_link[i][p].vc]++;
        if (dut_t.out_link[i][p].valid) vc_flits[1][dut_t.out_link[i][p].vc]++;
      end
      if (ev_m[i] && !er_m[i]) ej_stall[0]++;
      if (ev_t[i] && !er_t[i]) ej_stall[1]++;
      // wraparound: + link leaving coordinate K-1, or - link leaving 0
      for (int d = 0; d < N; d++) begin
        if (((i / (K ** d)) % K == K - 1 && dut_t.out_link[i][1+2*d].valid) ||
            ((i / (K ** d)) % K == 0     && dut_t.out_link[i][2+2*d].valid))
          wrap_used++;
      end
    end

    // request-level events inside each switch
    always @(negedge clk) if (rst_n) begin
      int cnt_m [NP][V];
      int cnt_t [NP][V];
      for (int op = 0; op < NP; op++)
        for (int ov = 0; ov < V; ov++) begin cnt_m[op][ov] = 0; cnt_t[op][ov] = 0; end
      for (int ip = 0; ip < NP; ip++)
        for (int iv = 0; iv < V; iv++) begin
          if (dut_m.g_node[i].u_router.req_valid[ip][iv])
            cnt_m[dut_m.g_node[i].u_router.req_port[ip][iv]]
                 [dut_m.g_node[i].u_router.req_vc[ip][iv]]++;
          if (dut_t.g_node[i].u_router.req_valid[ip][iv]) begin
            int op, ov, fr;
            op = int'(dut_t.g_node[i].u_router.req_port[ip][iv]);
            ov = int'(dut_t.g_node[i].u_router.req_vc[ip][iv]);
            cnt_t[op][ov]++;
            fr = int'(dut_t.g_node[i].u_router.out_free[op][ov]);
            if (op != 0 && op != ip && fr >= PKT && fr < 2 * PKT) bubble_hold++;
          end
        end
      for (int op = 0; op < NP; op++)
        for (int ov = 0; ov < V; ov++) begin
          if (cnt_m[op][ov] > 1) contention[0]++;
          if (cnt_t[op][ov] > 1) contention[1]++;
        end
    end
  end

  // credit hold: a head flit at an output-queue front with no room downstream
  for (genvar i = 0; i < NN; i++) begin : g_cred
    for (genvar p = 1; p < NP; p++) begin : g_p
      for (genvar v = 0; v < V; v++) begin : g_v
        always @(negedge clk) if (rst_n) begin
          if (dut_m.g_node[i].u_router.g_out[p].u_out.front_valid[v] &&
              dut_m.g_node[i].u_router.g_out[p].u_out.front[v].head &&
              !dut_m.g_node[i].u_router.g_out[p].u_out.g_link.elig[v])
            credit_hold[0]++;
          if (dut_t.g_node[i].u_router.g_out[p].u_out.front_valid[v] &&
              dut_t.g_node[i].u_router.g_out[p].u_out.front[v].head &&
              !dut_t.g_node[i].u_router.g_out[p].u_out.g_link.elig[v])
            credit_hold[1]++;
        end
      end
    end
  end

  int checks, failures;

  task automatic mech(input string name, input int count);
    checks++;
    $display("  %-34s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    checks = 0; failures = 0; wrap_used = 0; bubble_hold = 0;
    for (int n = 0; n < 2; n++) begin
      contention[n] = 0; credit_hold[n] = 0; ej_stall[n] = 0;
      for (int v = 0; v < V; v++) vc_flits[n][v] = 0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done_m && done_t);
    checks   += checks_m + checks_t;
    failures += failures_m + failures_t;
    $display("drained after %0d cycles", trf_m.cycle);
    $display("mechanisms (mesh / torus):");
    for (int v = 0; v < V; v++) begin
      mech($sformatf("mesh flits on VC %0d", v), vc_flits[0][v]);
      mech($sformatf("torus flits on VC %0d", v), vc_flits[1][v]);
    end
    mech("mesh output-VC contention", contention[0]);
    mech("torus output-VC contention", contention[1]);
    mech("mesh injection back-pressure", stalls_m);
    mech("torus injection back-pressure", stalls_t);
    mech("mesh credit hold", credit_hold[0]);
    mech("torus credit hold", credit_hold[1]);
    mech("mesh ejection stall", ej_stall[0]);
    mech("torus ejection stall", ej_stall[1]);
    mech("torus wraparound link use", wrap_used);
    mech("torus bubble hold", bubble_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: traffic did not drain (mesh %0d, torus %0d)", done_m, done_t);
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks_m + checks_t,
             failures + failures_m + failures_t + 1);
    $finish;
  end
endmodule
