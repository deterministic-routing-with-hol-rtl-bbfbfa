// tb_iodet_output_unit -- link arbitration with credits, and ejection.
//
// Network instance (2 VCs, 4-flit packets, 8-flit queues): a directed
// packet on an idle unit must appear on out_link in the 2nd..5th cycles
// after it was pushed (one cycle into the queue, one on the link register).
// Then random packets are pushed on both VCs while a model of the next
// switch's input queues drains at random and returns credits one cycle
// later. Checked: at most one flit per cycle (by construction of out_link),
// flits of each VC leave in the order pushed, a head leaves only when the
// next switch has room for the whole packet and no flit overflows it,
// `free` matches occupancy, and credits are used on both VCs.
// Ejection instance (1 VC): flits come out in order under a random ready.
module tb_iodet_output_unit;
  import iodet_pkg::*;

  localparam int NVC = 2, PKT = 4, DEPTH = 2 * PKT, FW = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NVC-1:0] push;
  flit_t [NVC-1:0] din;
  logic [NVC-1:0][FW-1:0] free;
  link_t out_link;
  credit_t in_credit;
  logic ev_unused;
  flit_t ef_unused;

  iodet_output_unit #(.NVC(NVC), .PKT(PKT), .EJECT(1'b0)) dut (
    .clk, .rst_n, .push, .din, .free, .out_link, .in_credit,
    .ej_valid(ev_unused), .ej_flit(ef_unused), .ej_ready(1'b0));

  logic [0:0] e_push;
  flit_t [0:0] e_din;
  logic [0:0][FW-1:0] e_free;
  link_t e_link;
  logic ej_valid, ej_ready;
  flit_t ej_flit;
  iodet_output_unit #(.NVC(1), .PKT(PKT), .EJECT(1'b1)) dut_e (
    .clk, .rst_n, .push(e_push), .din(e_din), .free(e_free), .out_link(e_link),
    .in_credit('0), .ej_valid, .ej_flit, .ej_ready);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%0t: %s", $time, msg);
    end
  endtask

  flit_t q [NVC][$];       // pushed, not yet on the link
  int    occ [NVC];        // output-queue occupancy (model)
  int    down [NVC];       // next switch's queue occupancy
  int    pkt_flit [NVC], pkts_sent [NVC];
  credit_t cred_next;
  int    link_flits [NVC];
  flit_t eq [$];
  int    e_sent, e_recv;
  int    cyc;
  bit    directed;
  int    dir_seen;

  function automatic flit_t mk(input int v, input int k, input int n);
    flit_t f;
    f.head = (k == 0);
    f.tail = (k == PKT - 1);
    f.data = {8'(v), 8'(k), 16'(n)};
    return f;
  endfunction

  initial begin
    push = '0; din = '0; in_credit = '0; cred_next = '0;
    e_push = '0; e_din = '0; ej_ready = 0;
    e_sent = 0; e_recv = 0; cyc = 0; directed = 1; dir_seen = 0;
    for (int v = 0; v < NVC; v++) begin
      occ[v] = 0; down[v] = 0; pkt_flit[v] = 0; pkts_sent[v] = 0; link_flits[v] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    cyc++;
    // ---- observe the link (flit registered at the last edge) ----
    if (out_link.valid) begin
      int v;
      v = int'(out_link.vc);
      chk(q[v].size() > 0 && out_link.flit == q[v][0], $sformatf("vc%0d wrong flit on link", v));
      if (out_link.flit.head)
        chk(DEPTH - down[v] >= PKT, $sformatf("vc%0d head sent with room %0d", v, DEPTH - down[v]));
      chk(down[v] < DEPTH, "next switch overflow");
      if (q[v].size() > 0) void'(q[v].pop_front());
      down[v]++;
      occ[v]--;
      link_flits[v]++;
      if (directed) begin
        dir_seen++;
        chk(cyc == 2 + dir_seen, $sformatf("directed flit %0d on link in cycle %0d", dir_seen, cyc));
      end
    end
    if (directed && dir_seen == PKT) directed = 0;
    for (int v = 0; v < NVC; v++)
      chk(int'(free[v]) == DEPTH - occ[v], $sformatf("free vc%0d %0d model %0d", v, free[v], DEPTH - occ[v]));
    // ---- next switch drains; credit arrives one cycle later ----
    in_credit = cred_next;
    cred_next = '0;
    for (int v = 0; v < NVC; v++)
      if (!directed && down[v] > 0 && $urandom_range(3) == 0) begin
        down[v]--;
        cred_next[v] = 1'b1;
      end
    // ---- push new flits ----
    push = '0;
    for (int v = 0; v < NVC; v++) begin
      bit go;
      go = directed ? (v == 0 && cyc <= PKT) : ($urandom_range(1) == 1);
      if (go && occ[v] < DEPTH && pkts_sent[v] < 40) begin
        push[v] = 1'b1;
        din[v]  = mk(v, pkt_flit[v], pkts_sent[v]);
        q[v].push_back(din[v]);
        occ[v]++;
        if (pkt_flit[v] == PKT - 1) begin pkt_flit[v] = 0; pkts_sent[v]++; end
        else pkt_flit[v]++;
      end
    end
    // ---- ejection instance ----
    chk(ej_valid == (eq.size() > 0), "eject valid mismatch");
    chk(e_link.valid == 1'b0, "eject port drove its link");
    ej_ready = ($urandom_range(2) != 0);
    if (ej_valid && ej_ready) begin
      chk(eq.size() > 0 && ej_flit == eq[0], "eject flit out of order");
      void'(eq.pop_front());
      e_recv++;
    end
    e_push = '0;
    if ($urandom_range(1) == 1 && eq.size() < DEPTH && e_sent < 200) begin
      e_push[0] = 1'b1;
      e_din[0]  = mk(3, e_sent % PKT, e_sent);
      e_sent++;
    end
    #1;
    if (e_push[0]) eq.push_back(e_din[0]);
    if (pkts_sent[0] == 40 && pkts_sent[1] == 40 && q[0].size() == 0 && q[1].size() == 0 &&
        e_recv == 200) begin
      chk(link_flits[0] == 40 * PKT && link_flits[1] == 40 * PKT, "flit count");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
