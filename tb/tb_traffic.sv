// tb_traffic -- traffic source and scoreboard for a k-ary n-cube network.
//
// Drives every node's injection port and consumes every ejection port.
// Phase 1 (zero load): single packets between chosen node pairs, one in the
// network at a time; the head's latency from acceptance at the source to
// appearing at the destination must be hops*(R+2) + R + 1 cycles: R routing
// cycles in each of the hops+1 switches, and per hop one cycle through
// the crossbar into the output queue and one on the link, plus the cycle
// into the injection queue. Phase 2 (load): every node sends NPKT packets to
// uniformly random other nodes with probability RATE_PCT% per idle cycle,
// while each ejection port is stalled STALL_PCT% of the cycles. With
// GEN_PER_10K > 0, phase 2 instead generates packets at a fixed rate into a
// per-source queue (latency then counts from generation) and the ejection
// ports take a flit every cycle unless STALL_PCT says otherwise.
//
// Every delivered packet is checked: arrives at the right node, is PKT
// flits long with head/tail marks in place, carries the source's payload
// pattern, and its sequence number per source/destination pair is the next
// one expected (in-order delivery). At the end every sent packet must have
// arrived. In phase 2 the latency of every packet, from the cycle it was
// generated (source queueing included) to the cycle its tail is taken, is
// summed into lat_sum/lat_cnt. Signals are driven and sampled on the falling
// clock edge.
module tb_traffic
  import iodet_pkg::*;
#(
  parameter int K        = 4,
  parameter int N        = 2,
  parameter bit TORUS    = 1'b0,
  parameter int PKT      = 4,
  parameter int R        = 3,
  parameter int NPKT     = 20,
  parameter int RATE_PCT = 50,
  parameter int STALL_PCT = 20,
  parameter int NZL      = 6,       // zero-load packets
  parameter int SEED     = 1,
  parameter int GEN_PER_10K = 0,    // >0: phase 2 generates packets at this
                                    // rate (per 10,000 cycles) into a source queue
  localparam int NN      = K ** N,
  localparam int CW      = (K > 1) ? $clog2(K) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic  [NN-1:0]     inj_valid,
  output flit_t [NN-1:0]     inj_flit,
  input  logic  [NN-1:0]     inj_ready,
  input  logic  [NN-1:0]     ej_valid,
  input  flit_t [NN-1:0]     ej_flit,
  output logic  [NN-1:0]     ej_ready,
  output int                 checks,
  output int                 failures,
  output int                 inj_stalls,   // cycles a source was refused
  output logic               done,
  output longint             lat_sum,      // phase 2: sum of packet latencies
  output int                 lat_cnt       // phase 2: packets measured
);
  function automatic int coord(input int node, input int d);
    return (node / (K ** d)) % K;
  endfunction
  function automatic logic [15:0] node_id(input int node);
    logic [15:0] id;
    id = '0;
    for (int d = 0; d < N; d++) id[d*CW +: CW] = CW'(coord(node, d));
    return id;
  endfunction
  function automatic int hops(input int s, input int t);
    int h, a, b, off;
    h = 0;
    for (int d = 0; d < N; d++) begin
      a = coord(s, d);
      b = coord(t, d);
      off = (b >= a) ? b - a : a - b;
      if (TORUS && K - off < off) off = K - off;
      h += off;
    end
    return h;
  endfunction
  function automatic flit_t make_flit(input int s, input int t, input int seq,
                                      input int k);
    flit_t f;
    f.head = (k == 0);
    f.tail = (k == PKT - 1);
    if (k == 0) f.data = {node_id(s), node_id(t)};
    else        f.data = {8'(s), 8'(k), 16'(seq)};
    return f;
  endfunction

  // source state
  int  src_left  [NN];     // packets still to send
  int  src_flit  [NN];     // next flit index of the packet in progress, -1 idle
  int  src_dst   [NN];
  int  src_seq   [NN];
  int  tx_seq    [NN][NN];
  int  rx_seq    [NN][NN];
  // sink state
  int  rx_flit   [NN];
  int  rx_src    [NN];
  int  rx_seqv   [NN];
  int  sent, received, expected_total;
  int  gen_cycle [longint];
  int  gen_q     [NN][$];      // generated, not yet started (GEN_PER_10K mode)    // (src, dst, seq) -> cycle the packet was generated
  int  cycle;
  bit  zero_load;
  int  zl_start, zl_lat, zl_src, zl_dst;
  bit  zl_seen;

  initial begin
    checks = 0; failures = 0; inj_stalls = 0; done = 1'b0; lat_sum = 0; lat_cnt = 0;
    inj_valid = '0; inj_flit = '0; ej_ready = '0;
    sent = 0; received = 0; cycle = 0; zl_seen = 1'b0;
    for (int i = 0; i < NN; i++) begin
      src_left[i] = 0; src_flit[i] = -1; rx_flit[i] = 0;
      for (int j = 0; j < NN; j++) begin tx_seq[i][j] = 0; rx_seq[i][j] = 0; end
    end
    void'($urandom(SEED));
    wait (rst_n);
    repeat (3) @(negedge clk);

    // ---------- phase 1: zero-load latency ----------
    zero_load = 1'b1;
    for (int z = 0; z < NZL; z++) begin
      zl_src = (z == 0) ? 0 : int'($urandom_range(NN - 1));
      zl_dst = (z == 0) ? NN - 1 : int'($urandom_range(NN - 1));
      if (zl_dst == zl_src) zl_dst = (zl_src + 1) % NN;
      src_left[zl_src] = 1;
      src_dst[zl_src]  = zl_dst;
      zl_seen = 1'b0;
      expected_total = sent + 1;
      wait (received == expected_total);
      checks++;
      if (zl_lat != hops(zl_src, zl_dst) * (R + 2) + R + 1) begin
        failures++;
        $display("zero-load latency %0d -> %0d: got %0d, expected %0d",
                 zl_src, zl_dst, zl_lat, hops(zl_src, zl_dst) * (R + 2) + R + 1);
      end
      @(negedge clk);
    end

    // ---------- phase 2: random uniform traffic ----------
    zero_load = 1'b0;
    for (int i = 0; i < NN; i++) src_left[i] = NPKT;
    expected_total = sent + NN * NPKT;
    wait (received == expected_total);
    repeat (5) @(negedge clk);
    checks++;
    if (sent != received) failures++;
    done = 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      // ----- sinks -----
      for (int i = 0; i < NN; i++) begin
        ej_ready[i] = zero_load ? 1'b1 : ($urandom_range(99) >= STALL_PCT);
        if (ej_valid[i] && ej_flit[i].head && rx_flit[i] == 0 && zero_load && !zl_seen) begin
          zl_seen = 1'b1;
          zl_lat  = cycle - zl_start;
        end
        if (ej_valid[i] && ej_ready[i]) begin
          flit_t f;
          f = ej_flit[i];
          if (rx_flit[i] == 0) begin
            checks++;
            if (!f.head || f.data[15:0] != node_id(i)) begin
              failures++;
              $display("node %0d: bad head %h", i, f.data);
            end
            rx_src[i] = -1;
            for (int s = 0; s < NN; s++) if (node_id(s) == f.data[31:16]) rx_src[i] = s;
            if (rx_src[i] < 0) begin failures++; rx_src[i] = 0; end
          end else begin
            checks++;
            if (f.head || f.tail != (rx_flit[i] == PKT - 1) ||
                f.data[31:16] != {8'(rx_src[i]), 8'(rx_flit[i])}) begin
              failures++;
              $display("node %0d: bad body flit %0d %h", i, rx_flit[i], f.data);
            end
            if (rx_flit[i] == 1) rx_seqv[i] = int'(f.data[15:0]);
            else if (int'(f.data[15:0]) != rx_seqv[i]) failures++;
          end
          if (rx_flit[i] == PKT - 1 || PKT == 1) begin
            checks++;
            if (PKT > 1 && rx_seqv[i] != (rx_seq[rx_src[i]][i] & 16'hffff)) begin
              failures++;
              $display("order: %0d -> %0d got seq %0d expected %0d",
                       rx_src[i], i, rx_seqv[i], rx_seq[rx_src[i]][i]);
            end
            if (!zero_load) begin
              longint key;
              key = (longint'(rx_src[i]) * NN + i) * 65536 + rx_seqv[i];
              if (gen_cycle.exists(key)) begin
                lat_sum += cycle - gen_cycle[key];
                lat_cnt++;
                gen_cycle.delete(key);
              end
            end
            rx_seq[rx_src[i]][i]++;
            rx_flit[i] = 0;
            received++;
          end else begin
            rx_flit[i]++;
          end
        end
      end
      // ----- sources -----
      for (int i = 0; i < NN; i++) begin
        if (GEN_PER_10K > 0 && !zero_load && src_left[i] > 0 &&
            $urandom_range(9999) < GEN_PER_10K) begin
          gen_q[i].push_back(cycle);
          src_left[i]--;
        end
        if (src_flit[i] < 0 &&
            ((GEN_PER_10K > 0 && !zero_load) ? gen_q[i].size() > 0 :
             (src_left[i] > 0 && (zero_load || $urandom_range(99) < RATE_PCT)))) begin
          if (!zero_load) begin
            src_dst[i] = int'($urandom_range(NN - 2));
            if (src_dst[i] >= i) src_dst[i]++;
          end
          src_seq[i]  = tx_seq[i][src_dst[i]]++;
          if (!zero_load)
            gen_cycle[(longint'(i) * NN + src_dst[i]) * 65536 + (src_seq[i] & 16'hffff)] =
                (GEN_PER_10K > 0) ? gen_q[i].pop_front() : cycle;
          src_flit[i] = 0;
          if (GEN_PER_10K == 0 || zero_load) src_left[i]--;
        end
        inj_valid[i] = (src_flit[i] >= 0);
        inj_flit[i]  = (src_flit[i] >= 0) ?
                       make_flit(i, src_dst[i], src_seq[i], src_flit[i]) : '0;
        if (inj_valid[i] && !inj_ready[i]) inj_stalls++;
        if (inj_valid[i] && inj_ready[i]) begin
          if (src_flit[i] == 0) zl_start = cycle;
          if (src_flit[i] == PKT - 1) begin
            src_flit[i] = -1;
            sent++;
          end else begin
            src_flit[i]++;
          end
        end
      end
    end
  end
endmodule
