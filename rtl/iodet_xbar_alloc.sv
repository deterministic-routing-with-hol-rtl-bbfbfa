// iodet_xbar_alloc -- IODET virtual-channel crossbar with output-VC allocation.
//
// The crossbar connects input VCs to output VCs, one flit per cycle on each
// connection. Only the crosspoints that the IODET routing can use exist
// (iodet_pkg::xbar_allowed): a packet staying in its dimension keeps its VC,
// a packet may turn only to a higher dimension or to the node, and the
// local ports have a single queue. The number of crosspoints is therefore
// iodet_pkg::crosspoints(N, V), e.g. 40 for a 2-D switch with 2 VCs where a
// switch that lets packets change VC on every hop needs 48.
//
// Allocation works per packet (virtual cut-through). Each output VC has a
// round-robin arbiter over the input VCs that request it. A request is
// eligible when the output VC is not bound to another packet and its queue
// has room for the whole packet. In a torus (TORUS = 1) a packet that enters
// a ring -- injected, or turning into this dimension -- needs room for two
// packets (bubble flow control), while a packet continuing round the ring
// needs room for one; this keeps a free packet buffer in every ring so the
// wraparound links cannot deadlock. Bubble flow control is one of the two
// usual ways to make deterministic routing deadlock-free in tori (the other,
// a dateline VC split, clashes with IODET's fixed VC per destination);
// choosing it, and the one-packet rule for meshes, are this design's own.
//
// On a grant the head flit crosses in the same cycle and the output VC stays
// bound to that input VC until the tail has crossed; body flits cross when
// the input VC has one at its front. Room was reserved at grant time, so a
// bound transfer never waits for the output queue.
module iodet_xbar_alloc
  import iodet_pkg::*;
#(
  parameter int N     = 2,
  parameter int V     = 2,
  parameter bit TORUS = 1'b0,
  parameter int PKT   = 32,                 // flits per packet
  localparam int NP   = 2 * N + 1,
  localparam int PW   = $clog2(NP),
  localparam int FW   = $clog2(2 * PKT + 1),
  localparam int NI   = NP * V              // flattened input-VC index space
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // from the input units, indexed [port][vc]
  input  logic  [NP-1:0][V-1:0]            req_valid,
  input  logic  [NP-1:0][V-1:0][PW-1:0]    req_port,
  input  logic  [NP-1:0][V-1:0][VC_W-1:0]  req_vc,
  input  flit_t [NP-1:0][V-1:0]            front,
  input  logic  [NP-1:0][V-1:0]            front_valid,
  output logic  [NP-1:0][V-1:0]            grant,
  output logic  [NP-1:0][V-1:0]            pop,
  // to the output units, indexed [port][vc]
  input  logic  [NP-1:0][V-1:0][FW-1:0]    out_free,
  output logic  [NP-1:0][V-1:0]            out_push,
  output flit_t [NP-1:0][V-1:0]            out_flit
);
  // per output VC: which input VC it takes a flit from this cycle (one-hot)
  logic [NI-1:0] sel [NP][V];
  logic          xfer [NP][V];
  logic [NI-1:0] gnt  [NP][V];

  for (genvar op = 0; op < NP; op++) begin : g_op
    for (genvar ov = 0; ov < V; ov++) begin : g_ov
      if (op != 0 || ov == 0) begin : g_used
        logic [NI-1:0] rq;
        logic          busy;
        logic [NI-1:0] owner;

        for (genvar ip = 0; ip < NP; ip++) begin : g_ip
          for (genvar iv = 0; iv < V; iv++) begin : g_iv
            if (xbar_allowed(ip, iv, op, ov)) begin : g_xp
              localparam int NEED = (TORUS && op != 0 && ip != op) ? 2 * PKT : PKT;
              assign rq[ip*V+iv] = req_valid[ip][iv] &&
                                   32'(req_port[ip][iv]) == op &&
                                   32'(req_vc[ip][iv]) == ov &&
                                   32'(out_free[op][ov]) >= NEED;
            end else begin : g_noxp
              assign rq[ip*V+iv] = 1'b0;
            end
          end
        end

        iodet_rr_arb #(.NREQ(NI)) u_arb (
          .clk, .rst_n,
          .req    (busy ? '0 : rq),
          .advance(!busy),
          .gnt    (gnt[op][ov])
        );

        always_comb begin
          sel[op][ov]  = busy ? owner : gnt[op][ov];
          xfer[op][ov] = 1'b0;
          for (int i = 0; i < NI; i++)
            if (sel[op][ov][i] && front_valid[i/V][i%V]) xfer[op][ov] = 1'b1;
        end

        // crossbar datapath: AND-OR over the existing crosspoints only
        always_comb begin
          out_flit[op][ov] = '0;
          for (int i = 0; i < NI; i++)
            if (xbar_allowed(i / V, i % V, op, ov) && sel[op][ov][i])
              out_flit[op][ov] = out_flit[op][ov] | front[i/V][i%V];
        end
        assign out_push[op][ov] = xfer[op][ov];

        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            busy  <= 1'b0;
            owner <= '0;
          end else if (xfer[op][ov] && out_flit[op][ov].tail) begin
            busy  <= 1'b0;
          end else if (!busy && gnt[op][ov] != '0) begin
            busy  <= 1'b1;
            owner <= gnt[op][ov];
          end
        end

        always_ff @(posedge clk) begin
          if (rst_n) a_onehot: assert ((sel[op][ov] & (sel[op][ov] - 1'b1)) == '0);
        end
      end else begin : g_unused
        assign sel[op][ov]      = '0;
        assign xfer[op][ov]     = 1'b0;
        assign gnt[op][ov]      = '0;
        assign out_flit[op][ov] = '0;
        assign out_push[op][ov] = 1'b0;
      end
    end
  end

  // gather grants and pops back to the input VCs
  always_comb begin
    grant = '0;
    pop   = '0;
    for (int op = 0; op < NP; op++)
      for (int ov = 0; ov < V; ov++)
        for (int i = 0; i < NI; i++) begin
          if (gnt[op][ov][i]) grant[i/V][i%V] = 1'b1;
          if (xfer[op][ov] && sel[op][ov][i]) pop[i/V][i%V] = 1'b1;
        end
  end
endmodule
