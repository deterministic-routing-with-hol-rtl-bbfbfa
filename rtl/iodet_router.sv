// iodet_router -- the switch of one node of a k-ary n-cube.
//
// 2N+1 ports: port 0 is the local node, port 1+2d leaves toward the
// neighbour with the next higher coordinate in dimension d, port 2+2d toward
// the next lower one. Network ports have V virtual channels; the local ports
// have one queue each. Every queue, input and output, holds two packets.
//
// Path of a packet: input queue -> routing (ROUTE_CYCLES cycles with the head
// at the front, IODET: dimension order, VC = destination coordinate mod V)
// -> output-VC allocation and the restricted VC crossbar (one flit per cycle
// per connection) -> output queue -> link arbitration with credits -> one
// cycle on the link. With nothing else in the network a head flit takes
// ROUTE_CYCLES + 2 cycles from being at the front of one input queue to
// being at the front of the next switch's input queue.
//
// Injection: the node offers flits on inj_flit/inj_valid and the switch
// takes one when inj_ready is high (room in the injection queue). Ejection:
// ej_flit/ej_valid with ej_ready from the node. Network links: out_link[p]
// and in_credit[p] go to the neighbour on port p, in_link[p] and
// credit_out[p] come from the neighbour that sends on port p (entry 0 of
// these arrays is unused). `my_id` is this node's coordinates, CW bits each.
//
// The port set, the two-packet queues, the IODET crossbar restriction and
// the routing time follow the IODET switch; the handshakes, credit return
// and per-VC crossbar connections (one flit per cycle per input VC, so an
// input port may forward flits of two VCs in one cycle) are this design's.
module iodet_router
  import iodet_pkg::*;
#(
  parameter int K            = 8,
  parameter int N            = 2,
  parameter int V            = 2,
  parameter bit TORUS        = 1'b0,
  parameter int PKT          = 32,
  parameter int ROUTE_CYCLES = 20,
  localparam int CW          = (K > 1) ? $clog2(K) : 1,
  localparam int NP          = 2 * N + 1,
  localparam int PW          = $clog2(NP),
  localparam int FW          = $clog2(2 * PKT + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N*CW-1:0]      my_id,
  input  link_t   [NP-1:0]     in_link,
  output credit_t [NP-1:0]     credit_out,
  output link_t   [NP-1:0]     out_link,
  input  credit_t [NP-1:0]     in_credit,
  input  logic                 inj_valid,
  input  flit_t                inj_flit,
  output logic                 inj_ready,
  output logic                 ej_valid,
  output flit_t                ej_flit,
  input  logic                 ej_ready
);
  logic  [NP-1:0][V-1:0]           req_valid, front_valid, grant, pop, out_push;
  logic  [NP-1:0][V-1:0][PW-1:0]   req_port;
  logic  [NP-1:0][V-1:0][VC_W-1:0] req_vc;
  flit_t [NP-1:0][V-1:0]           front, out_flit;
  logic  [NP-1:0][V-1:0][FW-1:0]   out_free;

  // ---------------- input units ----------------
  for (genvar p = 0; p < NP; p++) begin : g_in
    localparam int NV = (p == 0) ? 1 : V;
    logic  [NV-1:0]           rv, fv;
    logic  [NV-1:0][PW-1:0]   rp;
    logic  [NV-1:0][VC_W-1:0] rc;
    flit_t [NV-1:0]           fr;
    logic  [NV-1:0][FW-1:0]   fre;
    link_t                    lnk;

    if (p == 0) begin : g_inj
      assign lnk = '{valid: inj_valid && inj_ready, vc: '0, flit: inj_flit};
      assign inj_ready = (fre[0] != '0);
    end else begin : g_net
      assign lnk = in_link[p];
    end

    iodet_input_unit #(
      .K(K), .N(N), .V(V), .TORUS(TORUS), .NVC(NV),
      .DEPTH(2 * PKT), .ROUTE_CYCLES(ROUTE_CYCLES)
    ) u_in (
      .clk, .rst_n,
      .my_id      (my_id),
      .in_link    (lnk),
      .credit_out (credit_out[p]),
      .free       (fre),
      .req_valid  (rv),
      .req_port   (rp),
      .req_vc     (rc),
      .front      (fr),
      .front_valid(fv),
      .grant      (grant[p][NV-1:0]),
      .pop        (pop[p][NV-1:0])
    );

    for (genvar v = 0; v < V; v++) begin : g_map
      if (v < NV) begin : g_real
        assign req_valid[p][v]   = rv[v];
        assign req_port[p][v]    = rp[v];
        assign req_vc[p][v]      = rc[v];
        assign front[p][v]       = fr[v];
        assign front_valid[p][v] = fv[v];
      end else begin : g_none
        assign req_valid[p][v]   = 1'b0;
        assign req_port[p][v]    = '0;
        assign req_vc[p][v]      = '0;
        assign front[p][v]       = '0;
        assign front_valid[p][v] = 1'b0;
      end
    end
  end

  // ---------------- crossbar and allocation ----------------
  iodet_xbar_alloc #(.N(N), .V(V), .TORUS(TORUS), .PKT(PKT)) u_xbar (
    .clk, .rst_n,
    .req_valid  (req_valid),
    .req_port   (req_port),
    .req_vc     (req_vc),
    .front      (front),
    .front_valid(front_valid),
    .grant      (grant),
    .pop        (pop),
    .out_free   (out_free),
    .out_push   (out_push),
    .out_flit   (out_flit)
  );

  // ---------------- output units ----------------
  for (genvar p = 0; p < NP; p++) begin : g_out
    localparam int NV = (p == 0) ? 1 : V;
    logic [NV-1:0][FW-1:0] fre;
    logic                  ev;
    flit_t                 ef;

    iodet_output_unit #(.NVC(NV), .PKT(PKT), .EJECT(p == 0)) u_out (
      .clk, .rst_n,
      .push     (out_push[p][NV-1:0]),
      .din      (out_flit[p][NV-1:0]),
      .free     (fre),
      .out_link (out_link[p]),
      .in_credit(in_credit[p]),
      .ej_valid (ev),
      .ej_flit  (ef),
      .ej_ready (p == 0 ? ej_ready : 1'b0)
    );

    for (genvar v = 0; v < V; v++) begin : g_map
      if (v < NV) begin : g_real
        assign out_free[p][v] = fre[v];
      end else begin : g_none
        assign out_free[p][v] = '0;
      end
    end

    if (p == 0) begin : g_ej
      assign ej_valid = ev;
      assign ej_flit  = ef;
    end
  end
endmodule
