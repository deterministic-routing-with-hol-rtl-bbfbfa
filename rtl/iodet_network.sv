// iodet_network -- a k-ary n-cube (mesh or torus) of IODET switches.
//
// K**N nodes, each with one iodet_router. Node i has coordinate
// (i / K**d) % K in dimension d; its identifier, used as the destination in
// head flits, is the coordinates packed CW bits each, dimension 0 lowest
// (for K a power of two the identifier equals i). Output port 1+2d of a node
// drives input port 1+2d of its neighbour one step up in dimension d, and
// output port 2+2d drives input port 2+2d of the neighbour one step down;
// credits run back beside each link. With TORUS = 1 the ends of every ring
// are joined by wraparound links; with TORUS = 0 (a mesh) the edge ports are
// left idle, and dimension-order routing never uses them.
//
// The default is the 8 x 8 mesh with two VCs, two-packet queues and a
// 20-cycle routing time. The 8 x 8 torus is TORUS = 1. The packet length is
// this design's choice (see PKT). Every node has a flit-wide injection port
// (inj_*, valid/ready) and ejection port (ej_*, valid/ready); a packet is
// PKT flits, head first, tail last, with the destination identifier in the
// head flit's low data bits. Delivery per source/destination pair is in
// order: every packet of a pair follows the same path and the same VCs.
module iodet_network
  import iodet_pkg::*;
#(
  parameter int K            = 8,
  parameter int N            = 2,
  parameter int V            = 2,
  parameter bit TORUS        = 1'b0,
  parameter int PKT          = 32,
  parameter int ROUTE_CYCLES = 20,
  localparam int NN          = K ** N,
  localparam int CW          = (K > 1) ? $clog2(K) : 1,
  localparam int NP          = 2 * N + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic  [NN-1:0]     inj_valid,
  input  flit_t [NN-1:0]     inj_flit,
  output logic  [NN-1:0]     inj_ready,
  output logic  [NN-1:0]     ej_valid,
  output flit_t [NN-1:0]     ej_flit,
  input  logic  [NN-1:0]     ej_ready
);
  link_t   [NN-1:0][NP-1:0] in_link, out_link;
  credit_t [NN-1:0][NP-1:0] in_credit, credit_out;

  function automatic int coord(input int node, input int d);
    return (node / (K ** d)) % K;
  endfunction

  // neighbour of `node` one step (+1 or -1) along dimension d; -1 if none
  function automatic int neighbour(input int node, input int d, input int step);
    int c, nc;
    c  = coord(node, d);
    nc = c + step;
    if (nc < 0 || nc >= K) begin
      if (!TORUS) return -1;
      nc = (nc + K) % K;
    end
    return node + (nc - c) * (K ** d);
  endfunction

  for (genvar i = 0; i < NN; i++) begin : g_node
    logic [N*CW-1:0] id;
    for (genvar d = 0; d < N; d++) begin : g_id
      assign id[d*CW +: CW] = CW'(coord(i, d));
    end

    assign in_link[i][0]   = '0;
    assign in_credit[i][0] = '0;

    for (genvar d = 0; d < N; d++) begin : g_dim
      localparam int UP = neighbour(i, d, 1);
      localparam int DN = neighbour(i, d, -1);
      // + direction: arrives from the node below, credits from the node above
      if (DN >= 0) begin : g_from_dn
        assign in_link[i][1+2*d]   = out_link[DN][1+2*d];
        assign in_credit[i][2+2*d] = credit_out[DN][2+2*d];
      end else begin : g_edge_dn
        assign in_link[i][1+2*d]   = '0;
        assign in_credit[i][2+2*d] = '0;
      end
      if (UP >= 0) begin : g_from_up
        assign in_link[i][2+2*d]   = out_link[UP][2+2*d];
        assign in_credit[i][1+2*d] = credit_out[UP][1+2*d];
      end else begin : g_edge_up
        assign in_link[i][2+2*d]   = '0;
        assign in_credit[i][1+2*d] = '0;
      end
    end

    iodet_router #(
      .K(K), .N(N), .V(V), .TORUS(TORUS), .PKT(PKT), .ROUTE_CYCLES(ROUTE_CYCLES)
    ) u_router (
      .clk, .rst_n,
      .my_id     (id),
      .in_link   (in_link[i]),
      .credit_out(credit_out[i]),
      .out_link  (out_link[i]),
      .in_credit (in_credit[i]),
      .inj_valid (inj_valid[i]),
      .inj_flit  (inj_flit[i]),
      .inj_ready (inj_ready[i]),
      .ej_valid  (ej_valid[i]),
      .ej_flit   (ej_flit[i]),
      .ej_ready  (ej_ready[i])
    );
  end
endmodule
