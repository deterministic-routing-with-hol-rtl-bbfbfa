// iodet_input_unit -- one input port of the switch.
//
// Holds NVC virtual-channel queues of DEPTH flits (two packets each). A flit
// arriving on `in_link` is written into the queue its VC tag names; the
// upstream switch only sends when it holds a credit, so a queue never
// overflows. For the local injection port NVC = 1 and `free` tells the node
// whether there is room.
//
// Routing: while a head flit waits at the front of a queue, a counter runs.
// The routing function (iodet_route) is evaluated on that head flit, and the
// request to the crossbar (`req_valid`, with `req_port`/`req_vc`) is raised
// in the ROUTE_CYCLES-th cycle the head has been at the front; this models
// the 20-cycle routing time of the evaluated switch. On `grant` the head
// leaves in the same cycle and the VC stays bound to its output VC until the
// tail flit has been popped; body flits leave one per cycle when the
// crossbar pops them. Every pop returns one credit for that VC to the
// upstream switch through a register (one cycle on the return wire).
// The counter-based routing delay, the credit wire and its timing are this
// design's choices; the 20-cycle routing time and the two-packet queues follow the
// evaluated configuration.
module iodet_input_unit
  import iodet_pkg::*;
#(
  parameter int K            = 8,
  parameter int N            = 2,
  parameter int V            = 2,
  parameter bit TORUS        = 1'b0,
  parameter int NVC          = 2,
  parameter int DEPTH        = 64,
  parameter int ROUTE_CYCLES = 20,
  localparam int CW          = (K > 1) ? $clog2(K) : 1,
  localparam int PW          = $clog2(2 * N + 1),
  localparam int FW          = $clog2(DEPTH + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N*CW-1:0]          my_id,
  input  link_t                    in_link,
  output credit_t                  credit_out,
  output logic [NVC-1:0][FW-1:0]   free,
  // toward the crossbar
  output logic [NVC-1:0]           req_valid,
  output logic [NVC-1:0][PW-1:0]   req_port,
  output logic [NVC-1:0][VC_W-1:0] req_vc,
  output flit_t [NVC-1:0]          front,
  output logic [NVC-1:0]           front_valid,
  input  logic [NVC-1:0]           grant,
  input  logic [NVC-1:0]           pop
);
  localparam int RW = $clog2(ROUTE_CYCLES + 1);

  logic [NVC-1:0] active;
  logic [RW-1:0]  rcnt [NVC];

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    logic push;
    assign push = in_link.valid && (32'(in_link.vc) == v);

    iodet_flit_fifo #(.DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .push (push),
      .din  (in_link.flit),
      .pop  (pop[v]),
      .dout (front[v]),
      .valid(front_valid[v]),
      .free (free[v])
    );

    iodet_route #(.K(K), .N(N), .V(V), .TORUS(TORUS)) u_rt (
      .cur (my_id),
      .dst (front[v].data[N*CW-1:0]),
      .port(req_port[v]),
      .vc  (req_vc[v])
    );

    assign req_valid[v] = !active[v] && front_valid[v] &&
                          (32'(rcnt[v]) == ROUTE_CYCLES - 1);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active[v] <= 1'b0;
        rcnt[v]   <= '0;
      end else begin
        if (grant[v]) begin
          rcnt[v] <= '0;
        end else if (!active[v] && front_valid[v] &&
                     32'(rcnt[v]) < ROUTE_CYCLES - 1) begin
          rcnt[v] <= rcnt[v] + 1'b1;
        end
        if (pop[v] && front[v].tail) active[v] <= 1'b0;
        else if (grant[v])           active[v] <= 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (rst_n) a_head_first: assert (!(front_valid[v] && !active[v]) || front[v].head);
    end
    always_ff @(posedge clk) begin
      if (rst_n) a_grant_req: assert (!grant[v] || (req_valid[v] && pop[v]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credit_out <= '0;
    else        credit_out <= credit_t'(pop);
  end

  always_ff @(posedge clk) begin
    if (rst_n) a_vc_range: assert (!in_link.valid || 32'(in_link.vc) < NVC);
  end
endmodule
