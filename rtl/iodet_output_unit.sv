// iodet_output_unit -- one output port of the switch.
//
// Holds NVC virtual-channel queues of 2*PKT flits (two packets each) that the
// crossbar fills. `free` reports each queue's room to the allocator.
//
// Network port (EJECT = 0): a credit counter per VC tracks the room left in
// the matching input queue of the next switch (2*PKT flits after reset; one
// credit back per flit that switch forwards). Each cycle a round-robin link
// arbiter picks one VC whose front flit may go: a head flit needs credits
// for the whole packet (virtual cut-through), a body flit needs one. The
// chosen flit is registered onto `out_link`, so the link moves one flit per
// cycle and a flit spends one cycle on the wire before the next switch
// writes it into its queue.
//
// Ejection port (EJECT = 1, NVC = 1): the queue front is offered to the node
// with a valid/ready handshake; `out_link` stays idle.
//
// One flit per cycle per link and the one-cycle link follow the evaluated
// configuration; credits, the arbiter and the handshake are this design's.
module iodet_output_unit
  import iodet_pkg::*;
#(
  parameter int  NVC   = 2,
  parameter int  PKT   = 32,
  parameter bit  EJECT = 1'b0,
  localparam int DEPTH = 2 * PKT,
  localparam int FW    = $clog2(DEPTH + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // from the crossbar
  input  logic [NVC-1:0]         push,
  input  flit_t [NVC-1:0]        din,
  output logic [NVC-1:0][FW-1:0] free,
  // network side
  output link_t                  out_link,
  input  credit_t                in_credit,
  // ejection side
  output logic                   ej_valid,
  output flit_t                  ej_flit,
  input  logic                   ej_ready
);
  flit_t [NVC-1:0] front;
  logic  [NVC-1:0] front_valid;
  logic  [NVC-1:0] pop;

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    iodet_flit_fifo #(.DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .push (push[v]),
      .din  (din[v]),
      .pop  (pop[v]),
      .dout (front[v]),
      .valid(front_valid[v]),
      .free (free[v])
    );
  end

  if (EJECT) begin : g_eject
    assign ej_valid = front_valid[0];
    assign ej_flit  = front[0];
    assign pop      = NVC'(ej_valid && ej_ready);
    assign out_link = '0;
  end else begin : g_link
    logic [FW-1:0]  cred [NVC];
    logic [NVC-1:0] elig, gnt;

    for (genvar v = 0; v < NVC; v++) begin : g_el
      assign elig[v] = front_valid[v] &&
                       (front[v].head ? (32'(cred[v]) >= PKT) : (cred[v] != '0));
    end

    iodet_rr_arb #(.NREQ(NVC)) u_arb (
      .clk, .rst_n,
      .req    (elig),
      .advance(1'b1),
      .gnt    (gnt)
    );
    assign pop = gnt;

    for (genvar v = 0; v < NVC; v++) begin : g_cr
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) cred[v] <= FW'(DEPTH);
        else        cred[v] <= cred[v] - FW'(gnt[v]) + FW'(in_credit[v]);
      end
      always_ff @(posedge clk) begin
        if (rst_n) a_cred: assert (32'(cred[v]) <= DEPTH);
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_link <= '0;
      end else begin
        out_link.valid <= (gnt != '0);
        out_link.vc    <= '0;
        out_link.flit  <= '0;
        for (int v = 0; v < NVC; v++)
          if (gnt[v]) begin
            out_link.vc   <= VC_W'(v);
            out_link.flit <= front[v];
          end
      end
    end

    assign ej_valid = 1'b0;
    assign ej_flit  = '0;
  end
endmodule
