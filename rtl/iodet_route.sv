// iodet_route -- the IODET routing function of one switch.
//
// Given this node's identifier and a packet's destination identifier (one
// CW-bit coordinate per dimension), it returns the output port and the
// output virtual channel. The output port follows dimension-order routing:
// dimensions are crossed in strictly increasing order, so the first
// dimension whose coordinates differ is routed. In a mesh the direction is
// the sign of the difference; in a torus it is the shorter way round the
// ring, + on a tie (k/2 hops either way), which is this design's choice.
// When every coordinate matches, the packet leaves on port 0 to the node.
//
// The VC is the IODET rule: the destination's coordinate in the dimension
// being routed, modulo the number of VCs (its low bits when V is a power of
// two). A destination is always mapped to the same VC in a given dimension,
// so routing stays deterministic and delivery stays in order.
//
// Purely combinational. The routing time of the switch (20 cycles in the
// evaluated configuration) is modelled in the input unit, not here.
module iodet_route
  import iodet_pkg::*;
#(
  parameter int K     = 8,      // nodes per dimension
  parameter int N     = 2,      // dimensions
  parameter int V     = 2,      // virtual channels per network port
  parameter bit TORUS = 1'b0,   // 1: wraparound links
  localparam int CW   = (K > 1) ? $clog2(K) : 1,
  localparam int PW   = $clog2(2 * N + 1)
) (
  input  logic [N*CW-1:0] cur,
  input  logic [N*CW-1:0] dst,
  output logic [PW-1:0]   port,
  output logic [VC_W-1:0] vc
);
  always_comb begin
    logic            found;
    logic [CW-1:0]   c, d, off;
    port  = '0;
    vc    = '0;
    found = 1'b0;
    c     = '0;
    d     = '0;
    off   = '0;
    for (int i = 0; i < N; i++) begin
      c = cur[i*CW +: CW];
      d = dst[i*CW +: CW];
      if (!found && c != d) begin
        found = 1'b1;
        vc    = VC_W'(32'(d) % V);
        if (TORUS) begin
          // distance in the + direction around a ring of K nodes
          off = (d >= c) ? CW'(d - c) : CW'(32'(d) + K - 32'(c));
          port = (32'(off) <= K / 2) ? PW'(1 + 2 * i) : PW'(2 + 2 * i);
        end else begin
          port = (d > c) ? PW'(1 + 2 * i) : PW'(2 + 2 * i);
        end
      end
    end
  end
endmodule
