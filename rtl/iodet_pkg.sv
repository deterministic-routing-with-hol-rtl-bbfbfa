// iodet_pkg -- types and constants shared by the IODET switch and network.
//
// A packet is a fixed number of flits. The head flit carries the destination
// node identifier in its low data bits (one CW-bit field per dimension,
// dimension 0 in the least significant field) and the source identifier in
// bits [31:16]. Every switch port has a port number: 0 is the local node
// (injection in, ejection out); 1+2d is dimension d travelling in the +
// direction and 2+2d is dimension d travelling in the - direction. A packet
// that arrives on input port p and keeps going the same way leaves on output
// port p, so "continue in the same dimension" is simply "input port ==
// output port".
//
// xbar_allowed() is the IODET connection rule of the VC-level crossbar. A
// packet that stays in its dimension keeps its destination component, so it
// keeps its VC: input VC v connects only to output VC v of the same port.
// With dimension-order routing a packet can otherwise only turn to a higher
// dimension (either direction, any VC) or leave to the node. The injection
// port (one queue) reaches every VC of every network port; the ejection port
// has one queue. Counting the allowed pairs gives the IODET column of the
// switching-element comparison for tori: 2V^2n^2 + 4Vn - 2V(V-1)n. The
// rule itself follows the routing algorithm; the exact counting convention
// (single-queue local ports, no U-turns) is this design's reading of that
// comparison, and crosspoints() reproduces all of its IODET entries.
package iodet_pkg;

  localparam int DATA_W = 32;     // payload bits per flit
  localparam int VMAX   = 8;      // largest supported VC count
  localparam int VC_W   = 3;      // bits to name a VC (VMAX = 2**VC_W)

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  // One link direction: at most one flit per cycle, tagged with its VC.
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
    flit_t           flit;
  } link_t;

  // Credit return: one bit per VC, each worth one flit of buffer space.
  typedef logic [VMAX-1:0] credit_t;

  // Dimension a network port belongs to (port 0 has none).
  function automatic int port_dim(input int p);
    return (p - 1) / 2;
  endfunction

  // Is there a crosspoint from input (ip, iv) to output (op, ov)?
  function automatic bit xbar_allowed(input int ip, input int iv,
                                      input int op, input int ov);
    if (ip == 0) return (iv == 0) && (op != 0);          // injection
    if (op == 0) return (ov == 0);                        // ejection
    if (op == ip) return (ov == iv);                      // same ring: same VC
    return port_dim(op) > port_dim(ip);                   // turn to higher dim
  endfunction

  // Number of crosspoints of a switch with n dimensions and v VCs.
  function automatic int crosspoints(input int n, input int v);
    int cnt;
    cnt = 0;
    for (int ip = 0; ip <= 2 * n; ip++)
      for (int iv = 0; iv < ((ip == 0) ? 1 : v); iv++)
        for (int op = 0; op <= 2 * n; op++)
          for (int ov = 0; ov < ((op == 0) ? 1 : v); ov++)
            if (xbar_allowed(ip, iv, op, ov)) cnt++;
    return cnt;
  endfunction

endpackage
