// iodet_flit_fifo -- one virtual-channel queue of flits.
//
// A circular buffer of DEPTH flits with a registered occupancy count. The
// switch sizes every VC queue, input and output alike, to two packets
// (DEPTH = 2 * packet length), as the evaluated switch does. The front flit
// is visible combinationally while `valid` is high; `pop` removes it and
// `push` writes `din` at the end of the same cycle. A push and a pop may
// happen in the same cycle. `free` is DEPTH minus the occupancy; the switch
// uses it for cut-through (whole packet must fit) and bubble decisions.
// Pushing into a full queue or popping an empty one is an error (asserted);
// the credit and allocation logic around the queue never does either.
module iodet_flit_fifo
  import iodet_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  flit_t                    din,
  input  logic                     pop,
  output flit_t                    dout,
  output logic                     valid,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  assign dout  = mem[rd_ptr];
  assign valid = (count != '0);
  assign free  = CW'(DEPTH) - count;

  always_ff @(posedge clk) begin
    if (rst_n) a_no_overflow: assert (!push || pop || count != CW'(DEPTH));
  end
  always_ff @(posedge clk) begin
    if (rst_n) a_no_underflow: assert (!pop || valid);
  end
endmodule
