// iodet_rr_arb -- round-robin arbiter with one-hot grant.
//
// Grants the first requester at or after the priority pointer, searching
// upward and wrapping. When `advance` is high and a grant is given, the
// pointer moves to just after the winner, so every requester is served in
// turn. Combinational grant, registered pointer. The fairness policy is
// this design's choice; the switch only needs some fair allocator.
module iodet_rr_arb #(
  parameter int NREQ = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NREQ-1:0] req,
  input  logic            advance,
  output logic [NREQ-1:0] gnt
);
  localparam int IW = (NREQ > 1) ? $clog2(NREQ) : 1;
  logic [IW-1:0] ptr;
  logic [IW-1:0] win;

  always_comb begin
    logic done;
    gnt  = '0;
    win  = '0;
    done = 1'b0;
    for (int k = 0; k < NREQ; k++) begin
      int idx;
      idx = (32'(ptr) + k) % NREQ;
      if (!done && req[idx]) begin
        gnt[idx] = 1'b1;
        win      = IW'(idx);
        done     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && req != '0)
      ptr <= (32'(win) == NREQ - 1) ? '0 : win + 1'b1;
  end
endmodule
