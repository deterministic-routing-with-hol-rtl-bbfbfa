// tb_iodet_input_unit -- routing delay, route result, flit order, credits.
//
// Unit at node (1,1) of a 4 x 4 mesh, 2 VCs, 8-flit queues (two 4-flit
// packets), routing time R = 5. The bench sends packets on both VCs through
// in_link, interleaving the VCs flit by flit, and plays the crossbar: it
// grants a request after a random wait and pops body flits with random
// gaps. Checked: the request appears exactly R cycles after its head flit
// became the queue front (first cycle counted as 1), never earlier; the
// requested port and VC are the IODET route of the destination; popped
// flits come out per VC in the order sent; every pop returns exactly one
// credit on that VC one cycle later; `free` matches the occupancy.
module tb_iodet_input_unit;
  import iodet_pkg::*;

  localparam int K = 4, N = 2, V = 2, NVC = 2, PKT = 4, DEPTH = 2 * PKT, R = 5;
  localparam int PW = 3, FW = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t in_link;
  credit_t credit_out;
  logic [NVC-1:0][FW-1:0] free;
  logic [NVC-1:0] req_valid, front_valid, grant, pop;
  logic [NVC-1:0][PW-1:0] req_port;
  logic [NVC-1:0][VC_W-1:0] req_vc;
  flit_t [NVC-1:0] front;

  iodet_input_unit #(.K(K), .N(N), .V(V), .TORUS(1'b0), .NVC(NVC), .DEPTH(DEPTH),
                     .ROUTE_CYCLES(R)) dut (
    .clk, .rst_n, .my_id(4'b0101), .in_link, .credit_out, .free,
    .req_valid, .req_port, .req_vc, .front, .front_valid, .grant, .pop);

  int checks = 0, failures = 0;
  flit_t sent_q [NVC][$];
  int    inq    [NVC];          // flits in the queue (model)
  int    front_age [NVC];       // cycles the current head has been at the front
  int    exp_port [NVC][$], exp_vc [NVC][$];
  logic [NVC-1:0] pop_d;
  int    wait_grant [NVC];
  bit    bound [NVC];
  int    pkts_done = 0, delayed_grants = 0;

  // destinations (x,y) and the expected route from (1,1)
  function automatic void dest(input int idx, output int x, output int y,
                               output int port, output int vc);
    case (idx % 5)
      0: begin x = 3; y = 1; port = 1; vc = 1; end   // +x, dst x=3
      1: begin x = 0; y = 1; port = 2; vc = 0; end   // -x
      2: begin x = 1; y = 2; port = 3; vc = 0; end   // +y, dst y=2
      3: begin x = 1; y = 0; port = 4; vc = 0; end   // -y
      default: begin x = 1; y = 1; port = 0; vc = 0; end  // local
    endcase
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("%0t: %s", $time, msg);
    end
  endtask

  // sender: packets alternate VCs, one flit per cycle, only when the model
  // says there is room (this is what the upstream credits guarantee)
  int snd_pkt [NVC], snd_flit [NVC];
  initial begin
    in_link = '0; grant = '0; pop = '0;
    for (int v = 0; v < NVC; v++) begin
      snd_pkt[v] = 0; snd_flit[v] = 0; inq[v] = 0; front_age[v] = 0;
      wait_grant[v] = 0; bound[v] = 0;
    end
    pop_d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  always @(negedge clk) if (rst_n) begin
    int v;
    // ---- check credits from last cycle's pops, and free ----
    for (int c = 0; c < NVC; c++) begin
      chk(credit_out[c] == pop_d[c], $sformatf("credit vc%0d %0d vs pop %0d", c, credit_out[c], pop_d[c]));
      chk(int'(free[c]) == DEPTH - inq[c], $sformatf("free vc%0d %0d model %0d", c, free[c], DEPTH - inq[c]));
    end
    // ---- crossbar model ----
    for (int c = 0; c < NVC; c++) begin
      grant[c] = 1'b0;
      pop[c]   = 1'b0;
      if (front_valid[c] && !bound[c]) begin
        front_age[c]++;
        chk(req_valid[c] == (front_age[c] >= R),
            $sformatf("vc%0d req %0d at age %0d", c, req_valid[c], front_age[c]));
        if (req_valid[c]) begin
          chk(int'(req_port[c]) == exp_port[c][0] && int'(req_vc[c]) == exp_vc[c][0],
              $sformatf("vc%0d route %0d/%0d expected %0d/%0d", c, req_port[c], req_vc[c],
                        exp_port[c][0], exp_vc[c][0]));
          if (wait_grant[c] == 0) begin
            grant[c] = 1'b1;
            pop[c]   = 1'b1;
            bound[c] = !front[c].tail;
            void'(exp_port[c].pop_front());
            void'(exp_vc[c].pop_front());
            wait_grant[c] = $urandom_range(3);
            front_age[c] = 0;
          end else begin
            wait_grant[c]--;
            delayed_grants++;
          end
        end
      end else if (front_valid[c] && bound[c] && $urandom_range(3) != 0) begin
        pop[c] = 1'b1;
        if (front[c].tail) bound[c] = 0;
      end
      if (pop[c]) begin
        chk(front[c] == sent_q[c][0], $sformatf("vc%0d popped %h expected %h", c, front[c], sent_q[c][0]));
        void'(sent_q[c].pop_front());
        inq[c]--;
        if (front[c].tail) pkts_done++;
      end
    end
    pop_d = pop;
    // ---- sender ----
    in_link = '0;
    v = $urandom_range(NVC - 1);
    if (inq[v] < DEPTH && snd_pkt[v] < 12) begin
      int x, y, port, vcx;
      flit_t f;
      dest(snd_pkt[v] * 2 + v, x, y, port, vcx);
      f.head = (snd_flit[v] == 0);
      f.tail = (snd_flit[v] == PKT - 1);
      f.data = f.head ? {16'h00aa, 12'h0, 2'(y), 2'(x)} : {8'(v), 8'(snd_flit[v]), 16'(snd_pkt[v])};
      in_link = '{valid: 1'b1, vc: VC_W'(v), flit: f};
      sent_q[v].push_back(f);
      if (f.head) begin exp_port[v].push_back(port); exp_vc[v].push_back(vcx); end
      inq[v]++;
      if (f.tail) begin snd_flit[v] = 0; snd_pkt[v]++; end
      else snd_flit[v]++;
    end
    if (pkts_done == 2 * 12) begin
      chk(delayed_grants > 0, "no delayed grant exercised");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired, %0d packets done", pkts_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
