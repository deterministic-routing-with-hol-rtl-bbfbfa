// tb_iodet_xbar_alloc -- crossbar allocation and datapath, and the number
// of crosspoints.
//
// First, iodet_pkg::crosspoints(n, v) -- the count of crosspoints the IODET
// crossbar instantiates -- is compared with the published IODET switching-
// element counts for tori of 2, 3, 4 and 6 dimensions with 2, 4, 6 and 8
// VCs. Then a mesh and a torus allocator are run by tb_xbar_harness, which
// checks every grant and every flit; both runs must see output-VC
// contention, and the torus run must see the bubble rule hold a packet back.
module tb_iodet_xbar_alloc;
  import iodet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c_m, f_m, k_m, b_m, c_t, f_t, k_t, b_t;
  logic d_m, d_t;

  tb_xbar_harness #(.TORUS(1'b0), .SEED(3)) h_mesh (
    .clk, .rst_n, .checks(c_m), .failures(f_m), .contention(k_m), .bubble_holds(b_m), .done(d_m));
  tb_xbar_harness #(.TORUS(1'b1), .SEED(7)) h_torus (
    .clk, .rst_n, .checks(c_t), .failures(f_t), .contention(k_t), .bubble_holds(b_t), .done(d_t));

  // IODET column: dimensions {2,3,4,6} x VCs {2,4,6,8}
  localparam int DIMS [4] = '{2, 3, 4, 6};
  localparam int VCS  [4] = '{2, 4, 6, 8};
  localparam int IODET [4][4] = '{'{40, 112, 216, 352},
                                  '{84, 264, 540, 912},
                                  '{144, 480, 1008, 1728},
                                  '{312, 1104, 2376, 4128}};

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (crosspoints(DIMS[i], VCS[j]) != IODET[i][j]) begin
          failures++;
          $display("crosspoints(%0d,%0d) = %0d, expected %0d", DIMS[i], VCS[j],
                   crosspoints(DIMS[i], VCS[j]), IODET[i][j]);
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d_m && d_t);
    checks += c_m + c_t + 3;
    failures += f_m + f_t;
    $display("contention mesh %0d torus %0d, bubble holds torus %0d", k_m, k_t, b_t);
    if (k_m == 0 || k_t == 0) failures++;
    if (b_t == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_m + c_t, failures + f_m + f_t + 1);
    $finish;
  end
endmodule
