// tb_iodet_network_full -- the network at its default size.
//
// The 8 x 8 mesh with 2 VCs, 32-flit packets, two-packet queues and a
// 20-cycle routing time, exactly as the network's defaults give it. A few
// zero-load packets check the latency (hops*(R+2) + R + 1 cycles), then
// every node sends NPKT packets to random destinations under ejection
// stalls; tb_traffic checks integrity, in-order delivery and that all
// packets arrive.
module tb_iodet_network_full;
  import iodet_pkg::*;

  localparam int K = 8, N = 2, PKT = 32, R = 20;
  localparam int NN = K ** N;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [NN-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t [NN-1:0] inj_flit, ej_flit;
  int checks, failures, stalls, lat_cnt;
  longint lat_sum;
  logic done;

  iodet_network dut (
    .clk, .rst_n, .inj_valid, .inj_flit, .inj_ready,
    .ej_valid, .ej_flit, .ej_ready);

  tb_traffic #(.K(K), .N(N), .TORUS(1'b0), .PKT(PKT), .R(R), .NPKT(6),
               .RATE_PCT(20), .STALL_PCT(20), .NZL(4), .SEED(5)) trf (
    .clk, .rst_n, .inj_valid, .inj_flit, .inj_ready,
    .ej_valid, .ej_flit, .ej_ready,
    .checks, .failures, .inj_stalls(stalls), .done, .lat_sum, .lat_cnt);

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    $display("drained after %0d cycles, %0d injection stalls, mean latency %0d cycles over %0d packets",
             trf.cycle, stalls, lat_sum / (lat_cnt > 0 ? lat_cnt : 1), lat_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: traffic did not drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
