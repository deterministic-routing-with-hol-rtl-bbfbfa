// tb_iodet_uniform_8x8 -- uniform traffic on the 8 x 8 mesh and the 8 x 8
// torus at full size.
//
// Both networks use the default switch (2 VCs, 32-flit packets, two-packet
// queues, 20-cycle routing); the torus sets TORUS = 1. Every node generates
// 32-flit packets to uniformly random destinations at 0.1 flits/cycle/node
// (31 packets per 10,000 cycles) into a source queue, ejection never
// stalls, and latency is measured from generation to the tail's arrival.
// tb_traffic checks integrity, in-order delivery and that all arrive; the
// bench reports mean latency and the accepted traffic over a 6,000-cycle
// window in which every source is still generating, and fails if that
// falls short of 90 % of the offered load (both networks are expected to be
// below saturation there).
module tb_iodet_uniform_8x8;
  import iodet_pkg::*;

  localparam int K = 8, N = 2, PKT = 32, R = 20, NN = K ** N;
  localparam int NPKT = 40, GEN = 31;
  localparam int WARM = 600, WIN = 6000;   // measurement window after phase 2 starts

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [NN-1:0] iv_m, ir_m, ev_m, er_m, iv_t, ir_t, ev_t, er_t;
  flit_t [NN-1:0] if_m, ef_m, if_t, ef_t;
  int c_m, f_m, s_m, n_m, c_t, f_t, s_t, n_t;
  longint l_m, l_t;
  logic d_m, d_t;

  iodet_network dut_m (
    .clk, .rst_n, .inj_valid(iv_m), .inj_flit(if_m), .inj_ready(ir_m),
    .ej_valid(ev_m), .ej_flit(ef_m), .ej_ready(er_m));
  iodet_network #(.TORUS(1'b1)) dut_t (
    .clk, .rst_n, .inj_valid(iv_t), .inj_flit(if_t), .inj_ready(ir_t),
    .ej_valid(ev_t), .ej_flit(ef_t), .ej_ready(er_t));

  tb_traffic #(.K(K), .N(N), .TORUS(1'b0), .PKT(PKT), .R(R), .NPKT(NPKT),
               .STALL_PCT(0), .NZL(2), .SEED(31), .GEN_PER_10K(GEN)) trf_m (
    .clk, .rst_n, .inj_valid(iv_m), .inj_flit(if_m), .inj_ready(ir_m),
    .ej_valid(ev_m), .ej_flit(ef_m), .ej_ready(er_m),
    .checks(c_m), .failures(f_m), .inj_stalls(s_m), .done(d_m), .lat_sum(l_m), .lat_cnt(n_m));
  tb_traffic #(.K(K), .N(N), .TORUS(1'b1), .PKT(PKT), .R(R), .NPKT(NPKT),
               .STALL_PCT(0), .NZL(2), .SEED(37), .GEN_PER_10K(GEN)) trf_t (
    .clk, .rst_n, .inj_valid(iv_t), .inj_flit(if_t), .inj_ready(ir_t),
    .ej_valid(ev_t), .ej_flit(ef_t), .ej_ready(er_t),
    .checks(c_t), .failures(f_t), .inj_stalls(s_t), .done(d_t), .lat_sum(l_t), .lat_cnt(n_t));

  int checks, failures;
  int start_m, start_t, r0_m, r0_t, r1_m, r1_t;

  initial begin
    checks = 0; failures = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (!trf_m.zero_load && !trf_t.zero_load);
    start_m = trf_m.cycle; start_t = trf_t.cycle;
    repeat (WARM) @(posedge clk);
    r0_m = trf_m.received; r0_t = trf_t.received;
    repeat (WIN) @(posedge clk);
    r1_m = trf_m.received; r1_t = trf_t.received;
    wait (d_m && d_t);
    checks = c_m + c_t + 2;
    failures = f_m + f_t;
    begin
      real acc_m, acc_t, off;
      off   = real'(GEN) * PKT / 10000.0;
      acc_m = real'((r1_m - r0_m) * PKT) / real'(NN * WIN);
      acc_t = real'((r1_t - r0_t) * PKT) / real'(NN * WIN);
      $display("offered %0.3f flits/cycle/node", off);
      $display("mesh : mean latency %0d cycles, accepted %0.3f flits/cycle/node",
               l_m / (n_m > 0 ? n_m : 1), acc_m);
      $display("torus: mean latency %0d cycles, accepted %0.3f flits/cycle/node",
               l_t / (n_t > 0 ? n_t : 1), acc_t);
      if (acc_m < 0.9 * off) failures++;
      if (acc_t < 0.9 * off) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: traffic did not drain");
    $display("TB_RESULT checks=%0d failures=%0d", c_m + c_t, f_m + f_t + 1);
    $finish;
  end
endmodule
