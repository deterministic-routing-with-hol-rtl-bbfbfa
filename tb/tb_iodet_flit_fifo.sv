// tb_iodet_flit_fifo -- random push/pop against a queue model.
//
// A DEPTH = 8 queue is pushed and popped at random (never pushed when full
// unless popped in the same cycle, never popped when empty). Every cycle
// the front flit, `valid` and `free` are compared with a SystemVerilog
// queue holding what should be inside. Some phases fill it completely and
// drain it completely.
module tb_iodet_flit_fifo;
  import iodet_pkg::*;

  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic push, pop, valid;
  flit_t din, dout;
  logic [$clog2(DEPTH+1)-1:0] free;
  int checks = 0, failures = 0, fulls = 0;
  flit_t model[$];

  iodet_flit_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .valid, .free);

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int bias;
      @(negedge clk);
      // compare state
      checks++;
      if (valid != (model.size() != 0) || int'(free) != DEPTH - model.size() ||
          (model.size() != 0 && dout != model[0])) begin
        failures++;
        if (failures < 10) $display("cycle %0d: valid %0d free %0d dout %h, model size %0d",
                                    cyc, valid, free, dout, model.size());
      end
      if (model.size() == DEPTH) fulls++;
      bias = ((cyc / 200) % 2 == 0) ? 70 : 30;   // alternate filling and draining
      pop  = (model.size() != 0) && ($urandom_range(99) >= bias);
      push = ($urandom_range(99) < bias) && (model.size() < DEPTH || pop);
      din  = flit_t'({$urandom(), $urandom()});
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("queue never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
