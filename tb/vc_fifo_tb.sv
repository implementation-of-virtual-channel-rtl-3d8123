// Testbench for vc_fifo: random pushes and pops that respect full/empty,
// checked against a queue model (front flit, empty, full, count), including
// simultaneous push and pop and the wrap-around of both pointers.
module vc_fifo_tb;
  localparam int unsigned WIDTH = 10, DEPTH = 4;

  logic clk = 0, rst, push, pop, empty, full;
  logic [WIDTH-1:0] din, dout;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];

  vc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk); #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int saw_full = 0;
    rst = 1; push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      #1;
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH)
          || int'(count) != model.size()) begin
        failures++;
        $display("cycle %0d: status empty=%b full=%b count=%0d, model %0d", cyc, empty, full, count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (dout != model[0]) begin failures++; $display("front %h expected %h", dout, model[0]); end
      end
      if (full) saw_full++;
      push = (model.size() < DEPTH) && ($urandom % 2 == 1);
      pop  = (model.size() > 0) && ($urandom % 2 == 1);
      din  = WIDTH'($urandom);
      @(posedge clk); #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
      push = 0; pop = 0;
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
