// tb_ncs_fifo: random push/pop traffic against a queue model; checks order,
// empty/full, count, and push-while-full-with-pop.
module tb_ncs_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [31:0] din, dout; logic [2:0] count;
  logic [31:0] q [$];
  int checks = 0, failures = 0;
  ncs_fifo #(.T(logic [31:0]), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout,
                                                 .empty, .full, .count);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || int'(count) != q.size() ||
          (q.size() > 0 && dout != q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d size=%0d count=%0d empty=%b full=%b", n, q.size(), count, empty, full);
      end
      pop  = (q.size() > 0) && ($urandom_range(0, 2) != 0);
      push = ((q.size() < DEPTH) || pop) && ($urandom_range(0, 1) != 0);
      din  = $urandom;
      @(posedge clk); #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
