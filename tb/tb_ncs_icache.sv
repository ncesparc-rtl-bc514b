// tb_ncs_icache: checks that a cold cache misses, that a line refilled
// beat by beat hits for all of its words with the right data, that the line
// is not valid until its last beat, that a conflicting line (same index,
// other tag) evicts it, and that the full 16 KB can be resident at once.
module tb_ncs_icache;
  localparam int SIZE = 16384, LINE = 32;
  logic clk = 0, rst_n = 0, hit, fwe = 0, ffirst = 0, flast = 0;
  logic [31:0] addr, instr, faddr, fdata;
  int checks = 0, failures = 0;
  ncs_icache #(.SIZE_BYTES(SIZE), .LINE_BYTES(LINE)) dut (.clk, .rst_n, .addr, .hit, .instr,
      .fill_we(fwe), .fill_first(ffirst), .fill_last(flast), .fill_addr(faddr), .fill_data(fdata));
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  function automatic logic [31:0] pat(input logic [31:0] a); return a ^ 32'hA5A5_0000; endfunction
  task automatic fill(input logic [31:0] base);
    for (int w = 0; w < LINE / 4; w++) begin
      @(negedge clk);
      fwe = 1; ffirst = (w == 0); flast = (w == LINE / 4 - 1);
      faddr = base + 4 * w; fdata = pat(base + 4 * w);
      addr = base; #1;
      if (w > 0) chk(!hit, "line valid before its last beat");
    end
    @(negedge clk); fwe = 0; ffirst = 0; flast = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); addr = 32'h100; #1; chk(!hit, "cold miss");
    fill(32'h100);
    for (int w = 0; w < 8; w++) begin addr = 32'h100 + 4 * w; #1; chk(hit && instr == pat(addr), "hit after fill"); end
    addr = 32'h120; #1; chk(!hit, "next line still misses");
    fill(32'h100 + SIZE);                      // same index, other tag
    addr = 32'h100; #1; chk(!hit, "evicted by conflict");
    addr = 32'h100 + SIZE + 4; #1; chk(hit && instr == pat(addr), "conflicting line hits");
    for (int l = 0; l < SIZE / LINE; l++) fill(32'h10000 + l * LINE);
    for (int l = 0; l < SIZE / LINE; l++) begin
      addr = 32'h10000 + l * LINE + 4 * (l % 8); #1;
      chk(hit && instr == pat(addr), $sformatf("line %0d resident", l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
