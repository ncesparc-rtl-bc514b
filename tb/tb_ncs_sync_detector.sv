// tb_ncs_sync_detector: feeds instruction streams of two interleaved
// contexts: a standard busy-waiting loop must trigger exactly at the
// second execution of its load; a broken sequence, a load at another PC
// or a disabled context must not; counters of different contexts are
// independent.
module tb_ncs_sync_detector;
  import ncs_pkg::*;
  logic clk = 0, rst_n = 0, fire = 0, isld = 0, iscc = 0, isb = 0, en = 1, trig;
  ctx_t ctx; logic [31:0] pc; logic [2:0] cnt;
  int checks = 0, failures = 0, ntrig = 0;
  ncs_sync_detector #(.NCTX(4)) dut (.clk, .rst_n, .ex_fire(fire), .ex_ctx(ctx), .ex_pc(pc),
      .ex_is_load(isld), .ex_is_cc(iscc), .ex_is_bicc(isb), .enable(en), .trigger(trig),
      .count_of_ex(cnt));
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  // kind: 0 load, 1 cc, 2 bicc, 3 other
  task automatic ex(input int c, input int kind, input logic [31:0] p, input bit expect_trig);
    @(negedge clk);
    fire = 1; ctx = ctx_t'(c); pc = p;
    isld = (kind == 0); iscc = (kind == 1); isb = (kind == 2);
    #1; chk(trig == expect_trig, $sformatf("ctx %0d kind %0d pc %h: trigger %b", c, kind, p, trig));
    @(posedge clk); #1; fire = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // standard loop in context 1, interleaved with context 2 noise
    ex(1, 0, 32'h40, 0); ex(2, 3, 32'h80, 0);
    ex(1, 1, 32'h44, 0); ex(1, 2, 32'h48, 0); ex(2, 0, 32'h90, 0); ex(1, 3, 32'h4c, 0);
    ex(1, 0, 32'h40, 1);                      // second iteration: trigger
    ex(1, 1, 32'h44, 0);                      // counter was cleared
    // broken loop: other instruction in place of the test
    ex(3, 0, 32'h40, 0); ex(3, 3, 32'h44, 0); ex(3, 2, 32'h48, 0); ex(3, 3, 32'h4c, 0); ex(3, 0, 32'h40, 0);
    // load at another PC
    ex(0, 0, 32'h40, 0); ex(0, 1, 32'h44, 0); ex(0, 2, 32'h48, 0); ex(0, 3, 32'h4c, 0); ex(0, 0, 32'h50, 0);
    // context 2 loop completes with disable, then enabled
    en = 0;
    ex(2, 0, 32'h40, 0); ex(2, 1, 32'h44, 0); ex(2, 2, 32'h48, 0); ex(2, 3, 32'h4c, 0); ex(2, 0, 32'h40, 0);
    en = 1;
    ex(2, 1, 32'h44, 0); ex(2, 2, 32'h48, 0); ex(2, 3, 32'h4c, 0); ex(2, 0, 32'h40, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
