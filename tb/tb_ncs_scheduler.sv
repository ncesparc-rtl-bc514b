// tb_ncs_scheduler: checks the round-robin choice against a reference for
// random ready vectors and every last-context value, including the case in
// which only the last context is ready and the case with none ready.
module tb_ncs_scheduler;
  import ncs_pkg::*;
  localparam int NCTX = 16;
  logic [NCTX-1:0] ready; ctx_t last, next; logic found;
  int checks = 0, failures = 0;
  ncs_scheduler #(.NCTX(NCTX)) dut (.ready, .last, .found, .next);
  initial begin
    for (int n = 0; n < 5000; n++) begin
      int e; bit ef;
      ready = (n % 5 == 0) ? NCTX'(1) << (n % NCTX) : NCTX'($urandom);
      if (n % 97 == 0) ready = '0;
      last  = ctx_t'($urandom_range(0, NCTX - 1));
      #1;
      ef = 0; e = int'(last);
      for (int k = 1; k <= NCTX && !ef; k++)
        if (ready[(int'(last) + k) % NCTX]) begin ef = 1; e = (int'(last) + k) % NCTX; end
      checks++;
      if (found !== ef || (ef && int'(next) != e)) begin
        failures++;
        if (failures < 10) $display("FAIL ready=%b last=%0d -> %0d/%b expected %0d/%b", ready, last, next, found, e, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
