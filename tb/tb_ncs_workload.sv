// tb_ncs_workload: the inner-product workload on 1, 2, 4 and 8 contexts.
//
// Four processors, built with 1, 2, 4 and 8 hardware contexts and the 1 KB
// instruction cache of the evaluation setup (all other parameters at their
// defaults), run the inner product of two NELEM-element integer vectors side
// by side (see ncs_ip_system). Each configuration is run with the vectors
// split into contiguous slices and interleaved, at memory latencies of 10,
// 30 and 100 cycles, with Processor Consistency and fetch priority in the
// memory interface. The memory model has no data cache, so every load pays
// the full latency. Checked: every result correct; at latencies of 30 and
// 100 cycles, more contexts never take more cycles than one context, and
// eight contexts take fewer cycles than one. A table of cycles,
// cycles per instruction, switches and idle cycles is printed.
module tb_ncs_workload;
  localparam int NELEM = 8192;          // the evaluation size
  localparam int NCFG  = 4;
  localparam int NCTX_OF [NCFG] = '{1, 2, 4, 8};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   start = 1'b0, contiguous = 1'b1;
  int     latency = 10;
  logic   done [NCFG];
  logic   ok [NCFG];
  longint cycles [NCFG], instrs [NCFG], n_idle [NCFG];
  int     n_sw_miss [NCFG], n_sw_dep [NCFG], n_sw_sync [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_sys
    ncs_ip_system #(.NCTX(NCTX_OF[g])) u_sys (
      .clk, .start, .contiguous, .pc_mode(1'b1), .if_prio(1'b1), .latency, .nelem(NELEM),
      .done(done[g]), .ok(ok[g]), .cycles(cycles[g]), .instrs(instrs[g]),
      .n_sw_miss(n_sw_miss[g]), .n_sw_dep(n_sw_dep[g]), .n_sw_sync(n_sw_sync[g]),
      .n_idle(n_idle[g]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit all_done();
    for (int g = 0; g < NCFG; g++) if (!done[g]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int lats [3] = '{10, 30, 100};
    for (int d = 0; d < 2; d++) begin
      foreach (lats[li]) begin
        contiguous = (d == 0);
        latency = lats[li];
        @(posedge clk); start = 1'b1;
        do @(posedge clk); while (!all_done());
        $display("%s, memory latency %0d, %0d elements:", contiguous ? "contiguous" : "interleaved",
                 latency, NELEM);
        $display("  contexts   cycles    CPI   sw-miss  sw-dep  sw-synch  idle-cycles");
        for (int g = 0; g < NCFG; g++) begin
          $display("  %8d %8d %6.2f %8d %7d %9d %12d", NCTX_OF[g], cycles[g],
                   real'(cycles[g]) / real'(instrs[g]), n_sw_miss[g], n_sw_dep[g], n_sw_sync[g],
                   n_idle[g]);
          check(ok[g], $sformatf("result with %0d contexts, latency %0d", NCTX_OF[g], latency));
          if (latency >= 30)
            check(cycles[g] <= cycles[0],
                  $sformatf("%0d contexts slower than one at latency %0d", NCTX_OF[g], latency));
        end
        if (latency >= 30)
          check(cycles[NCFG-1] < cycles[0], $sformatf("8 contexts no faster at latency %0d", latency));
        start = 1'b0;
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
