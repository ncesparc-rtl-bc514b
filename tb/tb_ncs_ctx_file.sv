// tb_ncs_ctx_file: checks reset state (context 0 ready at the reset PC,
// others unmapped, one group of windows per context), E-stage writes of
// icc/Y/PSR/WIM/TBR, the D-stage CWP update, status ASR writes, blocking
// with PC/nPC save, and that a wake-up releases a context only when its
// reason (and, for a dependence, its register) matches; trap entry
// (CWP-1, S, PS, ET, TBR.tt), RETT (S from PS, ET) and a redirect that
// leaves the context ready.
module tb_ncs_ctx_file;
  import ncs_pkg::*;
  localparam int NCTX = 4;
  logic clk = 0, rst_n = 0;
  ctx_state_t st [NCTX];
  logic cwp_we = 0, e_icc_we = 0, e_y_we = 0, e_psr_we = 0, e_wim_we = 0, e_tbr_we = 0;
  logic asr_we = 0, wake_we = 0, blk_we = 0, trap_we = 0, rett_we = 0;
  logic [7:0] trap_tt;
  ctx_t cwp_ctx, e_ctx, asr_ctx, wake_ctx, blk_ctx;
  logic [4:0] cwp_val; icc_t e_icc; logic [31:0] e_y, e_psr, e_wim, e_tbr, asr_val, blk_pc, blk_npc;
  wait_e wake_why, blk_why; preg_t wake_reg, blk_reg;
  int checks = 0, failures = 0;
  ncs_ctx_file #(.NCTX(NCTX), .RESET_PC(32'h100)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic tick(); @(posedge clk); #1;
    cwp_we = 0; e_icc_we = 0; e_y_we = 0; e_psr_we = 0; e_wim_we = 0; e_tbr_we = 0;
    asr_we = 0; wake_we = 0; blk_we = 0; trap_we = 0; rett_we = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    for (int k = 0; k < NCTX; k++) begin
      chk(st[k].pc == 32'h100 && st[k].npc == 32'h104, "reset PC");
      chk(st[k].mapped == (k == 0) && st[k].waiting == (k != 0), "reset status");
      chk(st[k].cwp == 5'(k * 8 + 7), $sformatf("ctx %0d CWP %0d", k, st[k].cwp));
      chk(st[k].wim == 32'd1 << (k * 8), "reset WIM");
    end
    e_ctx = 1; e_icc_we = 1; e_icc = 4'b1010; e_y_we = 1; e_y = 32'h55; tick();
    chk(st[1].icc == 4'b1010 && st[1].y == 32'h55 && st[0].y == 0, "icc and Y of one context");
    e_ctx = 2; e_psr_we = 1; e_psr = 32'h00B0_00A3; cwp_we = 1; cwp_ctx = 2; cwp_val = 5'd9; tick();
    chk(st[2].icc == 4'hB && st[2].cwp == 5'd3 && st[2].s && st[2].et, "WRPSR wins over SAVE");
    cwp_we = 1; cwp_ctx = 3; cwp_val = 5'd30; e_ctx = 3; e_wim_we = 1; e_wim = 32'h8; e_tbr_we = 1; e_tbr = 32'h1234_5678; tick();
    chk(st[3].cwp == 5'd30 && st[3].wim == 32'h8 && st[3].tbr == 32'h1234_5000, "CWP, WIM, TBR");
    // start context 1 by software
    asr_we = 1; asr_ctx = 1; asr_val = 32'h4800_0000; tick();
    chk(st[1].mapped && !st[1].waiting && st[1].dis == 4'b0010, "status ASR write");
    // block on a dependence, wrong wake ignored, right wake releases
    blk_we = 1; blk_ctx = 1; blk_pc = 32'h200; blk_npc = 32'h300; blk_why = W_DEP; blk_reg = 10'd40; tick();
    chk(st[1].waiting && st[1].pc == 32'h200 && st[1].npc == 32'h300, "block saves PC/nPC");
    wake_we = 1; wake_ctx = 1; wake_why = W_DEP; wake_reg = 10'd41; tick();
    chk(st[1].waiting, "wake for another register ignored");
    wake_we = 1; wake_ctx = 1; wake_why = W_IFETCH; wake_reg = 10'd40; tick();
    chk(st[1].waiting, "wake for another reason ignored");
    wake_we = 1; wake_ctx = 1; wake_why = W_DEP; wake_reg = 10'd40; tick();
    chk(!st[1].waiting && st[1].why == W_NONE, "matching wake releases");
    // block and wake in the same cycle: block wins
    blk_we = 1; blk_ctx = 0; blk_why = W_SYNC; wake_we = 1; wake_ctx = 0; wake_why = W_SYNC; tick();
    chk(st[0].waiting && st[0].why == W_SYNC, "block wins over a same-cycle wake");
    wake_we = 1; wake_ctx = 0; wake_why = W_SYNC; tick();
    chk(!st[0].waiting, "synch wake");
    // trap entry in context 2 (CWP 3, S 1, ET 1 after the WRPSR above)
    e_ctx = 2; e_psr_we = 1; e_psr = 32'h0000_0023; tick();      // S=0, PS=0, ET=1, CWP=3
    e_ctx = 2; trap_we = 1; trap_tt = 8'h05; tick();
    chk(st[2].cwp == 5'd2 && st[2].s && !st[2].ps && !st[2].et && st[2].tbr[11:0] == 12'h050,
        "trap entry");
    e_ctx = 2; rett_we = 1; cwp_we = 1; cwp_ctx = 2; cwp_val = 5'd3; tick();
    chk(st[2].cwp == 5'd3 && !st[2].s && st[2].et, "RETT");
    blk_we = 1; blk_ctx = 2; blk_pc = 32'h3050; blk_npc = 32'h3054; blk_why = W_NONE; tick();
    chk(st[2].pc == 32'h3050 && st[2].npc == 32'h3054 && !st[2].waiting, "redirect keeps it ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
