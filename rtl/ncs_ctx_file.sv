// ncs_ctx_file: the per-context registers of NCESPARC+.
//
// Each hardware context has its own PC and nPC (the restart point of a
// suspended thread; nPC lets a thread suspended in a delay slot resume
// correctly), PSR (here the icc, CWP, S, PS and ET fields), WIM, TBR, Y, and
// a status Ancillary State Register: bit 31 waiting, bit 30 mapped, bits
// 29..26 disable switching altogether / on instruction cache misses / on load
// dependences / on synchronization loops. All of this is the document's. The
// wait reason and the register a dependence waits on are this design's
// additions, so that a completing memory operation wakes only the thread
// that is waiting for it.
//
// Every field is visible on st[]; updates happen at the rising edge, in this
// order of precedence (later wins): E-stage register writes and the D-stage
// CWP update (SAVE/RESTORE; a WRPSR of the same cycle wins), software writes
// of a status ASR, wake-ups from the Memory Interface Unit, and the block of
// the running thread at a context switch (which also saves its PC/nPC).
// A block with reason W_NONE only redirects the context (a trap): its PC
// and nPC are replaced and it stays ready.
//
// Traps (SPARC V8): trap_we decrements CWP, sets S, copies S to PS, clears
// ET and records the trap type in TBR[11:4]; rett_we copies PS to S and
// sets ET (the CWP increment of RETT comes through the D-stage port).
//
// Reset: every context starts at RESET_PC with S = 1, ET = 0, and its CWP at
// the top of its own group of NWIN/NCTX windows and the WIM bit on the
// group's bottom window, which is kept free for trap handlers. A context
// therefore has NWIN/NCTX - 1 windows for procedure calls before a
// window_overflow trap. Context 0 is mapped and ready; the others are unmapped until
// software starts them by writing their status ASR. These reset values are
// this design's choice.
module ncs_ctx_file
  import ncs_pkg::*;
#(
  parameter int          NCTX     = 16,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  output ctx_state_t  st [NCTX],
  // D stage: SAVE / RESTORE
  input  logic        cwp_we,
  input  ctx_t        cwp_ctx,
  input  logic [4:0]  cwp_val,
  // E stage writes, all for context e_ctx
  input  ctx_t        e_ctx,
  input  logic        e_icc_we,
  input  icc_t        e_icc,
  input  logic        e_y_we,
  input  logic [31:0] e_y,
  input  logic        e_psr_we,
  input  logic [31:0] e_psr,
  input  logic        e_wim_we,
  input  logic [31:0] e_wim,
  input  logic        e_tbr_we,
  input  logic [31:0] e_tbr,
  input  logic        trap_we,
  input  logic [7:0]  trap_tt,
  input  logic        rett_we,
  // software write of a status ASR (bits 31..26)
  input  logic        asr_we,
  input  ctx_t        asr_ctx,
  input  logic [31:0] asr_val,
  // wake-up from the Memory Interface Unit
  input  logic        wake_we,
  input  ctx_t        wake_ctx,
  input  wait_e       wake_why,
  input  preg_t       wake_reg,
  // block at a context switch
  input  logic        blk_we,
  input  ctx_t        blk_ctx,
  input  logic [31:0] blk_pc,
  input  logic [31:0] blk_npc,
  input  wait_e       blk_why,
  input  preg_t       blk_reg
);
  localparam int WPC = (NCTX > 0 && NCTX <= NWIN) ? NWIN / NCTX : 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCTX; k++) begin
        st[k].pc       <= RESET_PC;
        st[k].npc      <= RESET_PC + 32'd4;
        st[k].icc      <= '0;
        st[k].cwp      <= 5'((k * WPC + WPC - 1) % NWIN);
        st[k].s        <= 1'b1;
        st[k].ps       <= 1'b1;
        st[k].et       <= 1'b0;
        st[k].wim      <= 32'd1 << ((k * WPC) % NWIN);
        st[k].tbr      <= '0;
        st[k].y        <= '0;
        st[k].waiting  <= (k != 0);
        st[k].mapped   <= (k == 0);
        st[k].dis      <= '0;
        st[k].why      <= W_NONE;
        st[k].wait_reg <= '0;
      end
    end else begin
      if (cwp_we) st[cwp_ctx].cwp <= cwp_val;
      if (e_icc_we) st[e_ctx].icc <= e_icc;
      if (e_y_we)   st[e_ctx].y   <= e_y;
      if (e_psr_we) begin
        st[e_ctx].icc <= e_psr[23:20];
        st[e_ctx].s   <= e_psr[7];
        st[e_ctx].ps  <= e_psr[6];
        st[e_ctx].et  <= e_psr[5];
        st[e_ctx].cwp <= e_psr[4:0];
      end
      if (e_wim_we) st[e_ctx].wim <= e_wim;
      if (e_tbr_we) st[e_ctx].tbr <= {e_tbr[31:12], st[e_ctx].tbr[11:0]};
      if (trap_we) begin
        st[e_ctx].cwp       <= st[e_ctx].cwp - 5'd1;
        st[e_ctx].s         <= 1'b1;
        st[e_ctx].ps        <= st[e_ctx].s;
        st[e_ctx].et        <= 1'b0;
        st[e_ctx].tbr[11:0] <= {trap_tt, 4'd0};
      end
      if (rett_we) begin
        st[e_ctx].s  <= st[e_ctx].ps;
        st[e_ctx].et <= 1'b1;
      end
      if (asr_we) begin
        st[asr_ctx].waiting <= asr_val[31];
        st[asr_ctx].mapped  <= asr_val[30];
        st[asr_ctx].dis     <= asr_val[29:26];
        st[asr_ctx].why     <= asr_val[31] ? W_SW : W_NONE;
      end
      if (wake_we && st[wake_ctx].waiting && st[wake_ctx].why == wake_why &&
          (wake_why != W_DEP || st[wake_ctx].wait_reg == wake_reg)) begin
        st[wake_ctx].waiting <= 1'b0;
        st[wake_ctx].why     <= W_NONE;
      end
      if (blk_we) begin
        st[blk_ctx].pc       <= blk_pc;
        st[blk_ctx].npc      <= blk_npc;
        st[blk_ctx].waiting  <= (blk_why != W_NONE);
        st[blk_ctx].why      <= blk_why;
        st[blk_ctx].wait_reg <= blk_reg;
      end
    end
  end
endmodule
