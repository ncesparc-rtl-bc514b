// ncesparc: NCESPARC+, a coarse-grain multithreaded SPARC V8 integer unit.
//
// Up to NCTX hardware contexts share one four-stage pipeline (F fetch,
// D decode and operand fetch, E execute, W write back), the 520-register
// windowed register file and the Memory Interface Unit (MIU). A thread runs
// until it would wait on memory; then its context is suspended and the
// Scheduling Unit picks the next ready context round-robin. Three events
// suspend a thread, each of which can be turned off through the context's
// status ASR (ASR 1..16, one per context):
//   - instruction cache miss, found in F: the refill goes to the MIU's fetch
//     fifo, the fetched instruction is dropped, the next cycle schedules and
//     the one after fetches for the new context (2 cycles lost);
//   - use of a register whose load is still pending, found in D through the
//     register scoreboard: the D and F instructions are dropped (3 cycles
//     lost). If the load sits right before the user in E, D first waits one
//     interlock cycle, since a data cache hit returns within it;
//   - a busy-waiting loop (load/LDSTUB/SWAP, cc-setting test, branch back,
//     delay slot) found in E at the start of its second iteration: the load
//     becomes an internal synch instruction that the MIU retries until it
//     reads 0, and the E, D and F instructions are dropped (4 cycles lost).
// Software can also suspend the running thread by setting bit 31 of its own
// status ASR. The suspended thread's PC and nPC are saved, so it resumes at
// the dropped instruction (after the loop for a synch instruction). Every
// stage carries the context, PC and nPC of its instruction, so older
// instructions of the old context finish while the new one starts.
//
// Other pipeline details: Bicc, CALL and JMPL are resolved in D by the
// Branch Unit with SPARC delayed-branch and annul semantics, so a taken
// branch costs nothing; an E->D by-pass feeds a result to the next
// instruction and W writes the register file before D reads it; SAVE and
// RESTORE move CWP in D; stores that need three registers take a second D
// cycle (the register file has two read ports); the divider stalls E for 33
// cycles; a full load/store fifo stalls E.
//
// Traps (SPARC V8, taken only while PSR.ET = 1): D marks a SAVE or RESTORE
// into a window whose WIM bit is set (window_overflow 0x05 /
// window_underflow 0x06), a UDIV/SDIV by zero (0x2A), a Ticc whose
// condition holds (0x80 + the low 7 bits of rs1 + operand) and a RETT with
// traps enabled (illegal_instruction 0x02). The marked instruction does
// nothing else; in E it spends two cycles writing its PC and nPC into %l1
// and %l2 of window CWP-1, then CWP is decremented, PS <- S, S <- 1,
// ET <- 0, TBR.tt is set, the younger instructions of the context are
// dropped and the context restarts at TBR (through the scheduler, like a
// switch: 4 cycles). RETT moves CWP up in D, jumps like JMPL and restores
// S and ET in E. With ET = 0 these conditions are ignored.
//
// Not implemented: other SPARC V8 traps (alignment, privileged, illegal
// opcodes, interrupts); LDD/STD, alternate-space, tagged, MULScc, FLUSH and
// coprocessor/FPU instructions execute as no-ops.
//
// This design's own choices: traps ignored while ET = 0 (SPARC V8 would
// enter error mode); ASR 17 reads the running context's number;
// ASR 1..16 status words hold waiting/mapped/disable bits in 31..26 and the
// context number in 3..0; the two MIU settings come in on pins. Reset starts
// context 0 at RESET_PC; software starts another context by writing its
// status ASR (mapped = 1, waiting = 0), and it too begins at RESET_PC.
//
// Memory port: see ncs_miu. ev reports one pulse per mechanism per cycle;
// ret_* shows each instruction as it leaves E.
module ncesparc
  import ncs_pkg::*;
#(
  parameter int          NCTX         = 16,
  parameter int          ICACHE_BYTES = 16384,
  parameter int          LINE_BYTES   = 32,
  parameter int          IFQ_DEPTH    = 4,
  parameter int          LSQ_DEPTH    = 16,
  parameter int          SYQ_DEPTH    = 16,
  parameter logic [31:0] RESET_PC     = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_pc_mode,    // 1: Processor Consistency, 0: Sequential
  input  logic        cfg_if_prio,    // 1: fetch always first, 0: alternate
  output logic        mem_req_valid,
  output mem_req_t    mem_req,
  input  logic        mem_req_ready,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata,
  input  logic        mem_rlast,
  output ncs_events_t ev,
  output logic        ret_valid,
  output ctx_t        ret_ctx,
  output logic [31:0] ret_pc,
  output logic [31:0] ret_ir
);
  // ------------------------------------------------------------------
  // types
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {C_NONE, C_ALU, C_SHIFT, C_MULDIV, C_MEM, C_RD, C_WR, C_TRAP} cls_e;
  typedef enum logic [2:0] {SP_Y, SP_ASR, SP_PSR, SP_WIM, SP_TBR} sp_e;

  typedef struct packed {
    logic        valid;
    ctx_t        ctx;
    logic [31:0] pc, npc, ir;
  } fd_t;

  typedef struct packed {
    logic        valid;
    ctx_t        ctx;
    logic [31:0] pc, npc, ir;
    cls_e        cls;
    alu_op_e     alu_op;
    logic        set_cc;
    logic        sh_right, sh_arith;
    md_op_e      md_op;
    mem_kind_e   mkind;
    mem_size_e   msize;
    logic        msgn;
    sp_e         sp;
    logic [4:0]  spn;       // ASR number
    logic [7:0]  tt;        // trap type (C_TRAP)
    logic        rett;
    logic        writes_rd;
    preg_t       rd;
    logic [31:0] op1, op2, sdata;
  } de_t;

  typedef struct packed {
    logic        valid;
    preg_t       rd;
    logic [31:0] data;
  } ew_t;

  typedef enum logic {S_SCHED, S_RUN} fst_e;

  // ------------------------------------------------------------------
  // state
  // ------------------------------------------------------------------
  ctx_state_t  st [NCTX];
  fst_e        fstate;
  ctx_t        cur_ctx;
  logic [31:0] fpc, fnpc;
  logic        fill_pending;
  fd_t         fd;
  de_t         de;
  ew_t         ew;
  logic        ilk_done, st_phase, trap_ph;
  logic [31:0] st_op1, st_op2;

  // ------------------------------------------------------------------
  // units
  // ------------------------------------------------------------------
  // instruction cache
  logic        ic_hit;
  logic [31:0] ic_instr;
  logic        fill_we, fill_first, fill_last;
  logic [31:0] fill_addr, fill_data;
  ncs_icache #(.SIZE_BYTES(ICACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_icache (
    .clk, .rst_n, .addr(fpc), .hit(ic_hit), .instr(ic_instr),
    .fill_we, .fill_first, .fill_last, .fill_addr, .fill_data);

  // register file
  preg_t       ra_idx, rb_idx, sq0, sq1, sq2;
  logic [31:0] ra_data, rb_data;
  logic        s0, s1, s2;
  logic        sb_set;
  preg_t       sb_set_idx;
  logic        m_we;
  preg_t       m_idx;
  logic [31:0] m_data;
  ncs_regfile u_rf (
    .clk, .rst_n,
    .ra_idx, .ra_data, .rb_idx, .rb_data,
    .w_we(ew.valid), .w_idx(ew.rd), .w_data(ew.data),
    .m_we, .m_idx, .m_data,
    .sb_set, .sb_set_idx,
    .sq0_idx(sq0), .sq1_idx(sq1), .sq2_idx(sq2),
    .sq0_stale(s0), .sq1_stale(s1), .sq2_stale(s2));

  // context registers
  logic        cwp_we;
  logic [4:0]  cwp_val;
  logic        e_icc_we, e_y_we, e_psr_we, e_wim_we, e_tbr_we, asr_we, e_trap, e_rett, trap_w;
  preg_t       trap_rd;
  icc_t        e_icc;
  logic [31:0] e_y, wr_val;
  ctx_t        asr_ctx;
  logic        wake_we;
  ctx_t        wake_ctx;
  wait_e       wake_why;
  preg_t       wake_reg;
  logic        blk_we;
  ctx_t        blk_ctx;
  logic [31:0] blk_pc, blk_npc;
  wait_e       blk_why;
  preg_t       blk_reg;
  ncs_ctx_file #(.NCTX(NCTX), .RESET_PC(RESET_PC)) u_ctx (
    .clk, .rst_n, .st,
    .cwp_we, .cwp_ctx(fd.ctx), .cwp_val,
    .e_ctx(de.ctx), .e_icc_we, .e_icc, .e_y_we, .e_y,
    .e_psr_we, .e_psr(wr_val), .e_wim_we, .e_wim(wr_val), .e_tbr_we, .e_tbr(wr_val),
    .trap_we(e_trap), .trap_tt(de.tt), .rett_we(e_rett),
    .asr_we, .asr_ctx, .asr_val(wr_val),
    .wake_we, .wake_ctx, .wake_why, .wake_reg,
    .blk_we, .blk_ctx, .blk_pc, .blk_npc, .blk_why, .blk_reg);

  // scheduler
  logic [NCTX-1:0] ready;
  logic            sch_found;
  ctx_t            sch_next;
  always_comb for (int k = 0; k < NCTX; k++) ready[k] = st[k].mapped && !st[k].waiting;
  ncs_scheduler #(.NCTX(NCTX)) u_sched (
    .ready, .last(cur_ctx), .found(sch_found), .next(sch_next));

  // memory interface unit
  logic      if_push, if_full, ls_push, ls_ready;
  ls_entry_t ls_in;
  logic      ev_fwd, ev_sretry, ev_sdone;
  ncs_miu #(.NCTX(NCTX), .IFQ_DEPTH(IFQ_DEPTH), .LSQ_DEPTH(LSQ_DEPTH),
            .SYQ_DEPTH(SYQ_DEPTH), .LINE_BYTES(LINE_BYTES)) u_miu (
    .clk, .rst_n, .cfg_pc_mode, .cfg_if_prio,
    .if_push, .if_ctx(cur_ctx), .if_addr({fpc[31:$clog2(LINE_BYTES)], {$clog2(LINE_BYTES){1'b0}}}),
    .if_full,
    .ls_push, .ls_in, .ls_ready,
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_rvalid, .mem_rdata, .mem_rlast,
    .fill_we, .fill_first, .fill_last, .fill_addr, .fill_data,
    .rf_we(m_we), .rf_idx(m_idx), .rf_data(m_data),
    .wake_we, .wake_ctx, .wake_why, .wake_reg,
    .ev_forward(ev_fwd), .ev_sync_retry(ev_sretry), .ev_sync_done(ev_sdone),
    .lsq_count());

  // ------------------------------------------------------------------
  // E stage
  // ------------------------------------------------------------------
  logic [31:0] alu_y, sh_y, md_res, md_y;
  icc_t        alu_f;
  logic        md_done, md_v, md_req, md_ack;
  ncs_alu u_alu (.op(de.alu_op), .a(de.op1), .b(de.op2), .cin(st[de.ctx].icc.c),
                 .y(alu_y), .flags(alu_f));
  ncs_shifter u_sh (.a(de.op1), .shamt(de.op2[4:0]), .right(de.sh_right), .arith(de.sh_arith),
                    .y(sh_y));
  ncs_muldiv u_md (.clk, .rst_n, .req(md_req), .op(de.md_op), .a(de.op1), .b(de.op2),
                   .y_in(st[de.ctx].y), .ack(md_ack), .done(md_done), .result(md_res),
                   .y_out(md_y), .v(md_v));

  logic        stall_e, e_fire, e_sw, e_sync, e_soft, e_writes;
  logic [31:0] e_result, rd_spec;
  logic        sync_en, sync_trig;
  logic        e_is_load, e_is_cc, e_is_bicc;

  always_comb begin
    e_is_load = (de.cls == C_MEM) && (de.mkind != MK_STORE);
    e_is_cc   = (de.cls == C_ALU) && de.set_cc &&
                (de.alu_op inside {ALU_OR, ALU_SUB, ALU_AND, ALU_ADD});
    e_is_bicc = (de.ir[31:30] == 2'b00) && (de.ir[24:22] == 3'b010);
    sync_en   = !st[de.ctx].dis[3] && !st[de.ctx].dis[0];
  end

  ncs_sync_detector #(.NCTX(NCTX)) u_sync (
    .clk, .rst_n, .ex_fire(e_fire), .ex_ctx(de.ctx), .ex_pc(de.pc),
    .ex_is_load(e_is_load), .ex_is_cc(e_is_cc), .ex_is_bicc(e_is_bicc),
    .enable(sync_en), .trigger(sync_trig), .count_of_ex());

  always_comb begin
    md_req  = de.valid && (de.cls == C_MULDIV);
    stall_e = de.valid && (((de.cls == C_MEM) && !ls_ready) ||
                           ((de.cls == C_MULDIV) && !md_done) ||
                           ((de.cls == C_TRAP) && !trap_ph));
    e_fire  = de.valid && !stall_e;
    md_ack  = e_fire && (de.cls == C_MULDIV);
    // trap: %l1 <- PC in the first cycle, %l2 <- nPC in the second, both in
    // the window below CWP; then the context is redirected
    trap_w  = de.valid && (de.cls == C_TRAP);
    trap_rd = phys_reg(st[de.ctx].cwp - 5'd1, trap_ph ? 5'd18 : 5'd17);
    e_trap  = e_fire && (de.cls == C_TRAP);
    e_rett  = e_fire && de.rett;
    wr_val  = de.op1 ^ de.op2;

    // special register reads
    rd_spec = '0;
    unique case (de.sp)
      SP_Y:   rd_spec = st[de.ctx].y;
      SP_PSR: rd_spec = {8'h00, st[de.ctx].icc, 6'd0, 2'b00, 4'd0,
                         st[de.ctx].s, st[de.ctx].ps, st[de.ctx].et, st[de.ctx].cwp};
      SP_WIM: rd_spec = st[de.ctx].wim;
      SP_TBR: rd_spec = st[de.ctx].tbr;
      default: begin
        if (de.spn == 5'd17) rd_spec = 32'(de.ctx);
        else if (de.spn >= 5'd1 && 32'(de.spn) <= NCTX)
          rd_spec = status_word(st[ctx_t'(de.spn - 5'd1)], ctx_t'(de.spn - 5'd1));
      end
    endcase

    unique case (de.cls)
      C_SHIFT:  e_result = sh_y;
      C_MULDIV: e_result = md_res;
      C_RD:     e_result = rd_spec;
      default:  e_result = alu_y;
    endcase
    e_writes = de.valid && de.writes_rd &&
               (de.cls inside {C_ALU, C_SHIFT, C_MULDIV, C_RD});

    // context-register writes
    e_icc_we = 1'b0; e_icc = alu_f;
    e_y_we = 1'b0;   e_y = md_y;
    e_psr_we = 1'b0; e_wim_we = 1'b0; e_tbr_we = 1'b0;
    asr_we = 1'b0;   asr_ctx = ctx_t'(de.spn - 5'd1);
    e_soft = 1'b0;
    if (e_fire) begin
      if (de.cls == C_ALU && de.set_cc) e_icc_we = 1'b1;
      if (de.cls == C_MULDIV) begin
        e_y_we = 1'b1;
        if (de.set_cc) begin
          e_icc_we = 1'b1;
          e_icc    = '{n: md_res[31], z: (md_res == 32'd0), v: md_v, c: 1'b0};
        end
      end
      if (de.cls == C_WR) begin
        unique case (de.sp)
          SP_Y:   begin e_y_we = 1'b1; e_y = wr_val; end
          SP_PSR: e_psr_we = 1'b1;
          SP_WIM: e_wim_we = 1'b1;
          SP_TBR: e_tbr_we = 1'b1;
          default: if (de.spn >= 5'd1 && 32'(de.spn) <= NCTX) begin
            asr_we = 1'b1;
            e_soft = (asr_ctx == de.ctx) && wr_val[31];
          end
        endcase
      end
    end
    e_sync = sync_trig;      // gated by e_fire inside the detector
    e_sw   = e_sync || e_soft || e_trap;

    // hand the access to the MIU; a synch instruction replaces the load
    ls_push           = e_fire && (de.cls == C_MEM);
    ls_in.kind        = de.mkind;
    ls_in.sync        = e_sync;
    ls_in.ctx         = de.ctx;
    ls_in.rd          = de.rd;
    ls_in.addr        = alu_y;
    ls_in.size        = de.msize;
    ls_in.sgn         = de.msgn;
    ls_in.wdata       = de.sdata;
  end

  // ------------------------------------------------------------------
  // D stage: decode, operand fetch, hazards, branches
  // ------------------------------------------------------------------
  logic [1:0]  d_op;
  logic [4:0]  d_rd, d_rs1, d_rs2;
  logic [5:0]  d_op3;
  logic        d_i;
  logic [31:0] d_simm;
  logic [4:0]  d_cwp, d_cwp_new;
  de_t         dn;                // the record D hands to E
  logic        uses_rs1, uses_rs2, uses_rd_src, three_reg;
  preg_t       p_rs1, p_rs2, p_rd_src, p_rd_dst;
  logic [31:0] va, vb, d_op2val;
  logic        byp_a, byp_b;
  logic        stale_any, interlock, dep_block, dep_allowed;
  preg_t       stale_reg;
  logic        stall_d, d_sw, d_adv, flush_d;
  icc_t        d_icc;
  logic        br_cti, br_taken, br_annul, br_cond;
  logic        d_trap, d_et;
  logic [7:0]  d_tt;
  logic [31:0] br_target;

  always_comb begin
    d_op   = fd.ir[31:30];
    d_rd   = fd.ir[29:25];
    d_op3  = fd.ir[24:19];
    d_rs1  = fd.ir[18:14];
    d_i    = fd.ir[13];
    d_rs2  = fd.ir[4:0];
    d_simm = {{19{fd.ir[12]}}, fd.ir[12:0]};
    d_cwp  = st[fd.ctx].cwp;

    // ---- decode ----
    dn           = '0;
    dn.valid     = 1'b1;
    dn.ctx       = fd.ctx;
    dn.pc        = fd.pc;
    dn.npc       = fd.npc;
    dn.ir        = fd.ir;
    dn.alu_op    = ALU_ADD;
    dn.sp        = SP_Y;
    dn.spn       = d_rs1;
    dn.msize     = SZ_WORD;
    dn.mkind     = MK_LOAD;
    dn.md_op     = MD_UMUL;
    uses_rs1     = 1'b0;
    uses_rs2     = 1'b0;
    uses_rd_src  = 1'b0;
    d_cwp_new    = d_cwp;
    cwp_we       = 1'b0;
    d_et         = st[fd.ctx].et;
    d_trap       = 1'b0;
    d_tt         = '0;

    unique case (d_op)
      2'b01: begin                          // CALL: %o7 <- PC
        dn.cls = C_ALU; dn.writes_rd = 1'b1;
      end
      2'b00: begin
        if (fd.ir[24:22] == 3'b100) begin   // SETHI
          dn.cls = C_ALU; dn.writes_rd = 1'b1;
        end else begin
          dn.cls = C_NONE;                  // Bicc (handled by the Branch Unit), UNIMP, FBfcc, CBccc
        end
      end
      2'b10: begin
        uses_rs1 = 1'b1;
        uses_rs2 = !d_i;
        if (!d_op3[5]) begin                // 0x00 - 0x1F: ALU, multiply, divide
          dn.set_cc    = d_op3[4];
          dn.writes_rd = 1'b1;
          dn.cls       = C_ALU;
          unique case (d_op3[3:0])
            4'h0: dn.alu_op = ALU_ADD;
            4'h1: dn.alu_op = ALU_AND;
            4'h2: dn.alu_op = ALU_OR;
            4'h3: dn.alu_op = ALU_XOR;
            4'h4: dn.alu_op = ALU_SUB;
            4'h5: dn.alu_op = ALU_ANDN;
            4'h6: dn.alu_op = ALU_ORN;
            4'h7: dn.alu_op = ALU_XNOR;
            4'h8: dn.alu_op = ALU_ADDX;
            4'hC: dn.alu_op = ALU_SUBX;
            4'hA: begin dn.cls = C_MULDIV; dn.md_op = MD_UMUL; end
            4'hB: begin dn.cls = C_MULDIV; dn.md_op = MD_SMUL; end
            4'hE: begin dn.cls = C_MULDIV; dn.md_op = MD_UDIV; end
            4'hF: begin dn.cls = C_MULDIV; dn.md_op = MD_SDIV; end
            default: begin dn.cls = C_NONE; dn.writes_rd = 1'b0; dn.set_cc = 1'b0; end
          endcase
        end else begin
          unique case (d_op3)
            OP3_SLL, OP3_SRL, OP3_SRA: begin
              dn.cls = C_SHIFT; dn.writes_rd = 1'b1;
              dn.sh_right = (d_op3 != OP3_SLL);
              dn.sh_arith = (d_op3 == OP3_SRA);
            end
            OP3_RDASR, OP3_RDPSR, OP3_RDWIM, OP3_RDTBR: begin
              dn.cls = C_RD; dn.writes_rd = 1'b1;
              uses_rs1 = 1'b0; uses_rs2 = 1'b0;
              dn.sp = (d_op3 == OP3_RDPSR) ? SP_PSR : (d_op3 == OP3_RDWIM) ? SP_WIM :
                      (d_op3 == OP3_RDTBR) ? SP_TBR : (d_rs1 == 5'd0) ? SP_Y : SP_ASR;
              dn.spn = d_rs1;
            end
            OP3_WRASR, OP3_WRPSR, OP3_WRWIM, OP3_WRTBR: begin
              dn.cls = C_WR;
              dn.sp = (d_op3 == OP3_WRPSR) ? SP_PSR : (d_op3 == OP3_WRWIM) ? SP_WIM :
                      (d_op3 == OP3_WRTBR) ? SP_TBR : (d_rd == 5'd0) ? SP_Y : SP_ASR;
              dn.spn = d_rd;
            end
            OP3_JMPL: begin                 // rd <- PC, target from the Branch Unit
              dn.cls = C_ALU; dn.writes_rd = 1'b1;
            end
            OP3_SAVE, OP3_RESTORE: begin
              dn.cls = C_ALU; dn.writes_rd = 1'b1;
              d_cwp_new = (d_op3 == OP3_SAVE) ? d_cwp - 5'd1 : d_cwp + 5'd1;
              cwp_we    = d_adv;
              if (d_et && st[fd.ctx].wim[d_cwp_new]) begin
                d_trap = 1'b1;
                d_tt   = (d_op3 == OP3_SAVE) ? TT_WOVF : TT_WUNF;
              end
            end
            OP3_RETT: begin                 // target from the Branch Unit
              dn.cls = C_NONE; dn.rett = 1'b1;
              d_cwp_new = d_cwp + 5'd1;
              cwp_we    = d_adv;
              if (d_et) begin d_trap = 1'b1; d_tt = TT_ILLEGAL; end   // RETT with traps enabled
            end
            OP3_TICC: begin
              dn.cls = C_NONE;
              if (d_et && br_cond) d_trap = 1'b1;   // trap type below, once the operands are known
            end
            default: begin dn.cls = C_NONE; uses_rs1 = 1'b0; uses_rs2 = 1'b0; end
          endcase
        end
      end
      default: begin                        // op = 3: memory
        uses_rs1 = 1'b1;
        uses_rs2 = !d_i;
        dn.cls   = C_MEM;
        unique case (d_op3)
          OP3_LD:     begin dn.mkind = MK_LOAD;   dn.msize = SZ_WORD; dn.writes_rd = 1'b1; end
          OP3_LDUB:   begin dn.mkind = MK_LOAD;   dn.msize = SZ_BYTE; dn.writes_rd = 1'b1; end
          OP3_LDUH:   begin dn.mkind = MK_LOAD;   dn.msize = SZ_HALF; dn.writes_rd = 1'b1; end
          OP3_LDSB:   begin dn.mkind = MK_LOAD;   dn.msize = SZ_BYTE; dn.msgn = 1'b1; dn.writes_rd = 1'b1; end
          OP3_LDSH:   begin dn.mkind = MK_LOAD;   dn.msize = SZ_HALF; dn.msgn = 1'b1; dn.writes_rd = 1'b1; end
          OP3_ST:     begin dn.mkind = MK_STORE;  dn.msize = SZ_WORD; uses_rd_src = 1'b1; end
          OP3_STB:    begin dn.mkind = MK_STORE;  dn.msize = SZ_BYTE; uses_rd_src = 1'b1; end
          OP3_STH:    begin dn.mkind = MK_STORE;  dn.msize = SZ_HALF; uses_rd_src = 1'b1; end
          OP3_LDSTUB: begin dn.mkind = MK_LDSTUB; dn.msize = SZ_BYTE; dn.writes_rd = 1'b1; end
          OP3_SWAP:   begin dn.mkind = MK_SWAP;   dn.msize = SZ_WORD; dn.writes_rd = 1'b1; uses_rd_src = 1'b1; end
          default:    begin dn.cls = C_NONE; uses_rs1 = 1'b0; uses_rs2 = 1'b0; end
        endcase
      end
    endcase
    cwp_val = d_cwp_new;

    // ---- physical registers ----
    p_rs1    = phys_reg(d_cwp, d_rs1);
    p_rs2    = phys_reg(d_cwp, d_rs2);
    p_rd_src = phys_reg(d_cwp, d_rd);
    p_rd_dst = (d_op == 2'b01) ? phys_reg(d_cwp, 5'd15) : phys_reg(d_cwp_new, d_rd);
    dn.rd    = p_rd_dst;
    if (dn.writes_rd && p_rd_dst == '0) dn.writes_rd = (dn.cls == C_MEM); // %g0 target

    // three registers (address rs1 + rs2 and data rd) need a second D cycle
    three_reg = uses_rd_src && uses_rs2;
    ra_idx = (three_reg && st_phase) ? p_rd_src : p_rs1;
    rb_idx = (uses_rd_src && !uses_rs2) ? p_rd_src : p_rs2;

    // ---- E -> D by-pass ----
    byp_a = e_writes && de.ctx == fd.ctx && de.rd == ra_idx && ra_idx != '0;
    byp_b = e_writes && de.ctx == fd.ctx && de.rd == rb_idx && rb_idx != '0;
    va = byp_a ? e_result : ra_data;
    vb = byp_b ? e_result : rb_data;
    d_op2val = d_i ? d_simm : vb;

    // ---- operands ----
    dn.op1 = va;
    dn.op2 = d_op2val;
    dn.sdata = vb;
    if (d_op == 2'b01 || (d_op == 2'b10 && d_op3 == OP3_JMPL)) begin
      dn.op1 = fd.pc; dn.op2 = '0;
    end else if (d_op == 2'b00) begin
      dn.op1 = {fd.ir[21:0], 10'd0}; dn.op2 = '0;
    end else if (three_reg) begin
      dn.op1 = st_op1; dn.op2 = st_op2; dn.sdata = va;
    end

    // ---- traps found in D ----
    if (d_trap && d_op == 2'b10 && d_op3 == OP3_TICC) d_tt = 8'h80 | {1'b0, 7'(va + d_op2val)};
    if (d_et && dn.cls == C_MULDIV && dn.md_op inside {MD_UDIV, MD_SDIV} && d_op2val == '0) begin
      d_trap = 1'b1; d_tt = TT_DIV0;
    end
    if (d_trap) begin
      dn.cls = C_TRAP; dn.tt = d_tt; dn.writes_rd = 1'b0; dn.set_cc = 1'b0; dn.rett = 1'b0;
      cwp_we = 1'b0;
    end

    // ---- scoreboard: pending loads ----
    sq0 = p_rs1;
    sq1 = p_rs2;
    sq2 = uses_rd_src ? p_rd_src : p_rd_dst;
    stale_any = 1'b0;
    stale_reg = '0;
    if (!(three_reg && st_phase)) begin
      if (uses_rs1 && s0) begin stale_any = 1'b1; stale_reg = sq0; end
      else if (uses_rs2 && s1) begin stale_any = 1'b1; stale_reg = sq1; end
      else if ((uses_rd_src || dn.writes_rd) && s2) begin stale_any = 1'b1; stale_reg = sq2; end
    end
    interlock = fd.valid && stale_any && !ilk_done && de.valid && de.ctx == fd.ctx &&
                de.cls == C_MEM && de.mkind != MK_STORE && de.rd == stale_reg;
    dep_allowed = !st[fd.ctx].dis[3] && !st[fd.ctx].dis[1];
    dep_block   = fd.valid && stale_any && !interlock;

    // ---- Branch Unit ----
    d_icc = (de.valid && de.ctx == fd.ctx && de.set_cc && de.cls inside {C_ALU, C_MULDIV})
            ? e_icc : st[fd.ctx].icc;
  end

  ncs_branch_unit u_bu (.pc(fd.pc), .ir(fd.ir), .rs1_val(va), .op2_val(d_op2val), .icc(d_icc),
                        .is_cti(br_cti), .cond_true(br_cond), .taken(br_taken), .annul(br_annul),
                        .target(br_target));

  always_comb begin
    flush_d = e_sw && fd.valid && fd.ctx == de.ctx;
    d_sw    = dep_block && dep_allowed && !stall_e && !e_sw && !flush_d;
    stall_d = fd.valid && !flush_d &&
              (interlock || (dep_block && !d_sw) || (three_reg && !st_phase && !stale_any));
    d_adv   = fd.valid && !stall_e && !stall_d && !d_sw && !flush_d;
    sb_set     = d_adv && dn.cls == C_MEM && dn.writes_rd;
    sb_set_idx = dn.rd;
  end

  // ------------------------------------------------------------------
  // F stage and Scheduling Unit
  // ------------------------------------------------------------------
  logic        fd_load, f_sw, flush_f, f_annul, miss_allowed;
  logic [31:0] fnpc_eff;
  always_comb begin
    fd_load      = !stall_e && !stall_d;
    flush_f      = e_sw && fstate == S_RUN && cur_ctx == de.ctx;
    f_annul      = d_adv && br_annul;
    fnpc_eff     = (d_adv && br_taken && !d_trap) ? br_target : fnpc;
    miss_allowed = !st[cur_ctx].dis[3] && !st[cur_ctx].dis[2];
    f_sw = fstate == S_RUN && fd_load && !flush_f && !d_sw && !f_annul &&
           !ic_hit && miss_allowed && !if_full && !e_sw;
    if_push = f_sw || (fstate == S_RUN && fd_load && !flush_f && !d_sw && !f_annul &&
                       !ic_hit && !miss_allowed && !fill_pending && !if_full);

    // one suspension per cycle, oldest stage first
    blk_we = 1'b0; blk_ctx = de.ctx; blk_pc = de.npc; blk_npc = de.npc + 32'd4;
    blk_why = e_sync ? W_SYNC : W_SW; blk_reg = de.rd;
    if (e_trap) begin
      blk_we = 1'b1; blk_why = W_NONE;
      blk_pc = {st[de.ctx].tbr[31:12], de.tt, 4'd0}; blk_npc = blk_pc + 32'd4;
    end else if (e_sw) begin
      blk_we = 1'b1;
    end else if (d_sw) begin
      blk_we = 1'b1; blk_ctx = fd.ctx; blk_pc = fd.pc; blk_npc = fd.npc;
      blk_why = W_DEP; blk_reg = stale_reg;
    end else if (f_sw) begin
      blk_we = 1'b1; blk_ctx = cur_ctx; blk_pc = fpc; blk_npc = fnpc_eff;
      blk_why = W_IFETCH; blk_reg = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate <= S_SCHED;
      cur_ctx <= '0;
      fpc <= RESET_PC;
      fnpc <= RESET_PC + 32'd4;
      fill_pending <= 1'b0;
      fd <= '0;
      de <= '0;
      ew <= '0;
      ilk_done <= 1'b0;
      st_phase <= 1'b0;
      trap_ph <= 1'b0;
      st_op1 <= '0;
      st_op2 <= '0;
    end else begin
      // ---- W ----
      ew.valid <= (e_fire && e_writes) || trap_w;
      ew.rd    <= trap_w ? trap_rd : de.rd;
      ew.data  <= trap_w ? (trap_ph ? de.npc : de.pc) : e_result;
      trap_ph  <= trap_w && !trap_ph;

      // ---- E ----
      if (!stall_e) begin
        if (d_adv) de <= dn;
        else       de.valid <= 1'b0;
      end

      // ---- D hazard state ----
      if (!stall_e) begin
        if (d_adv || d_sw || flush_d || !fd.valid) begin
          ilk_done <= 1'b0;
          st_phase <= 1'b0;
        end else begin
          if (interlock) ilk_done <= 1'b1;
          if (three_reg && !st_phase && !stale_any) begin
            st_phase <= 1'b1;
            st_op1   <= va;
            st_op2   <= d_op2val;
          end
        end
      end

      // ---- F / scheduling ----
      if (fstate == S_SCHED) begin
        if (fd_load || flush_d) fd.valid <= 1'b0;
        if (sch_found) begin
          fstate  <= S_RUN;
          cur_ctx <= sch_next;
          fpc     <= st[sch_next].pc;
          fnpc    <= st[sch_next].npc;
          fill_pending <= 1'b0;
        end
      end else if (flush_f || d_sw || f_sw) begin
        fd.valid <= 1'b0;
        fstate   <= S_SCHED;
      end else if (fd_load) begin
        if (f_annul) begin
          fd.valid <= 1'b0;
          fpc      <= fnpc_eff;
          fnpc     <= fnpc_eff + 32'd4;
        end else if (ic_hit) begin
          fd       <= '{valid: 1'b1, ctx: cur_ctx, pc: fpc, npc: fnpc_eff, ir: ic_instr};
          fpc      <= fnpc_eff;
          fnpc     <= fnpc_eff + 32'd4;
          fill_pending <= 1'b0;
        end else begin                       // miss, switching off or fetch fifo full
          fd.valid <= 1'b0;
          fnpc     <= fnpc_eff;
          if (if_push) fill_pending <= 1'b1;
        end
      end else if (flush_d) begin
        fd.valid <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------------
  // observation
  // ------------------------------------------------------------------
  always_comb begin
    ev             = '0;
    ev.retire      = e_fire && !e_trap;
    ev.sw_miss     = f_sw;
    ev.sw_dep      = d_sw;
    ev.sw_sync     = e_sync;
    ev.sw_soft     = e_soft && !e_sync;
    ev.idle        = (fstate == S_SCHED) && !sch_found;
    ev.interlock   = interlock && !stall_e;
    ev.bypass      = d_adv && (byp_a || byp_b);
    ev.ls_stall    = de.valid && de.cls == C_MEM && !ls_ready;
    ev.div_stall   = de.valid && de.cls == C_MULDIV && !md_done;
    ev.imiss_stall = fstate == S_RUN && fd_load && !flush_f && !d_sw && !f_annul && !ic_hit && !f_sw;
    ev.dep_stall   = dep_block && !d_sw && !stall_e;
    ev.annul       = f_annul;
    ev.st_forward  = ev_fwd;
    ev.sync_retry  = ev_sretry;
    ev.sync_done   = ev_sdone;
    ev.trap        = e_trap;
    ret_valid      = e_fire && !e_trap;
    ret_ctx        = de.ctx;
    ret_pc         = de.pc;
    ret_ir         = de.ir;
  end

  // a context switch is never requested while the scheduler has nobody to run
  // for the same context twice in one cycle
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({e_sw, d_sw, f_sw}))
    else $error("ncesparc: two suspensions in one cycle");
endmodule
