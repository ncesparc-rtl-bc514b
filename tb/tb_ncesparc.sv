// tb_ncesparc: end-to-end test of the NCESPARC+ processor at its default size.
//
// Runs a multithreaded inner product, the kind of program the architecture
// is evaluated with: context 0 (the master) sets up shared pointers in the
// global registers, starts every other context by writing its status ASR,
// and then all NCTX threads each multiply-accumulate their own section of
// two integer vectors. Each thread writes its partial result, adds it to a
// shared total under an LDSTUB spin lock, and clears its flag; workers then
// suspend themselves through their status ASR, reached through a jump table
// (JMPL). The master waits on every flag with a load busy-waiting loop,
// divides the total by one (divider), writes a burst of stores (load/store
// fifo overflow), takes a software trap (TA, whose handler returns with
// JMPL/RETT), takes an annulling branch and stores the total to DONE.
//
// The program is run twice: Processor Consistency with fetch priority at a
// memory latency of 10 cycles, then Sequential Consistency with alternating
// priority at 30 cycles. The master runs with instruction-miss switching
// off at first (ASR bit 28) and context 1 with dependence switching off
// (bit 27), so both the stall and the switch variant of those mechanisms
// occur. Checked: the total, every partial, the lock released, the cycles
// lost per context switch (2 for a miss, 3 for a dependence, 4 for a
// synchronization loop), and that every mechanism happened at least once.
module tb_ncesparc;
  import ncs_pkg::*;
  import tb_sparc_asm::*;

  localparam int NCTX   = 16;          // the design's default
  localparam int CH     = 8;           // elements per thread
  localparam int N      = NCTX * CH;
  localparam logic [31:0] A_BASE = 32'h4000, B_BASE = 32'h6000, RES = 32'h8000,
                          FLAG = 32'h8100, LOCK = 32'h8200, SUM = 32'h8204,
                          DONE = 32'h8300, SCR = 32'h8400, PARKTAB = 32'h1000,
                          TBA = 32'h2000;

  logic clk = 0, rst_n = 0;
  logic cfg_pc_mode, cfg_if_prio;
  int   latency;
  logic mem_req_valid, mem_req_ready, mem_rvalid, mem_rlast;
  mem_req_t mem_req;
  logic [31:0] mem_rdata;
  ncs_events_t ev;
  logic ret_valid; ctx_t ret_ctx; logic [31:0] ret_pc, ret_ir;

  ncesparc dut (.clk, .rst_n, .cfg_pc_mode, .cfg_if_prio, .mem_req_valid, .mem_req,
                .mem_req_ready, .mem_rvalid, .mem_rdata, .mem_rlast, .ev,
                .ret_valid, .ret_ctx, .ret_pc, .ret_ir);
  ncs_mem_model #(.WORDS(16384)) u_mem (.clk, .rst_n, .latency, .mem_req_valid, .mem_req,
                .mem_req_ready, .mem_rvalid, .mem_rdata, .mem_rlast);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- program ----------------
  int pc;
  task automatic emit(input logic [31:0] w);
    u_mem.mem[pc/4] = w; pc += 4;
  endtask
  task automatic set32(input int rd, input logic [31:0] v);
    emit(sethi(rd, v)); emit(ori(rd, rd, int'(v[9:0])));
  endtask

  // registers
  localparam int G0=0, G2=2, G3=3, G4=4, G5=5, O0=8, O1=9, O2=10, O3=11, O4=12, O5=13,
                 L0=16, L1=17, L2=18, L3=19, L4=20, L5=21, L6=22, L7=23;

  logic [31:0] expect_part [NCTX];
  logic [31:0] expect_total;

  task automatic build_program();
    int work, loop, lk, park, waitk, donep, endl;
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = 32'h0;
    // data
    expect_total = 0;
    for (int k = 0; k < NCTX; k++) expect_part[k] = 0;
    for (int i = 0; i < N; i++) begin
      logic [31:0] a, b;
      a = $urandom_range(0, 1000); b = $urandom_range(0, 1000);
      u_mem.mem[(A_BASE/4) + i] = a;
      u_mem.mem[(B_BASE/4) + i] = b;
      expect_part[i / CH] += a * b;
      expect_total += a * b;
    end
    for (int k = 1; k < NCTX; k++) u_mem.mem[(FLAG/4) + k] = 1;

    pc = 0;
    emit(rdasr(L0, 17));                       // 0x00 context number
    emit(orcc(G0, G0, L0));                    // 0x04
    work = 14 * 4 + 8 * (NCTX - 1) + 8;        // address of WORK, laid out below
    emit(bicc(BNE, 0, (work - pc) / 4));       // 0x08
    emit(nop());                               // 0x0c
    // master: instruction-miss switching off while the code is cold
    emit(sethi(L1, 32'h5000_0000)); emit(wrasr(1, L1, 0));          // 0x10
    set32(G2, FLAG); set32(G3, LOCK); set32(G4, SUM); set32(G5, RES);  // 0x18..0x34
    emit(sethi(L1, 32'h4000_0000)); emit(wrasr(1, L1, 0));          // 0x38 back on
    for (int k = 1; k < NCTX; k++) begin
      emit(sethi(L1, (k == 1) ? 32'h4800_0000 : 32'h4000_0000));    // ctx 1: no dep switching
      emit(wrasr(k + 1, L1, 0));
    end
    if (pc != work) $fatal(1, "layout: WORK at %0h, expected %0h", pc, work);
    // WORK
    emit(slli(L1, L0, $clog2(CH * 4)));
    set32(L2, A_BASE); emit(add(L2, L2, L1));
    set32(L3, B_BASE); emit(add(L3, L3, L1));
    emit(ori(L4, G0, CH));
    emit(ori(L5, G0, 0));
    loop = pc;
    emit(ld(O0, L2, 0));
    emit(ld(O1, L3, 0));
    emit(umul(O2, O0, O1));                    // interlock / dependence on the load
    emit(add(L5, L5, O2));                     // by-pass from umul
    emit(addi(L2, L2, 4));
    emit(addi(L3, L3, 4));
    emit(subcci(L4, L4, 1));
    emit(bicc(BNE, 0, (loop - pc) / 4));
    emit(nop());
    emit(slli(L6, L0, 2));
    emit(str(L5, G5, L6));                     // partial -> RES[ctx] (two D cycles)
    emit(ldr(O3, G5, L6));                     // read back (forwarded in PC mode)
    lk = pc;
    emit(ldstub(O4, G3, 0));                   // spin lock
    emit(orcc(G0, G0, O4));
    emit(bicc(BNE, 0, (lk - pc) / 4));
    emit(nop());
    emit(ld(O5, G4, 0));
    emit(add(O5, O5, O3));
    emit(st(O5, G4, 0));
    emit(stb(G0, G3, 0));                      // release
    emit(str(G0, G2, L6));                     // flag[ctx] = 0
    emit(orcc(G0, G0, L0));
    park = pc + 4 * (2 + 4 * (NCTX - 1) + 1 + 4 + 20 + 2 + 2 + 2 + 2 + 2 + 10);
    emit(bicc(BNE, 0, (park - pc) / 4));
    emit(nop());
    // master: barrier
    for (int k = 1; k < NCTX; k++) begin
      waitk = pc;
      emit(ld(O3, G2, 4 * k));
      emit(orcc(G0, G0, O3));
      emit(bicc(BNE, 0, (waitk - pc) / 4));
      emit(nop());
    end
    emit(ld(O5, G4, 0));
    emit(wry(G0, 0)); emit(ori(L7, G0, 1)); emit(nop()); emit(nop());
    emit(udiv(O5, O5, L7));                    // total / 1
    set32(L1, TBA); emit(wrtbr(L1, 0));        // software trap, handler returns past it
    emit(rdpsr(L1)); emit(ori(L1, L1, 32'h20)); emit(wrpsr(L1, 0));
    emit(nop()); emit(nop()); emit(nop());
    emit(ticc(BA, G0, 1));
    set32(L1, SCR);
    for (int i = 0; i < 20; i++) emit(st(L0, L1, 4 * i));   // store burst
    donep = pc + 8;
    emit(bicc(BA, 1, (donep - pc) / 4));       // ba,a: delay slot annulled
    emit(ori(O5, G0, 0));                      // must not execute
    set32(L1, DONE);
    emit(st(O5, L1, 0));
    endl = pc;
    emit(bicc(BA, 0, 0)); emit(nop());
    if (pc != park) $fatal(1, "layout: PARK at %0h, expected %0h", pc, park);
    // workers: suspend through the jump table
    emit(sethi(L7, 32'hC000_0000));
    emit(slli(L6, L0, 4));
    set32(L1, PARKTAB);
    emit(add(L1, L1, L6));
    emit(jmpl(G0, L1, 0));
    emit(nop());
    if (pc > PARKTAB) $fatal(1, "program overlaps the jump table");
    pc = TBA + 16 * 32'h81;
    emit(jmpl(G0, L2, 0)); emit(rett(L2, 4));
    for (int k = 1; k < NCTX; k++) begin
      pc = PARKTAB + 16 * k;
      emit(wrasr(k + 1, L7, 0));
      emit(bicc(BA, 0, 0));
      emit(nop());
      emit(nop());
    end
  endtask

  // ---------------- monitors ----------------
  int n_ev [string];
  int n_retire;
  // context-switch overhead: cycles from the switching instruction's fetch
  // slot to the first fetch of the next context
  longint sw_cycle; int sw_stage; bit sw_open;
  int n_overhead_checked;

  always @(posedge clk) if (rst_n) begin
    if (ev.sw_miss)     n_ev["sw_miss"]++;
    if (ev.sw_dep)      n_ev["sw_dep"]++;
    if (ev.sw_sync)     n_ev["sw_sync"]++;
    if (ev.sw_soft)     n_ev["sw_soft"]++;
    if (ev.idle)        n_ev["idle"]++;
    if (ev.interlock)   n_ev["interlock"]++;
    if (ev.bypass)      n_ev["bypass"]++;
    if (ev.ls_stall)    n_ev["ls_stall"]++;
    if (ev.div_stall)   n_ev["div_stall"]++;
    if (ev.imiss_stall) n_ev["imiss_stall"]++;
    if (ev.dep_stall)   n_ev["dep_stall"]++;
    if (ev.annul)       n_ev["annul"]++;
    if (ev.sync_retry)  n_ev["sync_retry"]++;
    if (ev.sync_done)   n_ev["sync_done"]++;
    if (ev.trap)        n_ev["trap"]++;
    if (cfg_pc_mode && ev.st_forward) n_ev["st_forward"]++;
    if (ret_valid) n_retire++;
    // the delay slot of ba,a must never execute
    if (ret_valid && ret_ir == ori(O5, G0, 0)) check(0, "annulled delay slot executed");

    // overhead of a switch: event in stage s at cycle n; with a ready context the
    // scheduler takes cycle n+1 and the new context is fetched at n+2
    if (sw_open && int'(dut.fstate) == 1) begin
      int lost;
      lost = int'(cyc - sw_cycle) + sw_stage;
      begin
        checks++;
        n_overhead_checked++;
        if (lost != 2 + sw_stage) begin
          failures++;
          $display("FAIL: switch from stage %0d lost %0d cycles", sw_stage, lost);
        end
      end
      sw_open <= 1'b0;
    end
    if (int'(dut.fstate) == 0 && !dut.sch_found) sw_open <= 1'b0;  // idle: not a pure switch
    if (ev.sw_miss || ev.sw_dep || ev.sw_sync || ev.sw_soft) begin
      sw_open  <= 1'b1;
      sw_cycle <= cyc;
      sw_stage <= ev.sw_sync || ev.sw_soft ? 2 : ev.sw_dep ? 1 : 0;
    end
  end

  // ---------------- run ----------------
  task automatic run(input bit pcm, input bit ifp, input int lat, input int max_cycles);
    longint t0;
    bit done;
    cfg_pc_mode = pcm; cfg_if_prio = ifp; latency = lat;
    rst_n = 0;
    build_program();
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cyc; done = 0;
    while (!done && cyc - t0 < max_cycles) begin
      @(posedge clk);
      if (mem_req_valid && mem_req_ready && mem_req.kind == MK_STORE && mem_req.addr == DONE) done = 1;
    end
    check(done, $sformatf("program finished (pc_mode=%0d latency=%0d)", pcm, lat));
    repeat (lat + 4) @(posedge clk);
    $display("run pc_mode=%0d if_prio=%0d latency=%0d: %0d cycles, %0d instructions",
             pcm, ifp, lat, cyc - t0, n_retire);
    check(u_mem.mem[DONE/4] == expect_total,
          $sformatf("total %0h expected %0h", u_mem.mem[DONE/4], expect_total));
    check(u_mem.mem[SUM/4] == expect_total, "shared sum");
    for (int k = 0; k < NCTX; k++)
      check(u_mem.mem[RES/4 + k] == expect_part[k], $sformatf("partial of context %0d", k));
    check(u_mem.mem[LOCK/4][31:24] == 8'h00, "lock released");
    for (int k = 1; k < NCTX; k++)
      check(dut.st[k].waiting && dut.st[k].why == W_SW, $sformatf("context %0d parked", k));
  endtask

  initial begin
    cfg_pc_mode = 1; cfg_if_prio = 1; latency = 10;
    n_retire = 0; sw_open = 0; n_overhead_checked = 0;
    run(1'b1, 1'b1, 10, 200000);
    run(1'b0, 1'b0, 30, 400000);
    begin
      string names [16] = '{"trap", "sw_miss", "sw_dep", "sw_sync", "sw_soft", "idle", "interlock",
                            "bypass", "ls_stall", "div_stall", "imiss_stall", "dep_stall",
                            "annul", "sync_retry", "sync_done", "st_forward"};
      foreach (names[i]) begin
        int c;
        c = n_ev.exists(names[i]) ? n_ev[names[i]] : 0;
        $display("  %-12s %0d", names[i], c);
        check(c > 0, {"mechanism never happened: ", names[i]});
      end
    end
    check(n_overhead_checked > 0, "switch overhead measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
