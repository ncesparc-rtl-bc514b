// ncs_ip_system: one NCESPARC+ processor with its memory, running the
// inner-product program used to evaluate the architecture.
//
// Testbench helper, not a design block. A rising `start` loads a fresh
// program and data set into the memory model, resets the processor with the
// given consistency model, arbiter mode and memory latency, and runs until
// the master stores the result. `done` then rises together with the cycle
// count, the instruction count, the number of context switches of each kind,
// the idle cycles (no context ready) and `ok` (every partial product and the
// total correct). `done` falls when `start` falls.
//
// The program: the master (context 0) starts contexts 1..NCTX-1 through
// their status ASRs. Every thread reads its own slice descriptor (start of
// the A and B slices, stride, element count) from a table indexed by its
// context number, so the same code serves both the contiguous split (each
// thread takes NELEM/NCTX consecutive elements) and the interleaved split
// (thread k takes elements k, k+NCTX, ...). Multiplication is done in
// software with a shift-and-add loop, as the architecture is evaluated with
// no multiply instruction. Each thread stores its partial result, adds it to
// the shared sum and decrements a shared count of running threads under an
// LDSTUB spin lock; workers then suspend themselves, and the master
// busy-waits for the count to reach zero and stores the sum to DONE.
module ncs_ip_system
  import ncs_pkg::*;
  import tb_sparc_asm::*;
#(
  parameter int NCTX  = 4,
  parameter int WORDS = 32768,
  parameter int ICACHE_BYTES = 1024,
  parameter int DCACHE_BYTES = 65536
) (
  input  logic   clk,
  input  logic   start,
  input  logic   contiguous,
  input  logic   pc_mode,
  input  logic   if_prio,
  input  int     latency,
  input  int     nelem,
  output logic   done,
  output logic   ok,
  output longint cycles,
  output longint instrs,
  output int     n_sw_miss,
  output int     n_sw_dep,
  output int     n_sw_sync,
  output longint n_idle
);
  localparam logic [31:0] TAB = 32'h2000, RES = 32'h2400, LOCK = 32'h2600, SUM = 32'h2604,
                          REM = 32'h2608, DONE = 32'h2700, PARKTAB = 32'h1000,
                          A_BASE = 32'h8000, B_BASE = 32'h10000;

  logic rst_n = 1'b0;
  logic cfg_pc_mode, cfg_if_prio;
  int   lat;
  logic mem_req_valid, mem_req_ready, mem_rvalid, mem_rlast;
  mem_req_t mem_req;
  logic [31:0] mem_rdata;
  ncs_events_t ev;
  logic ret_valid; ctx_t ret_ctx; logic [31:0] ret_pc, ret_ir;

  ncesparc #(.NCTX(NCTX), .ICACHE_BYTES(ICACHE_BYTES)) dut (
    .clk, .rst_n, .cfg_pc_mode, .cfg_if_prio, .mem_req_valid, .mem_req,
    .mem_req_ready, .mem_rvalid, .mem_rdata, .mem_rlast, .ev,
    .ret_valid, .ret_ctx, .ret_pc, .ret_ir);
  ncs_mem_model #(.WORDS(WORDS), .DCACHE_BYTES(DCACHE_BYTES)) u_mem (
    .clk, .rst_n, .latency(lat), .mem_req_valid, .mem_req,
    .mem_req_ready, .mem_rvalid, .mem_rdata, .mem_rlast);

  localparam int G0=0, G2=2, G3=3, G4=4, O0=8, O1=9, O2=10, O4=12, O5=13,
                 L0=16, L1=17, L2=18, L3=19, L4=20, L5=21, L6=22, L7=23;

  int pc;
  logic [31:0] expect_part [NCTX];
  logic [31:0] expect_total;

  task automatic emit(input logic [31:0] w);
    u_mem.mem[pc/4] = w; pc += 4;
  endtask
  task automatic set32(input int rd, input logic [31:0] v);
    emit(sethi(rd, v)); emit(ori(rd, rd, int'(v[9:0])));
  endtask
  function automatic int here_to(input int target);
    return (target - pc) / 4;
  endfunction

  task automatic build(input bit contig, input int n);
    int work, loop, mloop, skip, lk, park, waitp, per;
    for (int i = 0; i < WORDS; i++) u_mem.mem[i] = 32'h0;
    per = n / NCTX;
    expect_total = 0;
    for (int k = 0; k < NCTX; k++) expect_part[k] = 0;
    for (int i = 0; i < n; i++) begin
      logic [31:0] a, b;
      int owner;
      a = $urandom_range(0, 255); b = $urandom_range(0, 255);
      u_mem.mem[A_BASE/4 + i] = a;
      u_mem.mem[B_BASE/4 + i] = b;
      owner = contig ? i / per : i % NCTX;
      expect_part[owner] += a * b;
      expect_total += a * b;
    end
    // slice descriptors: A pointer, B pointer, stride, count
    for (int k = 0; k < NCTX; k++) begin
      int off, stride;
      off    = contig ? 4 * k * per : 4 * k;
      stride = contig ? 4 : 4 * NCTX;
      u_mem.mem[TAB/4 + 4*k + 0] = A_BASE + off;
      u_mem.mem[TAB/4 + 4*k + 1] = B_BASE + off;
      u_mem.mem[TAB/4 + 4*k + 2] = stride;
      u_mem.mem[TAB/4 + 4*k + 3] = per;
    end
    u_mem.mem[REM/4] = NCTX;

    pc = 0;
    emit(rdasr(L0, 17));                       // own context number
    emit(orcc(G0, G0, L0));
    work = 4 * (11 + NCTX);
    emit(bicc(BNE, 0, here_to(work)));
    emit(nop());
    set32(G2, TAB); set32(G3, LOCK); set32(G4, RES);
    emit(sethi(L1, 32'h4000_0000));            // mapped, ready
    for (int k = 1; k < NCTX; k++) emit(wrasr(k + 1, L1, 0));
    emit(nop());
    if (pc != work) $fatal(1, "layout: WORK at %0h, expected %0h", pc, work);
    // WORK: fetch the slice descriptor
    emit(slli(L1, L0, 4));
    emit(ldr(L2, G2, L1));
    emit(addi(L1, L1, 4)); emit(ldr(L3, G2, L1));
    emit(addi(L1, L1, 4)); emit(ldr(L4, G2, L1));
    emit(addi(L1, L1, 4)); emit(ldr(L5, G2, L1));
    emit(ori(L6, G0, 0));
    loop = pc;
    emit(ld(O0, L2, 0));
    emit(ld(O1, L3, 0));
    emit(ori(O2, G0, 0));
    // software multiply: o2 = o0 * o1, one multiplier bit per pass
    mloop = pc;
    emit(andcci(G0, O1, 1));
    skip = pc + 12;
    emit(bicc(BE, 0, here_to(skip)));
    emit(srli(O1, O1, 1));                     // delay slot
    emit(add(O2, O2, O0));
    if (pc != skip) $fatal(1, "layout: skip");
    emit(orcc(G0, G0, O1));
    emit(bicc(BNE, 0, here_to(mloop)));
    emit(slli(O0, O0, 1));                     // delay slot
    emit(add(L6, L6, O2));
    emit(add(L2, L2, L4));
    emit(add(L3, L3, L4));
    emit(subcci(L5, L5, 1));
    emit(bicc(BNE, 0, here_to(loop)));
    emit(nop());
    emit(slli(L1, L0, 2));
    emit(str(L6, G4, L1));                     // partial -> RES[ctx]
    lk = pc;
    emit(ldstub(O4, G3, 0));
    emit(orcc(G0, G0, O4));
    emit(bicc(BNE, 0, here_to(lk)));
    emit(nop());
    emit(ld(O5, G3, SUM - LOCK)); emit(add(O5, O5, L6)); emit(st(O5, G3, SUM - LOCK));
    emit(ld(O5, G3, REM - LOCK)); emit(subcci(O5, O5, 1)); emit(st(O5, G3, REM - LOCK));
    emit(stb(G0, G3, 0));                      // release
    emit(orcc(G0, G0, L0));
    park = pc + 4 * 12;
    emit(bicc(BNE, 0, here_to(park)));
    emit(nop());
    // master: wait until every thread has added its part
    waitp = pc;
    emit(ld(O5, G3, REM - LOCK));
    emit(orcc(G0, G0, O5));
    emit(bicc(BNE, 0, here_to(waitp)));
    emit(nop());
    emit(ld(O5, G3, SUM - LOCK));
    set32(L1, DONE);
    emit(st(O5, L1, 0));
    emit(bicc(BA, 0, 0)); emit(nop());
    if (pc != park) $fatal(1, "layout: PARK at %0h, expected %0h", pc, park);
    // workers suspend themselves through a jump table (the ASR number is fixed per instruction)
    emit(sethi(L7, 32'hC000_0000));
    emit(slli(L1, L0, 4));
    set32(L2, PARKTAB);
    emit(add(L1, L1, L2));
    emit(jmpl(G0, L1, 0));
    emit(nop());
    if (pc > PARKTAB) $fatal(1, "program overlaps the jump table");
    for (int k = 1; k < NCTX; k++) begin
      pc = PARKTAB + 16 * k;
      emit(wrasr(k + 1, L7, 0));
      emit(bicc(BA, 0, 0));
      emit(nop());
      emit(nop());
    end
  endtask

  longint cnt_cyc, cnt_ins, cnt_idle;
  int cnt_miss, cnt_dep, cnt_sync;
  bit counting = 1'b0;
  always @(posedge clk) if (counting) begin
    cnt_cyc++;
    if (ret_valid)   cnt_ins++;
    if (ev.idle)     cnt_idle++;
    if (ev.sw_miss)  cnt_miss++;
    if (ev.sw_dep)   cnt_dep++;
    if (ev.sw_sync)  cnt_sync++;
  end

  initial begin
    done = 1'b0; ok = 1'b0; cycles = 0; instrs = 0;
    n_sw_miss = 0; n_sw_dep = 0; n_sw_sync = 0; n_idle = 0;
    cfg_pc_mode = 1'b1; cfg_if_prio = 1'b1; lat = 10;
    forever begin
      bit fin;
      @(posedge start);
      rst_n = 1'b0;
      cfg_pc_mode = pc_mode; cfg_if_prio = if_prio; lat = latency;
      build(contiguous, nelem);
      repeat (3) @(posedge clk);
      cnt_cyc = 0; cnt_ins = 0; cnt_idle = 0; cnt_miss = 0; cnt_dep = 0; cnt_sync = 0;
      rst_n = 1'b1;
      counting = 1'b1;
      fin = 1'b0;
      while (!fin) begin
        @(posedge clk);
        if (mem_req_valid && mem_req_ready && mem_req.kind == MK_STORE && mem_req.addr == DONE)
          fin = 1'b1;
      end
      counting = 1'b0;
      repeat (latency + 4) @(posedge clk);
      ok = (u_mem.mem[DONE/4] == expect_total) && (u_mem.mem[LOCK/4][31:24] == 8'h00)
           && (u_mem.mem[REM/4] == 0);
      for (int k = 0; k < NCTX; k++)
        if (u_mem.mem[RES/4 + k] != expect_part[k]) ok = 1'b0;
      cycles = cnt_cyc; instrs = cnt_ins; n_idle = cnt_idle;
      n_sw_miss = cnt_miss; n_sw_dep = cnt_dep; n_sw_sync = cnt_sync;
      done = 1'b1;
      @(negedge start);
      done = 1'b0;
    end
  end
endmodule
