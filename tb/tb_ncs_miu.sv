// tb_ncs_miu: drives the Memory Interface Unit against the behavioural
// memory. Checks: an instruction-fetch miss refills a whole line and wakes
// its context; word and byte loads return the right value to the right
// register and wake the waiting context; the fall-through path issues an
// access from an empty queue in the same cycle; with Processor Consistency a
// load matching a queued store is answered from the store before the store
// reaches memory, with Sequential Consistency it is not; a synch
// instruction is retried until it reads 0 and then writes 0 and wakes its
// context; fetch-first and alternating arbitration; a queued store goes
// before a synch retry; ls_ready drops when the load/store fifo is full.
module tb_ncs_miu;
  import ncs_pkg::*;
  localparam int LSQ = 4;
  logic clk = 0, rst_n = 0, pcm = 0, ifp = 1;
  logic if_push = 0, if_full, ls_push = 0, ls_ready;
  ctx_t if_ctx; logic [31:0] if_addr; ls_entry_t ls_in;
  logic mreq_v, mreq_r, mrv, mrlast; mem_req_t mreq; logic [31:0] mrd;
  logic fwe, ffirst, flast; logic [31:0] faddr, fdata;
  logic rf_we; preg_t rf_idx; logic [31:0] rf_data;
  logic wake_we; ctx_t wake_ctx; wait_e wake_why; preg_t wake_reg;
  logic evf, evr, evd; logic [2:0] lcnt;
  int latency = 5;
  int checks = 0, failures = 0;

  ncs_miu #(.NCTX(4), .IFQ_DEPTH(2), .LSQ_DEPTH(LSQ)) dut (
    .clk, .rst_n, .cfg_pc_mode(pcm), .cfg_if_prio(ifp),
    .if_push, .if_ctx, .if_addr, .if_full, .ls_push, .ls_in, .ls_ready,
    .mem_req_valid(mreq_v), .mem_req(mreq), .mem_req_ready(mreq_r), .mem_rvalid(mrv),
    .mem_rdata(mrd), .mem_rlast(mrlast),
    .fill_we(fwe), .fill_first(ffirst), .fill_last(flast), .fill_addr(faddr), .fill_data(fdata),
    .rf_we, .rf_idx, .rf_data, .wake_we, .wake_ctx, .wake_why, .wake_reg,
    .ev_forward(evf), .ev_sync_retry(evr), .ev_sync_done(evd), .lsq_count(lcnt));
  ncs_mem_model #(.WORDS(4096)) u_mem (.clk, .rst_n, .latency, .mem_req_valid(mreq_v),
    .mem_req(mreq), .mem_req_ready(mreq_r), .mem_rvalid(mrv), .mem_rdata(mrd), .mem_rlast(mrlast));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---- monitors ----
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  typedef struct { int t; preg_t idx; logic [31:0] d; } rfw_t;
  rfw_t rfw [$];
  typedef struct { int t; mem_kind_e k; logic [31:0] a; } mrq_t;
  mrq_t mrq [$];
  int nfill, nretry, ndone, nfwd, nwake_if, nwake_sync;
  logic [31:0] fill_seen [8];
  always @(posedge clk) if (rst_n) begin
    if (rf_we) rfw.push_back('{cyc, rf_idx, rf_data});
    if (mreq_v && mreq_r) mrq.push_back('{cyc, mreq.kind, mreq.addr});
    if (fwe) begin fill_seen[faddr[4:2]] = fdata; nfill++; end
    if (evr) nretry++;
    if (evd) ndone++;
    if (evf) nfwd++;
    if (wake_we && wake_why == W_IFETCH) nwake_if++;
    if (wake_we && wake_why == W_SYNC) nwake_sync++;
  end

  function automatic ls_entry_t mk(input mem_kind_e k, input logic [31:0] a, input int rd,
                                   input logic [31:0] d = 0, input mem_size_e sz = SZ_WORD,
                                   input bit sgn = 0, input bit sync = 0);
    ls_entry_t e;
    e.kind = k; e.sync = sync; e.ctx = 2; e.rd = preg_t'(rd); e.addr = a;
    e.size = sz; e.sgn = sgn; e.wdata = d;
    return e;
  endfunction
  task automatic push_ls(input ls_entry_t e);
    @(negedge clk);
    while (!ls_ready) @(negedge clk);
    ls_push = 1; ls_in = e;
    @(negedge clk); ls_push = 0;
  endtask
  task automatic idle(input int n); repeat (n) @(negedge clk); endtask
  function automatic bit rf_has(input int idx, input logic [31:0] d);
    foreach (rfw[i]) if (rfw[i].idx == preg_t'(idx) && rfw[i].d == d) return 1;
    return 0;
  endfunction

  initial begin
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = 32'h1000_0000 + i;
    nfill = 0; nretry = 0; ndone = 0; nfwd = 0; nwake_if = 0; nwake_sync = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    // 1. line refill
    @(negedge clk); if_push = 1; if_ctx = 3; if_addr = 32'h200; @(negedge clk); if_push = 0;
    idle(20);
    chk(nfill == 8 && nwake_if == 1, $sformatf("refill beats %0d wakes %0d", nfill, nwake_if));
    for (int w = 0; w < 8; w++) chk(fill_seen[w] == 32'h1000_0000 + 32'h80 + w, "refill data");

    // 2. loads, fall-through timing
    begin
      int t0;
      @(negedge clk); t0 = cyc;
      ls_push = 1; ls_in = mk(MK_LOAD, 32'h40, 77); #1;
      chk(mreq_v && mreq.addr == 32'h40, "fall-through issues in the push cycle");
      @(negedge clk); ls_push = 0;
      idle(10);
      chk(rfw.size() > 0 && rfw[$].idx == 77 && rfw[$].d == 32'h1000_0010, "word load");
      chk(rfw[$].t - t0 == latency + 1, $sformatf("load latency %0d", rfw[$].t - t0));
    end
    u_mem.mem[32'h44/4] = 32'h80F1_7FE2;
    push_ls(mk(MK_LOAD, 32'h44, 78, 0, SZ_BYTE, 1)); idle(8);
    chk(rf_has(78, 32'hFFFF_FF80), "signed byte load");
    push_ls(mk(MK_LOAD, 32'h46, 79, 0, SZ_HALF, 0)); idle(8);
    chk(rf_has(79, 32'h0000_7FE2), "unsigned halfword load");

    // 3. Sequential Consistency: load after queued store goes through memory
    pcm = 0; latency = 8;
    push_ls(mk(MK_LOAD, 32'h100, 80));
    push_ls(mk(MK_STORE, 32'h104, 0, 32'hCAFE_0001));
    push_ls(mk(MK_LOAD, 32'h104, 81));
    idle(40);
    chk(nfwd == 0 && rf_has(81, 32'hCAFE_0001), "SC load after store");

    // 4. Processor Consistency: forwarded from the queued store
    pcm = 1;
    begin
      int tl, ts;
      push_ls(mk(MK_LOAD, 32'h100, 82));
      push_ls(mk(MK_STORE, 32'h108, 0, 32'hCAFE_0002));
      push_ls(mk(MK_LOAD, 32'h108, 83, 0, SZ_BYTE));
      idle(40);
      chk(nfwd == 1 && rf_has(83, 32'h0000_00CA), "PC forwarded byte from word store");
      tl = -1; ts = -1;
      foreach (rfw[i]) if (rfw[i].idx == 83) tl = rfw[i].t;
      foreach (mrq[i]) if (mrq[i].k == MK_STORE && mrq[i].a == 32'h108) ts = mrq[i].t;
      chk(tl >= 0 && ts >= 0 && tl < ts, "forwarded load completes before the store is written");
      chk(u_mem.mem[32'h108/4] == 32'hCAFE_0002, "store reached memory");
    end

    // 5. synch instruction: retried until the lock reads 0
    latency = 3;
    u_mem.mem[32'h300/4] = 32'hFF00_0000;      // lock taken
    push_ls(mk(MK_LDSTUB, 32'h300, 90, 0, SZ_BYTE, 0, 1));
    idle(40);
    chk(nretry >= 3 && ndone == 0, $sformatf("synch retried %0d times while locked", nretry));
    // a store queued now goes before the next retry
    begin
      int n0;
      n0 = mrq.size();
      push_ls(mk(MK_STORE, 32'h304, 0, 32'h1));
      idle(10);
      for (int i = n0; i < mrq.size(); i++)
        if (mrq[i].k != MK_LDSTUB) begin chk(mrq[i].k == MK_STORE, "store before synch retry"); break; end
    end
    u_mem.mem[32'h300/4] = 32'h0000_0000;      // released
    idle(20);
    chk(ndone == 1 && nwake_sync == 1 && rf_has(90, 0), "synch terminates with 0 and wakes");
    chk(u_mem.mem[32'h300/4][31:24] == 8'hFF, "lock acquired by the final LDSTUB");

    // 6. arbitration: fetch-first vs alternate
    for (int mode = 0; mode < 2; mode++) begin
      int n0; mem_kind_e k [$];
      ifp = (mode == 0); latency = 6; k.delete();
      push_ls(mk(MK_LOAD, 32'h500, 91));                 // occupies memory
      n0 = mrq.size();
      @(negedge clk); if_push = 1; if_addr = 32'h400; @(negedge clk); if_addr = 32'h420;
      ls_push = 1; ls_in = mk(MK_LOAD, 32'h504, 92);
      @(negedge clk); if_push = 0; ls_in = mk(MK_LOAD, 32'h508, 93);
      @(negedge clk); ls_push = 0;
      idle(60);
      for (int i = n0; i < mrq.size(); i++) k.push_back(mrq[i].k);
      if (mode == 0) chk(k.size() == 4 && k[0] == MK_IFETCH && k[1] == MK_IFETCH, "fetch fifo first");
      else chk(k.size() == 4 && k[0] != k[1] && k[1] != k[2], $sformatf("alternating priority %p", k));
    end

    // 7. full load/store fifo
    latency = 30;
    begin
      int n; n = 0;
      @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        if (ls_ready) begin ls_push = 1; ls_in = mk(MK_STORE, 32'h600 + 4 * i, 0, i); n++; end
        else ls_push = 0;
        @(negedge clk);
      end
      ls_push = 0;
      chk(n == LSQ + 1, $sformatf("accepted %0d stores before full", n));
      chk(!ls_ready, "ls_ready low when full");
    end
    idle(400);
    chk(ls_ready, "ls_ready back after draining");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
