// tb_ncs_traps: SPARC V8 traps on the NCESPARC+ processor at its default size.
//
// With 16 contexts each context owns two register windows, one of them
// marked in WIM for trap handlers, so the first SAVE of context 0 overflows.
// The program sets TBR, enables traps (PSR.ET) and then:
//   - executes SAVE: a window_overflow trap (type 0x05) enters the handler
//     in the reserved window with %l1/%l2 = PC/nPC of the SAVE, S = 1 and
//     ET = 0; the handler records PC, nPC, TBR and PSR, clears WIM and
//     returns with JMPL %l1 / RETT %l2, so the SAVE is executed again and
//     now succeeds;
//   - executes UDIV by zero: a division_by_zero trap (0x2A) whose handler
//     records the PC and returns past the instruction, which must not have
//     written its destination;
//   - executes TA 5: a software trap of type 0x85, handled the same way.
// Checked: every recorded value, the PSR after the return (CWP, ET, S),
// the destination left alone, three trap events, and that the program ends.
module tb_ncs_traps;
  import ncs_pkg::*;
  import tb_sparc_asm::*;

  localparam logic [31:0] TBA = 32'h2000, HND = 32'h1000, DATA = 32'h3000, DONE = 32'h3100;
  localparam int G0=0, G1=1, G2=2, G3=3, O1=9, O2=10, L1=17, L2=18, L3=19, L4=20;

  logic clk = 0, rst_n = 0;
  logic mem_req_valid, mem_req_ready, mem_rvalid, mem_rlast;
  mem_req_t mem_req;
  logic [31:0] mem_rdata;
  ncs_events_t ev;
  logic ret_valid; ctx_t ret_ctx; logic [31:0] ret_pc, ret_ir;

  ncesparc dut (.clk, .rst_n, .cfg_pc_mode(1'b1), .cfg_if_prio(1'b1), .mem_req_valid, .mem_req,
                .mem_req_ready, .mem_rvalid, .mem_rdata, .mem_rlast, .ev,
                .ret_valid, .ret_ctx, .ret_pc, .ret_ir);
  ncs_mem_model #(.WORDS(8192)) u_mem (.clk, .rst_n, .latency(10), .mem_req_valid, .mem_req,
                .mem_req_ready, .mem_rvalid, .mem_rdata, .mem_rlast);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_trap = 0;
  always @(posedge clk) if (rst_n && ev.trap) n_trap++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int pc;
  task automatic emit(input logic [31:0] w);
    u_mem.mem[pc/4] = w; pc += 4;
  endtask
  task automatic set32(input int rd, input logic [31:0] v);
    emit(sethi(rd, v)); emit(ori(rd, rd, int'(v[9:0])));
  endtask

  int pc_save, pc_div, pc_ta;

  task automatic build();
    for (int i = 0; i < 8192; i++) u_mem.mem[i] = 32'h0;
    pc = 0;
    set32(G1, TBA); emit(wrtbr(G1, 0));
    emit(rdpsr(G2)); emit(ori(G2, G2, 32'h20)); emit(wrpsr(G2, 0));   // ET = 1
    emit(nop()); emit(nop()); emit(nop());
    set32(G3, DATA);
    pc_save = pc;
    emit(save(G0, G0, 0));                    // overflows, then succeeds on return
    emit(rdpsr(L4)); emit(st(L4, G3, 28));
    emit(ori(O2, G0, 32'h55));
    pc_div = pc;
    emit(udiv(O2, O1, G0));                   // division by zero
    emit(st(O2, G3, 24));
    pc_ta = pc;
    emit(ticc(BA, G0, 5));                    // ta 5
    set32(L1, DONE); emit(st(G3, L1, 0));
    emit(bicc(BA, 0, 0)); emit(nop());
    // trap table: one branch per used entry
    pc = TBA + 16 * 32'h05; emit(bicc(BA, 0, (HND - pc) / 4)); emit(nop());
    pc = TBA + 16 * 32'h2A; emit(st(L1, G3, 16)); emit(jmpl(G0, L2, 0)); emit(rett(L2, 4));
    pc = TBA + 16 * 32'h85; emit(st(L1, G3, 20)); emit(jmpl(G0, L2, 0)); emit(rett(L2, 4));
    // window_overflow handler
    pc = HND;
    emit(st(L1, G3, 0)); emit(st(L2, G3, 4));
    emit(rdtbr(L3)); emit(st(L3, G3, 8));
    emit(rdpsr(L3)); emit(st(L3, G3, 12));
    emit(wrwim(G0, 0)); emit(nop()); emit(nop()); emit(nop());
    emit(jmpl(G0, L1, 0)); emit(rett(L2, 0));
  endtask

  initial begin
    bit done;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    done = 0;
    for (int c = 0; c < 20000 && !done; c++) begin
      @(posedge clk);
      if (mem_req_valid && mem_req_ready && mem_req.kind == MK_STORE && mem_req.addr == DONE) done = 1;
    end
    check(done, "program finished");
    repeat (20) @(posedge clk);
    check(u_mem.mem[DATA/4 + 0] == pc_save,          "overflow: %l1 = PC of SAVE");
    check(u_mem.mem[DATA/4 + 1] == pc_save + 4,      "overflow: %l2 = nPC of SAVE");
    check(u_mem.mem[DATA/4 + 2] == (TBA | 32'h50),   "overflow: TBR.tt = 0x05");
    begin
      logic [31:0] p;
      p = u_mem.mem[DATA/4 + 3];
      check(p[4:0] == 5'd0 && p[7] && !p[5],         $sformatf("handler PSR %h: CWP 0, S, ET off", p));
      p = u_mem.mem[DATA/4 + 7];
      check(p[4:0] == 5'd0 && p[7] && p[5],          $sformatf("PSR after SAVE %h: CWP 0, ET on", p));
    end
    check(u_mem.mem[DATA/4 + 4] == pc_div,           "division by zero trapped at the UDIV");
    check(u_mem.mem[DATA/4 + 6] == 32'h55,           "trapped UDIV wrote nothing");
    check(u_mem.mem[DATA/4 + 5] == pc_ta,            "software trap at TA");
    check(n_trap == 3, $sformatf("%0d traps taken, expected 3", n_trap));
    check(dut.st[0].tbr == (TBA | 32'h850),          "TBR.tt of the last trap = 0x85");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
