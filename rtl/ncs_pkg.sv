// ncs_pkg: types and constants shared by the NCESPARC+ modules.
//
// Holds the SPARC V8 opcode fields the decoder uses, the mapping from a
// windowed register name (CWP, r0..r31) to one of the 520 physical registers,
// the request format of the Memory Interface Unit and the pipeline stage
// records. The window mapping and the 520-register count follow the document
// (32 windows of 24 registers overlapping by 8, plus 8 globals); the encodings
// of the memory request and of the per-context wait reasons are this design's
// own.
package ncs_pkg;

  localparam int XLEN     = 32;
  localparam int NWIN     = 32;             // register windows
  localparam int NPREG    = 8 + NWIN * 16;  // 520 physical registers
  localparam int MAX_CTX  = 16;             // hardware contexts supported

  typedef logic [9:0]  preg_t;              // physical register index
  typedef logic [3:0]  ctx_t;               // hardware context number
  typedef logic [31:0] word_t;

  // Physical register of architectural register r in window cwp.
  // Window w: outs r8-r15 -> 8 + 16w + 0..7, locals r16-r23 -> 8 + 16w + 8..15,
  // ins r24-r31 -> outs of window w+1 (SAVE decrements CWP, so the caller's
  // outs become the callee's ins).
  function automatic preg_t phys_reg(input logic [4:0] cwp, input logic [4:0] r);
    logic [4:0] w;
    logic [8:0] off;
    if (r < 5'd8) return preg_t'(r);
    if (r < 5'd24) begin
      off = {cwp, 4'b0000} + 9'(r - 5'd8);
    end else begin
      w   = cwp + 5'd1;
      off = {w, 4'b0000} + 9'(r - 5'd24);
    end
    return preg_t'(10'd8 + 10'(off));
  endfunction

  // ---- SPARC V8 op3 codes used (format 3) ----
  localparam logic [5:0] OP3_ADD  = 6'h00, OP3_AND  = 6'h01, OP3_OR   = 6'h02,
                         OP3_XOR  = 6'h03, OP3_SUB  = 6'h04, OP3_ANDN = 6'h05,
                         OP3_ORN  = 6'h06, OP3_XNOR = 6'h07, OP3_ADDX = 6'h08,
                         OP3_UMUL = 6'h0A, OP3_SMUL = 6'h0B, OP3_SUBX = 6'h0C,
                         OP3_UDIV = 6'h0E, OP3_SDIV = 6'h0F,
                         OP3_SLL  = 6'h25, OP3_SRL  = 6'h26, OP3_SRA  = 6'h27,
                         OP3_RDASR= 6'h28, OP3_RDPSR= 6'h29, OP3_RDWIM= 6'h2A,
                         OP3_RDTBR= 6'h2B, OP3_WRASR= 6'h30, OP3_WRPSR= 6'h31,
                         OP3_WRWIM= 6'h32, OP3_WRTBR= 6'h33, OP3_JMPL = 6'h38,
                         OP3_RETT = 6'h39, OP3_TICC = 6'h3A,
                         OP3_SAVE = 6'h3C, OP3_RESTORE = 6'h3D;
  // memory op3 (op = 3)
  localparam logic [5:0] OP3_LD   = 6'h00, OP3_LDUB = 6'h01, OP3_LDUH = 6'h02,
                         OP3_ST   = 6'h04, OP3_STB  = 6'h05, OP3_STH  = 6'h06,
                         OP3_LDSB = 6'h09, OP3_LDSH = 6'h0A, OP3_LDSTUB = 6'h0D,
                         OP3_SWAP = 6'h0F;

  // Branch condition codes (Bicc cond field)
  // SPARC V8 trap types raised by this design
  localparam logic [7:0] TT_ILLEGAL = 8'h02, TT_WOVF = 8'h05, TT_WUNF = 8'h06, TT_DIV0 = 8'h2A;

  localparam logic [3:0] COND_BN = 4'h0, COND_BE = 4'h1, COND_BA = 4'h8, COND_BNE = 4'h9;

  // ---- ALU ----
  typedef enum logic [3:0] {
    ALU_ADD, ALU_ADDX, ALU_SUB, ALU_SUBX, ALU_AND,
    ALU_ANDN, ALU_OR, ALU_ORN, ALU_XOR, ALU_XNOR
  } alu_op_e;

  typedef struct packed {
    logic n, z, v, c;
  } icc_t;

  // ---- multiplier / divider ----
  typedef enum logic [1:0] {MD_UMUL, MD_SMUL, MD_UDIV, MD_SDIV} md_op_e;

  // ---- memory ----
  typedef enum logic [2:0] {
    MK_IFETCH, MK_LOAD, MK_STORE, MK_LDSTUB, MK_SWAP
  } mem_kind_e;

  typedef enum logic [1:0] {SZ_BYTE = 2'd0, SZ_HALF = 2'd1, SZ_WORD = 2'd2} mem_size_e;

  // Request on the processor's memory port (to the MMU / data cache).
  // IFETCH returns LINE_WORDS beats, everything else one beat.
  typedef struct packed {
    mem_kind_e   kind;
    logic [31:0] addr;   // byte address (word aligned for IFETCH lines)
    logic [3:0]  be;     // byte enables for stores, big-endian: be[3] = byte 0
    logic [31:0] wdata;  // store / swap data, already placed in its byte lanes
  } mem_req_t;

  // Entry of the MIU load/store and synchronization fifos.
  typedef struct packed {
    mem_kind_e   kind;   // MK_LOAD, MK_STORE, MK_LDSTUB or MK_SWAP
    logic        sync;   // internal synch instruction (repeat until value is 0)
    ctx_t        ctx;
    preg_t       rd;     // destination physical register (context + window)
    logic [31:0] addr;
    mem_size_e   size;
    logic        sgn;    // sign-extend a loaded byte/halfword
    logic [31:0] wdata;  // register value to store / swap
  } ls_entry_t;

  // Why a context is waiting (status ASR bit 31 set).
  typedef enum logic [2:0] {
    W_NONE, W_IFETCH, W_DEP, W_SYNC, W_SW
  } wait_e;

  // Per-context architectural state.
  typedef struct packed {
    logic [31:0] pc, npc;      // restart point of a suspended thread
    icc_t        icc;
    logic [4:0]  cwp;
    logic        s, ps, et;
    logic [31:0] wim, tbr, y;
    logic        waiting;      // status ASR bit 31
    logic        mapped;       // bit 30
    logic [3:0]  dis;          // bits 29..26: 29 no switching, 28 no i-miss switch,
                               // 27 no dependence switch, 26 no sync-loop switch
    wait_e       why;
    preg_t       wait_reg;
  } ctx_state_t;

  // Pulses reporting the pipeline's mechanisms, one bit per event per cycle.
  typedef struct packed {
    logic retire;        // an instruction left the E stage
    logic sw_miss;       // context switch on an instruction cache miss
    logic sw_dep;        // context switch on a pending-load dependence
    logic sw_sync;       // context switch on a busy-waiting loop
    logic sw_soft;       // context switch forced by software (own ASR bit 31)
    logic idle;          // scheduler found no ready context
    logic interlock;     // one-cycle load interlock in D
    logic bypass;        // E->D operand by-pass used
    logic ls_stall;      // E stalled because the load/store fifo was full
    logic div_stall;     // E stalled on the divider
    logic imiss_stall;   // F waiting on a fill with switching disabled
    logic dep_stall;     // D waiting on a load with switching disabled
    logic annul;         // delay slot annulled
    logic st_forward;    // load served from a pending store
    logic sync_retry;    // synch instruction failed and was queued again
    logic sync_done;     // synch instruction terminated
    logic trap;          // a trap was taken
  } ncs_events_t;

  // Status ASR format (ASR 1..16, one per context)
  function automatic logic [31:0] status_word(input ctx_state_t s, input ctx_t id);
    return {s.waiting, s.mapped, s.dis, 22'd0, id};
  endfunction

  // Extract a loaded byte/halfword/word from a big-endian memory word.
  function automatic logic [31:0] load_extract(input logic [31:0] w, input logic [1:0] a,
                                               input mem_size_e sz, input logic sgn);
    logic [7:0]  b;
    logic [15:0] h;
    b = w[8*(3-int'(a)) +: 8];
    h = a[1] ? w[15:0] : w[31:16];
    case (sz)
      SZ_BYTE: return sgn ? {{24{b[7]}}, b} : {24'd0, b};
      SZ_HALF: return sgn ? {{16{h[15]}}, h} : {16'd0, h};
      default: return w;
    endcase
  endfunction

  function automatic logic [3:0] store_be(input logic [1:0] a, input mem_size_e sz);
    case (sz)
      SZ_BYTE: return 4'b1000 >> a;
      SZ_HALF: return a[1] ? 4'b0011 : 4'b1100;
      default: return 4'b1111;
    endcase
  endfunction

  function automatic logic [31:0] store_lanes(input logic [31:0] d, input mem_size_e sz);
    case (sz)
      SZ_BYTE: return {4{d[7:0]}};
      SZ_HALF: return {2{d[15:0]}};
      default: return d;
    endcase
  endfunction

endpackage
