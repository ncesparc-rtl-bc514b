// ncs_miu: the Memory Interface Unit of NCESPARC+.
//
// Decouples the pipeline from memory. Three queues, as in the document:
//   - the instruction-fetch fifo: line refills requested by instruction
//     cache misses, tagged with the context that missed;
//   - the load/store fifo: loads, stores, LDSTUB/SWAP and internal synch
//     instructions in program order, tagged with context and destination
//     physical register (which encodes the register window);
//   - the synchronization fifo: synch instructions whose termination
//     condition failed, waiting to be tried again. It holds one entry per
//     context, so it cannot overflow.
//
// Arbiter. Between the fetch fifo and the load/store side it either always
// favours instruction fetch (cfg_if_prio = 1) or alternates. On the
// load/store side a store at the head of the load/store fifo goes before the
// synchronization fifo; a synch instruction is retried when the load/store
// fifo is empty or before the next load (one retry per load, so loads are
// not starved). All of this follows the document.
//
// Memory consistency. With cfg_pc_mode = 0 (Sequential Consistency) every
// access goes to memory in program order. With cfg_pc_mode = 1 (Processor
// Consistency) a word load whose address matches a pending store in the
// load/store fifo takes its value from the youngest such store (the fifo is
// searched associatively, as the document notes) and completes at once
// without a memory access. This design forwards only from word stores;
// a load that overlaps a narrower pending store waits in order. LDSTUB and
// SWAP always go to memory after all earlier stores.
//
// Memory port: one access at a time. mem_req_valid/mem_req_ready hand over a
// request; every request is answered by mem_rvalid beats: a line fill
// returns LINE_BYTES/4 words, mem_rlast on the last; anything else returns
// one beat (the old memory word for loads and atomics, an acknowledge for
// stores). When the fifo is empty and the memory port idle, an access from
// the E stage is issued in the same cycle (the queue is fall-through), so a
// one-cycle data cache hit is back before the load interlock ends.
//
// Completion. A returning load writes its register through the register
// file's second write port (which also clears the scoreboard bit) and wakes
// the context if it waits for that register. A completed refill wakes the
// context that missed. A synch instruction that reads 0 writes 0 to its
// register and wakes its context; otherwise it goes to the synchronization
// fifo. Forwarded loads use the write port in cycles without a memory
// return. ls_ready tells the E stage whether it may hand over an access.
module ncs_miu
  import ncs_pkg::*;
#(
  parameter int NCTX       = 16,
  parameter int IFQ_DEPTH  = 4,
  parameter int LSQ_DEPTH  = 16,
  parameter int SYQ_DEPTH  = NCTX,
  parameter int LINE_BYTES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_pc_mode,
  input  logic        cfg_if_prio,
  // instruction fetch requests
  input  logic        if_push,
  input  ctx_t        if_ctx,
  input  logic [31:0] if_addr,
  output logic        if_full,
  // load / store / synch requests from E
  input  logic        ls_push,
  input  ls_entry_t   ls_in,
  output logic        ls_ready,
  // memory port
  output logic        mem_req_valid,
  output mem_req_t    mem_req,
  input  logic        mem_req_ready,
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata,
  input  logic        mem_rlast,
  // instruction cache refill
  output logic        fill_we,
  output logic        fill_first,
  output logic        fill_last,
  output logic [31:0] fill_addr,
  output logic [31:0] fill_data,
  // register file port M
  output logic        rf_we,
  output preg_t       rf_idx,
  output logic [31:0] rf_data,
  // wake-up
  output logic        wake_we,
  output ctx_t        wake_ctx,
  output wait_e       wake_why,
  output preg_t       wake_reg,
  // observation
  output logic        ev_forward,
  output logic        ev_sync_retry,
  output logic        ev_sync_done,
  output logic [$clog2(LSQ_DEPTH+1)-1:0] lsq_count
);
  typedef struct packed {
    ctx_t        ctx;
    logic [31:0] addr;
  } if_entry_t;

  typedef enum logic [1:0] {SRC_IF, SRC_LS, SRC_SY} src_e;

  localparam int LAW = (LSQ_DEPTH > 1) ? $clog2(LSQ_DEPTH) : 1;

  // ---------------- instruction fetch fifo ----------------
  if_entry_t ifq_head;
  logic      ifq_empty, ifq_pop;
  ncs_fifo #(.T(if_entry_t), .DEPTH(IFQ_DEPTH)) u_ifq (
    .clk, .rst_n,
    .push (if_push), .din ('{ctx: if_ctx, addr: if_addr}),
    .pop  (ifq_pop), .dout (ifq_head),
    .empty(ifq_empty), .full(if_full), .count());

  // ---------------- synchronization fifo ----------------
  ls_entry_t syq_head, syq_din;
  logic      syq_empty, syq_full, syq_push, syq_pop;
  ncs_fifo #(.T(ls_entry_t), .DEPTH(SYQ_DEPTH)) u_syq (
    .clk, .rst_n,
    .push (syq_push), .din (syq_din),
    .pop  (syq_pop), .dout (syq_head),
    .empty(syq_empty), .full(syq_full), .count());

  // ---------------- load/store fifo (associative) ----------------
  ls_entry_t     lsq [LSQ_DEPTH];
  logic [LAW-1:0] lsq_hd, lsq_tl;
  logic          lsq_push, lsq_pop;

  function automatic logic [LAW-1:0] lsq_inc(input logic [LAW-1:0] p);
    return (32'(p) == LSQ_DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  // store-to-load forwarding search (Processor Consistency)
  logic        fwd_hit;
  logic [31:0] fwd_word;
  always_comb begin
    logic      m;
    ls_entry_t e;
    m        = 1'b0;
    fwd_word = '0;
    fwd_hit  = 1'b0;
    // walk from the oldest entry to the newest; the last match is the youngest store
    for (int i = 0; i < LSQ_DEPTH; i++) begin
      e = lsq[(int'(lsq_hd) + i) % LSQ_DEPTH];
      if (i < int'(lsq_count) && e.kind == MK_STORE && !e.sync &&
          e.addr[31:2] == ls_in.addr[31:2]) begin
        m        = 1'b1;
        fwd_hit  = (e.size == SZ_WORD);
        fwd_word = e.wdata;
      end
    end
    fwd_hit = fwd_hit && m && cfg_pc_mode && ls_push &&
              ls_in.kind == MK_LOAD && !ls_in.sync;
  end

  // ---------------- state of the access in progress ----------------
  logic        busy;
  src_e        cur_src;
  ls_entry_t   cur;
  if_entry_t   cur_if;
  logic [$clog2(LINE_BYTES/4+1)-1:0] beat;
  logic        last_if;       // last grant went to instruction fetch
  logic        sync_served;   // a synch retry was made since the last load

  // forwarded load waiting for the write port
  logic        fwd_valid;
  ctx_t        fwd_ctx;
  preg_t       fwd_rd;
  logic [31:0] fwd_data;

  // ---------------- arbitration ----------------
  logic      ls_head_v, in_need, ls_cand_v, from_in, ls_is_store, sy_pick, side_v, grant_if;
  ls_entry_t ls_cand, side_e;
  logic      fire;

  always_comb begin
    ls_head_v   = (lsq_count != 0);
    in_need     = ls_push && !fwd_hit;
    ls_cand_v   = ls_head_v || in_need;
    from_in     = !ls_head_v;
    ls_cand     = ls_head_v ? lsq[lsq_hd] : ls_in;
    ls_is_store = (ls_cand.kind == MK_STORE) && !ls_cand.sync;
    sy_pick     = !syq_empty && (!ls_cand_v || (!ls_is_store && !sync_served));
    side_v      = sy_pick || ls_cand_v;
    side_e      = sy_pick ? syq_head : ls_cand;
    grant_if    = !ifq_empty && (!side_v || cfg_if_prio || !last_if);

    mem_req_valid = !busy && (!ifq_empty || side_v);
    if (grant_if) begin
      mem_req.kind  = MK_IFETCH;
      mem_req.addr  = ifq_head.addr;
      mem_req.be    = '0;
      mem_req.wdata = '0;
    end else begin
      mem_req.kind  = side_e.kind;
      mem_req.addr  = side_e.addr;
      unique case (side_e.kind)
        MK_STORE:  mem_req.be = store_be(side_e.addr[1:0], side_e.size);
        MK_SWAP:   mem_req.be = 4'b1111;
        MK_LDSTUB: mem_req.be = store_be(side_e.addr[1:0], SZ_BYTE);
        default:   mem_req.be = 4'b0000;
      endcase
      mem_req.wdata = store_lanes(side_e.wdata, side_e.size);
    end
    fire = mem_req_valid && mem_req_ready;

    ifq_pop  = fire && grant_if;
    syq_pop  = fire && !grant_if && sy_pick;
    lsq_pop  = fire && !grant_if && !sy_pick && ls_head_v;
    lsq_push = ls_push && !fwd_hit && !(fire && !grant_if && !sy_pick && from_in);
  end

  assign ls_ready = (32'(lsq_count) < LSQ_DEPTH) && !fwd_valid;

  // ---------------- response handling ----------------
  logic [31:0] rvalue;
  logic        resp_ls;
  always_comb begin
    resp_ls = busy && mem_rvalid && (cur_src != SRC_IF);
    rvalue  = load_extract(mem_rdata, cur.addr[1:0],
                           (cur.kind == MK_LDSTUB) ? SZ_BYTE : cur.size,
                           (cur.kind == MK_LDSTUB) ? 1'b0 : cur.sgn);

    fill_we    = busy && mem_rvalid && (cur_src == SRC_IF);
    fill_first = (beat == 0);
    fill_last  = mem_rlast;
    fill_addr  = cur_if.addr + 32'({beat, 2'b00});
    fill_data  = mem_rdata;

    rf_we = 1'b0; rf_idx = '0; rf_data = '0;
    wake_we = 1'b0; wake_ctx = '0; wake_why = W_NONE; wake_reg = '0;
    syq_push = 1'b0; syq_din = cur;
    ev_sync_retry = 1'b0; ev_sync_done = 1'b0; ev_forward = 1'b0;

    if (fill_we && mem_rlast) begin
      wake_we  = 1'b1;
      wake_ctx = cur_if.ctx;
      wake_why = W_IFETCH;
    end else if (resp_ls && cur.kind != MK_STORE) begin
      if (cur.sync) begin
        if (rvalue == 32'd0) begin
          rf_we = 1'b1; rf_idx = cur.rd; rf_data = 32'd0;
          wake_we = 1'b1; wake_ctx = cur.ctx; wake_why = W_SYNC; wake_reg = cur.rd;
          ev_sync_done = 1'b1;
        end else begin
          syq_push      = 1'b1;
          ev_sync_retry = 1'b1;
        end
      end else begin
        rf_we = 1'b1; rf_idx = cur.rd; rf_data = rvalue;
        wake_we = 1'b1; wake_ctx = cur.ctx; wake_why = W_DEP; wake_reg = cur.rd;
      end
    end
    // a forwarded load uses the port when the memory side does not
    if (fwd_valid && !rf_we && !wake_we) begin
      rf_we = 1'b1; rf_idx = fwd_rd; rf_data = fwd_data;
      wake_we = 1'b1; wake_ctx = fwd_ctx; wake_why = W_DEP; wake_reg = fwd_rd;
    end
    ev_forward = fwd_hit;
  end

  // ---------------- sequential state ----------------
  always_ff @(posedge clk) begin
    if (lsq_push) lsq[lsq_tl] <= ls_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lsq_hd <= '0; lsq_tl <= '0; lsq_count <= '0;
      busy <= 1'b0; cur_src <= SRC_IF; cur <= '0; cur_if <= '0; beat <= '0;
      last_if <= 1'b0; sync_served <= 1'b0;
      fwd_valid <= 1'b0; fwd_ctx <= '0; fwd_rd <= '0; fwd_data <= '0;
    end else begin
      if (lsq_push) lsq_tl <= lsq_inc(lsq_tl);
      if (lsq_pop)  lsq_hd <= lsq_inc(lsq_hd);
      lsq_count <= lsq_count + ($bits(lsq_count))'(lsq_push) - ($bits(lsq_count))'(lsq_pop);

      if (fire) begin
        busy    <= 1'b1;
        beat    <= '0;
        last_if <= grant_if;
        if (grant_if) begin
          cur_src <= SRC_IF;
          cur_if  <= ifq_head;
        end else begin
          cur_src <= sy_pick ? SRC_SY : SRC_LS;
          cur     <= side_e;
          if (sy_pick)                             sync_served <= 1'b1;
          else if (side_e.kind != MK_STORE)        sync_served <= 1'b0;
        end
      end else if (busy && mem_rvalid) begin
        beat <= beat + 1'b1;
        if (cur_src != SRC_IF || mem_rlast) busy <= 1'b0;
      end

      if (fwd_hit) begin
        fwd_valid <= 1'b1;
        fwd_ctx   <= ls_in.ctx;
        fwd_rd    <= ls_in.rd;
        fwd_data  <= load_extract(fwd_word, ls_in.addr[1:0], ls_in.size, ls_in.sgn);
      end else if (fwd_valid && !(resp_ls && cur.kind != MK_STORE) &&
                   !(fill_we && mem_rlast)) begin
        fwd_valid <= 1'b0;
      end
    end
  end

  // protocol rules
  assert property (@(posedge clk) disable iff (!rst_n) ls_push |-> ls_ready)
    else $error("ncs_miu: access pushed while not ready");
  assert property (@(posedge clk) disable iff (!rst_n) if_push |-> !if_full)
    else $error("ncs_miu: fetch request pushed on a full queue");
  assert property (@(posedge clk) disable iff (!rst_n) syq_push |-> !syq_full)
    else $error("ncs_miu: synchronization fifo overflow");
  assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> busy)
    else $error("ncs_miu: memory response with no access in progress");
endmodule
