// ncs_mem_model: behavioural model of the memory side of the processor's
// memory port (MMU, data cache and memory of the processing element).
//
// Not a design block: it stands in for the off-chip parts. One access at a
// time; mem_req_ready is high while idle. An access is answered `latency`
// cycles after it is accepted (latency >= 1): a line fill with LINE_WORDS
// beats on consecutive cycles, anything else with one beat. Stores, LDSTUB
// (byte set to 0xFF) and SWAP change memory when accepted and return the old
// word. The array is public so a testbench can load programs and check data.
// With DCACHE_BYTES > 0 a data cache is modelled for timing only: a 2-way
// set-associative tag store with LRU replacement and LINE_WORDS-word lines.
// A load, store or atomic that hits is answered one cycle after it is
// accepted; a miss takes `latency` and allocates the line. Instruction line
// fills always take `latency`.
module ncs_mem_model
  import ncs_pkg::*;
#(
  parameter int WORDS      = 16384,
  parameter int LINE_WORDS = 8,
  parameter int DCACHE_BYTES = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  int          latency,
  input  logic        mem_req_valid,
  input  mem_req_t    mem_req,
  output logic        mem_req_ready,
  output logic        mem_rvalid,
  output logic [31:0] mem_rdata,
  output logic        mem_rlast
);
  logic [31:0] mem [WORDS];
  logic        busy;
  int          wait_cnt, beats_left;
  logic [31:0] addr_q, old_q;
  mem_kind_e   kind_q;
  int          n_req;

  localparam int DSETS = (DCACHE_BYTES > 0) ? DCACHE_BYTES / (8 * LINE_WORDS) : 1;
  logic [31:0] dtag [DSETS][2];
  logic        dval [DSETS][2];
  logic        dlru [DSETS];

  // timing of one data access; updates the tag store
  function automatic int data_wait(input logic [31:0] a);
    int line, set;
    if (DCACHE_BYTES == 0) return latency;
    line = int'(a / (4 * LINE_WORDS));
    set  = line % DSETS;
    for (int w = 0; w < 2; w++)
      if (dval[set][w] && dtag[set][w] == 32'(line)) begin
        dlru[set] = 1'(1 - w);
        return 1;
      end
    begin
      int v;
      v = int'(dlru[set]);
      dtag[set][v] = 32'(line);
      dval[set][v] = 1'b1;
      dlru[set]    = 1'(1 - v);
    end
    return latency;
  endfunction

  function automatic int widx(input logic [31:0] a);
    return int'(a[31:2]) % WORDS;
  endfunction

  assign mem_req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; wait_cnt <= 0; beats_left <= 0; addr_q <= '0; old_q <= '0;
      kind_q <= MK_LOAD; mem_rvalid <= 1'b0; mem_rdata <= '0; mem_rlast <= 1'b0; n_req <= 0;
      for (int i = 0; i < DSETS; i++) begin
        dval[i][0] = 1'b0; dval[i][1] = 1'b0; dlru[i] = 1'b0;
        dtag[i][0] = '0;   dtag[i][1] = '0;
      end
    end else begin
      mem_rvalid <= 1'b0;
      mem_rlast  <= 1'b0;
      if (!busy && mem_req_valid) begin
        logic [31:0] w;
        int lat;
        w = mem[widx(mem_req.addr)];
        lat = (mem_req.kind == MK_IFETCH) ? latency : data_wait(mem_req.addr);
        busy     <= 1'b1;
        n_req    <= n_req + 1;
        wait_cnt <= (lat < 1) ? 0 : lat - 1;
        addr_q   <= mem_req.addr;
        kind_q   <= mem_req.kind;
        old_q    <= w;
        beats_left <= (mem_req.kind == MK_IFETCH) ? LINE_WORDS : 1;
        if (mem_req.kind == MK_STORE || mem_req.kind == MK_SWAP) begin
          for (int b = 0; b < 4; b++)
            if (mem_req.be[3-b]) w[31-8*b -: 8] = mem_req.wdata[31-8*b -: 8];
          mem[widx(mem_req.addr)] <= w;
        end else if (mem_req.kind == MK_LDSTUB) begin
          w[31-8*int'(mem_req.addr[1:0]) -: 8] = 8'hFF;
          mem[widx(mem_req.addr)] <= w;
        end
      end else if (busy) begin
        if (wait_cnt > 0) begin
          wait_cnt <= wait_cnt - 1;
        end else begin
          mem_rvalid <= 1'b1;
          mem_rdata  <= (kind_q == MK_IFETCH) ? mem[widx(addr_q)] : old_q;
          mem_rlast  <= (beats_left == 1);
          addr_q     <= addr_q + 32'd4;
          beats_left <= beats_left - 1;
          if (beats_left == 1) busy <= 1'b0;
        end
      end
    end
  end
endmodule
