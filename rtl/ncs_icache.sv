// ncs_icache: direct-mapped, virtually addressed instruction cache.
//
// SIZE_BYTES of instructions in lines of LINE_BYTES (16 KB and 32-byte
// blocks in the document, so 512 lines with an 18-bit tag). The F stage
// presents the fetch address and gets hit and the instruction in the same
// cycle (the document gives an access time slightly under one processor
// cycle), so the lookup is combinational. Addresses are used as they come,
// with no translation, since all contexts share one process.
//
// A miss is refilled by the Memory Interface Unit one 32-bit word per beat:
// fill_first invalidates the line as its first word is written, each beat
// writes one word at fill_addr, and fill_last writes the tag and sets the
// line valid. Valid bits reset to 0; the data and tag arrays are not reset.
module ncs_icache #(
  parameter int SIZE_BYTES = 16384,
  parameter int LINE_BYTES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookup
  input  logic [31:0] addr,
  output logic        hit,
  output logic [31:0] instr,
  // refill
  input  logic        fill_we,
  input  logic        fill_first,
  input  logic        fill_last,
  input  logic [31:0] fill_addr,
  input  logic [31:0] fill_data
);
  localparam int NLINES = SIZE_BYTES / LINE_BYTES;
  localparam int NWORDS = SIZE_BYTES / 4;
  localparam int OFFW   = $clog2(LINE_BYTES);
  localparam int IDXW   = $clog2(NLINES);
  localparam int TAGW   = 32 - OFFW - IDXW;
  localparam int WAW    = $clog2(NWORDS);

  logic [31:0]     data  [NWORDS];
  logic [TAGW-1:0] tags  [NLINES];
  logic [NLINES-1:0] valid;

  logic [IDXW-1:0] idx, fidx;
  logic [TAGW-1:0] tag, ftag;
  logic [WAW-1:0]  widx, fwidx;

  assign idx   = addr[OFFW +: IDXW];
  assign tag   = addr[31 -: TAGW];
  assign widx  = addr[2 +: WAW];
  assign fidx  = fill_addr[OFFW +: IDXW];
  assign ftag  = fill_addr[31 -: TAGW];
  assign fwidx = fill_addr[2 +: WAW];

  assign hit   = valid[idx] && (tags[idx] == tag);
  assign instr = data[widx];

  always_ff @(posedge clk) begin
    if (fill_we) data[fwidx] <= fill_data;
    if (fill_we && fill_last) tags[fidx] <= ftag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (fill_we) begin
      if (fill_last)       valid[fidx] <= 1'b1;
      else if (fill_first) valid[fidx] <= 1'b0;
    end
  end
endmodule
