// ncs_regfile: windowed register file with a scoreboard bit per register.
//
// NPREG (520) 32-bit registers: 8 globals and 32 overlapping windows of 24
// registers, addressed here by physical index (ncs_pkg::phys_reg maps a
// window and register name to it). Two read ports serve the D stage, write
// port W takes the pipeline result from the W stage and write port M takes
// data returned by the Memory Interface Unit for pending loads. Physical
// register 0 (%g0) always reads 0 and ignores writes.
//
// Reads are combinational and see a write of the same cycle (write-through),
// which models the document's split of the cycle into time steps: the result
// of the instruction in W is stored before the instruction in D reads its
// operands.
//
// Scoreboard: sb_set marks a register stale when D issues a load to it;
// a write on port M clears the bit. If both happen to one register in a
// cycle, the set wins (a new load was issued just as the old one returned).
// Three scoreboard lookups (both sources and the destination) report the
// stale bits, again seeing a clear of the same cycle. Timing: writes and
// scoreboard updates take effect at the rising clock edge.
module ncs_regfile
  import ncs_pkg::*;
#(
  parameter int NREG = ncs_pkg::NPREG
) (
  input  logic        clk,
  input  logic        rst_n,
  // read ports
  input  preg_t       ra_idx,
  output logic [31:0] ra_data,
  input  preg_t       rb_idx,
  output logic [31:0] rb_data,
  // pipeline write port
  input  logic        w_we,
  input  preg_t       w_idx,
  input  logic [31:0] w_data,
  // memory interface write port (also clears the scoreboard bit)
  input  logic        m_we,
  input  preg_t       m_idx,
  input  logic [31:0] m_data,
  // scoreboard
  input  logic        sb_set,
  input  preg_t       sb_set_idx,
  input  preg_t       sq0_idx,
  input  preg_t       sq1_idx,
  input  preg_t       sq2_idx,
  output logic        sq0_stale,
  output logic        sq1_stale,
  output logic        sq2_stale
);
  logic [31:0]     regs [NREG];
  logic [NREG-1:0] sb;

  function automatic logic [31:0] rd_port(input preg_t idx, input logic [31:0] stored,
                                          input logic wwe, input preg_t widx, input logic [31:0] wd,
                                          input logic mwe, input preg_t midx, input logic [31:0] md);
    if (idx == '0)                   return '0;
    if (mwe && midx == idx)          return md;
    if (wwe && widx == idx)          return wd;
    return stored;
  endfunction

  assign ra_data = rd_port(ra_idx, regs[ra_idx], w_we, w_idx, w_data, m_we, m_idx, m_data);
  assign rb_data = rd_port(rb_idx, regs[rb_idx], w_we, w_idx, w_data, m_we, m_idx, m_data);

  assign sq0_stale = sb[sq0_idx] && !(m_we && m_idx == sq0_idx);
  assign sq1_stale = sb[sq1_idx] && !(m_we && m_idx == sq1_idx);
  assign sq2_stale = sb[sq2_idx] && !(m_we && m_idx == sq2_idx);

  always_ff @(posedge clk) begin
    if (w_we && w_idx != '0) regs[w_idx] <= w_data;
    if (m_we && m_idx != '0) regs[m_idx] <= m_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb <= '0;
    end else begin
      if (m_we)                     sb[m_idx]      <= 1'b0;
      if (sb_set && sb_set_idx != '0) sb[sb_set_idx] <= 1'b1;
    end
  end

  // Only one of the two write ports may write a given register in a cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (w_we && m_we && w_idx != '0) |-> (w_idx != m_idx))
    else $error("ncs_regfile: both write ports target register %0d", w_idx);
endmodule
