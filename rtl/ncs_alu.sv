// ncs_alu: the 32-bit ALU of the NCESPARC+ data path.
//
// Performs the ten SPARC integer operations ADD, ADDX, SUB, SUBX, AND, ANDN,
// OR, ORN, XOR and XNOR and reports the four integer condition codes:
// negative, zero, overflow and carry (for subtraction the carry is the
// borrow, as in SPARC V8). Purely combinational; the E stage registers the
// result. The operation count and the four flags are the document's; the
// operation list is the SPARC V8 set that matches that count.
module ncs_alu
  import ncs_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,   // icc.c, used by ADDX / SUBX
  output logic [31:0] y,
  output icc_t        flags
);
  logic [32:0] sum;
  logic        is_sub;

  always_comb begin
    is_sub = (op == ALU_SUB) || (op == ALU_SUBX);
    sum    = '0;
    unique case (op)
      ALU_ADD:  sum = {1'b0, a} + {1'b0, b};
      ALU_ADDX: sum = {1'b0, a} + {1'b0, b} + 33'(cin);
      ALU_SUB:  sum = {1'b0, a} - {1'b0, b};
      ALU_SUBX: sum = {1'b0, a} - {1'b0, b} - 33'(cin);
      ALU_AND:  sum = {1'b0, a & b};
      ALU_ANDN: sum = {1'b0, a & ~b};
      ALU_OR:   sum = {1'b0, a | b};
      ALU_ORN:  sum = {1'b0, a | ~b};
      ALU_XOR:  sum = {1'b0, a ^ b};
      ALU_XNOR: sum = {1'b0, ~(a ^ b)};
      default:  sum = '0;
    endcase
    y       = sum[31:0];
    flags.n = y[31];
    flags.z = (y == 32'd0);
    flags.c = 1'b0;
    flags.v = 1'b0;
    if (op == ALU_ADD || op == ALU_ADDX) begin
      flags.c = sum[32];
      flags.v = (a[31] == b[31]) && (y[31] != a[31]);
    end else if (is_sub) begin
      flags.c = sum[32];
      flags.v = (a[31] != b[31]) && (y[31] != a[31]);
    end
  end
endmodule
