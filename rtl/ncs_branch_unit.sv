// ncs_branch_unit: branch target adder and condition evaluation.
//
// The document gives the Branch Unit an extra 32-bit adder that forms the
// destination either from two values read from registers (or a register and
// an immediate), which is JMPL, or, for the PC-relative CALL and Bicc, from
// the PC and the instruction's displacement. The unit also evaluates the
// SPARC Bicc condition against the integer condition codes and reports
// whether the delay slot is annulled (the a bit). It sits in the D stage, so
// a taken branch redirects the fetch of the instruction after the delay slot
// with no lost cycle. RETT forms its target like JMPL (its window and PSR
// effects are handled by the pipeline), and the condition result is also
// given to the pipeline for Ticc. Combinational.
module ncs_branch_unit
  import ncs_pkg::*;
(
  input  logic [31:0] pc,
  input  logic [31:0] ir,
  input  logic [31:0] rs1_val,  // by-passed register operand
  input  logic [31:0] op2_val,  // by-passed register or immediate operand
  input  icc_t        icc,
  output logic        is_cti,   // Bicc, CALL, JMPL or RETT
  output logic        cond_true, // ir[28:25] holds against icc (Bicc and Ticc)
  output logic        taken,
  output logic        annul,    // annul the delay-slot instruction
  output logic [31:0] target
);
  logic [1:0]  op;
  logic [2:0]  op2f;
  logic [5:0]  op3;
  logic [3:0]  cond;
  logic        abit, c, is_bicc, is_call, is_jmpl;
  logic [31:0] add_a, add_b;

  always_comb begin
    op      = ir[31:30];
    op2f    = ir[24:22];
    op3     = ir[24:19];
    cond    = ir[28:25];
    abit    = ir[29];
    is_bicc = (op == 2'b00) && (op2f == 3'b010);
    is_call = (op == 2'b01);
    is_jmpl = (op == 2'b10) && (op3 inside {OP3_JMPL, OP3_RETT});
    is_cti  = is_bicc | is_call | is_jmpl;

    unique case (cond[2:0])
      3'd0: c = 1'b0;                             // N / A
      3'd1: c = icc.z;                            // E
      3'd2: c = icc.z | (icc.n ^ icc.v);          // LE
      3'd3: c = icc.n ^ icc.v;                    // L
      3'd4: c = icc.c | icc.z;                    // LEU
      3'd5: c = icc.c;                            // CS
      3'd6: c = icc.n;                            // NEG
      default: c = icc.v;                         // VS
    endcase
    if (cond[3]) c = ~c;                          // upper half negates
    cond_true = c;

    // the single target adder
    if (is_jmpl) begin
      add_a = rs1_val;
      add_b = op2_val;
    end else if (is_call) begin
      add_a = pc;
      add_b = {ir[29:0], 2'b00};
    end else begin
      add_a = pc;
      add_b = {{8{ir[21]}}, ir[21:0], 2'b00};
    end
    target = add_a + add_b;

    taken = is_call | is_jmpl | (is_bicc & c);
    // a = 1: annul the delay slot unless a conditional branch is taken;
    // BA,a and BN,a always annul it.
    annul = is_bicc & abit & ((cond == COND_BA) | (cond == COND_BN) | ~c);
  end
endmodule
