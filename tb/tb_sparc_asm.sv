// tb_sparc_asm: SPARC V8 instruction encoders for the testbenches.
//
// Each function returns the 32-bit machine word of one instruction, so the
// testbenches can build their programs in SystemVerilog instead of loading
// precompiled images. Register numbers are architectural (0..31: %g0-%g7,
// %o0-%o7, %l0-%l7, %i0-%i7); immediates are 13-bit signed; branch
// displacements are in instructions relative to the branch.
package tb_sparc_asm;
  localparam logic [3:0] BN = 4'h0, BE = 4'h1, BA = 4'h8, BNE = 4'h9;

  function automatic logic [31:0] f3(input logic [1:0] op, input int rd, input logic [5:0] op3,
                                      input int rs1, input int rs2);
    return {op, 5'(rd), op3, 5'(rs1), 1'b0, 8'd0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] f3i(input logic [1:0] op, input int rd, input logic [5:0] op3,
                                       input int rs1, input int imm);
    return {op, 5'(rd), op3, 5'(rs1), 1'b1, 13'(imm)};
  endfunction

  // arithmetic / logic (op = 2)
  function automatic logic [31:0] alu (input logic [5:0] op3, input int rd, input int rs1, input int rs2);
    return f3(2'b10, rd, op3, rs1, rs2);
  endfunction
  function automatic logic [31:0] alui(input logic [5:0] op3, input int rd, input int rs1, input int imm);
    return f3i(2'b10, rd, op3, rs1, imm);
  endfunction
  function automatic logic [31:0] add  (input int rd, rs1, rs2); return alu (6'h00, rd, rs1, rs2); endfunction
  function automatic logic [31:0] addi (input int rd, rs1, imm); return alui(6'h00, rd, rs1, imm); endfunction
  function automatic logic [31:0] subcci(input int rd, rs1, imm); return alui(6'h14, rd, rs1, imm); endfunction
  function automatic logic [31:0] orcc (input int rd, rs1, rs2); return alu (6'h12, rd, rs1, rs2); endfunction
  function automatic logic [31:0] ori  (input int rd, rs1, imm); return alui(6'h02, rd, rs1, imm); endfunction
  function automatic logic [31:0] slli (input int rd, rs1, imm); return alui(6'h25, rd, rs1, imm); endfunction
  function automatic logic [31:0] srli (input int rd, rs1, imm); return alui(6'h26, rd, rs1, imm); endfunction
  function automatic logic [31:0] andcci(input int rd, rs1, imm); return alui(6'h11, rd, rs1, imm); endfunction
  function automatic logic [31:0] umul (input int rd, rs1, rs2); return alu (6'h0A, rd, rs1, rs2); endfunction
  function automatic logic [31:0] udiv (input int rd, rs1, rs2); return alu (6'h0E, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rdasr(input int rd, asr);      return f3(2'b10, rd, 6'h28, asr, 0); endfunction
  function automatic logic [31:0] wrasr(input int asr, rs1, imm); return f3i(2'b10, asr, 6'h30, rs1, imm); endfunction
  function automatic logic [31:0] wry  (input int rs1, imm);     return f3i(2'b10, 0, 6'h30, rs1, imm); endfunction
  function automatic logic [31:0] jmpl (input int rd, rs1, imm); return alui(6'h38, rd, rs1, imm); endfunction
  function automatic logic [31:0] save (input int rd, rs1, imm); return alui(6'h3C, rd, rs1, imm); endfunction
  function automatic logic [31:0] rdpsr(input int rd);           return f3(2'b10, rd, 6'h29, 0, 0); endfunction
  function automatic logic [31:0] rdtbr(input int rd);           return f3(2'b10, rd, 6'h2B, 0, 0); endfunction
  function automatic logic [31:0] wrpsr(input int rs1, imm);     return f3i(2'b10, 0, 6'h31, rs1, imm); endfunction
  function automatic logic [31:0] wrwim(input int rs1, imm);     return f3i(2'b10, 0, 6'h32, rs1, imm); endfunction
  function automatic logic [31:0] wrtbr(input int rs1, imm);     return f3i(2'b10, 0, 6'h33, rs1, imm); endfunction
  function automatic logic [31:0] rett (input int rs1, imm);     return f3i(2'b10, 0, 6'h39, rs1, imm); endfunction
  function automatic logic [31:0] ticc (input logic [3:0] cond, input int rs1, imm);
    return f3i(2'b10, int'(cond), 6'h3A, rs1, imm);
  endfunction
  function automatic logic [31:0] restore();                     return alu (6'h3D, 0, 0, 0); endfunction
  // memory (op = 3)
  function automatic logic [31:0] ld    (input int rd, rs1, imm); return f3i(2'b11, rd, 6'h00, rs1, imm); endfunction
  function automatic logic [31:0] ldr   (input int rd, rs1, rs2); return f3 (2'b11, rd, 6'h00, rs1, rs2); endfunction
  function automatic logic [31:0] st    (input int rd, rs1, imm); return f3i(2'b11, rd, 6'h04, rs1, imm); endfunction
  function automatic logic [31:0] str   (input int rd, rs1, rs2); return f3 (2'b11, rd, 6'h04, rs1, rs2); endfunction
  function automatic logic [31:0] stb   (input int rd, rs1, imm); return f3i(2'b11, rd, 6'h05, rs1, imm); endfunction
  function automatic logic [31:0] ldstub(input int rd, rs1, imm); return f3i(2'b11, rd, 6'h0D, rs1, imm); endfunction
  function automatic logic [31:0] swap  (input int rd, rs1, imm); return f3i(2'b11, rd, 6'h0F, rs1, imm); endfunction
  // format 2 and call
  function automatic logic [31:0] sethi(input int rd, input logic [31:0] value);
    return {2'b00, 5'(rd), 3'b100, value[31:10]};
  endfunction
  function automatic logic [31:0] nop(); return 32'h0100_0000; endfunction
  function automatic logic [31:0] bicc(input logic [3:0] cond, input bit a, input int disp);
    return {2'b00, a, cond, 3'b010, 22'(disp)};
  endfunction
  function automatic logic [31:0] call(input int disp); return {2'b01, 30'(disp)}; endfunction
endpackage
