// ncs_shifter: the 32-bit barrel shifter of the NCESPARC+ data path.
//
// Three operations, as the document gives them: logical left, logical right
// and arithmetic right shift, selected by two control bits, one for the
// direction (right) and one for the kind (arith). Built as five logarithmic
// stages of 1, 2, 4, 8 and 16 positions; a left shift reverses the word
// before and after a right-shift network, so one network serves both
// directions. Combinational.
module ncs_shifter (
  input  logic [31:0] a,
  input  logic [4:0]  shamt,
  input  logic        right,  // 1: shift right, 0: shift left
  input  logic        arith,  // 1: arithmetic (sign fill) for right shifts
  output logic [31:0] y
);
  function automatic logic [31:0] rev(input logic [31:0] x);
    for (int i = 0; i < 32; i++) rev[i] = x[31-i];
  endfunction

  logic [31:0] stage [6];
  logic        fill;

  always_comb begin
    fill     = right & arith & a[31];
    stage[0] = right ? a : rev(a);
    for (int s = 0; s < 5; s++) begin
      if (shamt[s]) stage[s+1] = (stage[s] >> (1 << s)) | ({32{fill}} << (32 - (1 << s)));
      else          stage[s+1] = stage[s];
    end
    y = right ? stage[5] : rev(stage[5]);
  end
endmodule
