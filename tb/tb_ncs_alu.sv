// tb_ncs_alu: checks all ten ALU operations and the four condition codes
// against a reference computed with 64-bit integer arithmetic, on corner
// values and random operands.
module tb_ncs_alu;
  import ncs_pkg::*;
  alu_op_e op; logic [31:0] a, b, y; logic cin; icc_t f;
  int checks = 0, failures = 0;
  ncs_alu dut (.op, .a, .b, .cin, .y, .flags(f));

  task automatic ref_model(input alu_op_e o, input logic [31:0] x, input logic [31:0] z, input logic ci,
                           output logic [31:0] r, output icc_t rf);
    longint unsigned s;
    longint sx;
    s = 0; rf = '0;
    case (o)
      ALU_ADD:  s = longint'(x) + longint'(z);
      ALU_ADDX: s = longint'(x) + longint'(z) + longint'(ci);
      ALU_SUB:  s = longint'(x) - longint'(z);
      ALU_SUBX: s = longint'(x) - longint'(z) - longint'(ci);
      ALU_AND:  s = longint'(x & z);
      ALU_ANDN: s = longint'(x & ~z);
      ALU_OR:   s = longint'(x | z);
      ALU_ORN:  s = longint'(x | ~z);
      ALU_XOR:  s = longint'(x ^ z);
      default:  s = longint'(~(x ^ z));
    endcase
    r = s[31:0];
    rf.n = r[31]; rf.z = (r == 0);
    if (o inside {ALU_ADD, ALU_ADDX, ALU_SUB, ALU_SUBX}) begin
      rf.c = s[32];
      if (o inside {ALU_ADD, ALU_ADDX}) sx = longint'($signed(x)) + longint'($signed(z)) + ((o == ALU_ADDX) ? longint'(ci) : 0);
      else                              sx = longint'($signed(x)) - longint'($signed(z)) - ((o == ALU_SUBX) ? longint'(ci) : 0);
      rf.v = (sx != longint'($signed(r)));
    end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1234_5678};
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] ey; icc_t ef;
      op  = alu_op_e'(n % 10);
      a   = (n < 360) ? corner[(n / 10) % 6] : $urandom;
      b   = (n < 360) ? corner[(n / 60) % 6] : $urandom;
      cin = $urandom_range(0, 1);
      #1;
      ref_model(op, a, b, cin, ey, ef);
      checks++;
      if (y !== ey || f !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h cin=%b: y=%h f=%b expected %h %b",
                                    op.name(), a, b, cin, y, f, ey, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
