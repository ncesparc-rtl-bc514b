// tb_ncs_branch_unit: checks Bicc condition evaluation for all 16
// conditions and all flag combinations, the annul rule, and the CALL, Bicc
// and JMPL targets.
module tb_ncs_branch_unit;
  import ncs_pkg::*;
  import tb_sparc_asm::*;
  logic [31:0] pc, ir, r1, o2, tgt; icc_t icc; logic cti, taken, annul;
  int checks = 0, failures = 0;
  ncs_branch_unit dut (.pc, .ir, .rs1_val(r1), .op2_val(o2), .icc, .is_cti(cti), .taken,
                       .annul, .target(tgt));
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  function automatic bit cond_ref(input int c, input icc_t f);
    case (c)
      0: return 0;               8: return 1;
      1: return f.z;             9: return !f.z;
      2: return f.z || (f.n != f.v);   10: return !(f.z || (f.n != f.v));
      3: return f.n != f.v;      11: return f.n == f.v;
      4: return f.c || f.z;      12: return !(f.c || f.z);
      5: return f.c;             13: return !f.c;
      6: return f.n;             14: return !f.n;
      default: return (c == 7) ? f.v : !f.v;
    endcase
  endfunction
  initial begin
    pc = 32'h0000_1000; r1 = 32'h100; o2 = 32'h24;
    for (int c = 0; c < 16; c++)
      for (int fl = 0; fl < 16; fl++)
        for (int a = 0; a < 2; a++) begin
          bit e, ea;
          ir = bicc(4'(c), a[0], -3); icc = 4'(fl); #1;
          e  = cond_ref(c, icc);
          ea = a && ((c == 8) || (c == 0) || !e);
          chk(cti && taken == e && annul == ea && tgt == pc - 12,
              $sformatf("bicc cond=%0d icc=%b a=%0d: taken=%b annul=%b tgt=%h", c, icc, a, taken, annul, tgt));
        end
    ir = call(32'h100); #1;
    chk(cti && taken && !annul && tgt == pc + 32'h400, "call target");
    ir = jmpl(15, 3, 8); #1;
    chk(cti && taken && tgt == r1 + o2, "jmpl target = rs1 + op2");
    ir = add(1, 2, 3); #1;
    chk(!cti && !taken && !annul, "non-branch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
