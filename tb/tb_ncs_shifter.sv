// tb_ncs_shifter: checks SLL, SRL and SRA for every shift amount against
// the SystemVerilog shift operators on random and corner operands.
module tb_ncs_shifter;
  logic [31:0] a, y; logic [4:0] sh; logic right, arith;
  int checks = 0, failures = 0;
  ncs_shifter dut (.a, .shamt(sh), .right, .arith, .y);
  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] e;
      a = (n % 7 == 0) ? 32'h8000_0001 : $urandom;
      sh = 5'(n % 32);
      case ((n / 32) % 3)
        0: begin right = 0; arith = 0; end
        1: begin right = 1; arith = 0; end
        default: begin right = 1; arith = 1; end
      endcase
      #1;
      if (!right)     e = a << sh;
      else if (!arith) e = a >> sh;
      else            e = 32'($signed(a) >>> sh);
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h sh=%0d r=%b ar=%b y=%h exp=%h", a, sh, right, arith, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
