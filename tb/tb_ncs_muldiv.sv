// tb_ncs_muldiv: checks UMUL/SMUL (64-bit product split over result and Y,
// available in the request cycle) and UDIV/SDIV of Y:a by b (quotient,
// remainder in Y, saturation on overflow) against 64-bit reference
// arithmetic, and that a divide takes exactly 33 cycles from request to done.
module tb_ncs_muldiv;
  import ncs_pkg::*;
  logic clk = 0, rst_n = 0, req = 0, ack = 0, done, v;
  md_op_e op; logic [31:0] a, b, yin, res, yout;
  int checks = 0, failures = 0;
  ncs_muldiv dut (.clk, .rst_n, .req, .op, .a, .b, .y_in(yin), .ack, .done, .result(res),
                  .y_out(yout), .v);
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      op = md_op_e'(n % 4); a = $urandom; b = $urandom;
      if (n % 8 >= 4) b = b >> $urandom_range(0, 30);
      yin = (op == MD_UDIV) ? $urandom % (b == 0 ? 1 : b) : $urandom;
      if (op == MD_SDIV) yin = {32{a[31]}};           // sign-extended dividend
      if (n % 37 == 0) yin = 32'h7FFF_FFFF;           // overflow cases
      if (n == 50) b = 0;
      req = 1;
      if (op inside {MD_UMUL, MD_SMUL}) begin
        longint unsigned p;
        #1;
        p = (op == MD_UMUL) ? {32'd0, a} * {32'd0, b} : 64'(longint'($signed(a)) * longint'($signed(b)));
        chk(done && res == p[31:0] && yout == p[63:32], $sformatf("mul %h*%h", a, b));
        ack = 1; @(negedge clk); ack = 0; req = 0;
      end else begin
        int cyc; longint unsigned dvd; longint unsigned q_u, r_u; longint q_s, r_s;
        logic [31:0] eq, er; bit ev;
        cyc = 0;
        while (!done) begin @(negedge clk); cyc++; end
        chk(cyc == 33, $sformatf("divide took %0d cycles", cyc));
        dvd = {yin, a};
        if (b == 0) begin eq = 32'hFFFF_FFFF; er = 0; ev = 1; end
        else if (op == MD_UDIV) begin
          q_u = dvd / {32'd0, b}; r_u = dvd % {32'd0, b};
          ev = (q_u > 64'hFFFF_FFFF); eq = ev ? 32'hFFFF_FFFF : q_u[31:0]; er = r_u[31:0];
        end else begin
          q_s = longint'(dvd) / longint'($signed(b)); r_s = longint'(dvd) % longint'($signed(b));
          ev = (q_s > 64'sh7FFF_FFFF) || (q_s < -64'sh8000_0000);
          eq = ev ? ((q_s > 0) ? 32'h7FFF_FFFF : 32'h8000_0000) : q_s[31:0]; er = r_s[31:0];
        end
        chk(res == eq && v == ev && (ev || yout == er),
            $sformatf("%s %h%h / %h -> q=%h r=%h v=%b expected %h %h %b", op.name(), yin, a, b, res, yout, v, eq, er, ev));
        ack = 1; @(negedge clk); ack = 0; req = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
