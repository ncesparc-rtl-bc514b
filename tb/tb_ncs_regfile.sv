// tb_ncs_regfile: checks the window mapping (outs of window w are the ins of
// window w-1, 8 globals shared, 520 distinct registers), random traffic on
// both write ports and both read ports against a model, write-through of
// same-cycle writes, %g0 reading zero, and the scoreboard (set by a load,
// cleared by the memory port, set winning over clear, clear seen in the
// same cycle).
module tb_ncs_regfile;
  import ncs_pkg::*;
  logic clk = 0, rst_n = 0;
  preg_t ra, rb, wi, mi, si, q0, q1, q2;
  logic [31:0] rad, rbd, wd, md;
  logic we = 0, mwe = 0, sset = 0, s0, s1, s2;
  logic [31:0] model [NPREG];
  logic [NPREG-1:0] sbm;
  int checks = 0, failures = 0;
  ncs_regfile dut (.clk, .rst_n, .ra_idx(ra), .ra_data(rad), .rb_idx(rb), .rb_data(rbd),
                   .w_we(we), .w_idx(wi), .w_data(wd), .m_we(mwe), .m_idx(mi), .m_data(md),
                   .sb_set(sset), .sb_set_idx(si), .sq0_idx(q0), .sq1_idx(q1), .sq2_idx(q2),
                   .sq0_stale(s0), .sq1_stale(s1), .sq2_stale(s2));
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    // window mapping
    begin
      bit seen [NPREG];
      foreach (seen[i]) seen[i] = 0;
      for (int w = 0; w < NWIN; w++) begin
        for (int r = 8; r < 16; r++)
          chk(phys_reg(5'(w), 5'(r)) == phys_reg(5'(w - 1), 5'(r + 16)), "outs(w) = ins(w-1)");
        for (int r = 0; r < 32; r++) seen[phys_reg(5'(w), 5'(r))] = 1;
        chk(phys_reg(5'(w), 5'd3) == 10'd3, "globals shared");
      end
      foreach (seen[i]) chk(seen[i], $sformatf("physical register %0d reachable", i));
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < NPREG; i++) model[i] = 0;
    sbm = '0;
    // initialise through port W
    for (int i = 1; i < NPREG; i++) begin
      @(negedge clk); we = 1; wi = preg_t'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wi = preg_t'($urandom_range(0, NPREG - 1)); wd = $urandom;
      mwe = $urandom_range(0, 1); mi = preg_t'($urandom_range(0, NPREG - 1)); md = $urandom;
      if (mwe && we && mi == wi) mwe = 0;
      sset = $urandom_range(0, 3) == 0; si = (n % 11 == 0) ? mi : preg_t'($urandom_range(0, NPREG - 1));
      ra = (n % 3 == 0) ? wi : preg_t'($urandom_range(0, NPREG - 1));
      rb = (n % 5 == 0) ? mi : preg_t'($urandom_range(0, NPREG - 1));
      q0 = ra; q1 = rb; q2 = (n % 2) ? mi : si;
      #1;
      begin
        logic [31:0] ea, eb;
        ea = (ra == 0) ? 0 : (mwe && mi == ra) ? md : (we && wi == ra) ? wd : model[ra];
        eb = (rb == 0) ? 0 : (mwe && mi == rb) ? md : (we && wi == rb) ? wd : model[rb];
        chk(rad == ea && rbd == eb, $sformatf("read %0d/%0d", ra, rb));
        chk(s0 == (sbm[q0] && !(mwe && mi == q0)) && s1 == (sbm[q1] && !(mwe && mi == q1)) &&
            s2 == (sbm[q2] && !(mwe && mi == q2)), "scoreboard lookup");
      end
      @(posedge clk); #1;
      if (we && wi != 0) model[wi] = wd;
      if (mwe && mi != 0) model[mi] = md;
      if (mwe) sbm[mi] = 0;
      if (sset && si != 0) sbm[si] = 1;
      we = 0; mwe = 0; sset = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
