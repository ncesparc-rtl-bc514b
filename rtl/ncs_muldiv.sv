// ncs_muldiv: 32-bit integer multiplier / divider.
//
// UMUL/SMUL form the 64-bit product of two 32-bit operands in the same
// cycle: the low word goes to the destination register and the high word to
// Y, as the document states. UDIV/SDIV divide the 64-bit value Y:a by b; the
// quotient goes to the destination register and, following the document
// (which here departs from plain SPARC V8), the remainder goes to Y.
//
// Division is iterative, one quotient bit per cycle (restoring division,
// 32 steps), so the E stage waits while it runs. Interface: hold req with
// the operands stable; done rises when the result is valid (in the request
// cycle for a multiply, 33 cycles after the request for a divide) and stays
// up until ack, the cycle in which the E stage takes the result. A quotient
// that does not fit in 32 bits saturates and sets v, as SPARC V8 does;
// division by zero returns all ones with v set (the pipeline traps on it
// first when traps are enabled, so this is seen only with ET = 0). Both the
// iterative algorithm and the divide-by-zero result are this design's
// choices.
module ncs_muldiv
  import ncs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  md_op_e      op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] y_in,
  input  logic        ack,
  output logic        done,
  output logic [31:0] result,
  output logic [31:0] y_out,
  output logic        v      // overflow (divide only)
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} st_e;
  st_e         st;
  logic [5:0]  step;
  logic [31:0] r_rem, r_q, r_d;
  logic        r_neg_q, r_neg_r, r_sgn, r_ov, r_dz;
  logic [31:0] fin_q, fin_r;
  logic        fin_v;

  wire is_div = (op == MD_UDIV) || (op == MD_SDIV);

  // multiply: combinational
  logic [63:0] prod;
  always_comb begin
    if (op == MD_SMUL) prod = 64'($signed(a) * $signed(b));
    else               prod = {32'd0, a} * {32'd0, b};
  end

  // operand magnitudes for the divide
  logic [63:0] dvd_mag;
  logic [31:0] dvs_mag;
  logic        dvd_neg, dvs_neg;
  always_comb begin
    dvd_neg = (op == MD_SDIV) && y_in[31];
    dvs_neg = (op == MD_SDIV) && b[31];
    dvd_mag = dvd_neg ? (~{y_in, a} + 64'd1) : {y_in, a};
    dvs_mag = dvs_neg ? (~b + 32'd1) : b;
  end

  // one restoring step
  logic [32:0] trial;
  always_comb trial = {r_rem, r_q[31]} - {1'b0, r_d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      step <= '0;
      r_rem <= '0; r_q <= '0; r_d <= '0;
      r_neg_q <= 1'b0; r_neg_r <= 1'b0; r_sgn <= 1'b0; r_ov <= 1'b0; r_dz <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (req && is_div) begin
          r_d     <= dvs_mag;
          r_rem   <= dvd_mag[63:32];
          r_q     <= dvd_mag[31:0];
          r_neg_q <= dvd_neg ^ dvs_neg;
          r_neg_r <= dvd_neg;
          r_sgn   <= (op == MD_SDIV);
          r_dz    <= (dvs_mag == 32'd0);
          r_ov    <= (dvd_mag[63:32] >= dvs_mag);   // quotient needs > 32 bits
          step    <= '0;
          st      <= S_RUN;
        end
        S_RUN: begin
          if (!trial[32]) begin
            r_rem <= trial[31:0];
            r_q   <= {r_q[30:0], 1'b1};
          end else begin
            r_rem <= {r_rem[30:0], r_q[31]};
            r_q   <= {r_q[30:0], 1'b0};
          end
          step <= step + 1'b1;
          if (step == 6'd31) st <= S_DONE;
        end
        S_DONE: if (ack) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // final sign handling and saturation
  always_comb begin
    fin_v = 1'b0;
    fin_r = r_neg_r ? (~r_rem + 32'd1) : r_rem;
    if (r_dz) begin
      fin_q = 32'hFFFF_FFFF;
      fin_r = 32'd0;
      fin_v = 1'b1;
    end else if (!r_sgn) begin
      fin_q = r_ov ? 32'hFFFF_FFFF : r_q;
      fin_v = r_ov;
    end else if (r_neg_q) begin
      if (r_ov || r_q > 32'h8000_0000) begin
        fin_q = 32'h8000_0000;
        fin_v = 1'b1;
      end else begin
        fin_q = ~r_q + 32'd1;
      end
    end else begin
      if (r_ov || r_q[31]) begin
        fin_q = 32'h7FFF_FFFF;
        fin_v = 1'b1;
      end else begin
        fin_q = r_q;
      end
    end
  end

  always_comb begin
    if (is_div) begin
      done   = (st == S_DONE);
      result = fin_q;
      y_out  = fin_r;
      v      = fin_v;
    end else begin
      done   = req;
      result = prod[31:0];
      y_out  = prod[63:32];
      v      = 1'b0;
    end
  end
endmodule
