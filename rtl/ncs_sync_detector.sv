// ncs_sync_detector: recognises busy-waiting synchronization loops.
//
// One small counter per context, updated by the instructions of that
// context as they execute in the E stage, as the document describes. A load,
// LDSTUB or SWAP sets the counter to 1 (and records its PC) unless the
// counter is 4; the three instructions of a standard loop that follow it
// increment it, any other instruction clears it. When the loop's load comes
// round again with the counter at 4 it would step the counter to 5: that is
// the trigger, and the pipeline replaces the load with an internal synch
// instruction and suspends the thread. The counter is then cleared.
//
// What counts as "a standard loop" is this design's reading: position 1 must
// be a condition-code setting ALU instruction (ORcc, SUBcc, ANDcc, ADDcc),
// position 2 a Bicc, position 3 any instruction (the delay slot), and the
// second load must be at the recorded PC. If enable is low (the context has
// ASR bit 26 or 29 set) no trigger is raised and the load restarts the count.
// Inputs are sampled when ex_fire is high; trigger is combinational.
module ncs_sync_detector
  import ncs_pkg::*;
#(
  parameter int NCTX = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ex_fire,     // an instruction of context ex_ctx executes in E
  input  ctx_t        ex_ctx,
  input  logic [31:0] ex_pc,
  input  logic        ex_is_load,  // LD*, LDSTUB or SWAP
  input  logic        ex_is_cc,    // ORcc/SUBcc/ANDcc/ADDcc
  input  logic        ex_is_bicc,
  input  logic        enable,
  output logic        trigger,
  output logic [2:0]  count_of_ex  // the executing context's counter (observation)
);
  logic [2:0]  cnt   [NCTX];
  logic [31:0] ldpc  [NCTX];

  assign count_of_ex = cnt[ex_ctx];
  assign trigger = ex_fire && ex_is_load && enable &&
                   (cnt[ex_ctx] == 3'd4) && (ldpc[ex_ctx] == ex_pc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCTX; i++) begin
        cnt[i]  <= '0;
        ldpc[i] <= '0;
      end
    end else if (ex_fire) begin
      if (trigger) begin
        cnt[ex_ctx] <= '0;
      end else if (ex_is_load) begin
        cnt[ex_ctx]  <= 3'd1;
        ldpc[ex_ctx] <= ex_pc;
      end else if ((cnt[ex_ctx] == 3'd1 && ex_is_cc) ||
                   (cnt[ex_ctx] == 3'd2 && ex_is_bicc) ||
                   (cnt[ex_ctx] == 3'd3)) begin
        cnt[ex_ctx] <= cnt[ex_ctx] + 3'd1;
      end else begin
        cnt[ex_ctx] <= '0;
      end
    end
  end
endmodule
