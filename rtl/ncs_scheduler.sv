// ncs_scheduler: the Scheduling Unit's round-robin context choice.
//
// Given which contexts are ready (status ASR bit 30 set: a thread is mapped,
// bit 31 clear: it is not waiting) and the context that ran last, it picks
// the next ready one in round-robin order, starting after the last one and
// reaching the last one itself only when no other is ready. This is the
// document's rule; the pipeline uses the answer in the single scheduling
// cycle that follows a context switch. Combinational.
module ncs_scheduler
  import ncs_pkg::*;
#(
  parameter int NCTX = 16
) (
  input  logic [NCTX-1:0] ready,
  input  ctx_t            last,
  output logic            found,
  output ctx_t            next
);
  always_comb begin
    found = 1'b0;
    next  = last;
    for (int k = 1; k <= NCTX; k++) begin
      if (!found && ready[(int'(last) + k) % NCTX]) begin
        found = 1'b1;
        next  = ctx_t'((int'(last) + k) % NCTX);
      end
    end
  end
endmodule
