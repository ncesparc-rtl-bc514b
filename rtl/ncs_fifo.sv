// ncs_fifo: synchronous first-in first-out queue.
//
// Used by the Memory Interface Unit for its instruction-fetch and
// synchronization queues. DEPTH entries of type T held in a circular array
// with read and write pointers and an occupancy count. Push and pop may
// happen in the same cycle, also when the queue is full (the pop frees the
// slot). The head is visible combinationally on dout while not empty.
// Pushing a full queue or popping an empty one is a protocol error, which
// the assertions report.
module ncs_fifo #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     dout,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T             mem [DEPTH];
  logic [AW-1:0] rp, wp;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == 0);
  assign full  = (32'(count) == DEPTH);
  assign dout  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + ($bits(count))'(push) - ($bits(count))'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  // handshake rules
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop))
    else $error("ncs_fifo: push on a full queue");
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("ncs_fifo: pop on an empty queue");
endmodule
