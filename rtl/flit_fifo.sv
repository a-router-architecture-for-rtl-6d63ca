// flit_fifo: synchronous first-in first-out buffer for flits.
//
// Used as the input virtual-channel buffer, as the extra (preemption) buffer
// and as the output virtual-channel buffer. Storage is a circular array with
// read and write pointers and an occupancy counter. A push and a pop may
// happen in the same cycle, also when the buffer is full (the pop frees the
// slot). The head entry is visible on dout while empty is low (first-word
// fall-through), so a pop consumes dout in the cycle it is asserted.
// Pushing into a full buffer or popping an empty one is a protocol error and
// is flagged by assertions. The 36-flit default depth is the evaluated
// configuration; the structure is a plain design choice.
module flit_fifo
  import router_pkg::*;
#(
  parameter int unsigned DEPTH = 36,
  parameter type         T     = flit_t
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  T                           din,
  input  logic                       pop,
  output T                           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                      mem [DEPTH];
  logic [AW-1:0]         rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  assign empty = (cnt == 0);
  assign full  = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign count = cnt;
  assign dout  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      if (push && !pop) cnt <= cnt + 1'b1;
      else if (pop && !push) cnt <= cnt - 1'b1;
    end
  end

  // Storage has no reset: only entries between the pointers are ever read.
  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
