// history_stack: last-in first-out store of the routing information of
// messages preempted in an input virtual channel.
//
// When a higher-priority message preempts a lower-priority one in the middle
// of its transfer, the flit preemption logic pushes the lower message's
// routing information here; when the preempting message has left, the entry
// is popped to build a dummy header that resumes the preempted message.
// Its depth of s-1 entries (one per possible nesting level with s classes)
// follows the document. Push and pop in the same cycle replace the top entry.
// top is valid while empty is low.
module history_stack
  import router_pkg::*;
#(
  parameter int unsigned DEPTH = 15,
  parameter type         T     = route_info_t
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     top,
  output logic empty,
  output logic full
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  T              mem [DEPTH];
  logic [CW-1:0] sp;   // number of entries held

  assign empty = (sp == 0);
  assign full  = (sp == CW'(DEPTH));
  assign top   = mem[(sp == 0) ? 0 : sp - 1'b1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0;
    end else if (push && !pop) begin
      sp <= sp + 1'b1;
    end else if (pop && !push) begin
      sp <= sp - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      if (pop) mem[sp - 1'b1] <= din;   // replace top
      else     mem[sp]        <= din;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push && !pop |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
