// vc_allocator: stage-3 arbitration for one output port (direction), with
// flexible output virtual-channel allocation.
//
// The output port is reached through NUM_SUB crossbar output ports
// ("subports"). Subport k may feed any of the CH_PER_SUB output virtual
// channels k*CH_PER_SUB .. k*CH_PER_SUB+CH_PER_SUB-1 and holds a channel
// identifier register naming the one it was given. Every cycle the arbiter
// grants one requesting header: the one of highest flow class, the lowest
// requester index on a tie. The grant reserves, for the whole message, the
// lowest-numbered free subport that still has a free channel in its set, and
// the lowest free channel of that set. The subport is released by
// rel_sub[k] when the tail (real or dummy) of the message crosses it; the
// channel stays allocated until that tail has left the output buffer on the
// link (rel_chan[c]). A free subport may therefore find some of its channels
// still draining, and picks another free one of its set.
// Grant outputs are combinational; the state changes at the clock edge.
// Releases take effect from the next cycle.
//
// From the document: message-granular crossbar-port reservation, a channel
// identifier of log(log s) bits per crossbar output port, each port with its
// own set of log s channels (so s/log s ports per direction). Design
// choices: the priority-then-index arbitration and the lowest-free selection.
module vc_allocator
  import router_pkg::*;
#(
  parameter int unsigned NUM_REQ    = 128,
  parameter int unsigned NUM_VCS    = 16,
  parameter int unsigned CH_PER_SUB = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1,
  localparam int unsigned NUM_SUB   = NUM_VCS / CH_PER_SUB,
  localparam int unsigned RW        = (NUM_REQ > 1) ? $clog2(NUM_REQ) : 1,
  localparam int unsigned SW        = (NUM_SUB > 1) ? $clog2(NUM_SUB) : 1,
  localparam int unsigned VCW       = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1,
  localparam int unsigned IW        = (CH_PER_SUB > 1) ? $clog2(CH_PER_SUB) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_REQ-1:0]  req,
  input  logic [PRIO_W-1:0]   req_prio [NUM_REQ],
  output logic                gnt_valid,
  output logic [RW-1:0]       gnt_idx,
  output logic [SW-1:0]       gnt_sub,
  output logic [VCW-1:0]      gnt_chan,
  input  logic [NUM_SUB-1:0]  rel_sub,
  input  logic [NUM_VCS-1:0]  rel_chan,
  output logic [NUM_SUB-1:0]  sub_busy,
  output logic [NUM_VCS-1:0]  chan_alloc,
  output logic [IW-1:0]       chan_id [NUM_SUB]
);

  // ---------------- choose a subport and channel ----------------
  // The first free subport that still has a free channel in its set, and
  // the first free channel of that set.
  logic          found;
  logic [SW-1:0] best_sub;
  logic [IW-1:0] best_ix;
  always_comb begin
    found    = 1'b0;
    best_sub = '0;
    best_ix  = '0;
    for (int k = 0; k < NUM_SUB; k++) begin
      for (int j = 0; j < CH_PER_SUB; j++) begin
        if (!found && !sub_busy[k] && !chan_alloc[k*CH_PER_SUB + j]) begin
          found    = 1'b1;
          best_sub = SW'(k);
          best_ix  = IW'(j);
        end
      end
    end
  end

  // ---------------- priority arbiter over requesting headers ----------------
  logic              any_req;
  logic [RW-1:0]     win;
  logic [PRIO_W-1:0] win_prio;

  always_comb begin
    any_req  = 1'b0;
    win      = '0;
    win_prio = '0;
    for (int i = 0; i < NUM_REQ; i++) begin
      if (req[i] && (!any_req || req_prio[i] > win_prio)) begin
        any_req  = 1'b1;
        win      = RW'(i);
        win_prio = req_prio[i];
      end
    end
  end

  assign gnt_valid = any_req && found;
  assign gnt_idx   = win;
  assign gnt_sub   = best_sub;
  assign gnt_chan  = VCW'(int'(best_sub) * CH_PER_SUB + int'(best_ix));

  // ---------------- reservation state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub_busy   <= '0;
      chan_alloc <= '0;
      for (int k = 0; k < NUM_SUB; k++) chan_id[k] <= '0;
    end else begin
      for (int k = 0; k < NUM_SUB; k++) if (rel_sub[k]) sub_busy[k] <= 1'b0;
      for (int c = 0; c < NUM_VCS; c++) if (rel_chan[c]) chan_alloc[c] <= 1'b0;
      if (gnt_valid) begin
        sub_busy[best_sub]                         <= 1'b1;
        chan_alloc[int'(best_sub)*CH_PER_SUB + int'(best_ix)] <= 1'b1;
        chan_id[best_sub]                          <= best_ix;
      end
    end
  end

  a_rel_sub:  assert property (@(posedge clk) disable iff (!rst_n) (rel_sub & ~sub_busy) == '0);
  a_rel_chan: assert property (@(posedge clk) disable iff (!rst_n) (rel_chan & ~chan_alloc) == '0);

endmodule
