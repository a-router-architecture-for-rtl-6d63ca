// link_scheduler: buffer-status-aware link scheduler of one output port
// (Modified Highest Non N-ACK Flow).
//
// Each output virtual channel remembers the acknowledgement it got on its
// last transmission attempt (nack) and, after a negative one, counts the
// cycles since (cycle_wait), saturating at MAX_COUNT. A ready channel is
// eligible when it has no N-ACK, or when its counter has reached MAX_COUNT.
// A binary tree of comparators picks the channel: each leaf presents
// {eligible, flow class}; each node passes on the larger key, the left
// (lower-numbered) input on a tie, so the root gives the eligible channel of
// highest class, the first such on a tie. When no ready channel is eligible
// the same tree picks the highest-class ready channel, so the link is not left
// idle. The choice is combinational (sel_valid/sel); the attempt's answer
// (ack, same cycle) is stored for the selected channel at the clock edge, and
// an N-ACK restarts its counter. USE_WAIT = 0 gives the plain Highest Non
// N-ACK Flow algorithm (no counters).
//
// The algorithm, the tree and the log s-bit counter follow the document;
// MAX_COUNT = 2**log2(s) - 1 (the largest value of that counter) and the
// fallback to all ready channels are this design's choices.
module link_scheduler
  import router_pkg::*;
#(
  parameter int unsigned NUM_CH    = 16,
  parameter bit          USE_WAIT  = 1'b1,
  parameter int unsigned CNT_W     = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  parameter int unsigned MAX_COUNT = (1 << CNT_W) - 1,
  localparam int unsigned CHW      = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_CH-1:0]  ready,
  input  logic [PRIO_W-1:0]  cls [NUM_CH],
  output logic               sel_valid,
  output logic [CHW-1:0]     sel,
  input  logic               ack,        // answer to this cycle's attempt
  output logic [NUM_CH-1:0]  nack_q,
  output logic [NUM_CH-1:0]  elig
);

  localparam int unsigned LEAVES = 1 << CHW;
  localparam int unsigned KW     = PRIO_W + 1;

  logic [CNT_W-1:0] cycle_wait [NUM_CH];

  // tree nodes, heap numbered: node 1 is the root, leaves LEAVES..2*LEAVES-1
  logic           nd_valid [2*LEAVES];
  logic [KW-1:0]  nd_key   [2*LEAVES];
  logic [CHW-1:0] nd_idx   [2*LEAVES];

  always_comb begin
    for (int c = 0; c < NUM_CH; c++) begin
      elig[c] = ready[c] && (!nack_q[c] || (USE_WAIT && cycle_wait[c] == CNT_W'(MAX_COUNT)));
    end
    nd_valid[0] = 1'b0;
    nd_key[0]   = '0;
    nd_idx[0]   = '0;
    for (int l = 0; l < LEAVES; l++) begin
      nd_valid[LEAVES+l] = (l < NUM_CH) ? ready[l] : 1'b0;
      nd_key[LEAVES+l]   = (l < NUM_CH) ? {elig[l], cls[l]} : '0;
      nd_idx[LEAVES+l]   = CHW'(l);
    end
    for (int n = LEAVES - 1; n >= 1; n--) begin
      if (nd_valid[2*n] && (!nd_valid[2*n+1] || nd_key[2*n] >= nd_key[2*n+1])) begin
        nd_valid[n] = 1'b1;
        nd_key[n]   = nd_key[2*n];
        nd_idx[n]   = nd_idx[2*n];
      end else begin
        nd_valid[n] = nd_valid[2*n+1];
        nd_key[n]   = nd_key[2*n+1];
        nd_idx[n]   = nd_idx[2*n+1];
      end
    end
    sel_valid = nd_valid[1];
    sel       = nd_idx[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nack_q <= '0;
      for (int c = 0; c < NUM_CH; c++) cycle_wait[c] <= '0;
    end else begin
      for (int c = 0; c < NUM_CH; c++) begin
        if (sel_valid && sel == CHW'(c)) begin
          nack_q[c] <= !ack;
          if (!ack) cycle_wait[c] <= '0;
        end else if (nack_q[c] && cycle_wait[c] != CNT_W'(MAX_COUNT)) begin
          cycle_wait[c] <= cycle_wait[c] + 1'b1;
        end
      end
    end
  end

endmodule
