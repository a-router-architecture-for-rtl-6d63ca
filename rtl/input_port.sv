// input_port: receive side of one physical input channel (stage 1).
//
// The upstream router raises rq with a virtual-channel number and a flit;
// this port answers in the same cycle with ack, high when that virtual
// channel can take the flit, and the flit is transferred in that cycle
// (rq && ack). ack low is the negative acknowledgement (N-ACK) that the
// upstream link scheduler records. The flit is steered to the addressed
// virtual channel, each of which is an input_vc with its own preemption
// logic. The request/acknowledge handshake is the document's link protocol,
// here made synchronous with a one-cycle transfer (flit = phit) as this
// design's choice.
module input_port
  import router_pkg::*;
#(
  parameter int unsigned NUM_VCS     = 16,
  parameter int unsigned NUM_CLASSES = 16,
  parameter int unsigned BUF_DEPTH   = 36,
  localparam int unsigned VCW        = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_rq,
  input  logic [VCW-1:0]     in_vc,
  input  flit_t              in_flit,
  output logic               in_ack,
  output logic [NUM_VCS-1:0] vc_valid,
  output flit_t              vc_flit [NUM_VCS],
  input  logic [NUM_VCS-1:0] vc_pop,
  output logic [NUM_VCS-1:0] ev_divert,
  output logic [NUM_VCS-1:0] ev_preempt,
  output logic [NUM_VCS-1:0] ev_resume
);

  logic [NUM_VCS-1:0] wr_valid, wr_ready;

  always_comb begin
    wr_valid = '0;
    wr_valid[in_vc] = in_rq;
    in_ack = in_rq && wr_ready[in_vc];
  end

  for (genvar v = 0; v < NUM_VCS; v++) begin : g_vc
    input_vc #(.NUM_CLASSES(NUM_CLASSES), .BUF_DEPTH(BUF_DEPTH)) u_vc (
      .clk, .rst_n,
      .wr_valid  (wr_valid[v]),
      .wr_flit   (in_flit),
      .wr_ready  (wr_ready[v]),
      .out_valid (vc_valid[v]),
      .out_flit  (vc_flit[v]),
      .out_pop   (vc_pop[v]),
      .ev_divert (ev_divert[v]),
      .ev_preempt(ev_preempt[v]),
      .ev_resume (ev_resume[v]));
  end

endmodule
