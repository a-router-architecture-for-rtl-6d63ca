// output_port: stage 5 of one physical output channel: the output virtual
// channel buffers and the output link controller.
//
// The crossbar writes flits into the NUM_VCS output buffers (wr_en/wr_flit).
// Each cycle the link scheduler picks one non-empty buffer; its head flit is
// offered to the next router with rq, the virtual-channel number and the
// flit. The next router answers in the same cycle with ack; on ack the flit
// leaves the buffer, on a negative answer it stays and the scheduler records
// the N-ACK for that channel. When a tail flit leaves, rel_chan tells the
// stage-3 allocator that the channel is free again. The flow class used by
// the scheduler is the class carried by the head flit. Buffers and the
// RQ/ACK link follow the document; the same-cycle answer is this design's
// choice.
module output_port
  import router_pkg::*;
#(
  parameter int unsigned NUM_VCS   = 16,
  parameter int unsigned BUF_DEPTH = 36,
  parameter bit          USE_WAIT  = 1'b1,
  localparam int unsigned VCW      = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_VCS-1:0] wr_en,
  input  flit_t              wr_flit [NUM_VCS],
  output logic [NUM_VCS-1:0] buf_full,
  output logic [NUM_VCS-1:0] rel_chan,
  output logic               out_rq,
  output logic [VCW-1:0]     out_vc,
  output flit_t              out_flit,
  input  logic               out_ack,
  output logic               ev_nack,
  output logic               ev_wait_retry
);

  logic [NUM_VCS-1:0] buf_empty, pop;
  flit_t              head [NUM_VCS];
  logic [PRIO_W-1:0]  cls  [NUM_VCS];
  logic [NUM_VCS-1:0] nack_q, elig;
  logic               sel_valid;
  logic [VCW-1:0]     sel;

  for (genvar v = 0; v < NUM_VCS; v++) begin : g_buf
    flit_fifo #(.DEPTH(BUF_DEPTH), .T(flit_t)) u_buf (
      .clk, .rst_n, .push(wr_en[v]), .din(wr_flit[v]), .pop(pop[v]),
      .dout(head[v]), .empty(buf_empty[v]), .full(buf_full[v]), .count());
    assign cls[v] = head[v].prio;
  end

  link_scheduler #(.NUM_CH(NUM_VCS), .USE_WAIT(USE_WAIT)) u_sched (
    .clk, .rst_n, .ready(~buf_empty), .cls, .sel_valid, .sel,
    .ack(out_ack), .nack_q, .elig);

  assign out_rq   = sel_valid;
  assign out_vc   = sel;
  assign out_flit = head[sel];
  assign ev_nack  = sel_valid && !out_ack;
  // a channel that had an N-ACK is tried again because its counter expired
  assign ev_wait_retry = sel_valid && nack_q[sel] && elig[sel];

  always_comb begin
    pop      = '0;
    rel_chan = '0;
    if (sel_valid && out_ack) begin
      pop[sel]      = 1'b1;
      rel_chan[sel] = is_tail(head[sel]);
    end
  end

endmodule
