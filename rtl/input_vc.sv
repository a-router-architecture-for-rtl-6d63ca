// input_vc: one input virtual channel of the preemptive router, i.e. the
// flit preemption unit of stage 1 (input buffer, extra buffer, history stack
// and flit preemption logic).
//
// Write side (link, stage 1 entry): a header that arrives while the input
// buffer is occupied by a message of lower flow class, and while the extra
// buffer is free, is diverted into the extra buffer together with the rest
// of its message. A header of equal or lower class is queued in the input
// buffer behind the occupant. wr_ready is the link ACK: it is high when the
// buffer the offered flit would enter has room.
//
// Read side (flit decoder, stage 1 exit): when the extra buffer holds a
// header, preemption begins. If the message being read from the input buffer
// has already sent its header but not its tail past stage 1, a dummy tail
// (no payload, behaves like a tail) is created for it and its routing
// information is pushed on the history stack; its remaining flits stay in the
// input buffer. The preempting message is then read from the extra buffer.
// After its tail, a dummy header is built from the history stack and the
// preempted message resumes. Flits leave through a one-entry stage register
// (out_valid/out_flit), which may be refilled in the cycle it is emptied
// (out_pop), so one flit per cycle can pass.
//
// Follows the document: extra buffer and history stack of s-1 entries, dummy
// tail only if the preempted tail has not passed stage 1, remaining flits
// kept in the input buffer. Design choices: the extra buffer holds one
// diverted message at a time (flit-granular FIFO), so one preemption level
// is outstanding at a time per VC; the priority compared against is the
// highest class of the messages occupying the input buffer.
module input_vc
  import router_pkg::*;
#(
  parameter int unsigned NUM_CLASSES = 16,
  parameter int unsigned BUF_DEPTH   = 36,
  parameter int unsigned EXTRA_DEPTH = NUM_CLASSES - 1,
  parameter int unsigned HIST_DEPTH  = NUM_CLASSES - 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // link side
  input  logic  wr_valid,
  input  flit_t wr_flit,
  output logic  wr_ready,
  // stage-1 output register
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_pop,
  // events
  output logic  ev_divert,
  output logic  ev_preempt,
  output logic  ev_resume
);

  // ---------------- buffers ----------------
  logic  in_push, in_pop, in_empty, in_full;
  logic  ex_push, ex_pop, ex_empty, ex_full;
  flit_t in_head, ex_head;
  logic  hs_push, hs_pop, hs_empty, hs_full;
  route_info_t hs_top, hs_din;

  flit_fifo #(.DEPTH(BUF_DEPTH), .T(flit_t)) u_in_buf (
    .clk, .rst_n, .push(in_push), .din(wr_flit), .pop(in_pop),
    .dout(in_head), .empty(in_empty), .full(in_full), .count());

  flit_fifo #(.DEPTH(EXTRA_DEPTH), .T(flit_t)) u_extra_buf (
    .clk, .rst_n, .push(ex_push), .din(wr_flit), .pop(ex_pop),
    .dout(ex_head), .empty(ex_empty), .full(ex_full), .count());

  history_stack #(.DEPTH(HIST_DEPTH), .T(route_info_t)) u_hist (
    .clk, .rst_n, .push(hs_push), .din(hs_din), .pop(hs_pop),
    .top(hs_top), .empty(hs_empty), .full(hs_full));

  // ---------------- state ----------------
  logic              wr_mid, wr_lane_ex;      // write side inside a message, and its lane
  logic [PRIO_W-1:0] in_last_prio;            // class of last header queued in input buffer
  logic              rd_ex_mode;              // stage-1 reading the extra buffer
  logic              in_msg_open;             // input-buffer message header sent, tail not
  route_info_t       rd_in_info;              // routing info of the input-buffer message
  logic              st1_valid;
  flit_t             st1_flit;

  // ---------------- write side ----------------
  logic              occ_in, ex_busy, go_extra, lane_ex, wr_fire;
  logic [PRIO_W-1:0] occ_prio;

  always_comb begin
    occ_in   = in_msg_open || !hs_empty || !in_empty || (wr_mid && !wr_lane_ex);
    ex_busy  = !ex_empty || rd_ex_mode || (wr_mid && wr_lane_ex);
    occ_prio = '0;
    if (in_msg_open || !hs_empty) occ_prio = rd_in_info.prio;
    if ((!in_empty || (wr_mid && !wr_lane_ex)) && in_last_prio > occ_prio) occ_prio = in_last_prio;
    go_extra = is_head(wr_flit) && occ_in && !ex_busy && (wr_flit.prio > occ_prio);
    lane_ex  = is_head(wr_flit) ? go_extra : wr_lane_ex;
    wr_ready = lane_ex ? !ex_full : !in_full;
    wr_fire  = wr_valid && wr_ready;
    in_push  = wr_fire && !lane_ex;
    ex_push  = wr_fire && lane_ex;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_mid       <= 1'b0;
      wr_lane_ex   <= 1'b0;
      in_last_prio <= '0;
    end else if (wr_fire) begin
      if (is_head(wr_flit)) begin
        wr_mid     <= 1'b1;
        wr_lane_ex <= go_extra;
        if (!go_extra) in_last_prio <= wr_flit.prio;
      end else if (is_tail(wr_flit)) begin
        wr_mid     <= 1'b0;
      end
    end
  end

  // ---------------- read side: flit preemption logic ----------------
  logic  load_ok, emit;
  flit_t emit_flit;
  logic  nxt_ex_mode, nxt_open;
  route_info_t nxt_info;

  always_comb begin
    load_ok     = !st1_valid || out_pop;
    emit        = 1'b0;
    emit_flit   = in_head;
    in_pop      = 1'b0;
    ex_pop      = 1'b0;
    hs_push     = 1'b0;
    hs_pop      = 1'b0;
    hs_din      = rd_in_info;
    nxt_ex_mode = rd_ex_mode;
    nxt_open    = in_msg_open;
    nxt_info    = rd_in_info;
    ev_preempt  = 1'b0;
    ev_resume   = 1'b0;
    if (load_ok) begin
      if (rd_ex_mode || (!ex_empty && is_head(ex_head) && !in_msg_open)) begin
        // read the preempting message from the extra buffer
        if (!ex_empty) begin
          emit        = 1'b1;
          emit_flit   = ex_head;
          ex_pop      = 1'b1;
          nxt_ex_mode = !is_tail(ex_head);
        end
      end else if (!ex_empty && is_head(ex_head)) begin
        // preempt the open input-buffer message: dummy tail, save its route
        emit             = 1'b1;
        emit_flit        = '0;
        emit_flit.kind   = FLIT_TAIL;
        emit_flit.dummy  = 1'b1;
        emit_flit.prio   = rd_in_info.prio;
        emit_flit.dest   = rd_in_info.dest;
        hs_push          = 1'b1;
        nxt_open         = 1'b0;
        nxt_ex_mode      = 1'b1;
        ev_preempt       = 1'b1;
      end else if (!hs_empty) begin
        // resume the preempted message with a dummy header
        emit             = 1'b1;
        emit_flit        = '0;
        emit_flit.kind   = FLIT_HEAD;
        emit_flit.dummy  = 1'b1;
        emit_flit.prio   = hs_top.prio;
        emit_flit.dest   = hs_top.dest;
        hs_pop           = 1'b1;
        nxt_open         = 1'b1;
        nxt_info         = hs_top;
        ev_resume        = 1'b1;
      end else if (!in_empty) begin
        emit      = 1'b1;
        emit_flit = in_head;
        in_pop    = 1'b1;
        if (is_head(in_head)) begin
          nxt_open      = 1'b1;
          nxt_info.prio = in_head.prio;
          nxt_info.dest = in_head.dest;
        end else if (is_tail(in_head)) begin
          nxt_open      = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ex_mode  <= 1'b0;
      in_msg_open <= 1'b0;
      rd_in_info  <= '0;
      st1_valid   <= 1'b0;
      st1_flit    <= '0;
    end else begin
      rd_ex_mode  <= nxt_ex_mode;
      in_msg_open <= nxt_open;
      rd_in_info  <= nxt_info;
      if (load_ok) begin
        st1_valid <= emit;
        if (emit) st1_flit <= emit_flit;
      end
    end
  end

  assign out_valid = st1_valid;
  assign out_flit  = st1_flit;
  assign ev_divert = ex_push && is_head(wr_flit);

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) out_pop |-> st1_valid);
  a_hist_room: assert property (@(posedge clk) disable iff (!rst_n) hs_push |-> !hs_full);

endmodule
