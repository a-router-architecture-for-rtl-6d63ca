// tb_qos_router: end-to-end test of the QoS router (reduced size: 4 ports,
// 4 VCs per port in 2 subports of 2 channels, 8-flit buffers).
//
// Sources drive the RQ/ACK input links, each VC sending whole messages in
// order; sinks answer the output links with ACK or N-ACK. Every payload flit
// carries {message id, sequence number}. The sinks rebuild each output VC's
// stream (header or dummy header opens a segment, tail or dummy tail closes
// it) and check that every message arrives at the port its destination is
// routed to, complete and in order.
//   Phase 1: zero-load latency: an M-flit message is offered on the output
//            link 5 cycles after its header entered and its tail M+4 cycles
//            after (M + P - 1 with P = 5 stages), at one flit per cycle.
//   Phase 2: preemption: a class-1 message is stuck behind an output that
//            answers only N-ACK; a class-9 message on the same input VC is
//            diverted into the extra buffer. When the output drains the flit
//            waiting in the stage-1 register, the class-9 message preempts
//            the other (dummy tail) and finishes first; the class-1 message
//            resumes (dummy header).
//   Phase 3: random mixed traffic with random N-ACKs.
// Each mechanism (divert, preempt, resume, allocation blocked, flexible VC
// allocation, crossbar stall on a full output VC, N-ACK, retry after the
// wait counter expired) must be seen at least once.
module tb_qos_router;
  import router_pkg::*;
  localparam int unsigned NP = 4, NV = 4, DEPTH = 8, NMSG = 300;
  localparam int unsigned VCW = $clog2(NV);

  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_sel;
  logic [DEST_W-1:0] cfg_addr;
  logic [7:0] cfg_data;
  logic in_rq [NP], in_ack [NP], out_rq [NP], out_ack [NP];
  logic [VCW-1:0] in_vc [NP], out_vc [NP];
  flit_t in_flit [NP], out_flit [NP];
  logic [NP-1:0] ev_divert, ev_preempt, ev_resume, ev_alloc_block, ev_flex_alloc,
                 ev_xbar_stall, ev_nack, ev_wait_retry;

  qos_router #(.NUM_PORTS(NP), .NUM_VCS(NV), .BUF_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- messages ----------------
  typedef struct {
    int id, prio, dest, len;
  } msg_t;
  msg_t msgs [$];                 // all messages, indexed by id
  int   vcq [NP][NV][$];          // message ids waiting per input VC
  int   pos [NP][NV];             // next flit of the head message
  int   next_seq [int];           // sink side: next expected sequence number
  longint first_out [int], last_out [int], first_in [int];
  int   open_id [NP][NV];         // sink: message of the open segment, -1 none
  int   done = 0;
  bit   ack_mode [NP];            // 0: always ACK, 1: random
  bit   block [NP];               // port answers only N-ACK
  int   n_ev [8];

  function automatic int route_of(int dest);
    return dest % NP;
  endfunction

  function automatic int add_msg(int p, int v, int prio, int dest, int len);
    msg_t m;
    m.id = msgs.size(); m.prio = prio; m.dest = dest; m.len = len;
    msgs.push_back(m);
    vcq[p][v].push_back(m.id);
    next_seq[m.id] = 0;
    return m.id;
  endfunction

  function automatic flit_t flit_of(int id, int seq);
    flit_t f = '0;
    f.kind = (seq == 0) ? FLIT_HEAD : (seq == msgs[id].len - 1) ? FLIT_TAIL : FLIT_BODY;
    f.prio = PRIO_W'(msgs[id].prio);
    f.dest = DEST_W'(msgs[id].dest);
    f.data = FLIT_DATA_W'({32'(id), 16'(seq)});
    return f;
  endfunction

  // one clock cycle of all sources and sinks
  int rr [NP];
  task automatic cycle();
    int sel_v [NP];
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      sel_v[p] = -1;
      for (int k = 0; k < NV; k++) begin
        int v;
        v = (rr[p] + k) % NV;
        if (sel_v[p] < 0 && vcq[p][v].size() > 0) sel_v[p] = v;
      end
      in_rq[p] = (sel_v[p] >= 0);
      in_vc[p] = VCW'((sel_v[p] >= 0) ? sel_v[p] : 0);
      in_flit[p] = (sel_v[p] >= 0) ? flit_of(vcq[p][sel_v[p]][0], pos[p][sel_v[p]]) : '0;
      out_ack[p] = block[p] ? 1'b0 : ack_mode[p] ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
    #1;
    // sinks
    for (int o = 0; o < NP; o++) if (out_rq[o] && out_ack[o]) begin
      flit_t f;
      int v, id, seq;
      f = out_flit[o]; v = out_vc[o];
      if (is_head(f)) begin
        check(open_id[o][v] < 0, "header on an open output VC segment");
        open_id[o][v] = -2;       // id known at the first payload flit
        if (f.dummy) open_id[o][v] = -3;
      end else begin
        check(open_id[o][v] != -1, "body/tail outside a segment");
      end
      if (!f.dummy) begin
        id = int'(f.data[47:16]); seq = int'(f.data[15:0]);
        check(id < msgs.size(), "known message id");
        if (id < msgs.size()) begin
          check(route_of(msgs[id].dest) == o, "message left on its routed port");
          check(seq == next_seq[id], $sformatf("message %0d flit order (exp %0d got %0d)", id, next_seq[id], seq));
          check(f.prio == PRIO_W'(msgs[id].prio) && f.dest == DEST_W'(msgs[id].dest), "sideband intact");
          next_seq[id] = seq + 1;
          if (seq == 0) first_out[id] = cyc;
          if (seq == msgs[id].len - 1) begin last_out[id] = cyc; done++; end
        end
      end
      if (is_tail(f)) open_id[o][v] = -1;
    end
    // sources
    for (int p = 0; p < NP; p++) if (in_rq[p] && in_ack[p]) begin
      int v, id;
      v = sel_v[p]; id = vcq[p][v][0];
      if (pos[p][v] == 0) first_in[id] = cyc;
      pos[p][v]++;
      if (pos[p][v] == msgs[id].len) begin
        pos[p][v] = 0;
        void'(vcq[p][v].pop_front());
        rr[p] = (v + 1) % NV;
      end
    end
    n_ev[0] += $countones(ev_divert);     n_ev[1] += $countones(ev_preempt);
    n_ev[2] += $countones(ev_resume);     n_ev[3] += $countones(ev_alloc_block);
    n_ev[4] += $countones(ev_flex_alloc); n_ev[5] += $countones(ev_xbar_stall);
    n_ev[6] += $countones(ev_nack);       n_ev[7] += $countones(ev_wait_retry);
    @(posedge clk);
  endtask

  task automatic wait_done(int target, int limit);
    for (int i = 0; i < limit && done < target; i++) cycle();
  endtask

  string ev_name [8] = '{"divert", "preempt", "resume", "alloc_block", "flex_alloc",
                         "xbar_stall", "nack", "wait_retry"};

  initial begin
    int id, lo, hi;
    cfg_we = 0; cfg_sel = 0; cfg_addr = '0; cfg_data = '0;
    for (int p = 0; p < NP; p++) begin
      in_rq[p] = 0; in_vc[p] = '0; in_flit[p] = '0; out_ack[p] = 1;
      ack_mode[p] = 0; block[p] = 0; rr[p] = 0;
      for (int v = 0; v < NV; v++) begin pos[p][v] = 0; open_id[p][v] = -1; end
    end
    foreach (n_ev[i]) n_ev[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // routing table: node d -> port d % NP; class c gets tick 1 + (15-c)/4
    for (int d = 0; d < 2 * NP; d++) begin
      @(negedge clk); cfg_we = 1; cfg_sel = 0; cfg_addr = DEST_W'(d); cfg_data = 8'(route_of(d));
    end
    for (int c = 0; c < 16; c++) begin
      @(negedge clk); cfg_we = 1; cfg_sel = 1; cfg_addr = DEST_W'(c); cfg_data = 8'(1 + (15 - c) / 4);
    end
    @(negedge clk); cfg_we = 0;

    // ---- phase 1: zero-load latency, M = DEPTH flits
    id = add_msg(0, 1, 3, 2, DEPTH);
    wait_done(1, 200);
    check(done == 1, "phase 1 message delivered");
    check(first_out[id] - first_in[id] == 5, $sformatf("header latency 5 cycles (got %0d)", first_out[id] - first_in[id]));
    check(last_out[id] - first_in[id] == DEPTH + 4, $sformatf("message latency M+P-1 (got %0d)", last_out[id] - first_in[id]));

    // ---- phase 2: preemption in the input buffer
    block[1] = 1;
    lo = add_msg(2, 0, 1, 1, 2 * DEPTH);          // class 1 to port 1, blocked
    repeat (3 * DEPTH) cycle();
    hi = add_msg(2, 0, 9, 3, 6);                  // class 9 on the same VC to port 3
    repeat (20) cycle();
    check(n_ev[0] == 1, "higher class diverted into the extra buffer");
    check(!last_out.exists(lo) && !last_out.exists(hi), "both wait while the output is blocked");
    block[1] = 0;                                 // the stuck flit can now drain
    wait_done(3, 500);
    check(last_out.exists(lo) && last_out.exists(hi), "both messages delivered");
    check(last_out[hi] < last_out[lo], "preempting message finished first");
    check(n_ev[1] == 1 && n_ev[2] == 1, "one preemption and one resume");

    // ---- phase 3: random traffic
    for (int p = 0; p < NP; p++) ack_mode[p] = 1;
    for (int i = 0; i < NMSG; i++) begin
      void'(add_msg($urandom_range(0, NP - 1), $urandom_range(0, NV - 1), $urandom_range(0, 15),
                    $urandom_range(0, 2 * NP - 1), $urandom_range(2, 3 * DEPTH)));
    end
    // a hot spot: many messages to port 0 so that allocation blocks
    for (int i = 0; i < 40; i++) void'(add_msg(i % NP, (i / NP) % NV, i % 16, 0, 4));
    wait_done(msgs.size(), 150000);
    check(done == msgs.size(), $sformatf("all messages delivered (%0d of %0d)", done, msgs.size()));
    foreach (msgs[i]) if (next_seq[i] != msgs[i].len) begin
      check(0, $sformatf("message %0d incomplete", i));
      break;
    end
    for (int e = 0; e < 8; e++) begin
      $display("mechanism %-12s happened %0d times", ev_name[e], n_ev[e]);
      check(n_ev[e] > 0, $sformatf("mechanism %s exercised", ev_name[e]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
