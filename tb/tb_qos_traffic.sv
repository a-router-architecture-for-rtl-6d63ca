// tb_qos_traffic: traffic and deadline accounting for the workload tests,
// shared by tb_qos_single (one router) and tb_qos_mesh (a 2x2 mesh). The
// routers are at their default size (8 ports, 16 VCs, 36-flit buffers).
//
// NR = 1: one router whose 8 ports each serve one endpoint.
// NR = 4: router r sits at (x, y) = (r % 2, r / 2). Port 0 links it to its x
// neighbour (r ^ 1) and port 1 to its y neighbour (r ^ 2). Ports 2 and 3 each
// serve one endpoint, and ports 4 to 7 are left idle. The outputs of one
// router drive the inputs of the next directly: RQ, VC and flit go one way,
// and ACK comes back the other way in the same cycle. Routing is dimension
// order: x first, then y, then the endpoint's port.
// With uniform destinations, each endpoint's injection rate is also the load
// on every mesh link and ejection port. So the offered load is a fraction of
// the link bandwidth, which is one flit per cycle.
//
// Traffic per endpoint:
//   * three variable-bit-rate streams of random real-time classes 1..15. Each
//     sends one frame per frame period F: a burst of random size (uniform,
//     0.5x to 1.5x the mean), split into 36-flit messages;
//   * best-effort class-0 messages of 36 flits, arriving at random (one
//     Bernoulli trial per cycle, an approximation of Poisson arrivals).
// Every message takes a random input VC.
// The run covers two loads, 80% and 85%. Each load has five stages of the
// real-time to best-effort ratio x:y (1:4, 2:3, 1:1, 3:2, 4:1), two frame
// periods each. A frame meets its deadline if its last flit is delivered
// within F cycles of its arrival. The frame period is scaled down from
// 33.3 ms (3.33 million cycles at 100 MHz) to F cycles to keep the simulation
// short, and frame sizes scale with it.
//
// Checks:
//   * every flit of every message reaches the endpoint it is addressed to,
//     exactly once;
//   * within each segment (header or dummy header up to tail or dummy tail),
//     flits arrive in order;
//   * every frame is delivered;
//   * real-time messages see lower mean network latency than best-effort ones.
//     Network latency runs from the header entering the first router to the
//     last flit leaving. Endpoints serve their VCs round robin, so time spent
//     queued at the source is not counted.
// It prints the deadline missing probability and mean missing time per stage.
// Across routers, the two segments of a preempted message may arrive in either
// order. The endpoint puts them back together from the sequence numbers in the
// payload.
// The parent ends the simulation when `finished` rises.
//
// The source design's evaluation gives these: the two topologies, the router
// sizes, 36-flit messages, MPEG-like frames at 30 per second, the 80% and 85%
// loads, five ratio stages and a deadline of one frame period. This testbench
// chooses the rest: stream count, frame sizes, ratio values, endpoint
// placement, the routing order and the scaled frame period.
module tb_qos_traffic #(
  parameter int unsigned NR = 4                              // 1 or 4 routers
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import router_pkg::*;
  localparam int unsigned NP = 8, NV = 16;                   // ports, VCs
  localparam int unsigned NE = (NR == 1) ? 8 : 2;            // endpoints per router
  localparam int unsigned EP0 = (NR == 1) ? 0 : 2;           // port of the first endpoint
  localparam int unsigned VCW = $clog2(NV);
  localparam int unsigned MLEN = 36;                         // message length in flits
  localparam int unsigned F = 1500;                          // frame period and deadline, cycles
  localparam int unsigned NS = 3;                            // real-time streams per endpoint
  localparam int unsigned FRAMES_PER_STAGE = 2;

  logic clk = 0, rst_n = 0;
  logic cfg_we [NR], cfg_sel [NR];
  logic [DEST_W-1:0] cfg_addr [NR];
  logic [7:0] cfg_data [NR];
  logic in_rq [NR][NP], in_ack [NR][NP], out_rq [NR][NP], out_ack [NR][NP];
  logic [VCW-1:0] in_vc [NR][NP], out_vc [NR][NP];
  flit_t in_flit [NR][NP], out_flit [NR][NP];
  logic [NP-1:0] ev [NR][8];

  // endpoint-driven link signals
  logic src_rq [NR][NP];
  logic [VCW-1:0] src_vc [NR][NP];
  flit_t src_flit [NR][NP];

  for (genvar r = 0; r < NR; r++) begin : g_rt
    qos_router dut (
      .clk, .rst_n,
      .cfg_we(cfg_we[r]), .cfg_sel(cfg_sel[r]), .cfg_addr(cfg_addr[r]), .cfg_data(cfg_data[r]),
      .in_rq(in_rq[r]), .in_vc(in_vc[r]), .in_flit(in_flit[r]), .in_ack(in_ack[r]),
      .out_rq(out_rq[r]), .out_vc(out_vc[r]), .out_flit(out_flit[r]), .out_ack(out_ack[r]),
      .ev_divert(ev[r][0]), .ev_preempt(ev[r][1]), .ev_resume(ev[r][2]),
      .ev_alloc_block(ev[r][3]), .ev_flex_alloc(ev[r][4]), .ev_xbar_stall(ev[r][5]),
      .ev_nack(ev[r][6]), .ev_wait_retry(ev[r][7]));
  end

  // mesh wiring: port 0 to the x neighbour, port 1 to the y neighbour
  always_comb begin
    for (int r = 0; r < NR; r++) begin
      for (int p = 0; p < NP; p++) begin
        int n;
        n = int'(((p == 0) ? (r ^ 1) : (r ^ 2)) % NR);
        if (p < int'(EP0)) begin
          in_rq[r][p]   = out_rq[n][p];
          in_vc[r][p]   = out_vc[n][p];
          in_flit[r][p] = out_flit[n][p];
          out_ack[r][p] = in_ack[n][p];
        end else begin
          in_rq[r][p]   = src_rq[r][p];
          in_vc[r][p]   = src_vc[r][p];
          in_flit[r][p] = src_flit[r][p];
          out_ack[r][p] = 1'b1;          // endpoints always accept
        end
      end
    end
  end

  always #5 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // endpoint e of router r is node r*8 + EP0 + e
  function automatic int node_of(int r, int e);
    return r * int'(NP) + int'(EP0) + e;
  endfunction

  function automatic int route(int r, int dest);
    int dr;
    dr = dest / NP;
    if (NR == 1) return dest % NP;
    if ((dr % 2) != (r % 2)) return 0;
    if ((dr / 2) != (r / 2)) return 1;
    return dest % NP;
  endfunction

  // ---------------- messages and frames ----------------
  typedef struct {
    int prio, dest, len, frame, stage;
    longint born;
  } msg_t;
  msg_t msgs [$];
  int   got [int];                      // flits delivered per message
  longint inj [int];                    // cycle the header entered the first router
  bit   seen [int][int];                // [id][seq] delivered
  int   vcq [NR][NP][NV][$];            // message ids waiting per source VC
  int   pos [NR][NP][NV];
  int   rr [NR][NP];
  int   seg_last [NR][NP][NV];          // sink: last sequence number in the open segment, -1 none yet
  bit   seg_open [NR][NP][NV];
  int   done = 0;

  typedef struct { longint born; int left, stage; } frame_t;
  frame_t frames [$];
  int   frames_done = 0;

  int   n_ev [8];
  // per stage (load index * 5 + ratio index)
  int   st_frames [10], st_missed [10];
  longint st_miss_time [10];
  longint lat_rt = 0, lat_be = 0;
  int   n_rt = 0, n_be = 0;

  function automatic flit_t flit_of(int id, int seq);
    flit_t f = '0;
    f.kind = (seq == 0) ? FLIT_HEAD : (seq == msgs[id].len - 1) ? FLIT_TAIL : FLIT_BODY;
    f.prio = PRIO_W'(msgs[id].prio);
    f.dest = DEST_W'(msgs[id].dest);
    f.data = FLIT_DATA_W'({32'(id), 16'(seq)});
    return f;
  endfunction

  function automatic void add_msg(int r, int e, int prio, int dest, int len, int frame, int stage);
    msg_t m;
    int id;
    m.prio = prio; m.dest = dest; m.len = len; m.frame = frame; m.stage = stage; m.born = cyc;
    id = msgs.size();
    msgs.push_back(m);
    got[id] = 0;
    vcq[r][int'(EP0) + e][$urandom_range(0, NV - 1)].push_back(id);
  endfunction

  function automatic int rand_dest();
    return node_of($urandom_range(0, NR - 1), $urandom_range(0, NE - 1));
  endfunction

  // one frame of a real-time stream: its messages all arrive now
  function automatic void add_frame(int r, int e, int prio, int flits, int stage);
    frame_t fr;
    int fid, dest;
    fid = frames.size();
    fr.born = cyc; fr.stage = stage; fr.left = 0;
    dest = rand_dest();
    while (flits > 0) begin
      int len;
      len = (flits >= MLEN) ? MLEN : ((flits < 2) ? 2 : flits);
      add_msg(r, e, prio, dest, len, fid, stage);
      fr.left++;
      flits -= len;
    end
    frames.push_back(fr);
  endfunction

  task automatic cycle();
    int sel_v [NR][NP];
    @(negedge clk);
    for (int r = 0; r < NR; r++) for (int p = int'(EP0); p < int'(EP0 + NE); p++) begin
      sel_v[r][p] = -1;
      for (int k = 0; k < NV; k++) begin
        int v;
        v = (rr[r][p] + k) % NV;
        if (sel_v[r][p] < 0 && vcq[r][p][v].size() > 0) sel_v[r][p] = v;
      end
      src_rq[r][p]   = (sel_v[r][p] >= 0);
      src_vc[r][p]   = VCW'((sel_v[r][p] >= 0) ? sel_v[r][p] : 0);
      src_flit[r][p] = (sel_v[r][p] >= 0) ? flit_of(vcq[r][p][sel_v[r][p]][0], pos[r][p][sel_v[r][p]]) : '0;
    end
    #1;
    // endpoints receive
    for (int r = 0; r < NR; r++) for (int p = int'(EP0); p < int'(EP0 + NE); p++) if (out_rq[r][p]) begin
      flit_t f;
      int v, id, seq;
      f = out_flit[r][p]; v = out_vc[r][p];
      if (is_head(f)) begin
        check(!seg_open[r][p][v], "header on an open segment");
        seg_open[r][p][v] = 1;
        seg_last[r][p][v] = -1;
      end else begin
        check(seg_open[r][p][v], "body or tail outside a segment");
      end
      if (!f.dummy) begin
        id = int'(f.data[47:16]); seq = int'(f.data[15:0]);
        check(id < msgs.size(), "known message id");
        if (id < msgs.size()) begin
          check(msgs[id].dest == node_of(r, p - int'(EP0)), "delivered to its endpoint");
          check(!seen[id].exists(seq), "flit delivered once");
          check(seg_last[r][p][v] < 0 || seq == seg_last[r][p][v] + 1, "in order within a segment");
          check(f.prio == PRIO_W'(msgs[id].prio), "class intact");
          seen[id][seq] = 1;
          seg_last[r][p][v] = seq;
          got[id]++;
          if (got[id] == msgs[id].len) begin
            done++;
            if (msgs[id].prio == 0) begin lat_be += cyc - inj[id]; n_be++; end
            else                    begin lat_rt += cyc - inj[id]; n_rt++; end
            seen.delete(id);
            if (msgs[id].frame >= 0) begin
              int fid;
              fid = msgs[id].frame;
              frames[fid].left--;
              if (frames[fid].left == 0) begin
                longint t;
                t = cyc - frames[fid].born;
                frames_done++;
                st_frames[frames[fid].stage]++;
                if (t > longint'(F)) begin
                  st_missed[frames[fid].stage]++;
                  st_miss_time[frames[fid].stage] += t - longint'(F);
                end
              end
            end
          end
        end
      end
      if (is_tail(f)) seg_open[r][p][v] = 0;
    end
    // endpoints send
    for (int r = 0; r < NR; r++) for (int p = int'(EP0); p < int'(EP0 + NE); p++) if (src_rq[r][p] && in_ack[r][p]) begin
      int v, id;
      v = sel_v[r][p]; id = vcq[r][p][v][0];
      if (pos[r][p][v] == 0) inj[id] = cyc;
      pos[r][p][v]++;
      if (pos[r][p][v] == msgs[id].len) begin
        pos[r][p][v] = 0;
        void'(vcq[r][p][v].pop_front());
        rr[r][p] = (v + 1) % NV;
      end
    end
    for (int r = 0; r < NR; r++) for (int e = 0; e < 8; e++) n_ev[e] += $countones(ev[r][e]);
    @(posedge clk);
  endtask

  string ev_name [8] = '{"divert", "preempt", "resume", "alloc_block", "flex_alloc",
                         "xbar_stall", "nack", "wait_retry"};
  int loads [2] = '{80, 85};
  int rx [5] = '{1, 2, 1, 3, 4};
  int ry [5] = '{4, 3, 1, 2, 1};

  initial begin
    int cls [NR][NE][NS];
    int phase [NR][NE][NS];
    finished = 0; checks = 0; failures = 0;
    for (int r = 0; r < NR; r++) begin
      cfg_we[r] = 0; cfg_sel[r] = 0; cfg_addr[r] = '0; cfg_data[r] = '0;
      for (int p = 0; p < NP; p++) begin
        src_rq[r][p] = 0; src_vc[r][p] = '0; src_flit[r][p] = '0; rr[r][p] = 0;
        for (int v = 0; v < NV; v++) begin pos[r][p][v] = 0; seg_open[r][p][v] = 0; seg_last[r][p][v] = -1; end
      end
      for (int e = 0; e < NE; e++) for (int s = 0; s < NS; s++) begin
        cls[r][e][s] = $urandom_range(1, 15);
        phase[r][e][s] = $urandom_range(0, F - 1);
      end
    end
    foreach (n_ev[i]) n_ev[i] = 0;
    foreach (st_frames[i]) begin st_frames[i] = 0; st_missed[i] = 0; st_miss_time[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // routing tables (dimension order) and Virtual Clock ticks: class c may use
    // 1/(1 + (15 - c) / 4) of a link
    for (int d = 0; d < NR * NP; d++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        cfg_we[r] = 1; cfg_sel[r] = 0; cfg_addr[r] = DEST_W'(d); cfg_data[r] = 8'(route(r, d));
      end
    end
    for (int c = 0; c < 16; c++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        cfg_we[r] = 1; cfg_sel[r] = 1; cfg_addr[r] = DEST_W'(c); cfg_data[r] = 8'(1 + (15 - c) / 4);
      end
    end
    @(negedge clk);
    for (int r = 0; r < NR; r++) cfg_we[r] = 0;

    for (int li = 0; li < 2; li++) for (int si = 0; si < 5; si++) begin
      int stage, rt_mean, be_thr;
      stage = li * 5 + si;
      // mean frame size per stream, and best-effort arrival probability in 1/65536
      rt_mean = (loads[li] * rx[si] * int'(F)) / (100 * (rx[si] + ry[si]) * int'(NS));
      be_thr  = (loads[li] * ry[si] * 65536) / (100 * (rx[si] + ry[si]) * int'(MLEN));
      for (int t = 0; t < int'(F) * FRAMES_PER_STAGE; t++) begin
        for (int r = 0; r < NR; r++) for (int e = 0; e < NE; e++) begin
          for (int s = 0; s < NS; s++) if ((t % int'(F)) == phase[r][e][s])
            add_frame(r, e, cls[r][e][s], $urandom_range(rt_mean / 2, rt_mean * 3 / 2), stage);
          if ($urandom_range(0, 65535) < be_thr)
            add_msg(r, e, 0, rand_dest(), MLEN, -1, stage);
        end
        cycle();
      end
    end
    for (int i = 0; i < 200000 && done < msgs.size(); i++) cycle();

    check(done == msgs.size(), $sformatf("all messages delivered (%0d of %0d)", done, msgs.size()));
    check(frames_done == frames.size(), $sformatf("all frames delivered (%0d of %0d)", frames_done, frames.size()));
    for (int st = 0; st < 10; st++)
      $display("load %0d%%  x:y = %0d:%0d  frames %4d  missed %4d  mean missing time %0d cycles",
               loads[st / 5], rx[st % 5], ry[st % 5], st_frames[st], st_missed[st],
               (st_missed[st] != 0) ? st_miss_time[st] / longint'(st_missed[st]) : 0);
    $display("mean network latency (header injected to last flit delivered): real-time %0d cycles over %0d messages, best-effort %0d cycles over %0d messages",
             (n_rt != 0) ? lat_rt / longint'(n_rt) : 0, n_rt, (n_be != 0) ? lat_be / longint'(n_be) : 0, n_be);
    check(n_rt > 0 && n_be > 0, "both traffic kinds delivered");
    check(n_rt > 0 && n_be > 0 && lat_rt / longint'(n_rt) < lat_be / longint'(n_be), "real-time classes see lower latency");
    for (int e = 0; e < 8; e++) $display("mechanism %-12s happened %0d times", ev_name[e], n_ev[e]);
    finished = 1;
  end
endmodule
