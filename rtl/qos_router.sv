// qos_router: five-stage pipelined wormhole router with QoS support for
// cluster interconnects.
//
// Pipeline (one flit per cycle per port):
//   1  input_port: RQ/ACK link receive, per-VC input buffers with
//      higher-priority preemption (extra buffer, history stack, dummy
//      tail/header creation) and a stage-1 flit register per VC.
//   2  routing_unit: a header in a stage-1 register is looked up in the
//      routing table (one header per input port per cycle, lowest VC first);
//      the output port is registered. Body and tail flits skip this stage.
//   3  vc_allocator per output port: the routed header of highest flow class
//      reserves a free crossbar subport of its output port and a free output
//      VC from that subport's channel set, for the whole message. A message
//      resumed after preemption is held here until the output VC that
//      carried its earlier part has sent that part's dummy tail, which keeps
//      its flits in order on the output link.
//   4  vclock_scheduler per input port picks, by Virtual Clock stamps, one VC
//      whose flit holds a reservation and whose output VC buffer has room;
//      the crossbar moves it into the output VC buffer. A tail (real or
//      dummy) frees the subport.
//   5  output_port: output VC buffers; the Modified Highest Non N-ACK link
//      scheduler offers one flit per cycle to the next router; an output VC
//      is freed when its tail leaves.
// A header entering on in_rq/in_ack in cycle t is offered on out_rq in cycle
// t+5 when nothing blocks it, and an M-flit message leaves completely by
// t+M+4, i.e. M + (P-1) cycles with P = 5.
//
// Configuration: cfg_sel = 0 writes routing-table entry cfg_addr (a
// destination node) with output port cfg_data; cfg_sel = 1 writes the
// Virtual Clock tick (cycles per flit) of flow class cfg_addr. After reset
// every destination maps to port 0 and every tick is 1.
//
// The stage structure, preemption, flexible VC allocation, link scheduling
// and the evaluated sizes (8 ports, 16 VCs, 128-bit flits, 36-flit buffers)
// follow the document. One flow class per VC count (16), the routing-table
// organisation, the same-cycle link handshake and all encodings are this
// design's choices. The ev_* outputs pulse when the named mechanism acts and
// exist for observation only.
module qos_router
  import router_pkg::*;
#(
  parameter int unsigned NUM_PORTS   = 8,
  parameter int unsigned NUM_VCS     = 16,
  parameter int unsigned NUM_CLASSES = 16,
  parameter int unsigned BUF_DEPTH   = 36,
  parameter int unsigned CH_PER_SUB  = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1,
  parameter bit          USE_WAIT    = 1'b1,
  localparam int unsigned PW         = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int unsigned VCW        = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1,
  localparam int unsigned NUM_SUB    = NUM_VCS / CH_PER_SUB,
  localparam int unsigned SW         = (NUM_SUB > 1) ? $clog2(NUM_SUB) : 1,
  localparam int unsigned IW         = (CH_PER_SUB > 1) ? $clog2(CH_PER_SUB) : 1,
  localparam int unsigned NUM_REQ    = NUM_PORTS * NUM_VCS,
  localparam int unsigned RW         = (NUM_REQ > 1) ? $clog2(NUM_REQ) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic                 cfg_we,
  input  logic                 cfg_sel,
  input  logic [DEST_W-1:0]    cfg_addr,
  input  logic [7:0]           cfg_data,
  // input links
  input  logic                 in_rq   [NUM_PORTS],
  input  logic [VCW-1:0]       in_vc   [NUM_PORTS],
  input  flit_t                in_flit [NUM_PORTS],
  output logic                 in_ack  [NUM_PORTS],
  // output links
  output logic                 out_rq   [NUM_PORTS],
  output logic [VCW-1:0]       out_vc   [NUM_PORTS],
  output flit_t                out_flit [NUM_PORTS],
  input  logic                 out_ack  [NUM_PORTS],
  // mechanism events, per port
  output logic [NUM_PORTS-1:0] ev_divert,
  output logic [NUM_PORTS-1:0] ev_preempt,
  output logic [NUM_PORTS-1:0] ev_resume,
  output logic [NUM_PORTS-1:0] ev_alloc_block,
  output logic [NUM_PORTS-1:0] ev_flex_alloc,
  output logic [NUM_PORTS-1:0] ev_xbar_stall,
  output logic [NUM_PORTS-1:0] ev_nack,
  output logic [NUM_PORTS-1:0] ev_wait_retry
);

  localparam int unsigned TIME_W = 32;
  localparam int unsigned TICK_W = 8;

  // ---------------- configuration and real time ----------------
  logic [TICK_W-1:0] vtick [NUM_CLASSES];
  logic [TIME_W-1:0] now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= '0;
      for (int c = 0; c < NUM_CLASSES; c++) vtick[c] <= TICK_W'(1);
    end else begin
      now <= now + 1'b1;
      for (int c = 0; c < NUM_CLASSES; c++)
        if (cfg_we && cfg_sel && cfg_addr == DEST_W'(c)) vtick[c] <= cfg_data;
    end
  end

  // ---------------- stage 1: input ports ----------------
  logic [NUM_VCS-1:0] vc_valid  [NUM_PORTS];
  flit_t              vc_flit   [NUM_PORTS][NUM_VCS];
  logic [NUM_VCS-1:0] vc_pop    [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    logic [NUM_VCS-1:0] div, pre, res;
    input_port #(.NUM_VCS(NUM_VCS), .NUM_CLASSES(NUM_CLASSES), .BUF_DEPTH(BUF_DEPTH)) u_in (
      .clk, .rst_n,
      .in_rq(in_rq[p]), .in_vc(in_vc[p]), .in_flit(in_flit[p]), .in_ack(in_ack[p]),
      .vc_valid(vc_valid[p]), .vc_flit(vc_flit[p]), .vc_pop(vc_pop[p]),
      .ev_divert(div), .ev_preempt(pre), .ev_resume(res));
    assign ev_divert[p]  = |div;
    assign ev_preempt[p] = |pre;
    assign ev_resume[p]  = |res;
  end

  // per input VC pipeline state
  logic          rt_valid [NUM_PORTS][NUM_VCS];   // header routed
  logic [PW-1:0] rt_port  [NUM_PORTS][NUM_VCS];
  logic          rsv      [NUM_PORTS][NUM_VCS];   // subport/channel reserved
  logic [SW-1:0] rsv_sub  [NUM_PORTS][NUM_VCS];
  // a preempted message may be resumed only after its earlier segment (closed
  // by a dummy tail) has left the output VC it used, so that its flits leave
  // the router in order even if the resumed segment gets another channel
  logic          seg_wait [NUM_PORTS][NUM_VCS];
  logic [PW-1:0] seg_port [NUM_PORTS][NUM_VCS];
  logic [VCW-1:0] seg_chan [NUM_PORTS][NUM_VCS];

  // ---------------- stage 2: routing ----------------
  logic [DEST_W-1:0] lk_dest [NUM_PORTS];
  logic [PW-1:0]     lk_port [NUM_PORTS];
  logic              rt_go   [NUM_PORTS];
  logic [VCW-1:0]    rt_vc   [NUM_PORTS];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      rt_go[p] = 1'b0;
      rt_vc[p] = '0;
      for (int v = NUM_VCS - 1; v >= 0; v--) begin
        if (vc_valid[p][v] && is_head(vc_flit[p][v]) && !rt_valid[p][v] && !rsv[p][v]) begin
          rt_go[p] = 1'b1;
          rt_vc[p] = VCW'(v);
        end
      end
      lk_dest[p] = vc_flit[p][rt_vc[p]].dest;
    end
  end

  routing_unit #(.NUM_PORTS(NUM_PORTS), .NUM_LOOKUPS(NUM_PORTS)) u_route (
    .clk, .rst_n,
    .cfg_we(cfg_we && !cfg_sel), .cfg_dest(cfg_addr), .cfg_port(cfg_data[PW-1:0]),
    .lk_dest, .lk_port);

  // ---------------- stage 3: arbitration / output VC allocation ----------------
  logic [NUM_REQ-1:0] al_req   [NUM_PORTS];
  logic [PRIO_W-1:0]  al_prio  [NUM_REQ];
  logic               gnt_valid[NUM_PORTS];
  logic [RW-1:0]      gnt_idx  [NUM_PORTS];
  logic [SW-1:0]      gnt_sub  [NUM_PORTS];
  logic [VCW-1:0]     gnt_chan [NUM_PORTS];
  logic [NUM_SUB-1:0] rel_sub  [NUM_PORTS];
  logic [NUM_VCS-1:0] rel_chan [NUM_PORTS];
  logic [NUM_SUB-1:0] sub_busy [NUM_PORTS];
  logic [NUM_VCS-1:0] chan_alloc [NUM_PORTS];
  logic [IW-1:0]      chan_id  [NUM_PORTS][NUM_SUB];
  logic [PW-1:0]      sub_owner[NUM_PORTS][NUM_SUB];
  logic [VCW-1:0]     sub_chan [NUM_PORTS][NUM_SUB];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) al_req[o] = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        al_prio[p*NUM_VCS+v] = vc_flit[p][v].prio;
        if (vc_valid[p][v] && is_head(vc_flit[p][v]) && rt_valid[p][v] && !rsv[p][v] && !seg_wait[p][v])
          al_req[rt_port[p][v]][p*NUM_VCS+v] = 1'b1;
      end
    end
  end

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      ev_alloc_block[o] = (|al_req[o]) && !gnt_valid[o];
      ev_flex_alloc[o]  = gnt_valid[o] && (gnt_chan[o] != VCW'(gnt_sub[o] * CH_PER_SUB));
      for (int k = 0; k < NUM_SUB; k++) sub_chan[o][k] = VCW'(k * CH_PER_SUB + int'(chan_id[o][k]));
    end
  end

  // requester index -> input port and VC
  function automatic logic [PW-1:0] req_port(logic [RW-1:0] r);
    return PW'(int'(r) / NUM_VCS);
  endfunction
  function automatic logic [VCW-1:0] req_vc(logic [RW-1:0] r);
    return VCW'(int'(r) % NUM_VCS);
  endfunction

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_alloc
    vc_allocator #(.NUM_REQ(NUM_REQ), .NUM_VCS(NUM_VCS), .CH_PER_SUB(CH_PER_SUB)) u_alloc (
      .clk, .rst_n,
      .req(al_req[o]), .req_prio(al_prio),
      .gnt_valid(gnt_valid[o]), .gnt_idx(gnt_idx[o]), .gnt_sub(gnt_sub[o]), .gnt_chan(gnt_chan[o]),
      .rel_sub(rel_sub[o]), .rel_chan(rel_chan[o]),
      .sub_busy(sub_busy[o]), .chan_alloc(chan_alloc[o]), .chan_id(chan_id[o]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < NUM_SUB; k++) sub_owner[o][k] <= '0;
      end else if (gnt_valid[o]) begin
        sub_owner[o][gnt_sub[o]] <= req_port(gnt_idx[o]);
      end
    end
  end

  // ---------------- stage 4: virtual clock scheduling and crossbar ----------------
  logic [NUM_VCS-1:0] xb_elig  [NUM_PORTS];
  logic [PRIO_W-1:0]  xb_cls   [NUM_PORTS][NUM_VCS];
  logic               xb_go    [NUM_PORTS];
  logic [VCW-1:0]     xb_vc    [NUM_PORTS];
  logic               xb_valid [NUM_PORTS];
  flit_t              xb_flit  [NUM_PORTS];
  logic [PW-1:0]      xb_oport [NUM_PORTS];
  logic [SW-1:0]      xb_sub   [NUM_PORTS];
  logic [NUM_VCS-1:0] obuf_full[NUM_PORTS];
  logic [NUM_VCS-1:0] ob_we    [NUM_PORTS];
  flit_t              ob_flit  [NUM_PORTS][NUM_VCS];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      ev_xbar_stall[p] = 1'b0;
      for (int v = 0; v < NUM_VCS; v++) begin
        xb_cls[p][v]  = vc_flit[p][v].prio;
        xb_elig[p][v] = vc_valid[p][v] && rsv[p][v]
                     && !obuf_full[rt_port[p][v]][sub_chan[rt_port[p][v]][rsv_sub[p][v]]];
        if (vc_valid[p][v] && rsv[p][v] && !xb_elig[p][v]) ev_xbar_stall[p] = 1'b1;
      end
    end
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_vclk
    vclock_scheduler #(.NUM_VCS(NUM_VCS), .NUM_CLASSES(NUM_CLASSES), .TIME_W(TIME_W), .TICK_W(TICK_W)) u_vclk (
      .clk, .rst_n, .now, .vtick, .elig(xb_elig[p]), .cls(xb_cls[p]),
      .gnt_valid(xb_go[p]), .gnt_vc(xb_vc[p]));
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      xb_valid[p] = xb_go[p];
      xb_flit[p]  = vc_flit[p][xb_vc[p]];
      xb_oport[p] = rt_port[p][xb_vc[p]];
      xb_sub[p]   = rsv_sub[p][xb_vc[p]];
      vc_pop[p]   = '0;
      if (xb_go[p]) vc_pop[p][xb_vc[p]] = 1'b1;
    end
    for (int o = 0; o < NUM_PORTS; o++) rel_sub[o] = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (xb_go[p] && is_tail(xb_flit[p])) rel_sub[xb_oport[p]][xb_sub[p]] = 1'b1;
    end
  end

  crossbar #(.NUM_PORTS(NUM_PORTS), .NUM_VCS(NUM_VCS), .NUM_SUB(NUM_SUB)) u_xbar (
    .in_valid(xb_valid), .in_flit(xb_flit), .in_oport(xb_oport), .in_sub(xb_sub),
    .sub_owner, .sub_chan, .out_we(ob_we), .out_flit(ob_flit));

  // per-VC state updates for stages 2, 3 and 4
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        for (int v = 0; v < NUM_VCS; v++) begin
          rt_valid[p][v] <= 1'b0;
          rt_port[p][v]  <= '0;
          rsv[p][v]      <= 1'b0;
          rsv_sub[p][v]  <= '0;
          seg_wait[p][v] <= 1'b0;
          seg_port[p][v] <= '0;
          seg_chan[p][v] <= '0;
        end
      end
    end else begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (rt_go[p]) begin
          rt_valid[p][rt_vc[p]] <= 1'b1;
          rt_port[p][rt_vc[p]]  <= lk_port[p];
        end
        if (xb_go[p] && is_tail(xb_flit[p])) begin
          rt_valid[p][xb_vc[p]] <= 1'b0;
          rsv[p][xb_vc[p]]      <= 1'b0;
        end
        for (int v = 0; v < NUM_VCS; v++) begin
          if (seg_wait[p][v] && rel_chan[seg_port[p][v]][seg_chan[p][v]]) seg_wait[p][v] <= 1'b0;
        end
        if (xb_go[p] && is_tail(xb_flit[p]) && xb_flit[p].dummy) begin
          seg_wait[p][xb_vc[p]] <= 1'b1;
          seg_port[p][xb_vc[p]] <= xb_oport[p];
          seg_chan[p][xb_vc[p]] <= sub_chan[xb_oport[p]][xb_sub[p]];
        end
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (gnt_valid[o]) begin
          rsv[req_port(gnt_idx[o])][req_vc(gnt_idx[o])]     <= 1'b1;
          rsv_sub[req_port(gnt_idx[o])][req_vc(gnt_idx[o])] <= gnt_sub[o];
        end
      end
    end
  end

  // ---------------- stage 5: output ports ----------------
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    output_port #(.NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH), .USE_WAIT(USE_WAIT)) u_out (
      .clk, .rst_n,
      .wr_en(ob_we[o]), .wr_flit(ob_flit[o]), .buf_full(obuf_full[o]), .rel_chan(rel_chan[o]),
      .out_rq(out_rq[o]), .out_vc(out_vc[o]), .out_flit(out_flit[o]), .out_ack(out_ack[o]),
      .ev_nack(ev_nack[o]), .ev_wait_retry(ev_wait_retry[o]));
  end

endmodule
