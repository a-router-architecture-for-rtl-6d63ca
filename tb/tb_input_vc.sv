// tb_input_vc: self-checking test of the flit preemption unit (one input VC).
// 1. A message passes in order at one flit per cycle.
// 2. A class-5 message arrives while a class-1 message occupies the input
//    buffer with its header already past stage 1: it is diverted into the
//    extra buffer, a dummy tail closes the class-1 message, the class-5
//    message passes, a dummy header resumes the class-1 message and its
//    remaining flits follow. The exact output sequence is checked.
// 3. A lower-class header is queued in the input buffer, not diverted.
// 4. wr_ready (ACK) falls when the input buffer is full.
module tb_input_vc;
  import router_pkg::*;
  localparam int unsigned BUF_DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, out_valid, out_pop;
  flit_t wr_flit, out_flit;
  logic ev_divert, ev_preempt, ev_resume;
  int checks = 0, failures = 0;
  int n_div = 0, n_pre = 0, n_res = 0;
  flit_t got [$];

  input_vc #(.NUM_CLASSES(16), .BUF_DEPTH(BUF_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mk(flit_kind_e k, int prio, int id, int seq, bit dummy = 0);
    flit_t f = '0;
    f.kind = k; f.prio = PRIO_W'(prio); f.dest = DEST_W'(id); f.dummy = dummy;
    if (!dummy) f.data = FLIT_DATA_W'({id[15:0], seq[15:0]});
    return f;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_pop) got.push_back(out_flit);
    n_div += int'(ev_divert); n_pre += int'(ev_preempt); n_res += int'(ev_resume);
  end

  task automatic send(flit_t f);
    @(negedge clk);
    wr_valid = 1; wr_flit = f;
    while (!wr_ready) @(negedge clk);
    @(posedge clk);
    #1 wr_valid = 0;
  endtask

  task automatic send_msg(int prio, int id, int len);
    send(mk(FLIT_HEAD, prio, id, 0));
    for (int i = 1; i < len - 1; i++) send(mk(FLIT_BODY, prio, id, i));
    send(mk(FLIT_TAIL, prio, id, len - 1));
  endtask

  flit_t exp_q [$];
  int t0;

  initial begin
    wr_valid = 0; wr_flit = '0; out_pop = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // ---- 1: plain message, output register drained every cycle
    out_pop = 1;
    fork
      send_msg(3, 1, 6);
      begin
        // out_pop is only meaningful with out_valid
        forever begin @(negedge clk); out_pop = out_valid; end
      end
    join_any
    repeat (6) @(posedge clk);
    check(got.size() == 6, "msg1 flit count");
    for (int i = 0; i < 6 && i < got.size(); i++)
      check(got[i].data == FLIT_DATA_W'({16'd1, 16'(i)}) && !got[i].dummy, "msg1 order");
    disable fork;
    got.delete();

    // ---- 2: preemption
    out_pop = 0;
    @(negedge clk);
    send_msg(1, 2, 5);            // header moves to stage register, rest waits
    repeat (2) @(posedge clk);
    check(out_valid && out_flit.kind == FLIT_HEAD && out_flit.dest == 2, "m1 header at stage 1");
    send_msg(5, 3, 3);            // diverted to extra buffer
    check(n_div == 1, "divert event");
    exp_q = {mk(FLIT_HEAD, 1, 2, 0), mk(FLIT_TAIL, 1, 2, 0, 1),
             mk(FLIT_HEAD, 5, 3, 0), mk(FLIT_BODY, 5, 3, 1), mk(FLIT_TAIL, 5, 3, 2),
             mk(FLIT_HEAD, 1, 2, 0, 1),
             mk(FLIT_BODY, 1, 2, 1), mk(FLIT_BODY, 1, 2, 2), mk(FLIT_BODY, 1, 2, 3),
             mk(FLIT_TAIL, 1, 2, 4)};
    t0 = 0;
    fork
      forever begin @(negedge clk); out_pop = out_valid; end
    join_none
    repeat (20) @(posedge clk);
    disable fork;
    out_pop = 0;
    check(got.size() == exp_q.size(), "preemption flit count");
    for (int i = 0; i < exp_q.size() && i < got.size(); i++) begin
      check(got[i] == exp_q[i], $sformatf("preemption sequence flit %0d", i));
    end
    check(n_pre == 1 && n_res == 1, "preempt/resume events");
    got.delete();

    // ---- 3: lower class queued behind, not diverted
    @(negedge clk);
    send_msg(6, 4, 3);
    send_msg(2, 5, 3);
    check(n_div == 1, "lower class not diverted");
    fork
      forever begin @(negedge clk); out_pop = out_valid; end
    join_none
    repeat (12) @(posedge clk);
    disable fork;
    out_pop = 0;
    check(got.size() == 6, "queued messages count");
    for (int i = 0; i < 6 && i < got.size(); i++)
      check(got[i].dest == ((i < 3) ? 4 : 5), "queued messages in order");
    got.delete();

    // ---- 4: ACK falls on a full input buffer
    @(negedge clk);
    wr_valid = 1;
    for (int i = 0; i < BUF_DEPTH + 1; i++) begin
      wr_flit = mk((i == 0) ? FLIT_HEAD : FLIT_BODY, 1, 6, i);
      @(negedge clk);
    end
    // one flit sits in the stage register, BUF_DEPTH in the buffer
    wr_flit = mk(FLIT_BODY, 1, 6, 99);
    #1 check(!wr_ready, "ACK low on full buffer");
    wr_valid = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
