// tb_vc_allocator: self-checking test of stage-3 arbitration with flexible
// output VC allocation (16 channels, 4 subports of 4 channels, 8 requesters).
// Directed part: priority arbitration, lowest free subport, a freed subport
// whose first channel is still draining takes another channel of its set,
// no grant when every subport is busy. Random part: grants, subports and
// channels compared with a reference model every cycle.
module tb_vc_allocator;
  import router_pkg::*;
  localparam int unsigned NR = 8, NV = 16, G = 4, NS = 4;
  logic clk = 0, rst_n = 0;
  logic [NR-1:0] req;
  logic [PRIO_W-1:0] req_prio [NR];
  logic gnt_valid;
  logic [2:0] gnt_idx;
  logic [1:0] gnt_sub;
  logic [3:0] gnt_chan;
  logic [NS-1:0] rel_sub, sub_busy;
  logic [NV-1:0] rel_chan, chan_alloc;
  logic [1:0] chan_id [NS];
  int checks = 0, failures = 0;
  bit m_sub [NS];
  bit m_ch [NV];

  vc_allocator #(.NUM_REQ(NR), .NUM_VCS(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one cycle: compare with the model, then update the model
  task automatic step();
    int w = -1, wp = -1, fs = -1, fc = -1;
    #1;
    for (int i = 0; i < NR; i++) if (req[i] && int'(req_prio[i]) > wp) begin wp = req_prio[i]; w = i; end
    for (int k = 0; k < NS && fs < 0; k++)
      for (int j = 0; j < G && fs < 0; j++)
        if (!m_sub[k] && !m_ch[k*G+j]) begin fs = k; fc = k*G+j; end
    check(gnt_valid == (w >= 0 && fs >= 0), "gnt_valid");
    if (w >= 0 && fs >= 0) begin
      check(int'(gnt_idx) == w, "granted requester");
      check(int'(gnt_sub) == fs && int'(gnt_chan) == fc, $sformatf("subport/channel exp %0d/%0d got %0d/%0d", fs, fc, gnt_sub, gnt_chan));
    end
    @(posedge clk);
    for (int k = 0; k < NS; k++) if (rel_sub[k]) m_sub[k] = 0;
    for (int c = 0; c < NV; c++) if (rel_chan[c]) m_ch[c] = 0;
    if (w >= 0 && fs >= 0) begin m_sub[fs] = 1; m_ch[fc] = 1; end
    @(negedge clk);
    req = '0; rel_sub = '0; rel_chan = '0;
  endtask

  initial begin
    req = '0; rel_sub = '0; rel_chan = '0;
    for (int i = 0; i < NR; i++) req_prio[i] = '0;
    foreach (m_sub[k]) m_sub[k] = 0;
    foreach (m_ch[c]) m_ch[c] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // priority: requester 5 (class 7) beats requester 2 (class 3)
    req[2] = 1; req[5] = 1; req_prio[2] = 3; req_prio[5] = 7;
    step();
    check(gnt_idx == 5, "higher class granted first");
    req[2] = 1; step();                          // subport 1, channel 4
    rel_sub[0] = 1; step();                      // subport 0 free, channel 0 draining
    req[1] = 1; #1 check(gnt_valid && gnt_sub == 0 && gnt_chan == 1, "flexible channel in freed subport");
    step();
    req[3] = 1; step();
    req[4] = 1; step();                          // all four subports busy
    req[6] = 1; #1 check(!gnt_valid, "no grant with all subports busy");
    step();
    // random
    for (int i = 0; i < 4000; i++) begin
      req = NR'($urandom);
      for (int r = 0; r < NR; r++) req_prio[r] = PRIO_W'($urandom_range(0, 3));
      for (int k = 0; k < NS; k++) rel_sub[k] = m_sub[k] && ($urandom_range(0, 3) == 0);
      for (int c = 0; c < NV; c++) rel_chan[c] = m_ch[c] && ($urandom_range(0, 3) == 0);
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
