// tb_link_scheduler: self-checking test of the Modified Highest Non N-ACK
// link scheduler with 8 channels (MAX_COUNT = 7).
// Checks: highest flow class wins; the first channel wins a tie; a channel
// that got an N-ACK is passed over while others are eligible; it becomes
// eligible again exactly MAX_COUNT cycles after its N-ACK; with no eligible
// channel the highest-class ready one is still tried. Every cycle the choice
// is compared with a reference model of the algorithm.
module tb_link_scheduler;
  import router_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned MAXC = 7;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] ready, nack_q, elig;
  logic [PRIO_W-1:0] cls [N];
  logic sel_valid, ack;
  logic [2:0] sel;
  int checks = 0, failures = 0;
  int unsigned m_cnt [N];
  bit m_nack [N];

  link_scheduler #(.NUM_CH(N), .USE_WAIT(1'b1)) dut (.*);

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

  function automatic int model_pick();
    int best = -1; int bkey = -1;
    for (int c = 0; c < N; c++) begin
      if (ready[c]) begin
        int e = (!m_nack[c] || m_cnt[c] == MAXC) ? 1 : 0;
        int key = e * 16 + int'(cls[c]);
        if (key > bkey) begin bkey = key; best = c; end
      end
    end
    return best;
  endfunction

  task automatic step(bit a);
    int exp_sel = model_pick();
    ack = a;
    #1;
    check(sel_valid == (exp_sel >= 0), "sel_valid");
    if (exp_sel >= 0) check(int'(sel) == exp_sel, $sformatf("selection exp %0d got %0d", exp_sel, sel));
    @(posedge clk);
    for (int c = 0; c < N; c++) begin
      if (exp_sel == c) begin
        m_nack[c] = !a;
        if (!a) m_cnt[c] = 0;
      end else if (m_nack[c] && m_cnt[c] != MAXC) m_cnt[c]++;
    end
    @(negedge clk);
  endtask

  int first_retry;

  initial begin
    ready = '0; ack = 0;
    for (int c = 0; c < N; c++) begin cls[c] = '0; m_cnt[c] = 0; m_nack[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // highest class and tie-break
    ready = 8'b0110_1010; cls[1] = 2; cls[3] = 7; cls[5] = 7; cls[6] = 4;
    step(1'b1);
    check(sel == 3, "highest class, first on tie");

    // N-ACK on channel 3: channel 5 (same class) is chosen next
    step(1'b0);
    step(1'b1);
    check(sel == 5, "N-ACKed channel passed over");
    // keep channel 5 busy; count cycles until channel 3 is tried again
    first_retry = -1;
    for (int i = 0; i < 20 && first_retry < 0; i++) begin
      #1;
      if (sel == 3) first_retry = i + 1;
      step(1'b1);
    end
    check(first_retry == MAXC, $sformatf("retry after max_count cycles (got %0d)", first_retry));

    // only N-ACKed channels ready: still tried (highest class)
    ready = 8'b0000_0110; cls[1] = 2; cls[2] = 9;
    step(1'b0);   // channel 2 N-ACK
    step(1'b0);   // channel 1 N-ACK (2 not eligible, 1 eligible)
    #1 check(sel == 2 && sel_valid, "fallback to highest-class ready channel");
    step(1'b1);

    // random traffic against the model
    for (int i = 0; i < 3000; i++) begin
      ready = N'($urandom);
      for (int c = 0; c < N; c++) cls[c] = PRIO_W'($urandom_range(0, 3));
      step($urandom_range(0, 2) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
