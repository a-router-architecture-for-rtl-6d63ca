// tb_vclock_scheduler: self-checking test of the Virtual Clock scheduler.
// Two always-eligible channels with ticks 2 and 6 share the crossbar input
// 3:1; equal ticks share 1:1; a channel that was idle does not gain credit
// (its clock restarts at real time); every grant is compared with a model.
module tb_vclock_scheduler;
  import router_pkg::*;
  localparam int unsigned NV = 4, NC = 4;
  logic clk = 0, rst_n = 0;
  logic [31:0] now;
  logic [7:0] vtick [NC];
  logic [NV-1:0] elig;
  logic [PRIO_W-1:0] cls [NV];
  logic gnt_valid;
  logic [1:0] gnt_vc;
  int checks = 0, failures = 0;
  longint m_vclk [NV];
  int cnt [NV];

  vclock_scheduler #(.NUM_VCS(NV), .NUM_CLASSES(NC)) dut (.*);

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

  task automatic run(int cycles);
    for (int i = 0; i < cycles; i++) begin
      longint best = -1; int bv = -1;
      #1;
      for (int v = 0; v < NV; v++) begin
        longint st = ((m_vclk[v] > now) ? m_vclk[v] : now) + vtick[cls[v]];
        if (elig[v] && (bv < 0 || st < best)) begin best = st; bv = v; end
      end
      check(gnt_valid == (bv >= 0), "grant valid");
      if (bv >= 0) begin
        check(int'(gnt_vc) == bv, "granted channel");
        cnt[bv]++;
      end
      @(posedge clk);
      if (bv >= 0) m_vclk[bv] = best;
      now <= now + 1;
      @(negedge clk);
    end
  endtask

  initial begin
    now = 0; elig = '0;
    for (int v = 0; v < NV; v++) begin cls[v] = PRIO_W'(v); m_vclk[v] = 0; cnt[v] = 0; end
    vtick[0] = 2; vtick[1] = 6; vtick[2] = 2; vtick[3] = 2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    elig = 4'b0011;
    run(400);
    check(cnt[0] >= 295 && cnt[0] <= 305 && cnt[1] >= 95 && cnt[1] <= 105, $sformatf("3:1 share got %0d:%0d", cnt[0], cnt[1]));
    cnt = '{default: 0};
    elig = 4'b1100;
    run(200);
    check(cnt[2] == 100 && cnt[3] == 100, "1:1 share");
    // channel 0 was idle for 200 cycles: it must not win 200 grants in a row
    cnt = '{default: 0};
    elig = 4'b0101;
    run(40);
    check(cnt[0] < 35 && cnt[2] > 5, "no credit banked while idle");
    for (int i = 0; i < 1000; i++) begin
      elig = NV'($urandom);
      run(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
