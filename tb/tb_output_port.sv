// tb_output_port: self-checking test of the output VC buffers and the output
// link controller (4 VCs of 4 flits). Random crossbar writes and random
// ACK/N-ACK answers from the next router; checks that every offered flit is
// the head of the offered VC, that flits leave only on ACK and in order, that
// buffer-full flags and channel releases (on tails) are right, and that while
// no N-ACK has been seen the offered VC carries the highest class.
module tb_output_port;
  import router_pkg::*;
  localparam int unsigned NV = 4, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [NV-1:0] wr_en, buf_full, rel_chan;
  flit_t wr_flit [NV];
  logic out_rq, out_ack, ev_nack, ev_wait_retry;
  logic [1:0] out_vc;
  flit_t out_flit;
  int checks = 0, failures = 0, sent = 0, nacks = 0, rels = 0;
  flit_t q [NV][$];
  int seq [NV];

  output_port #(.NUM_VCS(NV), .BUF_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    bit nack_seen;
    wr_en = '0; out_ack = 0; nack_seen = 0;
    foreach (seq[v]) seq[v] = 0;
    for (int v = 0; v < NV; v++) wr_flit[v] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int maxc;
      @(negedge clk);
      for (int v = 0; v < NV; v++) begin
        wr_en[v] = (q[v].size() < DEPTH) && ($urandom_range(0, 2) == 0);
        wr_flit[v] = '0;
        wr_flit[v].prio = PRIO_W'((v * 5 + seq[v] / 3) % 8);
        wr_flit[v].kind = (seq[v] % 3 == 0) ? FLIT_HEAD : (seq[v] % 3 == 2) ? FLIT_TAIL : FLIT_BODY;
        wr_flit[v].data = FLIT_DATA_W'({v, seq[v]});
      end
      out_ack = (i < 3000) ? 1'b1 : ($urandom_range(0, 2) != 0);
      #1;
      maxc = -1;
      for (int v = 0; v < NV; v++) begin
        check(buf_full[v] == (q[v].size() == DEPTH), "buffer full flag");
        if (q[v].size() > 0 && int'(q[v][0].prio) > maxc) maxc = q[v][0].prio;
      end
      check(out_rq == (maxc >= 0), "rq whenever a flit waits");
      if (out_rq) begin
        check(q[out_vc].size() > 0 && out_flit == q[out_vc][0], "offered flit is head of its VC");
        if (!nack_seen) check(int'(out_flit.prio) == maxc, "highest class offered");
        check(rel_chan == ((out_ack && is_tail(out_flit)) ? NV'(1) << out_vc : '0), "channel release on tail");
        if (out_ack) begin
          void'(q[out_vc].pop_front());
          sent++;
          rels += int'(is_tail(out_flit));
        end else begin
          nacks++;
          nack_seen = 1;
        end
      end
      for (int v = 0; v < NV; v++) if (wr_en[v]) begin q[v].push_back(wr_flit[v]); seq[v]++; end
      @(posedge clk);
    end
    check(sent > 2000 && nacks > 100 && rels > 500, $sformatf("traffic: %0d sent %0d N-ACK %0d releases", sent, nacks, rels));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
