// tb_input_port: self-checking test of the input link controller with 4
// virtual channels of 4-flit buffers. Random RQ traffic on random VCs is
// checked against per-VC models: ACK exactly when the addressed VC has room,
// flits of each VC delivered in order to that VC's stage-1 output, N-ACKs seen.
module tb_input_port;
  import router_pkg::*;
  localparam int unsigned NV = 4, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_rq, in_ack;
  logic [1:0] in_vc;
  flit_t in_flit;
  logic [NV-1:0] vc_valid, vc_pop, ev_divert, ev_preempt, ev_resume;
  flit_t vc_flit [NV];
  int checks = 0, failures = 0, nacks = 0, delivered = 0;
  flit_t sent [NV][$];
  int seq [NV];

  input_port #(.NUM_VCS(NV), .BUF_DEPTH(DEPTH)) dut (.*);

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
    in_rq = 0; in_vc = '0; in_flit = '0; vc_pop = '0;
    foreach (seq[v]) seq[v] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // one class per VC, messages of 4 flits: no preemption here
      in_vc = 2'($urandom);
      in_rq = ($urandom_range(0, 1) == 1);
      in_flit = '0;
      in_flit.prio = PRIO_W'(in_vc);
      in_flit.dest = DEST_W'(in_vc);
      in_flit.kind = (seq[in_vc] % 4 == 0) ? FLIT_HEAD : (seq[in_vc] % 4 == 3) ? FLIT_TAIL : FLIT_BODY;
      in_flit.data = FLIT_DATA_W'(seq[in_vc]);
      // drain slowly so that buffers fill
      for (int v = 0; v < NV; v++) vc_pop[v] = vc_valid[v] && ($urandom_range(0, 9) == 0);
      #1;
      for (int v = 0; v < NV; v++) if (vc_pop[v]) begin
        check(sent[v].size() > 0 && vc_flit[v] == sent[v][0], "in-order delivery per VC");
        if (sent[v].size() > 0) void'(sent[v].pop_front());
        delivered++;
      end
      if (in_rq) begin
        if (in_ack) begin
          sent[in_vc].push_back(in_flit);
          seq[in_vc]++;
        end else nacks++;
      end
      @(posedge clk);
    end
    check(nacks > 50 && delivered > 500, $sformatf("traffic seen: %0d N-ACKs, %0d flits", nacks, delivered));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
