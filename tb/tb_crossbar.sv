// tb_crossbar: self-checking test of the crossbar and its channel-identifier
// decoders (4 ports, 16 VCs, 4 subports per output port). Random owners,
// channel identifiers and input flits; every write strobe and written flit is
// compared with a model of the switch.
module tb_crossbar;
  import router_pkg::*;
  localparam int unsigned NP = 4, NV = 16, NS = 4;
  logic in_valid [NP];
  flit_t in_flit [NP];
  logic [1:0] in_oport [NP];
  logic [1:0] in_sub [NP];
  logic [1:0] sub_owner [NP][NS];
  logic [3:0] sub_chan [NP][NS];
  logic [NV-1:0] out_we [NP];
  flit_t out_flit [NP][NV];
  int checks = 0, failures = 0;

  crossbar #(.NUM_PORTS(NP), .NUM_VCS(NV), .NUM_SUB(NS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int hits = 0;
    for (int it = 0; it < 3000; it++) begin
      logic [NV-1:0] exp_we [NP];
      flit_t exp_f [NP][NV];
      for (int p = 0; p < NP; p++) begin
        in_valid[p] = ($urandom_range(0, 3) != 0);
        in_flit[p] = '0;
        in_flit[p].data = {$urandom, $urandom, $urandom, $urandom};
        in_oport[p] = 2'($urandom);
        in_sub[p] = 2'($urandom);
        for (int k = 0; k < NS; k++) begin
          sub_owner[p][k] = 2'($urandom);
          sub_chan[p][k] = 4'(k * 4 + $urandom_range(0, 3));
        end
      end
      for (int p = 0; p < NP; p++) begin
        exp_we[p] = '0;
        for (int k = 0; k < NS; k++) begin
          int o;
          o = sub_owner[p][k];
          if (in_valid[o] && in_oport[o] == p && in_sub[o] == k) begin
            exp_we[p][sub_chan[p][k]] = 1'b1;
            exp_f[p][sub_chan[p][k]] = in_flit[o];
          end
        end
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        check(out_we[p] == exp_we[p], "write strobes");
        for (int c = 0; c < NV; c++) if (exp_we[p][c]) begin
          check(out_flit[p][c] == exp_f[p][c], "switched flit");
          hits++;
        end
      end
    end
    check(hits > 1000, "enough switched flits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
