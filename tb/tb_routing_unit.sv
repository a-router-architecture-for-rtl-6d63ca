// tb_routing_unit: self-checking test of the routing table lookup.
// After reset every destination maps to port 0; random entries are written
// through the configuration port and all lookup ports are compared with a
// model table, including entries rewritten later.
module tb_routing_unit;
  import router_pkg::*;
  localparam int unsigned NP = 8;
  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [DEST_W-1:0] cfg_dest;
  logic [2:0] cfg_port;
  logic [DEST_W-1:0] lk_dest [NP];
  logic [2:0] lk_port [NP];
  int checks = 0, failures = 0;
  int model [256];

  routing_unit #(.NUM_PORTS(NP)) dut (.*);

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

  task automatic lookup_all();
    for (int i = 0; i < NP; i++) lk_dest[i] = DEST_W'($urandom);
    #1;
    for (int i = 0; i < NP; i++) check(int'(lk_port[i]) == model[lk_dest[i]], "lookup");
  endtask

  initial begin
    cfg_we = 0; cfg_dest = '0; cfg_port = '0;
    foreach (model[d]) model[d] = 0;
    for (int i = 0; i < NP; i++) lk_dest[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    lookup_all();
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cfg_we = ($urandom_range(0, 1) == 1);
      cfg_dest = DEST_W'($urandom);
      cfg_port = 3'($urandom);
      lookup_all();
      @(posedge clk);
      if (cfg_we) model[cfg_dest] = cfg_port;
    end
    @(negedge clk); cfg_we = 0;
    for (int d = 0; d < 256; d++) begin
      lk_dest[0] = DEST_W'(d); #1;
      check(int'(lk_port[0]) == model[d], "full table sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
