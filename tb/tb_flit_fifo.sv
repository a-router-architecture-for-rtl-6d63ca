// tb_flit_fifo: self-checking test of flit_fifo at depth 4.
// Random pushes and pops are compared with a queue model: head value, empty,
// full and count every cycle, including push and pop together when full.
module tb_flit_fifo;
  import router_pkg::*;
  localparam int unsigned DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  flit_t din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  flit_t model [$];

  flit_fifo #(.DEPTH(DEPTH)) dut (.*);

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

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full  == (model.size() == DEPTH), "full");
      check(count == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], "head value");
      pop  = (model.size() > 0) && ($urandom_range(0, 2) != 0);
      push = (model.size() < DEPTH || pop) && ($urandom_range(0, 2) != 0);
      if (i > 1500) begin pop = 0; push = (model.size() < DEPTH); end  // fill up
      din  = '0;
      din.data = {$urandom, $urandom, $urandom, $urandom};
      din.prio = PRIO_W'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    // full buffer: push and pop in the same cycle keep it full
    @(negedge clk);
    check(full, "full before simultaneous push/pop");
    push = 1; pop = 1; din.data = 128'hABCD;
    @(posedge clk); #1;
    void'(model.pop_front()); model.push_back(din);
    push = 0; pop = 0;
    @(negedge clk);
    check(full && count == DEPTH, "still full after push+pop");
    for (int i = 0; i < DEPTH; i++) begin
      check(dout == model[0], "drain order");
      pop = 1;
      @(posedge clk); #1; void'(model.pop_front());
      @(negedge clk);
    end
    pop = 0;
    check(empty, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
