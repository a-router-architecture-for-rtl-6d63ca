// tb_history_stack: self-checking test of history_stack (depth 15).
// Random push/pop (and push+pop replacing the top) is compared with a LIFO
// model; the stack is filled to its depth of s-1 entries and emptied.
module tb_history_stack;
  import router_pkg::*;
  localparam int unsigned DEPTH = 15;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  route_info_t din, top;
  int checks = 0, failures = 0;
  route_info_t model [$];

  history_stack #(.DEPTH(DEPTH)) dut (.*);

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
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full  == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(top == model[$], "top value");
      if (i < 1000) begin
        pop  = (model.size() > 0) && ($urandom_range(0, 1) != 0);
        push = (model.size() < DEPTH || pop) && ($urandom_range(0, 1) != 0);
      end else if (i < 1020) begin
        pop = 0; push = (model.size() < DEPTH);          // fill
      end else if (i < 1040) begin
        push = 0; pop = (model.size() > 0);              // empty
      end else begin
        pop  = (model.size() > 0) && ($urandom_range(0, 1) != 0);
        push = (model.size() < DEPTH || pop) && ($urandom_range(0, 1) != 0);
      end
      din = route_info_t'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(model.pop_back());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
