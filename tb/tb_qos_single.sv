// tb_qos_single: workload test on one router with all 8 ports serving endpoints,
// at the routers' default size. Real-time variable-bit-rate frames and
// best-effort messages are offered at 80% and 85% of the link bandwidth, in
// five stages of the real-time to best-effort ratio. The run counts frames
// that miss their deadline and checks that every flit is delivered once, to
// the right endpoint, and in order within its segment. The traffic, the
// checks and the scaled frame period are described in tb_qos_traffic. This
// module adds the watchdog and prints the result line.
module tb_qos_single;
  logic finished;
  int   checks, failures;

  tb_qos_traffic #(.NR(1)) traffic (.finished, .checks, .failures);

  initial begin
    #1;                                   // let the core clear finished first
    wait (finished === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // watchdog: the run needs about 35000 cycles of 10 time units
    #6000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
