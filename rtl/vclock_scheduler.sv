// vclock_scheduler: Virtual Clock rate-based scheduler of stage 4 for one
// crossbar input port.
//
// Each virtual channel of the input port keeps a virtual clock. A channel
// whose flit may cross the crossbar this cycle (elig) is given the stamp
// max(now, vclk) + vtick[class], where vtick[class] is the inverse of the
// bandwidth allowed to its flow class (in cycles per flit). The eligible
// channel with the smallest stamp wins (lowest index on a tie) and its
// virtual clock takes the stamp. A flow that sends faster than its rate runs
// its virtual clock ahead of real time and loses to flows within their rate;
// an idle flow cannot bank credit because of the max with real time. The
// grant is combinational; vclk updates at the clock edge when gnt_valid.
// The Virtual Clock algorithm is the document's choice; the stamp widths and
// the per-class tick table are this design's.
module vclock_scheduler
  import router_pkg::*;
#(
  parameter int unsigned NUM_VCS     = 16,
  parameter int unsigned NUM_CLASSES = 16,
  parameter int unsigned TIME_W      = 32,
  parameter int unsigned TICK_W      = 8,
  localparam int unsigned VCW        = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [TIME_W-1:0]  now,
  input  logic [TICK_W-1:0]  vtick [NUM_CLASSES],
  input  logic [NUM_VCS-1:0] elig,
  input  logic [PRIO_W-1:0]  cls [NUM_VCS],
  output logic               gnt_valid,
  output logic [VCW-1:0]     gnt_vc
);

  logic [TIME_W-1:0] vclk  [NUM_VCS];
  logic [TIME_W-1:0] stamp [NUM_VCS];
  logic [TIME_W-1:0] best;

  always_comb begin
    for (int v = 0; v < NUM_VCS; v++) begin
      stamp[v] = ((vclk[v] > now) ? vclk[v] : now) + TIME_W'(vtick[cls[v]]);
    end
    gnt_valid = 1'b0;
    gnt_vc    = '0;
    best      = '0;
    for (int v = 0; v < NUM_VCS; v++) begin
      if (elig[v] && (!gnt_valid || stamp[v] < best)) begin
        gnt_valid = 1'b1;
        gnt_vc    = VCW'(v);
        best      = stamp[v];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VCS; v++) vclk[v] <= '0;
    end else if (gnt_valid) begin
      vclk[gnt_vc] <= stamp[gnt_vc];
    end
  end

endmodule
