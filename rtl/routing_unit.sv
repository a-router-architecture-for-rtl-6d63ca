// routing_unit: routing decision of stage 2, a routing-table lookup.
//
// The table maps each destination node address to an output port. It is
// written through a configuration port (cfg_we, cfg_dest, cfg_port) and read
// combinationally by NUM_LOOKUPS independent lookup ports, one per input
// port of the router; the router registers the result, so a header spends
// one cycle in this stage. Body and tail flits never use it. Reset clears
// the table to port 0. The document names the table lookup; its
// organisation, the configuration port and the reset value are this design's
// choices.
module routing_unit
  import router_pkg::*;
#(
  parameter int unsigned NUM_PORTS   = 8,
  parameter int unsigned NUM_LOOKUPS = NUM_PORTS,
  localparam int unsigned PW         = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [DEST_W-1:0] cfg_dest,
  input  logic [PW-1:0]     cfg_port,
  input  logic [DEST_W-1:0] lk_dest [NUM_LOOKUPS],
  output logic [PW-1:0]     lk_port [NUM_LOOKUPS]
);

  logic [PW-1:0] table_q [2**DEST_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2**DEST_W; i++) table_q[i] <= '0;
    end else if (cfg_we) begin
      table_q[cfg_dest] <= cfg_port;
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_LOOKUPS; i++) lk_port[i] = table_q[lk_dest[i]];
  end

endmodule
