// crossbar: stage-4 switch from the router's input ports to its crossbar
// output ports (subports), followed by the channel-identifier decoders that
// steer each subport onto one output virtual-channel buffer.
//
// Every subport is owned by at most one input port at a time (set by stage-3
// reservation), so the crossbar is a multiplexer per subport selecting the
// flit of its owner input: sub_owner[p][k] names the input port, sub_chan
// [p][k] the channel within output port p. The output is one write strobe and
// one flit per output virtual channel. Purely combinational. The document
// gives the crossbar and the log(log s)-bit decoders per subport; the
// encoding of the select signals is this design's.
module crossbar
  import router_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 8,
  parameter int unsigned NUM_VCS   = 16,
  parameter int unsigned NUM_SUB   = 4,
  localparam int unsigned PW       = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  localparam int unsigned VCW      = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1,
  localparam int unsigned SW       = (NUM_SUB > 1) ? $clog2(NUM_SUB) : 1
) (
  // input side: one flit per input port per cycle, addressed to a subport
  input  logic                 in_valid  [NUM_PORTS],
  input  flit_t                in_flit   [NUM_PORTS],
  input  logic [PW-1:0]        in_oport  [NUM_PORTS],
  input  logic [SW-1:0]        in_sub    [NUM_PORTS],
  // subport configuration (from stage 3)
  input  logic [PW-1:0]        sub_owner [NUM_PORTS][NUM_SUB],
  input  logic [VCW-1:0]       sub_chan  [NUM_PORTS][NUM_SUB],
  // output side: per output port and virtual channel
  output logic [NUM_VCS-1:0]   out_we    [NUM_PORTS],
  output flit_t                out_flit  [NUM_PORTS][NUM_VCS]
);

  logic  sub_we   [NUM_PORTS][NUM_SUB];
  flit_t sub_flit [NUM_PORTS][NUM_SUB];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int k = 0; k < NUM_SUB; k++) begin
        // multiplexer: the owner's flit, taken only if it addresses this subport
        sub_flit[p][k] = in_flit[sub_owner[p][k]];
        sub_we[p][k]   = in_valid[sub_owner[p][k]]
                      && in_oport[sub_owner[p][k]] == PW'(p)
                      && in_sub[sub_owner[p][k]] == SW'(k);
      end
    end
    // channel-identifier decoders onto the output VC buffers
    for (int p = 0; p < NUM_PORTS; p++) begin
      out_we[p] = '0;
      for (int c = 0; c < NUM_VCS; c++) out_flit[p][c] = sub_flit[p][0];
      for (int k = 0; k < NUM_SUB; k++) begin
        if (sub_we[p][k]) begin
          out_we[p][sub_chan[p][k]]   = 1'b1;
          out_flit[p][sub_chan[p][k]] = sub_flit[p][k];
        end
      end
    end
  end

endmodule
