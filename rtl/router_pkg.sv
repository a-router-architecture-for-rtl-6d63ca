// router_pkg: types and constants shared by the QoS wormhole router.
//
// A flit is the unit of flow control. Every flit carries, next to its
// 128-bit payload, a small sideband: its kind (header, body, tail), a flag
// marking flits created inside a router by input-buffer preemption (dummy
// header / dummy tail, which carry no payload), the flow class of its message
// and the destination node. The 128-bit flit width and the 16 flow classes
// are the evaluated configuration; the sideband layout, the 8-bit node
// address and the "larger number = higher priority" convention are this
// design's own choices.
package router_pkg;

  localparam int unsigned FLIT_DATA_W = 128;  // flit payload width
  localparam int unsigned PRIO_W      = 4;    // flow class field (up to 16 classes)
  localparam int unsigned DEST_W      = 8;    // destination node address

  typedef enum logic [1:0] {
    FLIT_HEAD = 2'd0,
    FLIT_BODY = 2'd1,
    FLIT_TAIL = 2'd2
  } flit_kind_e;

  typedef struct packed {
    flit_kind_e              kind;
    logic                    dummy;  // created by preemption, no payload
    logic [PRIO_W-1:0]       prio;   // flow class, larger is more urgent
    logic [DEST_W-1:0]       dest;   // destination node
    logic [FLIT_DATA_W-1:0]  data;
  } flit_t;

  // Routing information of a preempted message, enough to rebuild its header.
  typedef struct packed {
    logic [PRIO_W-1:0] prio;
    logic [DEST_W-1:0] dest;
  } route_info_t;

  function automatic logic is_head(flit_t f);
    return f.kind == FLIT_HEAD;
  endfunction

  function automatic logic is_tail(flit_t f);
    return f.kind == FLIT_TAIL;
  endfunction

endpackage
