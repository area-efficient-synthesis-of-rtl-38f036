// fs_noc_pkg: types and constants shared by the fault-secure NoC switch.
//
// The switch has five ports of a 2D mesh (local, north, east, south, west), as
// in the evaluated switch. A flit is FLIT_W data bits (8 in the main
// configuration) plus one even-parity check bit computed by the sender. The
// flow-control sideband (valid, head, tail forward, ready backward) travels
// next to the flit and is not covered by the flit code; errors in it are left
// to the concurrent error detection of the control logic.
//
// Port numbering, the head-flit destination layout, the sideband signals and
// the mesh coordinate width are choices of this design.
package fs_noc_pkg;

  localparam int unsigned NUM_PORTS = 5;   // local + 4 mesh neighbours
  localparam int unsigned FLIT_W    = 8;   // data bits of a flit
  localparam int unsigned COORD_W   = 3;   // mesh coordinate bits (8 x 8 mesh)

  // Port indices
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_NORTH = 1;
  localparam int unsigned P_EAST  = 2;
  localparam int unsigned P_SOUTH = 3;
  localparam int unsigned P_WEST  = 4;

  typedef logic [NUM_PORTS-1:0] port_vec_t;   // one bit per port
  typedef logic [COORD_W-1:0]   coord_t;

  // A flit as stored in a buffer and carried by the crossbar.
  typedef struct packed {
    logic              head;   // first flit of a packet, carries destination
    logic              tail;   // last flit of a packet
    logic              chk;    // even parity over data
    logic [FLIT_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_BITS = $bits(flit_t);

  // Per-output-port state of the control logic (the state flip-flops of the
  // critical region).
  typedef struct packed {
    logic      locked;  // output is reserved by a packet in flight
    port_vec_t owner;   // one-hot input port that holds the output
    port_vec_t ptr;     // one-hot round-robin priority pointer
  } out_state_t;

  // Inputs of the combinational control logic: the sideband of the flit at
  // the front of every input buffer, the destination it carries, the ready
  // signals of the downstream links, the switch position and the state.
  typedef struct packed {
    port_vec_t                   in_valid;   // input buffer not empty
    port_vec_t                   in_head;    // front flit is a head flit
    port_vec_t                   in_tail;    // front flit is a tail flit
    coord_t    [NUM_PORTS-1:0]   dx;         // destination x of the front flit
    coord_t    [NUM_PORTS-1:0]   dy;         // destination y of the front flit
    port_vec_t                   out_ready;  // downstream can accept a flit
    coord_t                      my_x;       // position of this switch
    coord_t                      my_y;
    out_state_t [NUM_PORTS-1:0]  st;         // current state, per output
  } ctrl_in_t;

  // Outputs of the combinational control logic, primary and pseudo-primary
  // (next state). These are the outputs of the critical region.
  typedef struct packed {
    port_vec_t                   out_valid;  // output port presents a flit
    port_vec_t [NUM_PORTS-1:0]   sel;        // one-hot crossbar select, per output
    port_vec_t                   pop;        // input buffer front is consumed
    out_state_t [NUM_PORTS-1:0]  nxt;        // next state, per output
  } ctrl_out_t;

  localparam int unsigned CTRL_OUT_W = $bits(ctrl_out_t);

  // Bits of the control logic that belong to one output port: out_valid,
  // crossbar select and next state. The arbiter and state of one output port
  // feed only its own slice.
  localparam int unsigned SLICE_W = 1 + NUM_PORTS + $bits(out_state_t);

  // Number of extra parity groups over the critical region outputs.
  localparam int unsigned NUM_GROUPS = 43;

  // Order in which the control outputs are assigned to parity groups: the
  // slices of the output ports one after the other, then the buffer pops.
  // Bit k of this vector belongs to group k mod NUM_GROUPS. As NUM_GROUPS is
  // larger than SLICE_W, the members of a group always come from different
  // output ports, whose arbitration and state logic is disjoint; a fault that
  // moves a request from one output port to another changes bits 17, 34, 51
  // or 68 positions apart, which also lie in different groups.
  function automatic logic [CTRL_OUT_W-1:0] ctrl_order(ctrl_out_t c);
    logic [CTRL_OUT_W-1:0] v;
    for (int o = 0; o < NUM_PORTS; o++)
      v[o*SLICE_W +: SLICE_W] = {c.out_valid[o], c.sel[o], c.nxt[o]};
    v[NUM_PORTS*SLICE_W +: NUM_PORTS] = c.pop;
    return v;
  endfunction

  // A head flit carries its destination in its low data bits:
  // x in data[COORD_W-1:0], y in data[2*COORD_W-1:COORD_W].

endpackage
