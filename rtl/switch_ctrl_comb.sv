// switch_ctrl_comb: combinational control logic of the wormhole switch.
//
// This is the part of the switch that manages the flow of flits: the routing
// function, the round-robin arbitration of every output port and the
// wormhole reservation of an output by a packet. It has no flip-flops: the
// state (per output: locked, one-hot owner, one-hot round-robin pointer) comes
// in through cin.st and the next state leaves through cout.nxt, so state
// inputs and outputs appear as pseudo-primary inputs and outputs. Its outputs
// (cout) are the outputs of the critical region that the parity-based
// concurrent error detection watches.
//
// Per cycle:
//  * an input whose front flit is a head flit requests the output chosen by
//    XY routing;
//  * a free output grants one requesting input round-robin and is reserved
//    (locked) by it from that cycle on, whether or not the flit moves;
//  * a reserved output selects its owner in the crossbar; it presents a flit
//    when the owner's buffer is not empty, and the flit moves (the input
//    buffer pops) when the downstream ready is high;
//  * when a tail flit moves, the output is released in the next cycle.
// A head flit is forwarded in the cycle it reaches the front of its buffer if
// its output is free. Wormhole switching, XY routing and round-robin service
// follow the evaluated switch; the exact reservation rules are choices of
// this design.
module switch_ctrl_comb
  import fs_noc_pkg::*;
(
  input  ctrl_in_t  cin,
  output ctrl_out_t cout
);
  port_vec_t route [NUM_PORTS];   // route[i]: output requested by input i
  port_vec_t req   [NUM_PORTS];   // req[o]: inputs requesting output o
  port_vec_t grant [NUM_PORTS];
  port_vec_t nptr  [NUM_PORTS];
  port_vec_t fire;                // a flit moves through output o

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_route
    xy_route u_route (
      .my_x (cin.my_x),
      .my_y (cin.my_y),
      .dx   (cin.dx[i]),
      .dy   (cin.dy[i]),
      .route(route[i])
    );
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    for (genvar i = 0; i < NUM_PORTS; i++) begin : g_req
      assign req[o][i] = cin.in_valid[i] & cin.in_head[i] & route[i][o];
    end

    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .req     (cin.st[o].locked ? '0 : req[o]),
      .ptr     (cin.st[o].ptr),
      .grant   (grant[o]),
      .next_ptr(nptr[o])
    );

    always_comb begin
      port_vec_t sel;
      logic      tail;
      sel                    = cin.st[o].locked ? cin.st[o].owner : grant[o];
      cout.sel[o]            = sel;
      cout.out_valid[o]      = |(sel & cin.in_valid);
      fire[o]                = cout.out_valid[o] & cin.out_ready[o];
      tail                   = |(sel & cin.in_tail);
      cout.nxt[o].locked     = (cin.st[o].locked | (|grant[o])) & ~(fire[o] & tail);
      cout.nxt[o].owner      = cin.st[o].locked ? cin.st[o].owner
                             : ((|grant[o]) ? grant[o] : cin.st[o].owner);
      cout.nxt[o].ptr        = nptr[o];
    end
  end

  always_comb begin
    cout.pop = '0;
    for (int o = 0; o < NUM_PORTS; o++)
      cout.pop |= cout.sel[o] & {NUM_PORTS{fire[o]}};
  end
endmodule
