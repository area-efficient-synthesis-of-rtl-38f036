// fs_noc_switch: fault-secure five-port wormhole switch for a 2D mesh.
//
// Data path: every input port writes arriving flits (data plus the sender's
// parity check bit, and the head/tail sideband) into an input_fifo; the
// crossbar connects the front flit of an input buffer to an output port.
// Control: switch_ctrl_comb performs XY routing, round-robin arbitration per
// output port and wormhole reservation; its state (per output: locked, owner,
// round-robin pointer) is held in the out_st register of this module.
//
// Error detection has two parts, as in the described fault-secure structure:
//  * a flit_checker at every output port recomputes the parity of the data
//    leaving the switch and flags a mismatch (flit_err); this covers the
//    incoming links, the buffers and the crossbar data path;
//  * ced_critical_region watches the outputs and next state of the control
//    logic with a multi-bit parity code (prediction logic, parity trees,
//    two-rail checker) and flags a mismatch (ced_err).
// error, the OR of all of them, is the switch's error port towards its
// neighbours and network interface, all combinational in the cycle in which
// the erroneous value appears.
//
// Interface: per port, in_flit/in_valid/in_ready (valid/ready handshake, a
// flit moves when both are high) and out_flit/out_valid/out_ready likewise.
// my_x/my_y give the switch position. A flit entering in cycle t can leave in
// cycle t+1 (its output free, downstream ready). The test interface loads the
// control outputs and the checked output flits into the compaction scan
// chains (test_capture), shifts them (test_shift) and, with test_mode high,
// outputs one parity bit per shift cycle (compact_out), computed by the
// largest parity tree of the CED: 43 cycles for the control parity groups
// plus 2 (at 8 data bits) for the flit bits that do not fit into their free
// chain positions. Placing the flit bits in the chains and using them to
// even out the chain lengths follows the described scan restructuring; the
// exact placement is this design's.
// The default flit has 8 data bits, the main configuration; FLIT_T selects
// wider flits (16 to 128 data bits were evaluated for this switch).
// Buffer depth, flit sideband, handshake and the test interface are choices
// of this design.
module fs_noc_switch
  import fs_noc_pkg::*;
#(
  // Flit type: a packed struct {head, tail, chk, data[FLIT_W-1:0]} laid out
  // like fs_noc_pkg::flit_t; a wider data field gives a wider switch.
  parameter type         FLIT_T     = fs_noc_pkg::flit_t,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned SCAN_CHAINS = (CTRL_OUT_W + NUM_GROUPS - 1) / NUM_GROUPS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  coord_t     my_x,
  input  coord_t     my_y,
  // input links
  input  FLIT_T      in_flit  [NUM_PORTS],
  input  port_vec_t  in_valid,
  output port_vec_t  in_ready,
  // output links
  output FLIT_T      out_flit [NUM_PORTS],
  output port_vec_t  out_valid,
  input  port_vec_t  out_ready,
  // error port
  output logic       error,
  output port_vec_t  flit_err,
  output logic       ced_err,
  // test response compaction
  input  logic                   test_mode,
  input  logic                   test_capture,
  input  logic                   test_shift,
  input  logic [SCAN_CHAINS-1:0] scan_in,
  output logic [SCAN_CHAINS-1:0] scan_out,
  output logic                   compact_out
);
  localparam int unsigned FB = $bits(FLIT_T);   // flit bits
  localparam int unsigned FW = FB - 3;           // data bits
  // Scan chain length: one position per control parity group; the checked
  // output flit bits (data and chk of every output port) first fill the
  // positions the smaller groups leave empty, the rest are appended.
  localparam int unsigned SCAN_FLIT = NUM_PORTS * (FW + 1);
  localparam int unsigned SCAN_FREE = NUM_GROUPS * SCAN_CHAINS - CTRL_OUT_W;
  localparam int unsigned SCAN_XTRA = SCAN_FLIT > SCAN_FREE ? SCAN_FLIT - SCAN_FREE : 0;
  localparam int unsigned SCAN_LEN  = NUM_GROUPS + (SCAN_XTRA + SCAN_CHAINS - 1) / SCAN_CHAINS;

  FLIT_T      front   [NUM_PORTS];
  port_vec_t  not_empty;
  ctrl_in_t   cin;
  ctrl_out_t  cout;
  out_state_t out_st  [NUM_PORTS];
  port_vec_t  sel     [NUM_PORTS];
  FLIT_T      xbar_out[NUM_PORTS];

  // Input buffers
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    input_fifo #(.WIDTH(FB), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .push     (in_valid[i]),
      .wr_data  (in_flit[i]),
      .in_ready (in_ready[i]),
      .pop      (cout.pop[i]),
      .rd_data  (front[i]),
      .not_empty(not_empty[i])
    );
  end

  // Control logic (critical region) and its state
  always_comb begin
    cin.in_valid  = not_empty;
    cin.out_ready = out_ready;
    cin.my_x      = my_x;
    cin.my_y      = my_y;
    for (int i = 0; i < NUM_PORTS; i++) begin
      cin.in_head[i] = front[i].head;
      cin.in_tail[i] = front[i].tail;
      cin.dx[i]      = front[i].data[COORD_W-1:0];
      cin.dy[i]      = front[i].data[2*COORD_W-1:COORD_W];
      cin.st[i]      = out_st[i];
    end
  end

  switch_ctrl_comb u_ctrl (.cin(cin), .cout(cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        out_st[o].locked <= 1'b0;
        out_st[o].owner  <= '0;
        out_st[o].ptr    <= port_vec_t'(1);
      end
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) out_st[o] <= cout.nxt[o];
    end
  end

  // Crossbar and output links
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_sel
    assign sel[o] = cout.sel[o];
  end

  crossbar #(.FLIT_T(FLIT_T)) u_xbar (.in_flit(front), .sel(sel), .out_flit(xbar_out));

  assign out_flit  = xbar_out;
  assign out_valid = cout.out_valid;

  // Flit checkers at the output ports
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    flit_checker #(.W(FW)) u_chk (
      .valid(cout.out_valid[o]),
      .data (xbar_out[o].data),
      .chk  (xbar_out[o].chk),
      .error(flit_err[o])
    );
  end

  // Concurrent error detection of the critical region
  logic [NUM_GROUPS-1:0] par_act, par_pred;
  logic                  trc_z0, trc_z1;

  ced_critical_region #(.G(NUM_GROUPS), .TEST_N(SCAN_CHAINS)) u_ced (
    .cin     (cin),
    .cout    (cout),
    .par_act (par_act),
    .par_pred(par_pred),
    .z0      (trc_z0),
    .z1      (trc_z1),
    .error   (ced_err),
    .test_mode(test_mode),
    .test_in (scan_out),
    .test_par(compact_out)
  );

  assign error = ced_err | (|flit_err);

  // Test response compaction: chain c, position t < NUM_GROUPS holds member c
  // of group t, bit t + c*NUM_GROUPS of the group order of the control
  // outputs. The positions left over (past the last control output, and the
  // appended positions) take the checked output flit bits in order, scanning
  // positions first and chains second; anything beyond them is zero.
  logic [CTRL_OUT_W-1:0]           cout_ord;
  logic [SCAN_FLIT-1:0]            flit_cap;
  logic [SCAN_LEN*SCAN_CHAINS-1:0] cap_data;
  assign cout_ord = ctrl_order(cout);
  always_comb
    for (int o = 0; o < NUM_PORTS; o++)
      flit_cap[o*(FW+1) +: FW+1] = {out_flit[o].chk, out_flit[o].data};
  always_comb begin
    int unsigned j;
    cap_data = '0;
    j = 0;
    for (int unsigned t = 0; t < SCAN_LEN; t++)
      for (int unsigned c = 0; c < SCAN_CHAINS; c++)
        if (t < NUM_GROUPS && t + c * NUM_GROUPS < CTRL_OUT_W)
          cap_data[t*SCAN_CHAINS + c] = cout_ord[t + c*NUM_GROUPS];
        else if (j < SCAN_FLIT) begin
          cap_data[t*SCAN_CHAINS + c] = flit_cap[j];
          j++;
        end
  end

  scan_compactor #(.N_CHAINS(SCAN_CHAINS), .CHAIN_LEN(SCAN_LEN)) u_scan (
    .clk        (clk),
    .rst_n      (rst_n),
    .capture    (test_capture),
    .shift      (test_shift),
    .cap_data   (cap_data),
    .scan_in    (scan_in),
    .scan_out   (scan_out)
  );
endmodule
