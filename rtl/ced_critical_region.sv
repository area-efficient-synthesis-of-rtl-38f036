// ced_critical_region: concurrent error detection of the switch control logic.
//
// The control logic (switch_ctrl_comb, including its pseudo-primary next-state
// outputs) is the critical region: the part whose faults the flit code cannot
// always see. It is protected by a multi-bit parity code with G groups:
//  * prediction logic computes, from the inputs of the critical region
//    alone, the parity each group must have;
//  * parity trees (parity_groups) compute the parity of each group of the
//    outputs actually produced;
//  * a two-rail checker compares them: pair g is (computed p[g], inverted
//    predicted p[g]), which is complementary when they agree.
// error is high when the checker's output pair is not complementary.
// Everything is combinational; error is valid in the cycle of the outputs.
// For manufacturing test the largest parity tree (group 0, TEST_N inputs) is
// reused as the response compactor: with test_mode high its inputs are the
// scan chain outputs (test_in) and test_par is their parity; error has no
// meaning then.
//
// The prediction logic here is written as an independent instance of the
// control function followed by the same group reduction; a synthesis tool is
// expected to collapse it to the parity functions. The number of groups (43)
// follows the evaluated 8-bit switch. The assignment of outputs to groups is
// fixed: fs_noc_pkg::ctrl_order arranges the outputs per output port and
// parity_groups puts bit k of that order into group k mod G, so that the
// members of a group never come from the same output port.
module ced_critical_region
  import fs_noc_pkg::*;
#(
  parameter int unsigned G      = NUM_GROUPS,
  parameter int unsigned TEST_N = (CTRL_OUT_W + G - 1) / G   // size of group 0
) (
  input  ctrl_in_t  cin,       // inputs of the critical region
  input  ctrl_out_t cout,      // outputs produced by the critical region
  output logic [G-1:0] par_act,  // computed group parities
  output logic [G-1:0] par_pred, // predicted group parities
  output logic      z0,        // two-rail checker output pair
  output logic      z1,
  output logic      error,
  // Test compaction: in test mode the parity tree of group 0, the largest
  // group, takes test_in in place of its functional members.
  input  logic      test_mode,
  input  logic [TEST_N-1:0] test_in,
  output logic      test_par     // parity of test_in while test_mode is high
);
  ctrl_out_t             pred_out;
  logic [CTRL_OUT_W-1:0] v_act;

  // Prediction logic.
  switch_ctrl_comb u_pred_fn (.cin(cin), .cout(pred_out));
  parity_groups #(.W(CTRL_OUT_W), .G(G)) u_pred_par (.v(ctrl_order(pred_out)), .p(par_pred));

  // Parity trees over the produced outputs. Group 0 holds bits 0, G, 2G, ...
  // of the group order; in test mode these inputs come from test_in.
  always_comb begin
    v_act = ctrl_order(cout);
    if (test_mode)
      for (int unsigned c = 0; c < TEST_N; c++)
        if (c * G < CTRL_OUT_W) v_act[c*G] = test_in[c];
  end

  parity_groups #(.W(CTRL_OUT_W), .G(G)) u_act_par (.v(v_act), .p(par_act));

  assign test_par = par_act[0];

  two_rail_checker #(.N(G)) u_trc (
    .a0(par_act),
    .a1(~par_pred),
    .z0(z0),
    .z1(z1)
  );

  assign error = ~(z0 ^ z1);
endmodule
