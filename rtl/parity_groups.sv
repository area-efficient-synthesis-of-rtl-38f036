// parity_groups: parity trees of the multi-bit parity code.
//
// The W watched outputs are distributed over G parity groups and one parity
// tree (XOR reduction) per group computes the parity of its members:
// p[g] = XOR of v[k] over all k with k mod G == g. Output k therefore shares a
// group with outputs k +/- G, 2G, ... Which outputs end up together is set by
// the order of v (see fs_noc_pkg::ctrl_order). A fixed assignment is a choice
// of this design: a fault-secure assignment would be derived from a fault
// analysis of the gate netlist. Purely combinational.
module parity_groups #(
  parameter int unsigned W = fs_noc_pkg::CTRL_OUT_W,
  parameter int unsigned G = fs_noc_pkg::NUM_GROUPS
) (
  input  logic [W-1:0] v,
  output logic [G-1:0] p
);
  always_comb begin
    p = '0;
    for (int unsigned k = 0; k < W; k++)
      p[k % G] ^= v[k];
  end
endmodule
