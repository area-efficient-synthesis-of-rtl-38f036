// two_rail_checker: totally self-checking two-rail (dual-rail) checker tree.
//
// N input pairs (a0[i], a1[i]) are valid code words when the two rails are
// complementary. A binary tree of two-rail cells, each computing
//   z0 = x0&y0 | x1&y1,   z1 = x0&y1 | x1&y0,
// reduces them to one output pair (z0, z1) that is complementary exactly when
// every input pair is; any non-complementary input pair, or a single fault in
// the tree, makes z0 == z1. The tree is laid out as a heap: leaves at indices
// N-1 .. 2N-2, node k combines nodes 2k+1 and 2k+2, node 0 is the root.
// Purely combinational. The cell is the standard one; its use for comparing
// predicted and computed parity bits follows the described CED structure.
module two_rail_checker #(
  parameter int unsigned N = fs_noc_pkg::NUM_GROUPS
) (
  input  logic [N-1:0] a0,
  input  logic [N-1:0] a1,
  output logic         z0,
  output logic         z1
);
  logic [2*N-2:0] n0, n1;

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign n0[N-1+i] = a0[i];
    assign n1[N-1+i] = a1[i];
  end

  for (genvar k = 0; k < N - 1; k++) begin : g_cell
    assign n0[k] = (n0[2*k+1] & n0[2*k+2]) | (n1[2*k+1] & n1[2*k+2]);
    assign n1[k] = (n0[2*k+1] & n1[2*k+2]) | (n1[2*k+1] & n0[2*k+2]);
  end

  assign z0 = n0[0];
  assign z1 = n1[0];
endmodule
