// scan_compactor: scan chains ordered by parity group, for test response
// compaction.
//
// The scan cells are arranged as N_CHAINS parallel chains of CHAIN_LEN
// cells; cell t of chain c loads cap_data[t*N_CHAINS + c]. The surrounding
// design orders cap_data so that position t of all chains holds the members
// of one parity group (and, in the switch, checked output flit bits in the
// positions a small group leaves free). In every shift cycle the N_CHAINS
// chain outputs leave together on scan_out; in the switch they drive the
// largest functional parity tree (see ced_critical_region), which turns them
// into one compacted bit, so CHAIN_LEN positions are compacted and shifted
// out in CHAIN_LEN cycles.
//
// Timing: capture loads all cells at a clock edge; after it, scan_out shows
// position 0; each shift edge moves every chain one position
// towards its output (scan_in enters at the far end), so after s shifts
// scan_out shows position s. capture has priority over shift.
//
// The chain arrangement follows the described scan restructuring. Here the
// cells form a capture register of their own next to the functional
// flip-flops, which is a choice of this design.
module scan_compactor #(
  parameter int unsigned N_CHAINS  = 3,
  parameter int unsigned CHAIN_LEN = fs_noc_pkg::NUM_GROUPS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          capture,
  input  logic                          shift,
  input  logic [CHAIN_LEN*N_CHAINS-1:0] cap_data,
  input  logic [N_CHAINS-1:0]           scan_in,
  output logic [N_CHAINS-1:0]           scan_out
);
  logic [CHAIN_LEN-1:0] chain [N_CHAINS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CHAINS; c++) chain[c] <= '0;
    end else if (capture) begin
      for (int c = 0; c < N_CHAINS; c++)
        for (int t = 0; t < CHAIN_LEN; t++)
          chain[c][t] <= cap_data[t*N_CHAINS + c];
    end else if (shift) begin
      for (int c = 0; c < N_CHAINS; c++)
        for (int t = 0; t < CHAIN_LEN; t++)
          if (t == CHAIN_LEN - 1) chain[c][t] <= scan_in[c];
          else                    chain[c][t] <= chain[c][t+1];
    end
  end

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_out
    assign scan_out[c] = chain[c][0];
  end
endmodule
