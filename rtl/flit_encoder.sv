// flit_encoder: check-bit generator of the flit code.
//
// The flit code is a single even-parity bit over the FLIT_W data bits: chk is
// the XOR of all data bits. The sender (network interface) uses it to append
// the check bit when a packet is injected, and every flit checker uses it to
// recompute the check bit. Purely combinational.
module flit_encoder #(
  parameter int unsigned W = fs_noc_pkg::FLIT_W
) (
  input  logic [W-1:0] data,
  output logic         chk
);
  assign chk = ^data;
endmodule
