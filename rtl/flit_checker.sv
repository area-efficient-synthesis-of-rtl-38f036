// flit_checker: concurrent check of the flit code at one output port.
//
// The flit leaving the switch carries the check bit the sender computed. The
// checker recomputes it from the data bits with a flit_encoder and compares:
// a mismatch while the port presents a valid flit raises error in the same
// cycle (combinational). Errors on the incoming link, in the input buffer and
// in the crossbar data path that flip an odd number of data bits are caught
// here. Gating with valid is a choice of this design: an idle output carries
// no flit.
module flit_checker #(
  parameter int unsigned W = fs_noc_pkg::FLIT_W
) (
  input  logic         valid,
  input  logic [W-1:0] data,
  input  logic         chk,
  output logic         error
);
  logic chk_re;

  flit_encoder #(.W(W)) u_enc (.data(data), .chk(chk_re));

  assign error = valid & (chk_re ^ chk);
endmodule
