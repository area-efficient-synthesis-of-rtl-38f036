// rr_arbiter: round-robin arbiter over the input ports (combinational).
//
// req has one bit per requesting input, ptr is a one-hot priority pointer.
// The grant goes to the first requesting input at or after the pointer
// position, wrapping around; grant is one-hot, or zero when nothing is
// requested. next_ptr is the position just after the granted input, so the
// winner has the lowest priority in the next round; with no grant the pointer
// is kept. The pointer register lives with the rest of the control state.
// Round-robin service of the input ports follows the evaluated switch; the
// one-hot pointer is a choice of this design.
module rr_arbiter #(
  parameter int unsigned N = fs_noc_pkg::NUM_PORTS
) (
  input  logic [N-1:0] req,
  input  logic [N-1:0] ptr,
  output logic [N-1:0] grant,
  output logic [N-1:0] next_ptr
);
  always_comb begin
    logic        found;
    int unsigned p, idx;
    // index of the pointer bit (0 if the pointer holds no bit)
    p = 0;
    for (int unsigned k = 0; k < N; k++)
      if (ptr[k]) p = k;
    grant = '0;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (p + k) % N;
      if (!found && req[idx]) begin
        grant[idx] = 1'b1;
        found      = 1'b1;
      end
    end
    next_ptr = found ? {grant[N-2:0], grant[N-1]} : ptr;
  end
endmodule
