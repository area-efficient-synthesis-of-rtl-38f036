// crossbar: the crossbar multiplexers of the switch data path.
//
// Every output port o takes the flit of the input selected by the one-hot
// select sel[o] (AND-OR multiplexer); with no select bit set the output is
// all zero. The check bit travels with the data, so a fault in a multiplexer
// that corrupts an odd number of data bits is caught by the flit checker
// behind it, while a fault on a select line is left to the checking of the
// control logic. Purely combinational. The flit type is a parameter, so the
// same crossbar serves any flit width.
module crossbar
  import fs_noc_pkg::*;
#(
  parameter type FLIT_T = fs_noc_pkg::flit_t   // any packed flit type
) (
  input  FLIT_T     in_flit [NUM_PORTS],
  input  port_vec_t sel     [NUM_PORTS],
  output FLIT_T     out_flit[NUM_PORTS]
);
  localparam int unsigned FB = $bits(FLIT_T);

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb begin
      out_flit[o] = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        out_flit[o] |= in_flit[i] & FLIT_T'({FB{sel[o][i]}});
    end
  end
endmodule
