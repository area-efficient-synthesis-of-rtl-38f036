// tb_crossbar: random input flits and one-hot (or empty) selects per output;
// every output must carry the selected input flit, or zero without select.
module tb_crossbar;
  import fs_noc_pkg::*;
  flit_t     in_flit [NUM_PORTS];
  port_vec_t sel     [NUM_PORTS];
  flit_t     out_flit[NUM_PORTS];
  int checks = 0, failures = 0;
  int choice [NUM_PORTS];
  logic clk = 0;
  always #5 clk = ~clk;

  crossbar dut (.in_flit(in_flit), .sel(sel), .out_flit(out_flit));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < NUM_PORTS; i++) in_flit[i] = flit_t'($urandom);
      for (int o = 0; o < NUM_PORTS; o++) begin
        choice[o] = $urandom_range(0, NUM_PORTS);   // NUM_PORTS = none
        sel[o] = (choice[o] == NUM_PORTS) ? '0 : port_vec_t'(1) << choice[o];
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (out_flit[o] !== ((choice[o] == NUM_PORTS) ? flit_t'(0) : in_flit[choice[o]])) begin
          failures++;
          $display("out %0d sel %b: %h", o, sel[o], out_flit[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
