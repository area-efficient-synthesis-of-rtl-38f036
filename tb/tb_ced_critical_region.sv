// tb_ced_critical_region: the CED must stay quiet while the control outputs
// are the fault-free ones, and must flag every single-bit error on the
// outputs of the critical region (one bit changes the parity of exactly one
// group). It also checks the group parities against an independent
// reduction, and that a select bit moved from one output port to another
// (two bits in different output-port slices) is flagged. In test mode the
// tree of group 0 must give the parity of the test inputs.
module tb_ced_critical_region;
  import fs_noc_pkg::*;
  ctrl_in_t  cin;
  ctrl_out_t good, cout;
  logic [NUM_GROUPS-1:0] par_act, par_pred, exp_par;
  logic z0, z1, error;
  logic test_mode = 1'b0, test_par;
  logic [2:0] test_in = '0;
  logic [CTRL_OUT_W-1:0] ord;
  int checks = 0, failures = 0, n_detect = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  // fault-free reference outputs
  switch_ctrl_comb u_ref (.cin(cin), .cout(good));

  ced_critical_region dut (
    .cin(cin), .cout(cout), .par_act(par_act), .par_pred(par_pred),
    .z0(z0), .z1(z1), .error(error),
    .test_mode(test_mode), .test_in(test_in), .test_par(test_par));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    for (int n = 0; n < 2000; n++) begin
      cin = ctrl_in_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      #1;
      cout = good;
      #1;
      exp_par = '0;
      ord = ctrl_order(cout);
      for (int k = 0; k < CTRL_OUT_W; k++) exp_par[k % NUM_GROUPS] ^= ord[k];
      checks++;
      if (error || par_act !== exp_par || par_pred !== exp_par || z0 === z1) begin
        failures++;
        if (failures < 10) $display("false alarm or wrong parity, n=%0d", n);
      end
      b = $urandom_range(0, CTRL_OUT_W - 1);
      cout[b] = ~cout[b];
      #1;
      checks++;
      if (!error) begin
        failures++;
        if (failures < 10) $display("missed error on output bit %0d", b);
      end else n_detect++;
    end
    // A request moved from output o1 to output o2: the select bit of input i
    // falls at o1 and rises at o2. Both must never share a group.
    for (int n = 0; n < 200; n++) begin
      int o1, o2, i;
      cin = ctrl_in_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      #1;
      cout = good;
      o1 = $urandom_range(0, NUM_PORTS-1);
      o2 = (o1 + $urandom_range(1, NUM_PORTS-1)) % NUM_PORTS;
      i  = $urandom_range(0, NUM_PORTS-1);
      cout.sel[o1][i] = ~cout.sel[o1][i];
      cout.sel[o2][i] = ~cout.sel[o2][i];
      #1;
      checks++;
      if (!error) begin
        failures++;
        if (failures < 10) $display("missed moved select: input %0d, outputs %0d and %0d", i, o1, o2);
      end else n_detect++;
    end
    // Test mode: group 0's parity tree compacts test_in.
    test_mode = 1'b1;
    for (int n = 0; n < 8; n++) begin
      test_in = 3'(n);
      #1;
      checks++;
      if (test_par !== ^test_in) begin failures++; $display("test parity of %b wrong", test_in); end
    end
    test_mode = 1'b0;
    $display("detected %0d injected errors", n_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
