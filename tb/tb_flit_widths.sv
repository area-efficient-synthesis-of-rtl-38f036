// tb_flit_widths: runs the switch with 16-, 32-, 64- and 128-bit flits side by
// side (switch_width_run), each with random wormhole traffic, back-pressure and
// injected link errors, and sums their results.
module tb_flit_widths;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] done;
  int c [4];
  int f [4];

  switch_width_run #(.W(16))  u_w16  (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(c[0]), .failures(f[0]));
  switch_width_run #(.W(32))  u_w32  (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(c[1]), .failures(f[1]));
  switch_width_run #(.W(64))  u_w64  (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(c[2]), .failures(f[2]));
  switch_width_run #(.W(128)) u_w128 (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(c[3]), .failures(f[3]));

  int checks, failures;

  task automatic report(int extra);
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3] + extra;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    report(1);
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done == 4'hf);
    report(0);
  end
endmodule
