// tb_two_rail_checker: 43 random complementary pairs must give a
// complementary output pair; making any one pair non-complementary (00 or 11)
// must give equal outputs.
module tb_two_rail_checker;
  localparam int N = 43;
  logic [N-1:0] a0, a1;
  logic z0, z1;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  two_rail_checker #(.N(N)) dut (.a0(a0), .a1(a1), .z0(z0), .z1(z1));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    for (int n = 0; n < 500; n++) begin
      a0 = N'({$urandom, $urandom});
      a1 = ~a0;
      #1;
      checks++;
      if (z0 === z1) begin failures++; $display("false alarm a0=%h", a0); end
      b = $urandom_range(0, N-1);
      if ($urandom_range(0, 1) == 1) a0[b] = ~a0[b]; else a1[b] = ~a1[b];
      #1;
      checks++;
      if (z0 !== z1) begin failures++; $display("missed pair %0d a0=%h a1=%h", b, a0, a1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
