// tb_rr_arbiter: exhaustive check of the round-robin arbiter for five inputs,
// plus a fairness run in which all inputs request and every input must be
// served once in five rounds.
module tb_rr_arbiter;
  localparam int N = 5;
  logic [N-1:0] req, ptr, grant, next_ptr;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  rr_arbiter #(.N(N)) dut (.req(req), .ptr(ptr), .grant(grant), .next_ptr(next_ptr));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_g, exp_p, seen;
    for (int p = 0; p < N; p++)
      for (int r = 0; r < (1 << N); r++) begin
        ptr = N'(1) << p; req = N'(r);
        exp_g = '0;
        for (int k = 0; k < N; k++)
          if (exp_g == '0 && req[(p + k) % N]) exp_g[(p + k) % N] = 1'b1;
        exp_p = ptr;
        for (int k = 0; k < N; k++)
          if (exp_g[k]) exp_p = N'(1) << ((k + 1) % N);
        #1;
        checks++;
        if (grant !== exp_g || next_ptr !== exp_p) begin
          failures++;
          $display("ptr=%b req=%b grant=%b/%b next=%b/%b", ptr, req, grant, exp_g, next_ptr, exp_p);
        end
      end
    // fairness: all requesting, five rounds serve every input once
    ptr = 5'b00100; req = '1; seen = '0;
    for (int k = 0; k < N; k++) begin
      #1;
      seen |= grant;
      ptr = next_ptr;
    end
    checks++;
    if (seen !== '1) begin failures++; $display("unfair: %b", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
