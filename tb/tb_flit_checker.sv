// tb_flit_checker: random flits with correct and wrong check bits, valid and
// idle; the error flag must be high exactly for a valid flit whose check bit
// is not the even parity of its data.
module tb_flit_checker;
  localparam int W = 8;
  logic valid, chk, error;
  logic [W-1:0] data;
  int checks = 0, failures = 0, detected = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  flit_checker #(.W(W)) dut (.valid(valid), .data(data), .chk(chk), .error(error));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic good, exp_err;
    int ones;
    for (int n = 0; n < 2000; n++) begin
      data  = W'($urandom);
      valid = $urandom_range(0, 3) != 0;
      ones  = $countones(data);
      good  = $urandom_range(0, 1) == 1;
      chk   = good ? ones[0] : ~ones[0];
      // corrupt one data bit after encoding in some cases
      if (good && $urandom_range(0, 3) == 0) begin
        data = data ^ (W'(1) << $urandom_range(0, W-1));
        good = 1'b0;
      end
      exp_err = valid && !good;
      #1;
      checks++;
      if (error !== exp_err) begin
        failures++;
        $display("data=%h chk=%b valid=%b error=%b", data, chk, valid, error);
      end
      if (error) detected++;
    end
    checks++;
    if (detected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
