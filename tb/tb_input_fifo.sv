// tb_input_fifo: random push/pop traffic against a queue model; checks the
// front flit, the empty/full flags and that a flit is at the front one cycle
// after it was written into an empty buffer.
module tb_input_fifo;
  localparam int W = 11, D = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop, in_ready, not_empty;
  logic [W-1:0] wr_data, rd_data;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, full_seen = 0;
  logic acc_push;
  always #5 clk = ~clk;

  input_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .push(push), .wr_data(wr_data), .in_ready(in_ready),
    .pop(pop), .rd_data(rd_data), .not_empty(not_empty));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: write into empty buffer, front valid next cycle
    @(negedge clk); push = 1; wr_data = 11'h5a5;
    @(negedge clk); push = 0;
    checks++;
    if (!not_empty || rd_data !== 11'h5a5) begin failures++; $display("latency check failed"); end
    pop = 1;
    @(negedge clk); pop = 0;
    checks++;
    if (not_empty) begin failures++; $display("not empty after pop"); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check state before this cycle's action
      checks++;
      if (not_empty !== (q.size() != 0) || in_ready !== (q.size() != D)) begin
        failures++; $display("flags wrong: size=%0d ne=%b rdy=%b", q.size(), not_empty, in_ready);
      end
      if (q.size() != 0) begin
        checks++;
        if (rd_data !== q[0]) begin failures++; $display("front %h exp %h", rd_data, q[0]); end
      end
      if (!in_ready) full_seen++;
      push = ($urandom_range(0, 99) < (n < 1500 ? 70 : 40));
      pop  = not_empty && ($urandom_range(0, 99) < (n < 1500 ? 40 : 70));
      wr_data = W'($urandom);
      acc_push = push && (q.size() != D);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (acc_push) q.push_back(wr_data);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
