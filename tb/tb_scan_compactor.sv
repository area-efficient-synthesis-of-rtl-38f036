// tb_scan_compactor: captures random responses into 3 chains of 43 cells and
// shifts them out; in shift cycle t the chain outputs must be the members of
// group t (the cells at position t of all chains), so that a parity tree on
// them gives one bit per group and 43 cycles suffice for all groups. scan_in
// bits shifted in must come out CHAIN_LEN cycles later.
module tb_scan_compactor;
  localparam int NC = 3, L = 43;
  logic clk = 0, rst_n = 0;
  logic capture, shift;
  logic [L*NC-1:0] cap_data;
  logic [NC-1:0] scan_in, scan_out;
  logic [NC-1:0] sin_hist [L];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scan_compactor #(.N_CHAINS(NC), .CHAIN_LEN(L)) dut (
    .clk(clk), .rst_n(rst_n), .capture(capture), .shift(shift), .cap_data(cap_data),
    .scan_in(scan_in), .scan_out(scan_out));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic par;
    capture = 0; shift = 0; scan_in = '0; cap_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      @(negedge clk);
      cap_data = (L*NC)'({$urandom, $urandom, $urandom, $urandom, $urandom});
      capture = 1;
      @(negedge clk);
      capture = 0;
      for (int t = 0; t < L; t++) begin
        par = 1'b0;
        for (int c = 0; c < NC; c++) par ^= cap_data[t*NC + c];
        checks++;
        if ((^scan_out) !== par || scan_out !== cap_data[t*NC +: NC]) begin
          failures++;
          if (failures < 10) $display("round %0d group %0d: got %b exp %b", r, t, scan_out, cap_data[t*NC +: NC]);
        end
        scan_in = NC'($urandom);
        sin_hist[t] = scan_in;
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
      // the chains now hold the scan_in bits in order
      for (int t = 0; t < L; t++) begin
        checks++;
        if (scan_out !== sin_hist[t]) begin failures++; $display("scan_in bit %0d lost", t); end
        shift = 1;
        @(negedge clk);
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
