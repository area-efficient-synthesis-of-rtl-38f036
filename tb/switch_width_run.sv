// switch_width_run: traffic test of one fs_noc_switch with W data bits per
// flit, used by tb_flit_widths. Every input sends random wormhole packets
// (1 to 4 flits) to random outputs under random back-pressure; a scoreboard
// per (output, input) pair checks that every flit arrives once, in order and
// intact, and that no error is flagged. At the end one flit per input carries
// a corrupted data bit, and the flit checker of its output must flag it.
// done rises when the run is over; checks and failures are its counts.
module switch_width_run #(
  parameter int unsigned W       = 16,
  parameter int unsigned PACKETS = 40   // packets per input
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import fs_noc_pkg::*;
  localparam int NP = NUM_PORTS;
  localparam int NCH = (CTRL_OUT_W + NUM_GROUPS - 1) / NUM_GROUPS;

  typedef struct packed {
    logic         head;
    logic         tail;
    logic         chk;
    logic [W-1:0] data;
  } wflit_t;

  wflit_t    in_flit [NP];
  port_vec_t in_valid, in_ready;
  wflit_t    out_flit[NP];
  port_vec_t out_valid, out_ready;
  logic      error, ced_err, compact_out;
  port_vec_t flit_err;
  logic [NCH-1:0] scan_out;

  fs_noc_switch #(.FLIT_T(wflit_t)) dut (
    .clk(clk), .rst_n(rst_n), .my_x(3'd3), .my_y(3'd3),
    .in_flit(in_flit), .in_valid(in_valid), .in_ready(in_ready),
    .out_flit(out_flit), .out_valid(out_valid), .out_ready(out_ready),
    .error(error), .flit_err(flit_err), .ced_err(ced_err),
    .test_mode(1'b0), .test_capture(1'b0), .test_shift(1'b0), .scan_in('0),
    .scan_out(scan_out), .compact_out(compact_out));

  wflit_t src_q [NP][$];
  wflit_t exp_q [NP*NP][$];
  int     src_route [NP][$];
  int     cur_src [NP];
  int     n_inj = 0, n_det = 0;
  logic   corrupt = 1'b0;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL W=%0d @%0t: %s", W, $time, msg);
  endtask

  task automatic gen_packet(int i, int o, int len, logic bad);
    logic [2:0] x, y;
    case (o)
      P_EAST:  begin x = 3'($urandom_range(4, 7)); y = 3'($urandom_range(0, 7)); end
      P_WEST:  begin x = 3'($urandom_range(0, 2)); y = 3'($urandom_range(0, 7)); end
      P_NORTH: begin x = 3'd3; y = 3'($urandom_range(4, 7)); end
      P_SOUTH: begin x = 3'd3; y = 3'($urandom_range(0, 2)); end
      default: begin x = 3'd3; y = 3'd3; end
    endcase
    for (int k = 0; k < len; k++) begin
      wflit_t f;
      f.data = {W{1'b0}};
      for (int b = 0; b < W; b += 32) f.data = (f.data << 32) | W'($urandom);
      if (k == 0) f.data[5:0] = {y, x};
      f.head = (k == 0); f.tail = (k == len - 1); f.chk = ^f.data;
      if (bad && k == len - 1) f.data = f.data ^ (W'(1) << $urandom_range(0, W-1));
      src_q[i].push_back(f);
      src_route[i].push_back(o);
    end
  endtask

  task automatic cycle();
    @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = src_q[i].size() != 0 && $urandom_range(0, 99) < 90;
      in_flit[i]  = in_valid[i] ? src_q[i][0] : '0;
    end
    for (int o = 0; o < NP; o++) out_ready[o] = $urandom_range(0, 99) < 75;
    #4;
    for (int o = 0; o < NP; o++) begin
      logic bad;
      bad = out_valid[o] && ((^out_flit[o].data) != out_flit[o].chk);
      checks++;
      if (flit_err[o] !== bad) fail($sformatf("flit_err[%0d]=%b", o, flit_err[o]));
      if (out_valid[o] && out_ready[o]) begin
        int s;
        if (bad) n_det++;
        if (out_flit[o].head)
          for (int k = 0; k < NP; k++) if (dut.cout.sel[o][k]) cur_src[o] = k;
        s = cur_src[o];
        checks++;
        if (s < 0 || exp_q[o*NP + s].size() == 0) fail($sformatf("unexpected flit at output %0d", o));
        else begin
          wflit_t e;
          e = exp_q[o*NP + s].pop_front();
          if (!corrupt && out_flit[o] !== e) fail($sformatf("output %0d from %0d: wrong flit", o, s));
        end
      end
    end
    if (!corrupt) begin
      checks++;
      if (error) fail("error in fault-free operation");
    end
    for (int i = 0; i < NP; i++)
      if (in_valid[i] && in_ready[i]) begin
        int r;
        r = src_route[i].pop_front();
        exp_q[r*NP + i].push_back(src_q[i].pop_front());
      end
  endtask

  function automatic int pending();
    int n = 0;
    for (int i = 0; i < NP; i++) n += src_q[i].size();
    for (int k = 0; k < NP*NP; k++) n += exp_q[k].size();
    return n;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    in_valid = '0; out_ready = '0;
    for (int i = 0; i < NP; i++) begin in_flit[i] = '0; cur_src[i] = -1; end
    @(posedge rst_n);
    for (int n = 0; n < PACKETS; n++)
      for (int i = 0; i < NP; i++) gen_packet(i, $urandom_range(0, NP-1), $urandom_range(1, 4), 1'b0);
    while (pending() != 0) cycle();
    corrupt = 1'b1;
    for (int i = 0; i < NP; i++) begin gen_packet(i, $urandom_range(0, NP-1), 2, 1'b1); n_inj++; end
    while (pending() != 0) cycle();
    checks++;
    if (n_det != n_inj) fail($sformatf("%0d of %0d link errors detected", n_det, n_inj));
    $display("W=%0d: %0d packets per input delivered, %0d/%0d link errors detected", W, PACKETS, n_det, n_inj);
    done = 1;
  end
endmodule
