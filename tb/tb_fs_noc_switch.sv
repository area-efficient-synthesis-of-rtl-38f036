// tb_fs_noc_switch: end-to-end test of the fault-secure switch at its default
// parameters. The switch sits at (3,3) of the mesh.
//
//  1. Latency: a one-flit packet into the idle switch leaves one cycle after
//     it was accepted.
//  2. Traffic: every input sends random wormhole packets (1 to 4 flits) to
//     random outputs with random downstream back-pressure. A scoreboard per
//     (output, input) pair checks that every flit arrives once, in order and
//     intact, that the flits of a packet are not interleaved, and that no
//     error is flagged. Arbitration with several requesters, back-pressure,
//     full input buffers and a reserved output waiting for its next flit
//     must each happen.
//  3. Link errors: flits with a wrong check bit are injected; the flit checker
//     of the output they leave through must flag each of them.
//  4. Control faults: for single cycles, 1 to 3 bits of the control logic
//     outputs are inverted; whenever that changes some group parity, the CED
//     error and the error port must rise.
//  5. Test compaction: the control outputs and the checked output flit bits
//     are captured into the scan chains and, with test_mode high, shifted out
//     through the largest CED parity tree; each of the 45 shift cycles must
//     give the parity of the expected chain position (control group t, with
//     flit bits in the free chain positions).
module tb_fs_noc_switch;
  import fs_noc_pkg::*;

  localparam int NP = NUM_PORTS;
  localparam int NCH = (CTRL_OUT_W + NUM_GROUPS - 1) / NUM_GROUPS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  coord_t    my_x = 3'd3, my_y = 3'd3;
  flit_t     in_flit [NP];
  port_vec_t in_valid, in_ready;
  flit_t     out_flit[NP];
  port_vec_t out_valid, out_ready;
  logic      error, ced_err;
  port_vec_t flit_err;
  logic      test_mode, test_capture, test_shift, compact_out;
  logic [NCH-1:0] scan_in, scan_out;

  fs_noc_switch dut (
    .clk(clk), .rst_n(rst_n), .my_x(my_x), .my_y(my_y),
    .in_flit(in_flit), .in_valid(in_valid), .in_ready(in_ready),
    .out_flit(out_flit), .out_valid(out_valid), .out_ready(out_ready),
    .error(error), .flit_err(flit_err), .ced_err(ced_err),
    .test_mode(test_mode), .test_capture(test_capture), .test_shift(test_shift),
    .scan_in(scan_in), .scan_out(scan_out), .compact_out(compact_out));

  // Fault-free copy of the control function, fed with the same inputs.
  ctrl_out_t ref_cout;
  switch_ctrl_comb u_ref (.cin(dut.cin), .cout(ref_cout));

  int checks = 0, failures = 0;
  int n_contention = 0, n_backpressure = 0, n_full = 0, n_wait = 0;
  int n_link_inj = 0, n_link_det = 0, n_ced_act = 0, n_ced_det = 0, n_ced_masked = 0;
  int n_delivered = 0, n_sent = 0;

  // sources and scoreboard
  flit_t src_q [NP][$];
  flit_t exp_q [NP*NP][$];
  int    cur_src [NP];
  logic  corrupt_mode = 0;
  ctrl_out_t cout_val;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  function automatic flit_t mk(logic [FLIT_W-1:0] d, logic h, logic t);
    flit_t f;
    f.head = h; f.tail = t; f.data = d; f.chk = ^d;
    return f;
  endfunction

  // A packet from input i to output o, length len.
  task automatic gen_packet(int i, int o, int len);
    coord_t x, y;
    case (o)
      P_EAST:  begin x = coord_t'($urandom_range(4, 7)); y = coord_t'($urandom_range(0, 7)); end
      P_WEST:  begin x = coord_t'($urandom_range(0, 2)); y = coord_t'($urandom_range(0, 7)); end
      P_NORTH: begin x = 3'd3; y = coord_t'($urandom_range(4, 7)); end
      P_SOUTH: begin x = 3'd3; y = coord_t'($urandom_range(0, 2)); end
      default: begin x = 3'd3; y = 3'd3; end
    endcase
    for (int k = 0; k < len; k++) begin
      logic [FLIT_W-1:0] d;
      d = (k == 0) ? {2'($urandom), y, x} : FLIT_W'($urandom);
      src_q[i].push_back(mk(d, k == 0, k == len - 1));
    end
  endtask

  function automatic int onehot_idx(port_vec_t v);
    for (int k = 0; k < NP; k++) if (v[k]) return k;
    return -1;
  endfunction

  // One clock cycle: drive at the falling edge, sample just before the
  // rising edge.
  // inject: number of critical-region output bits to flip in this cycle.
  int out_ready_pct = 70, in_valid_pct = 100;
  task automatic cycle(int inject = 0);
    @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = src_q[i].size() != 0 && $urandom_range(0, 99) < in_valid_pct;
      in_flit[i]  = in_valid[i] ? src_q[i][0] : '0;
    end
    for (int o = 0; o < NP; o++) out_ready[o] = $urandom_range(0, 99) < out_ready_pct;
    if (inject > 0) begin
      ctrl_out_t v, mask;
      logic [NUM_GROUPS-1:0] dpar;
      logic [CTRL_OUT_W-1:0] mord;
      #1;
      v = dut.cout;
      mask = '0;
      for (int k = 0; k < inject; k++) mask[$urandom_range(0, CTRL_OUT_W-1)] = 1'b1;
      dpar = '0;
      mord = ctrl_order(mask);
      for (int k = 0; k < CTRL_OUT_W; k++) dpar[k % NUM_GROUPS] ^= mord[k];
      cout_val = v ^ mask;
      force dut.cout = cout_val;
      #1;
      checks++;
      if (dpar != '0) begin
        n_ced_act++;
        if (!ced_err || !error) fail("control output error not flagged");
        else n_ced_det++;
      end else if (mask != '0) n_ced_masked++;
      release dut.cout;
      #2;
    end else #4;
    // mechanisms
    for (int o = 0; o < NP; o++) begin
      if ($countones(dut.u_ctrl.req[o]) > 1 && !dut.out_st[o].locked) n_contention++;
      if (out_valid[o] && !out_ready[o]) n_backpressure++;
      if (dut.out_st[o].locked && !out_valid[o]) n_wait++;
    end
    for (int i = 0; i < NP; i++) if (in_valid[i] && !in_ready[i]) n_full++;
    // outputs
    for (int o = 0; o < NP; o++) begin
      logic bad_code;
      bad_code = out_valid[o] && ((^out_flit[o].data) != out_flit[o].chk);
      checks++;
      if (flit_err[o] !== bad_code || (bad_code && !error)) fail($sformatf("flit_err[%0d]=%b, code error %b", o, flit_err[o], bad_code));
      if (bad_code && flit_err[o] && out_ready[o]) n_link_det++;
      if (out_valid[o] && out_ready[o]) begin
        int s;
        if (out_flit[o].head) cur_src[o] = onehot_idx(dut.cout.sel[o]);
        s = cur_src[o];
        checks++;
        if (s < 0 || exp_q[o*NP + s].size() == 0) fail($sformatf("unexpected flit at output %0d", o));
        else begin
          flit_t e;
          e = exp_q[o*NP + s].pop_front();
          if (!corrupt_mode && out_flit[o] !== e)
            fail($sformatf("output %0d from %0d: got %h exp %h", o, s, out_flit[o], e));
          else if (corrupt_mode && {out_flit[o].head, out_flit[o].tail} !== {e.head, e.tail})
            fail($sformatf("output %0d framing", o));
          n_delivered++;
        end
      end
    end
    if (!corrupt_mode) begin
      checks++;
      if (error) fail("error flagged in fault-free operation");
    end
    // inputs accepted at the coming edge
    for (int i = 0; i < NP; i++)
      if (in_valid[i] && in_ready[i]) begin
        flit_t f;
        int r;
        // expected flit: recompute route from the packet head
        r = route_of(i);
        f = src_q[i].pop_front();
        exp_q[r * NP + i].push_back(f);
        n_sent++;
      end
  endtask

  // route of the packet currently being accepted at input i
  int cur_route [NP];
  function automatic int route_of(int i);
    flit_t f;
    f = src_q[i][0];
    if (f.head) begin
      int x, y;
      x = int'(f.data[2:0]); y = int'(f.data[5:3]);
      cur_route[i] = x > 3 ? P_EAST : x < 3 ? P_WEST : y > 3 ? P_NORTH : y < 3 ? P_SOUTH : P_LOCAL;
    end
    return cur_route[i];
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    in_valid = '0; out_ready = '0; test_mode = 0; test_capture = 0; test_shift = 0; scan_in = '0;
    for (int i = 0; i < NP; i++) begin in_flit[i] = '0; cur_src[i] = -1; cur_route[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;

    // 1. latency
    out_ready_pct = 100;
    gen_packet(P_LOCAL, P_EAST, 1);
    cycle();                       // accepted at the next edge
    lat = 0;
    while (n_delivered == 0 && lat < 10) begin cycle(); lat++; end
    checks++;
    if (lat != 1) fail($sformatf("latency %0d cycles, expected 1", lat));

    // 2. traffic
    out_ready_pct = 70;
    in_valid_pct = 85;
    for (int round = 0; round < 300; round++) begin
      for (int i = 0; i < NP; i++)
        if (src_q[i].size() < 8) gen_packet(i, $urandom_range(0, NP-1), $urandom_range(1, 4));
      cycle();
    end
    in_valid_pct = 100;
    // hot spot: all inputs to the east output
    for (int i = 0; i < NP; i++) gen_packet(i, P_EAST, 4);
    out_ready_pct = 30;
    for (int c = 0; c < 200; c++) cycle();
    out_ready_pct = 100;
    while ((src_q[0].size() + src_q[1].size() + src_q[2].size() + src_q[3].size() + src_q[4].size()) != 0)
      cycle();
    for (int c = 0; c < 20; c++) cycle();
    for (int k = 0; k < NP*NP; k++) begin
      checks++;
      if (exp_q[k].size() != 0) fail($sformatf("%0d flits of pair %0d not delivered", exp_q[k].size(), k));
    end

    // 3. link errors: corrupt one data bit after encoding
    corrupt_mode = 1;
    for (int n = 0; n < 20; n++) begin
      int i;
      flit_t f;
      i = $urandom_range(0, NP-1);
      gen_packet(i, $urandom_range(0, NP-1), 3);
      f = src_q[i][src_q[i].size()-2];
      f.data = f.data ^ (FLIT_W'(1) << $urandom_range(0, FLIT_W-1));
      src_q[i][src_q[i].size()-2] = f;
      n_link_inj++;
      for (int c = 0; c < 6; c++) cycle();
    end
    while ((src_q[0].size() + src_q[1].size() + src_q[2].size() + src_q[3].size() + src_q[4].size()) != 0)
      cycle();
    for (int c = 0; c < 20; c++) cycle();
    checks++;
    if (n_link_det != n_link_inj) fail($sformatf("link errors: %0d injected, %0d detected", n_link_inj, n_link_det));

    // 4. errors on the outputs of the control logic, one cycle each
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < NP; i++)
        if (src_q[i].size() < 4) gen_packet(i, $urandom_range(0, NP-1), $urandom_range(1, 4));
      cycle((n % 3) + 1);
    end
    checks++;
    if (n_ced_act == 0) fail("no control output error injected");

    // reset, drain
    in_valid = '0;
    for (int i = 0; i < NP; i++) src_q[i].delete();
    for (int k = 0; k < NP*NP; k++) exp_q[k].delete();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;

    // 5. test compaction: capture control outputs and output flits
    // mid-traffic, shift out through the compacting parity tree
    begin
      localparam int unsigned NFB = NP * (FLIT_W + 1);     // checked flit bits
      localparam int unsigned NC  = 3;                     // chains
      localparam int unsigned LEN = NUM_GROUPS + 2;        // (45 - 39 free) / 3
      ctrl_out_t cap;
      logic [CTRL_OUT_W-1:0] cap_ord;
      logic [NFB-1:0] fcap;
      logic exp_bit [LEN][NC];
      int unsigned j;
      for (int i = 0; i < NP; i++) gen_packet(i, P_EAST, 2);
      cycle(); cycle();
      @(negedge clk);
      test_capture = 1;
      #4 cap = dut.cout;
      cap_ord = ctrl_order(cap);
      for (int o = 0; o < NP; o++) fcap[o*(FLIT_W+1) +: FLIT_W+1] = {out_flit[o].chk, out_flit[o].data};
      // expected chain contents: control group t at position t, chain c;
      // flit bits in the free positions in order
      j = 0;
      for (int t = 0; t < LEN; t++)
        for (int c = 0; c < NC; c++) begin
          exp_bit[t][c] = 1'b0;
          if (t < NUM_GROUPS && t + c*NUM_GROUPS < CTRL_OUT_W) exp_bit[t][c] = cap_ord[t + c*NUM_GROUPS];
          else if (j < NFB) begin exp_bit[t][c] = fcap[j]; j++; end
        end
      checks++;
      if (j != NFB) fail("flit bits do not fit the chains");
      @(negedge clk);
      test_capture = 0;
      test_mode = 1;
      #1;
      for (int t = 0; t < LEN; t++) begin
        logic p;
        p = exp_bit[t][0] ^ exp_bit[t][1] ^ exp_bit[t][2];
        checks += 2;
        if (compact_out !== p) fail($sformatf("compacted bit of position %0d", t));
        if (scan_out !== {exp_bit[t][2], exp_bit[t][1], exp_bit[t][0]})
          fail($sformatf("chain outputs at position %0d", t));
        test_shift = 1;
        @(negedge clk);
        test_shift = 0;
        #1;
      end
      test_mode = 0;
    end

    checks += 4;
    if (n_contention == 0)   fail("no arbitration between several requesters");
    if (n_backpressure == 0) fail("no back-pressure");
    if (n_full == 0)         fail("input buffer never full");
    if (n_wait == 0)         fail("no reserved output waiting for a flit");
    $display("sent=%0d delivered=%0d contention=%0d backpressure=%0d full=%0d wait=%0d",
             n_sent, n_delivered, n_contention, n_backpressure, n_full, n_wait);
    $display("link errors %0d/%0d detected, control output errors %0d/%0d detected, %0d masked in a group",
             n_link_det, n_link_inj, n_ced_det, n_ced_act, n_ced_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
