// tb_switch_ctrl_comb: random control inputs and states against a reference
// model of the wormhole control (XY route, round-robin grant, reservation,
// release on the tail flit). Counts how often arbitration with several
// requesters, back-pressure and a release happened, and fails if one never did.
module tb_switch_ctrl_comb;
  import fs_noc_pkg::*;
  ctrl_in_t  cin;
  ctrl_out_t cout, exp_o;
  int checks = 0, failures = 0;
  int n_contention = 0, n_backpressure = 0, n_release = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  switch_ctrl_comb dut (.cin(cin), .cout(cout));

  function automatic int route_of(coord_t mx, coord_t my, coord_t x, coord_t y);
    if (x > mx) return P_EAST;
    if (x < mx) return P_WEST;
    if (y > my) return P_NORTH;
    if (y < my) return P_SOUTH;
    return P_LOCAL;
  endfunction

  function automatic ctrl_out_t model(ctrl_in_t c);
    ctrl_out_t r;
    r = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      int p, win, nreq;
      logic fire;
      p = 0;
      for (int k = 0; k < NUM_PORTS; k++) if (c.st[o].ptr[k]) p = k;
      win = -1; nreq = 0;
      if (!c.st[o].locked)
        for (int k = 0; k < NUM_PORTS; k++) begin
          int i = (p + k) % NUM_PORTS;
          if (c.in_valid[i] && c.in_head[i] && route_of(c.my_x, c.my_y, c.dx[i], c.dy[i]) == o) begin
            nreq++;
            if (win < 0) win = i;
          end
        end
      if (nreq > 1) n_contention++;
      r.sel[o] = c.st[o].locked ? c.st[o].owner : (win >= 0 ? port_vec_t'(1) << win : '0);
      r.out_valid[o] = |(r.sel[o] & c.in_valid);
      fire = r.out_valid[o] && c.out_ready[o];
      if (r.out_valid[o] && !c.out_ready[o]) n_backpressure++;
      for (int i = 0; i < NUM_PORTS; i++) if (fire && r.sel[o][i]) r.pop[i] = 1'b1;
      r.nxt[o].locked = (c.st[o].locked || win >= 0) && !(fire && (|(r.sel[o] & c.in_tail)));
      if (c.st[o].locked && fire && (|(r.sel[o] & c.in_tail))) n_release++;
      r.nxt[o].owner  = c.st[o].locked ? c.st[o].owner : (win >= 0 ? port_vec_t'(1) << win : c.st[o].owner);
      r.nxt[o].ptr    = win >= 0 ? port_vec_t'(1) << ((win + 1) % NUM_PORTS) : c.st[o].ptr;
    end
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      cin = ctrl_in_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      // keep the state well formed: one-hot owner and pointer
      for (int o = 0; o < NUM_PORTS; o++) begin
        cin.st[o].owner = port_vec_t'(1) << $urandom_range(0, NUM_PORTS-1);
        cin.st[o].ptr   = port_vec_t'(1) << $urandom_range(0, NUM_PORTS-1);
        cin.st[o].locked = $urandom_range(0, 2) == 0;
      end
      // bias the traffic towards a few destinations to create contention
      cin.my_x = 3'd3; cin.my_y = 3'd3;
      for (int i = 0; i < NUM_PORTS; i++)
        if ($urandom_range(0, 1) == 1) begin
          cin.dx[i] = 3'd5; cin.dy[i] = 3'd1;
        end
      #1;
      exp_o = model(cin);
      checks++;
      if (cout !== exp_o) begin
        failures++;
        if (failures < 10) $display("mismatch: got %h exp %h", cout, exp_o);
      end
    end
    checks += 3;
    if (n_contention == 0)   begin failures++; $display("no contention"); end
    if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    if (n_release == 0)      begin failures++; $display("no release"); end
    $display("contention=%0d backpressure=%0d release=%0d", n_contention, n_backpressure, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
