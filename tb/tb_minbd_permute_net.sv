// Testbench for minbd_permute_net.
// Random vectors: every valid input flit must leave on exactly one port
// (nothing lost, nothing duplicated); each deflection flag must match the
// dimension-order direction computed here; the highest-priority flit must
// get its productive port; a lone flit must never be deflected.
// A hand-worked vector: at router (2,2) a flit of age 3 in slot 0 and a flit
// of age 5 in slot 2 both want East; the older one gets East, the younger
// one is deflected to North.
module tb_minbd_permute_net;
  import minbd_pkg::*;

  coord_t     cur_x, cur_y;
  flit_t      in_flit [NPORTS];
  flit_t      out_flit [NPORTS];
  logic [3:0] deflected;
  int         checks = 0, failures = 0;

  minbd_permute_net dut (.cur_x, .cur_y, .in_flit, .out_flit, .deflected);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected productive port, -1 for a flit at its destination.
  function automatic int want_port(flit_t f, coord_t x, coord_t y);
    if (f.dst_x > x) return 1;       // East
    if (f.dst_x < x) return 3;       // West
    if (f.dst_y > y) return 2;       // South
    if (f.dst_y < y) return 0;       // North
    return -1;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nvalid, best, found, port_of, n_defl = 0;
    // hand-worked vector
    cur_x = 2; cur_y = 2;
    for (int i = 0; i < NPORTS; i++) in_flit[i] = '0;
    in_flit[0] = '{valid: 1'b1, dst_x: 3'd5, dst_y: 3'd2, src_x: 3'd0, src_y: 3'd0, age: 8'd3, data: 32'hA};
    in_flit[2] = '{valid: 1'b1, dst_x: 3'd7, dst_y: 3'd1, src_x: 3'd0, src_y: 3'd0, age: 8'd5, data: 32'hB};
    #1;
    check(out_flit[1] == in_flit[2], "older flit takes East");
    check(out_flit[0] == in_flit[0], "younger flit deflected to North");
    check(deflected == 4'b0001, "only North output deflected");
    check(!out_flit[2].valid && !out_flit[3].valid, "S and W idle");
    #1;
    for (int t = 0; t < 3000; t++) begin
      cur_x = coord_t'($urandom_range(0, 7));
      cur_y = coord_t'($urandom_range(0, 7));
      nvalid = 0;
      for (int i = 0; i < NPORTS; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom});
        in_flit[i].valid = ($urandom_range(0, 4) != 0);
        in_flit[i].age = 8'($urandom_range(0, 5));
        in_flit[i].data = 32'(t * 4 + i);     // unique tag
        if ($urandom_range(0, 9) == 0) begin in_flit[i].dst_x = cur_x; in_flit[i].dst_y = cur_y; end
        if (!in_flit[i].valid) in_flit[i] = '0;
        else nvalid++;
      end
      #1;
      // conservation
      for (int i = 0; i < NPORTS; i++) begin
        if (!in_flit[i].valid) continue;
        found = 0; port_of = -1;
        for (int p = 0; p < NPORTS; p++)
          if (out_flit[p] == in_flit[i]) begin found++; port_of = p; end
        check(found == 1, $sformatf("slot %0d flit leaves exactly once", i));
      end
      for (int p = 0; p < NPORTS; p++) begin
        found = 0;
        for (int i = 0; i < NPORTS; i++) if (in_flit[i].valid && out_flit[p] == in_flit[i]) found = 1;
        check(!out_flit[p].valid || found == 1, "no invented flit");
        check(deflected[p] == (out_flit[p].valid && want_port(out_flit[p], cur_x, cur_y) != p),
              $sformatf("deflection flag port %0d", p));
        if (deflected[p]) n_defl++;
      end
      // highest priority flit (oldest, lowest slot on a tie) is productive
      best = -1;
      for (int i = 0; i < NPORTS; i++)
        if (in_flit[i].valid && (best < 0 || in_flit[i].age > in_flit[best].age)) best = i;
      if (best >= 0 && want_port(in_flit[best], cur_x, cur_y) >= 0)
        check(out_flit[want_port(in_flit[best], cur_x, cur_y)] == in_flit[best], "oldest flit productive");
      if (nvalid == 1 && best >= 0 && want_port(in_flit[best], cur_x, cur_y) >= 0)
        check(deflected == 4'b0000, "lone flit not deflected");
      #1;
    end
    check(n_defl > 500, "deflections exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
