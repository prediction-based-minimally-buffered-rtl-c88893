// Testbench for minbd_router: one router at (1,1), its links driven and
// observed directly.
// Every flit given to the router carries a unique tag in its payload; a
// scoreboard requires each one to leave exactly once, on an output link or
// through ejection, and ejection only for flits addressed to (1,1).
// Directed cases check the cycle counts: a flit passing through leaves its
// productive port two cycles after arrival with its age incremented; a
// locally addressed flit is ejected one cycle after arrival; an injected flit
// leaves two cycles after it is accepted; two flits wanting the same port
// make the younger one buffered and re-injected; inj_hold blocks injection.
// A saturation phase keeps all four inputs busy so that the side buffer
// fills, refuses, and the redirection block fires.
module tb_minbd_router;
  import minbd_pkg::*;

  localparam coord_t X = 3'd1, Y = 3'd1;

  logic       clk = 0, rst_n = 0;
  flit_t      in_flit [NPORTS];
  flit_t      out_flit [NPORTS];
  flit_t      inj_flit, ej_flit;
  logic       inj_hold, inj_ready;
  sb_status_e sb_status;
  router_ev_t ev;
  int         checks = 0, failures = 0;

  minbd_router dut (
    .clk, .rst_n, .cur_x(X), .cur_y(Y), .in_flit, .out_flit,
    .inj_flit, .inj_hold, .inj_ready, .ej_flit, .sb_status, .ev
  );

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scoreboard ----------------
  int    cyc = 0;
  int    next_tag = 1;
  flit_t pending [int];        // tag -> flit as given to the router
  int    left_port [int];      // tag -> port it left on (4 = ejected)
  int    left_cyc  [int];      // tag -> cycle of leaving
  int    n_defl = 0, n_buf = 0, n_refused = 0, n_reinj = 0, n_redir = 0;
  int    n_ej = 0, n_inj = 0, n_blocked = 0, n_held = 0;
  logic  accepted;

  function automatic flit_t mk(coord_t dx, coord_t dy, int age);
    flit_t f;
    f.valid = 1'b1; f.dst_x = dx; f.dst_y = dy; f.src_x = 0; f.src_y = 0;
    f.age = 8'(age); f.data = 32'(next_tag);
    next_tag++;
    return f;
  endfunction

  task automatic give(flit_t f);
    pending[int'(f.data)] = f;
  endtask

  task automatic leave(flit_t f, int port);
    int tag = int'(f.data);
    check(pending.exists(tag), $sformatf("flit %0d left once and was given before", tag));
    if (pending.exists(tag)) pending.delete(tag);
    left_port[tag] = port;
    left_cyc[tag]  = cyc;
  endtask

  // One clock cycle: sample the combinational outputs, clock, then record
  // what appeared on the registered outputs.
  task automatic cycle();
    #1;
    accepted = inj_ready;
    if (inj_ready) give(inj_flit);
    n_defl    += int'(ev.deflect);
    n_buf     += int'(ev.buffered);
    n_refused += int'(ev.buf_refused);
    n_reinj   += int'(ev.reinject);
    n_redir   += int'(ev.redirect);
    n_ej      += int'(ev.eject);
    n_inj     += int'(ev.inject);
    n_blocked += int'(ev.inj_blocked);
    n_held    += int'(ev.inj_held);
    @(posedge clk);
    cyc++;
    #1;
    for (int p = 0; p < NPORTS; p++)
      if (out_flit[p].valid) leave(out_flit[p], p);
    if (ej_flit.valid) begin
      check(ej_flit.dst_x == X && ej_flit.dst_y == Y, "ejected flit addressed here");
      leave(ej_flit, 4);
    end
    for (int p = 0; p < NPORTS; p++) in_flit[p] = '0;
    if (accepted) inj_flit = '0;
  endtask

  task automatic drive(int port, flit_t f);
    in_flit[port] = f;
    give(f);
  endtask

  task automatic idle(int n);
    repeat (n) cycle();
  endtask

  initial begin
    flit_t a, b;
    int    t0;
    for (int p = 0; p < NPORTS; p++) in_flit[p] = '0;
    inj_flit = '0; inj_hold = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;

    // A: pass-through West -> East, latency 2, age + 1
    a = mk(3, 1, 7); drive(PORT_W, a); t0 = cyc; idle(4);
    check(left_port.exists(int'(a.data)) && left_port[int'(a.data)] == PORT_E, "A: leaves East");
    check(left_cyc[int'(a.data)] - t0 == 2, "A: two-cycle router latency");
    check(n_defl == 0 && n_buf == 0, "A: no deflection");

    // B: ejection one cycle after arrival
    a = mk(1, 1, 2); drive(PORT_N, a); t0 = cyc; idle(3);
    check(left_port.exists(int'(a.data)) && left_port[int'(a.data)] == 4, "B: ejected");
    check(left_cyc[int'(a.data)] - t0 == 1, "B: ejection latency 1");

    // C: injection, leaves South two cycles after acceptance
    a = mk(1, 3, 0); inj_flit = a; t0 = cyc;
    #1; check(inj_ready, "C: injection accepted at once");
    idle(4);
    check(left_port.exists(int'(a.data)) && left_port[int'(a.data)] == PORT_S, "C: leaves South");
    check(left_cyc[int'(a.data)] - t0 == 2, "C: injection-to-link latency 2");

    // D: contention for East: older wins, younger is buffered, then re-injected
    a = mk(3, 1, 9); b = mk(4, 1, 1);
    drive(PORT_N, a); drive(PORT_W, b); t0 = cyc;
    idle(8);
    check(left_port[int'(a.data)] == PORT_E && left_cyc[int'(a.data)] - t0 == 2, "D: older flit East on time");
    check(left_port.exists(int'(b.data)) && left_port[int'(b.data)] == PORT_E, "D: buffered flit later leaves East");
    check(left_cyc[int'(b.data)] - t0 == 4, "D: buffered flit re-injected next cycle, leaves 2 later");
    check(n_buf == 1 && n_reinj == 1, "D: one buffer write and one re-injection");
    check(n_defl == 0, "D: no flit left on a deflected port");

    // E: inj_hold keeps a flit out of the network
    a = mk(0, 1, 0); inj_flit = a; inj_hold = 1;
    idle(3);
    check(!left_port.exists(int'(a.data)) && n_inj == 1, "E: held flit not injected");
    inj_hold = 0; idle(4);
    check(left_port.exists(int'(a.data)) && left_port[int'(a.data)] == PORT_W, "E: released flit leaves West");

    // F: saturation, every input busy every cycle, mostly eastbound
    for (int t = 0; t < 400; t++) begin
      for (int p = 0; p < NPORTS; p++)
        drive(p, mk(($urandom_range(0, 3) != 0) ? 3'd5 : coord_t'($urandom_range(0, 7)),
                    coord_t'($urandom_range(0, 3)), $urandom_range(0, 20)));
      if (!inj_flit.valid) inj_flit = mk(coord_t'($urandom_range(0, 7)), coord_t'($urandom_range(0, 7)), 0);
      cycle();
    end
    inj_flit = '0;
    idle(40);
    check(pending.size() == 0, $sformatf("F: all flits delivered (%0d missing)", pending.size()));
    check(sb_status == SB_EMPTY, "F: side buffer drained");
    check(n_defl > 0,    "deflections happened");
    check(n_buf > 0,     "buffering happened");
    check(n_refused > 0, "full side buffer refused a flit");
    check(n_reinj > 0,   "re-injection happened");
    check(n_redir > 0,   "redirection happened");
    check(n_blocked > 0, "injection found no free slot");
    check(n_held > 0,    "injection held");
    $display("events: defl=%0d buf=%0d refused=%0d reinj=%0d redir=%0d ej=%0d inj=%0d blocked=%0d held=%0d",
             n_defl, n_buf, n_refused, n_reinj, n_redir, n_ej, n_inj, n_blocked, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
