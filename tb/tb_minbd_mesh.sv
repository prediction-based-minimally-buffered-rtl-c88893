// End-to-end testbench for minbd_mesh at its default size (8x8, side
// buffers of 4 flits, redirection threshold 2).
// Every flit carries a unique tag; a scoreboard requires each injected flit
// to be ejected exactly once, at its destination node.
// Phase 1 sends single flits through an idle network and checks the
// zero-load latency: accepted at the source, ejected 2*hops+1 cycles later.
// Phase 2 offers heavy uniform-random traffic from every node with the
// injection hold driven by a behavioural congestion-prediction model at each
// node, fed by the side-buffer status of the node's neighbours (the
// neighbour-status wiring itself is checked every cycle). Phase 3 drains the network. Each
// mechanism (deflection, buffering, refusal by a full side buffer,
// re-injection, redirection, ejection, injection blocked for lack of a slot,
// injection held by the controller) must happen at least once.
module tb_minbd_mesh;
  import minbd_pkg::*;

  localparam int MX = 8, MY = 8;

  logic       clk = 0, rst_n = 0;
  flit_t      inj_flit  [MY][MX];
  logic       inj_hold  [MY][MX];
  logic       ctrl_hold [MY][MX];
  logic       inj_ready [MY][MX];
  flit_t      ej_flit   [MY][MX];
  sb_status_e sb_status [MY][MX];
  sb_status_e nb_status [MY][MX][NPORTS];
  router_ev_t ev        [MY][MX];
  logic       use_ctrl = 0;
  int         checks = 0, failures = 0;

  minbd_mesh dut (.clk, .rst_n, .inj_flit, .inj_hold, .inj_ready, .ej_flit, .sb_status, .nb_status, .ev);

  for (genvar y = 0; y < MY; y++) begin : g_cy
    for (genvar x = 0; x < MX; x++) begin : g_cx
      minbd_predict_model u_ctrl (
        .own_status(sb_status[y][x]), .nb_status(nb_status[y][x]), .inj_hold(ctrl_hold[y][x])
      );
    end
  end

  // The status each node sees from a side must be its neighbour's own status.
  int n_status_checks = 0;
  always @(negedge clk) if (rst_n) begin
    for (int y = 0; y < MY; y++)
      for (int x = 0; x < MX; x++) begin
        check(nb_status[y][x][PORT_N] == ((y > 0)      ? sb_status[y-1][x] : SB_EMPTY), "N neighbour status");
        check(nb_status[y][x][PORT_S] == ((y < MY - 1) ? sb_status[y+1][x] : SB_EMPTY), "S neighbour status");
        check(nb_status[y][x][PORT_E] == ((x < MX - 1) ? sb_status[y][x+1] : SB_EMPTY), "E neighbour status");
        check(nb_status[y][x][PORT_W] == ((x > 0)      ? sb_status[y][x-1] : SB_EMPTY), "W neighbour status");
        if (nb_status[y][x][PORT_E] != SB_EMPTY) n_status_checks++;
      end
  end

  always_comb
    for (int y = 0; y < MY; y++)
      for (int x = 0; x < MX; x++)
        inj_hold[y][x] = use_ctrl && ctrl_hold[y][x];

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int    cyc = 0, next_tag = 1;
  flit_t sent [int];      // tag -> flit
  int    sent_cyc [int];  // tag -> acceptance cycle
  int    lat [int];       // tag -> latency
  longint n_defl = 0, n_buf = 0, n_refused = 0, n_reinj = 0, n_redir = 0;
  longint n_ej = 0, n_inj = 0, n_blocked = 0, n_held = 0, n_delivered = 0;

  function automatic flit_t mk(int sx, int sy);
    flit_t f;
    int dx, dy;
    do begin
      dx = $urandom_range(0, MX - 1);
      dy = $urandom_range(0, MY - 1);
    end while (dx == sx && dy == sy);
    f = '0;
    f.valid = 1'b1;
    f.dst_x = coord_t'(dx); f.dst_y = coord_t'(dy);
    f.src_x = coord_t'(sx); f.src_y = coord_t'(sy);
    f.data  = 32'(next_tag);
    next_tag++;
    return f;
  endfunction

  task automatic cycle();
    logic acc [MY][MX];
    #1;
    for (int y = 0; y < MY; y++)
      for (int x = 0; x < MX; x++) begin
        acc[y][x] = inj_ready[y][x];
        if (inj_ready[y][x]) begin
          sent[int'(inj_flit[y][x].data)]     = inj_flit[y][x];
          sent_cyc[int'(inj_flit[y][x].data)] = cyc;
        end
        n_defl    += longint'(ev[y][x].deflect);
        n_buf     += ev[y][x].buffered;
        n_refused += ev[y][x].buf_refused;
        n_reinj   += ev[y][x].reinject;
        n_redir   += ev[y][x].redirect;
        n_ej      += ev[y][x].eject;
        n_inj     += ev[y][x].inject;
        n_blocked += ev[y][x].inj_blocked;
        n_held    += ev[y][x].inj_held;
      end
    @(posedge clk);
    cyc++;
    #1;
    for (int y = 0; y < MY; y++)
      for (int x = 0; x < MX; x++) begin
        if (acc[y][x]) inj_flit[y][x] = '0;
        if (ej_flit[y][x].valid) begin
          int tag = int'(ej_flit[y][x].data);
          check(sent.exists(tag), $sformatf("flit %0d delivered once", tag));
          if (sent.exists(tag)) begin
            check(int'(sent[tag].dst_x) == x && int'(sent[tag].dst_y) == y,
                  $sformatf("flit %0d delivered at its destination", tag));
            lat[tag] = cyc - sent_cyc[tag];
            sent.delete(tag);
            n_delivered++;
          end
        end
      end
  endtask

  initial begin
    int hops, sx, sy;
    flit_t f;
    for (int y = 0; y < MY; y++) for (int x = 0; x < MX; x++) inj_flit[y][x] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;

    // Phase 1: zero-load latency
    for (int k = 0; k < 40; k++) begin
      sx = $urandom_range(0, MX - 1); sy = $urandom_range(0, MY - 1);
      f = mk(sx, sy);
      inj_flit[sy][sx] = f;
      hops = ((int'(f.dst_x) > sx) ? int'(f.dst_x) - sx : sx - int'(f.dst_x)) +
             ((int'(f.dst_y) > sy) ? int'(f.dst_y) - sy : sy - int'(f.dst_y));
      repeat (2 * hops + 4) cycle();
      check(lat.exists(int'(f.data)) && lat[int'(f.data)] == 2 * hops + 1,
            $sformatf("zero-load latency for %0d hops", hops));
    end
    check(n_defl == 0, "no deflection at zero load");

    // Phase 2: heavy load with the prediction controller
    use_ctrl = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int y = 0; y < MY; y++)
        for (int x = 0; x < MX; x++)
          if (!inj_flit[y][x].valid && $urandom_range(0, 99) < 60) inj_flit[y][x] = mk(x, y);
      cycle();
    end

    // Phase 3: drain
    for (int y = 0; y < MY; y++) for (int x = 0; x < MX; x++) inj_flit[y][x] = '0;
    for (int t = 0; t < 2000 && sent.size() != 0; t++) cycle();
    repeat (5) cycle();
    check(sent.size() == 0, $sformatf("all flits delivered (%0d missing)", sent.size()));
    check(n_delivered > 1000, "traffic actually flowed");
    check(n_ej == n_delivered, "eject events match deliveries");
    check(n_defl > 0,    "deflection happened");
    check(n_buf > 0,     "side buffering happened");
    check(n_refused > 0, "a full side buffer refused a flit");
    check(n_reinj > 0,   "re-injection happened");
    check(n_redir > 0,   "redirection happened");
    check(n_blocked > 0, "injection found no free slot");
    check(n_held > 0,    "injection held by the controller");
    check(n_status_checks > 0, "non-empty neighbour status observed");
    $display("delivered=%0d deflect=%0d buffered=%0d refused=%0d reinject=%0d redirect=%0d eject=%0d inject=%0d blocked=%0d held=%0d cycles=%0d",
             n_delivered, n_defl, n_buf, n_refused, n_reinj, n_redir, n_ej, n_inj, n_blocked, n_held, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
