// minbd_router: minimally-buffered deflection (MinBD) router for a 2D mesh.
//
// The router has no input buffers. Every arriving flit goes straight to the
// routing logic, which deflects the loser when two flits want the same
// output; but up to one deflected flit per cycle is pulled into a small
// side buffer instead, and re-injected later to try again for a productive
// port. The side buffer also reports its fill level (sb_status) to the
// neighbouring routers, for an external flow-control mechanism that can
// hold back local injection (inj_hold).
//
// Pipeline (two stages, plus the link register at the outputs):
//   stage 1, on in_flit:  ejector -> redirection -> buffer re-injector ->
//                         local injector -> pipeline register
//   stage 2, on that reg: route computation + permutation network ->
//                         buffer-eject into the side buffer -> out_flit register
// A flit that is not buffered therefore leaves two cycles after it arrived;
// an ejected flit appears on ej_flit one cycle after it arrived; a flit is
// accepted from the local node (inj_ready high, combinational) in the cycle
// a slot is free and leaves two cycles later. The re-injector sits before
// the local injector, so buffered flits have priority over new traffic.
//
// A deflected flit addressed to this router itself (a second local flit the
// single ejector could not take) is never buffered: re-injection happens
// after ejection, so from the buffer it could never leave. It is deflected
// onto a link instead and ejected when it comes back.
//
// The side buffer takes one write per cycle. When the redirection block
// swaps a pipeline flit into the buffer, the buffer-eject of stage 2 is
// skipped in that cycle. Each flit's age (hop count, the arbitration
// priority) is incremented as it is registered onto an output link.
//
// Following the router's description: no input buffers, eject/inject in the
// first stage, one ejection per cycle by arbitration priority, a second
// injector ahead of the local one for the side buffer, redirection ahead of
// it, buffering of at most one deflected flit per cycle after the
// permutation network, status signals from the side buffer. This design's
// choices: the two-stage split, XY productive direction, oldest-first
// priority, the permutation network's wiring, the redirection rule and
// threshold, the buffer depth and the status encoding.
module minbd_router
  import minbd_pkg::*;
#(
  parameter int unsigned SB_DEPTH        = 4,
  parameter int unsigned REDIRECT_THRESH = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  coord_t     cur_x,
  input  coord_t     cur_y,
  input  flit_t      in_flit  [NPORTS],  // from the N, E, S, W neighbours
  output flit_t      out_flit [NPORTS],  // to the N, E, S, W neighbours
  input  flit_t      inj_flit,           // new traffic from the local node
  input  logic       inj_hold,           // external throttle of new traffic
  output logic       inj_ready,          // inj_flit accepted this cycle
  output flit_t      ej_flit,            // traffic delivered to the local node
  output sb_status_e sb_status,          // side-buffer level for neighbours
  output router_ev_t ev
);

  // ---------------- stage 1: eject, redirect, re-inject, inject ----------
  flit_t e_out [NPORTS];
  flit_t r_out [NPORTS];
  flit_t b_out [NPORTS];
  flit_t i_out [NPORTS];
  flit_t ej_now, redir_flit, sb_head, inj_req;
  logic  redirect, reinj_done, sb_empty, sb_full;

  minbd_ejector u_eject (
    .cur_x, .cur_y, .in_flit, .out_flit(e_out), .ej_flit(ej_now)
  );

  minbd_redirect #(.REDIRECT_THRESH(REDIRECT_THRESH)) u_redirect (
    .clk, .rst_n, .in_flit(e_out), .sb_empty,
    .out_flit(r_out), .redir_flit, .redirect
  );

  minbd_injector u_reinject (
    .in_flit(r_out), .inj_flit(sb_head), .out_flit(b_out), .inj_done(reinj_done)
  );

  always_comb begin
    inj_req       = inj_flit;
    inj_req.valid = inj_flit.valid && !inj_hold;
  end

  minbd_injector u_inject (
    .in_flit(b_out), .inj_flit(inj_req), .out_flit(i_out), .inj_done(inj_ready)
  );

  flit_t st2 [NPORTS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) st2[i] <= FLIT_NONE;
      ej_flit <= FLIT_NONE;
    end else begin
      st2     <= i_out;
      ej_flit <= ej_now;
    end
  end

  // ---------------- stage 2: permute, buffer-eject ------------------------
  flit_t      p_out  [NPORTS];
  flit_t      be_out [NPORTS];
  flit_t      buf_flit;
  logic [3:0] deflected;
  logic [3:0] here;        // output flit is addressed to this router

  always_comb
    for (int i = 0; i < NPORTS; i++)
      here[i] = at_dest(p_out[i], cur_x, cur_y);

  minbd_permute_net u_permute (
    .cur_x, .cur_y, .in_flit(st2), .out_flit(p_out), .deflected
  );

  minbd_buffer_eject u_buf_eject (
    .in_flit(p_out), .deflected(deflected & ~here), .enable(!sb_full && !redirect),
    .out_flit(be_out), .buf_flit
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) out_flit[i] <= FLIT_NONE;
    end else begin
      for (int i = 0; i < NPORTS; i++) begin
        out_flit[i]     <= be_out[i];
        out_flit[i].age <= age_inc(be_out[i].age);
      end
    end
  end

  // ---------------- side buffer -------------------------------------------
  minbd_side_buffer #(.SB_DEPTH(SB_DEPTH)) u_side_buffer (
    .clk, .rst_n,
    .push     (redirect || buf_flit.valid),
    .push_flit(redirect ? redir_flit : buf_flit),
    .pop      (reinj_done),
    .head     (sb_head),
    .empty    (sb_empty),
    .full     (sb_full),
    .status   (sb_status)
  );

  // ---------------- event strobes -----------------------------------------
  always_comb begin
    ev.deflect = '0;
    for (int i = 0; i < NPORTS; i++)
      if (deflected[i] && be_out[i].valid) ev.deflect = ev.deflect + 3'd1;
    ev.buffered    = buf_flit.valid;
    ev.buf_refused = (|deflected) && sb_full;
    ev.reinject    = reinj_done;
    ev.redirect    = redirect;
    ev.eject       = ej_now.valid;
    ev.inject      = inj_ready;
    ev.inj_blocked = inj_req.valid && !inj_ready;
    ev.inj_held    = inj_flit.valid && inj_hold;
  end

  // A redirection always frees the slot the re-injector then fills.
  assert property (@(posedge clk) disable iff (!rst_n) redirect |-> reinj_done)
    else $error("redirection without re-injection");

endmodule
