// minbd_mesh: a MESH_X x MESH_Y two-dimensional mesh of MinBD routers.
//
// Router (x, y) is linked to its four neighbours: its North output feeds the
// South input of router (x, y-1), its East output the West input of
// (x+1, y), and so on (x grows towards East, y towards South). On a side
// with no neighbour, the router's output is looped back into its own input
// on that side, so every router is the same 4-port router and a flit
// deflected off the edge simply comes back one cycle later (this design's
// choice for the mesh boundary).
//
// Each node has a local injection port (inj_flit / inj_ready, the flit is
// held until accepted), a local ejection port (ej_flit, one flit per cycle
// at most) and an injection hold input. Each router's side-buffer status is
// carried to its four neighbours: nb_status[y][x][p] is the status of the
// neighbour of node (x, y) on side p (SB_EMPTY where there is none), and
// sb_status[y][x] is the node's own. An external flow-control mechanism is
// expected to collect these at each node, predict congestion and drive
// inj_hold; that mechanism is not part of this RTL.
// Link latency: one register (the router's output register); per hop a flit
// spends two cycles.
module minbd_mesh
  import minbd_pkg::*;
#(
  parameter int unsigned MESH_X          = 8,
  parameter int unsigned MESH_Y          = 8,
  parameter int unsigned SB_DEPTH        = 4,
  parameter int unsigned REDIRECT_THRESH = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  flit_t      inj_flit  [MESH_Y][MESH_X],
  input  logic       inj_hold  [MESH_Y][MESH_X],
  output logic       inj_ready [MESH_Y][MESH_X],
  output flit_t      ej_flit   [MESH_Y][MESH_X],
  output sb_status_e sb_status [MESH_Y][MESH_X],
  output sb_status_e nb_status [MESH_Y][MESH_X][NPORTS],  // neighbours' status, per side
  output router_ev_t ev        [MESH_Y][MESH_X]
);

  flit_t link_out [MESH_Y][MESH_X][NPORTS];
  flit_t link_in  [MESH_Y][MESH_X][NPORTS];

  for (genvar y = 0; y < int'(MESH_Y); y++) begin : g_row
    for (genvar x = 0; x < int'(MESH_X); x++) begin : g_col
      // North input comes from the South output of the router above.
      if (y > 0) begin : g_n
        assign link_in[y][x][PORT_N]   = link_out[y-1][x][PORT_S];
        assign nb_status[y][x][PORT_N] = sb_status[y-1][x];
      end else begin : g_n_edge
        assign link_in[y][x][PORT_N]   = link_out[y][x][PORT_N];
        assign nb_status[y][x][PORT_N] = SB_EMPTY;
      end
      if (y < int'(MESH_Y) - 1) begin : g_s
        assign link_in[y][x][PORT_S]   = link_out[y+1][x][PORT_N];
        assign nb_status[y][x][PORT_S] = sb_status[y+1][x];
      end else begin : g_s_edge
        assign link_in[y][x][PORT_S]   = link_out[y][x][PORT_S];
        assign nb_status[y][x][PORT_S] = SB_EMPTY;
      end
      if (x < int'(MESH_X) - 1) begin : g_e
        assign link_in[y][x][PORT_E]   = link_out[y][x+1][PORT_W];
        assign nb_status[y][x][PORT_E] = sb_status[y][x+1];
      end else begin : g_e_edge
        assign link_in[y][x][PORT_E]   = link_out[y][x][PORT_E];
        assign nb_status[y][x][PORT_E] = SB_EMPTY;
      end
      if (x > 0) begin : g_w
        assign link_in[y][x][PORT_W]   = link_out[y][x-1][PORT_E];
        assign nb_status[y][x][PORT_W] = sb_status[y][x-1];
      end else begin : g_w_edge
        assign link_in[y][x][PORT_W]   = link_out[y][x][PORT_W];
        assign nb_status[y][x][PORT_W] = SB_EMPTY;
      end

      minbd_router #(
        .SB_DEPTH       (SB_DEPTH),
        .REDIRECT_THRESH(REDIRECT_THRESH)
      ) u_router (
        .clk, .rst_n,
        .cur_x    (coord_t'(x)),
        .cur_y    (coord_t'(y)),
        .in_flit  (link_in[y][x]),
        .out_flit (link_out[y][x]),
        .inj_flit (inj_flit[y][x]),
        .inj_hold (inj_hold[y][x]),
        .inj_ready(inj_ready[y][x]),
        .ej_flit  (ej_flit[y][x]),
        .sb_status(sb_status[y][x]),
        .ev       (ev[y][x])
      );
    end
  end

  initial assert (MESH_X <= 2**COORD_W && MESH_Y <= 2**COORD_W)
    else $error("mesh larger than the flit's coordinate fields");

endmodule
