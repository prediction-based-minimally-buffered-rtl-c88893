// minbd_permute_net: the deflection-routing permutation network of the
// MinBD router's second pipeline stage.
//
// Up to four flits, one per pipeline slot, are each given a distinct output
// port (N, E, S, W), so no flit ever waits: a flit that loses arbitration for
// its productive port is deflected to another one. The network is built from
// four 2x2 arbiter blocks in two stages (this design's arrangement):
//   stage 1: block A takes slots 0,1 and block B takes slots 2,3; each sends
//            one flit towards the {N,E} half and one towards the {S,W} half;
//   stage 2: block C drives outputs N,E and block D drives outputs S,W.
// In each block the higher-priority flit gets the side it asks for, so the
// highest-priority flit in the router always leaves on its productive port.
// The productive port is the dimension-order (X, then Y) direction. A flit
// addressed to this router (the ejector left it in the pipeline) has no
// productive port and is always reported as deflected.
// Purely combinational: out_flit[p] is the flit leaving on port p and
// deflected[p] says it did not get its productive port.
module minbd_permute_net
  import minbd_pkg::*;
(
  input  coord_t     cur_x,
  input  coord_t     cur_y,
  input  flit_t      in_flit  [NPORTS],
  output flit_t      out_flit [NPORTS],
  output logic [3:0] deflected
);

  logic [2:0] tag      [NPORTS];
  logic       want1    [NPORTS];

  always_comb
    for (int i = 0; i < NPORTS; i++) begin
      tag[i]   = {at_dest(in_flit[i], cur_x, cur_y), route_dor(in_flit[i], cur_x, cur_y)};
      want1[i] = tag[i][1];        // S or W -> lower half
    end

  // Stage 1 blocks: s1[0] = A (slots 0,1), s1[1] = B (slots 2,3).
  // Stage 2 blocks: s2[0] = C (ports N,E), s2[1] = D (ports S,W).
  flit_t      s1_in_flit  [2][2];
  logic [2:0] s1_in_tag   [2][2];
  logic       s1_want     [2][2];
  flit_t      s1_out_flit [2][2];
  logic [2:0] s1_out_tag  [2][2];
  flit_t      s2_in_flit  [2][2];
  logic [2:0] s2_in_tag   [2][2];
  logic       s2_want     [2][2];
  flit_t      s2_out_flit [2][2];
  logic [2:0] s2_out_tag  [2][2];
  logic [2:0] out_tag     [NPORTS];

  always_comb
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < 2; k++) begin
        s1_in_flit[b][k] = in_flit[2*b+k];
        s1_in_tag[b][k]  = tag[2*b+k];
        s1_want[b][k]    = want1[2*b+k];
      end

  // Output k of stage-1 block b feeds input b of stage-2 block k.
  always_comb
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < 2; k++) begin
        s2_in_flit[k][b] = s1_out_flit[b][k];
        s2_in_tag[k][b]  = s1_out_tag[b][k];
        s2_want[k][b]    = s1_out_tag[b][k][0];  // E within {N,E}, W within {S,W}
      end

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      out_flit[p] = s2_out_flit[p/2][p%2];
      out_tag[p]  = s2_out_tag[p/2][p%2];
    end

  for (genvar b = 0; b < 2; b++) begin : g_blk
    minbd_arbiter_block u_s1 (
      .in_flit (s1_in_flit[b]), .in_tag (s1_in_tag[b]), .want_hi(s1_want[b]),
      .out_flit(s1_out_flit[b]), .out_tag(s1_out_tag[b])
    );
    minbd_arbiter_block u_s2 (
      .in_flit (s2_in_flit[b]), .in_tag (s2_in_tag[b]), .want_hi(s2_want[b]),
      .out_flit(s2_out_flit[b]), .out_tag(s2_out_tag[b])
    );
  end

  always_comb
    for (int p = 0; p < NPORTS; p++)
      deflected[p] = out_flit[p].valid && (out_tag[p][2] || out_tag[p][1:0] != 2'(p));

endmodule
