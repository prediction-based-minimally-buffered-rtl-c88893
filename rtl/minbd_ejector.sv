// minbd_ejector: ejection logic of the MinBD router's first pipeline stage.
//
// The flits that arrive on the four network inputs pass through here first.
// Every flit whose destination is this router is a candidate; at most one
// is removed per cycle and handed to the local node. When several candidates
// are present, the one with the highest arbitration priority (oldest age,
// ties to the lower slot index, see minbd_pkg::prio_higher) is taken, so
// ejection and routing use the same priority as the router's design asks.
// The remaining local flits stay in the pipeline and are deflected later.
// Purely combinational; the router registers ej_flit.
module minbd_ejector
  import minbd_pkg::*;
(
  input  coord_t cur_x,
  input  coord_t cur_y,
  input  flit_t  in_flit  [NPORTS],
  output flit_t  out_flit [NPORTS],
  output flit_t  ej_flit
);

  logic       found;
  logic [1:0] sel;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int i = 0; i < NPORTS; i++) begin
      if (at_dest(in_flit[i], cur_x, cur_y)) begin
        if (!found || prio_higher(in_flit[i], in_flit[sel])) begin
          found = 1'b1;
          sel   = 2'(i);
        end
      end
    end
  end

  always_comb begin
    ej_flit = found ? in_flit[sel] : FLIT_NONE;
    for (int i = 0; i < NPORTS; i++)
      out_flit[i] = (found && sel == 2'(i)) ? FLIT_NONE : in_flit[i];
  end

endmodule
