// minbd_injector: places one flit into a free pipeline slot.
//
// The router uses two instances in its first stage: the first re-injects the
// head of the side buffer, the second, placed after it, injects new traffic
// from the local node, so buffered flits get the network before new ones.
// A free slot is one with an invalid flit; the lowest-index free slot is
// taken (this design's choice). When all four slots are occupied nothing is
// injected and inj_done stays low; the source must keep its flit and retry.
// Purely combinational.
module minbd_injector
  import minbd_pkg::*;
(
  input  flit_t in_flit  [NPORTS],
  input  flit_t inj_flit,          // inj_flit.valid requests injection
  output flit_t out_flit [NPORTS],
  output logic  inj_done
);

  always_comb begin
    inj_done = 1'b0;
    for (int i = 0; i < NPORTS; i++) begin
      out_flit[i] = in_flit[i];
      if (inj_flit.valid && !inj_done && !in_flit[i].valid) begin
        out_flit[i] = inj_flit;
        inj_done    = 1'b1;
      end
    end
  end

endmodule
