// minbd_predict_model: behavioural stand-in, for simulation only, for the
// external flow-control mechanism at one node, which collects the
// side-buffer status signals of the node's neighbours and throttles the
// node's injection.
// The network leaves that mechanism's algorithm open; this model uses a
// simple rule: injection is held while at least HOLD_MIN neighbours report a
// side buffer at HIGH or FULL, or the node's own side buffer is FULL.
// Combinational.
module minbd_predict_model
  import minbd_pkg::*;
#(
  parameter int unsigned HOLD_MIN = 2
) (
  input  sb_status_e own_status,
  input  sb_status_e nb_status [NPORTS],
  output logic       inj_hold
);

  always_comb begin
    int n;
    n = 0;
    for (int p = 0; p < NPORTS; p++)
      if (nb_status[p] == SB_HIGH || nb_status[p] == SB_FULL) n++;
    inj_hold = (n >= int'(HOLD_MIN)) || (own_status == SB_FULL);
  end

endmodule
