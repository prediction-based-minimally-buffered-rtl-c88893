// minbd_arbiter_block: one 2x2 switch of the permutation network.
//
// The two incoming flits are compared by arbitration priority (valid beats
// invalid, older beats younger, a tie goes to input 0). The winner is sent
// to the output it asks for (want_hi = 1 asks for output 1); the other flit
// takes the remaining output, which for it may be a deflection. Each flit's
// routing tag travels with it so that later stages and the deflection check
// need not recompute it. Purely combinational.
module minbd_arbiter_block
  import minbd_pkg::*;
(
  input  flit_t      in_flit  [2],
  input  logic [2:0] in_tag   [2],   // {at_dest, desired port}
  input  logic       want_hi  [2],
  output flit_t      out_flit [2],
  output logic [2:0] out_tag  [2]
);

  logic winner;   // index of the higher-priority input
  logic swap;     // input 0 goes to output 1

  always_comb begin
    winner = prio_higher(in_flit[1], in_flit[0]);
    if (winner) swap = !want_hi[1];   // input 1 wants output 0 -> swap
    else        swap =  want_hi[0];
    if (!in_flit[0].valid && !in_flit[1].valid) swap = 1'b0;

    out_flit[0] = swap ? in_flit[1] : in_flit[0];
    out_flit[1] = swap ? in_flit[0] : in_flit[1];
    out_tag[0]  = swap ? in_tag[1]  : in_tag[0];
    out_tag[1]  = swap ? in_tag[0]  : in_tag[1];
  end

endmodule
