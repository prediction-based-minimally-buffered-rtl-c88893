// minbd_buffer_eject: takes one deflected flit per cycle out of the router
// pipeline and into the side buffer.
//
// It sits after the permutation network, the first point at which the
// router knows which flits are deflected. If any flit is deflected and the
// side buffer can take a write (enable), the deflected flit on the
// lowest-numbered output port (this design's choice) is removed from that
// port and sent to the buffer; the other flits, deflected or not, leave
// normally. enable is low when the buffer is full or when the redirection
// block already writes the buffer in this cycle. Purely combinational.
module minbd_buffer_eject
  import minbd_pkg::*;
(
  input  flit_t      in_flit  [NPORTS],
  input  logic [3:0] deflected,
  input  logic       enable,
  output flit_t      out_flit [NPORTS],
  output flit_t      buf_flit
);

  logic       take;
  logic [1:0] sel;

  always_comb begin
    take = 1'b0;
    sel  = '0;
    for (int i = NPORTS - 1; i >= 0; i--)
      if (deflected[i] && in_flit[i].valid) begin
        take = enable;
        sel  = 2'(i);
      end
  end

  always_comb begin
    buf_flit = take ? in_flit[sel] : FLIT_NONE;
    for (int i = 0; i < NPORTS; i++)
      out_flit[i] = (take && sel == 2'(i)) ? FLIT_NONE : in_flit[i];
  end

endmodule
