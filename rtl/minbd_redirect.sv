// minbd_redirect: redirection block, placed in the first pipeline stage
// right before the side-buffer re-injector, that keeps buffered flits from
// waiting forever.
//
// A buffered flit can only re-enter the network through a free slot, and
// under heavy load all four slots may stay occupied. This block counts the
// consecutive cycles in which the side buffer holds a flit and no slot is
// free ("starved" cycles). In a starved cycle where that count has already
// reached REDIRECT_THRESH, it takes the flit out of one slot (slots are
// visited round-robin), hands it to the side buffer (redir_flit, redirect)
// and leaves the slot empty, so that the re-injector behind it places the
// buffer's head there in the same cycle. The buffer therefore sees a pop and
// a push in that cycle. The counting rule, the threshold and the
// round-robin slot choice are this design's own; the block's purpose and its
// place in the pipeline follow the router's description.
//
// Timing: combinational from in_flit/sb_empty to the outputs; the counter
// and the round-robin pointer update on the rising clock edge.
module minbd_redirect
  import minbd_pkg::*;
#(
  parameter int unsigned REDIRECT_THRESH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit  [NPORTS],
  input  logic  sb_empty,
  output flit_t out_flit [NPORTS],
  output flit_t redir_flit,
  output logic  redirect
);

  localparam int unsigned CNT_W = $clog2(REDIRECT_THRESH + 1) + 1;

  logic [CNT_W-1:0] starve_cnt;
  logic [1:0]       rr_ptr;
  logic             starved;

  always_comb begin
    starved = !sb_empty;
    for (int i = 0; i < NPORTS; i++)
      if (!in_flit[i].valid) starved = 1'b0;
    redirect = starved && (starve_cnt >= CNT_W'(REDIRECT_THRESH));
  end

  always_comb begin
    redir_flit = redirect ? in_flit[rr_ptr] : FLIT_NONE;
    for (int i = 0; i < NPORTS; i++)
      out_flit[i] = (redirect && rr_ptr == 2'(i)) ? FLIT_NONE : in_flit[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      starve_cnt <= '0;
      rr_ptr     <= '0;
    end else begin
      if (!starved || redirect) starve_cnt <= '0;
      else                      starve_cnt <= starve_cnt + 1'b1;
      if (redirect) rr_ptr <= rr_ptr + 2'd1;
    end
  end

endmodule
