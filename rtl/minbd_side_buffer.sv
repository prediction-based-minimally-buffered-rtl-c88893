// minbd_side_buffer: the MinBD router's side buffer, a small FIFO queue that
// holds flits which would otherwise have been deflected.
//
// One write (push) and one read (pop) per cycle. The head flit is shown on
// `head` without being removed; pop removes it at the clock edge. A push is
// accepted when the buffer is not full, or when it is full and a pop happens
// in the same cycle (the redirection swap). The buffer also produces the
// status signal sent to neighbouring routers, a 2-bit occupancy level
// (EMPTY / LOW / HIGH / FULL, see minbd_pkg::sb_status_e), registered with
// the occupancy itself so it is glitch-free on the link.
// Depth (SB_DEPTH) and the status encoding are this design's choices: the
// router's description asks only for a small single FIFO queue with status
// signals.
module minbd_side_buffer
  import minbd_pkg::*;
#(
  parameter int unsigned SB_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  flit_t      push_flit,
  input  logic       pop,
  output flit_t      head,
  output logic       empty,
  output logic       full,
  output sb_status_e status
);

  localparam int unsigned PW = (SB_DEPTH > 1) ? $clog2(SB_DEPTH) : 1;
  localparam int unsigned CW = $clog2(SB_DEPTH + 1);

  flit_t          mem [SB_DEPTH];
  logic [PW-1:0]  rd_ptr, wr_ptr;
  logic [CW-1:0]  count;
  logic           do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(SB_DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign head    = empty ? FLIT_NONE : mem[rd_ptr];

  function automatic logic [PW-1:0] ptr_next(logic [PW-1:0] p);
    return (p == PW'(SB_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= ptr_next(wr_ptr);
      if (do_pop)  rd_ptr <= ptr_next(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wr_ptr] <= push_flit;

  always_comb begin
    if (empty)                         status = SB_EMPTY;
    else if (full)                     status = SB_FULL;
    else if (2 * count >= CW'(SB_DEPTH)) status = SB_HIGH;
    else                               status = SB_LOW;
  end

  // A pop is only ever requested while the buffer holds a flit.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("side buffer popped while empty");

endmodule
