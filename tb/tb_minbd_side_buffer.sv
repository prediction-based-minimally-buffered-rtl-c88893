// Testbench for minbd_side_buffer: random pushes and pops against a queue
// model; checks head, empty/full, the status level, that a push into a full
// buffer is dropped unless a pop happens in the same cycle, and FIFO order.
module tb_minbd_side_buffer;
  import minbd_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic       clk = 0, rst_n = 0;
  logic       push, pop;
  flit_t      push_flit, head;
  logic       empty, full;
  sb_status_e status;
  int         checks = 0, failures = 0;
  flit_t      model[$];

  minbd_side_buffer #(.SB_DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .push_flit, .pop, .head, .empty, .full, .status);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sb_status_e exp_st;
    int n_full_push = 0, n_swap = 0;
    push = 0; pop = 0; push_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // compare state
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() != 0) check(head == model[0], "head");
      else                   check(!head.valid, "no head");
      if (model.size() == 0)            exp_st = SB_EMPTY;
      else if (model.size() == DEPTH)   exp_st = SB_FULL;
      else if (2 * model.size() >= DEPTH) exp_st = SB_HIGH;
      else                              exp_st = SB_LOW;
      check(status == exp_st, "status");
      // drive, with phases biased towards filling and draining
      push_flit = flit_t'({$urandom, $urandom});
      push_flit.valid = 1'b1;
      push = ($urandom_range(0, 99) < (((t / 200) % 2 == 0) ? 70 : 30));
      pop  = (model.size() != 0) && ($urandom_range(0, 99) < (((t / 200) % 2 == 0) ? 30 : 70));
      @(posedge clk);
      if (push && model.size() == DEPTH && !pop) n_full_push++;
      if (push && model.size() == DEPTH && pop)  n_swap++;
      if (pop) void'(model.pop_front());
      if (push && model.size() < DEPTH) model.push_back(push_flit);
    end
    check(n_full_push > 10, "push into full buffer exercised");
    check(n_swap > 5, "push and pop on a full buffer exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
