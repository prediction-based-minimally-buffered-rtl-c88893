// Testbench for minbd_redirect: drives slot occupancy and the buffer-empty
// flag cycle by cycle. A reference model counts consecutive starved cycles
// (buffer not empty, all four slots occupied) and expects a redirection in
// the starved cycle that follows THRESH starved cycles, taking slots in
// round-robin order. Long all-full runs check the redirection period of
// THRESH+1 cycles.
module tb_minbd_redirect;
  import minbd_pkg::*;

  localparam int unsigned THRESH = 2;

  logic  clk = 0, rst_n = 0;
  flit_t in_flit [NPORTS];
  flit_t out_flit [NPORTS];
  logic  sb_empty;
  flit_t redir_flit;
  logic  redirect;
  int    checks = 0, failures = 0;

  minbd_redirect #(.REDIRECT_THRESH(THRESH)) dut (.clk, .rst_n, .in_flit, .sb_empty, .out_flit, .redir_flit, .redirect);

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
    int  cnt = 0, ptr = 0, n_redirect = 0, last_redirect = -1, n_period = 0;
    logic starved, exp_redir;
    sb_empty = 1;
    for (int i = 0; i < NPORTS; i++) in_flit[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // phases: long all-full runs, then random traffic
      sb_empty = ((t / 100) % 2 == 0) ? 1'b0 : ($urandom_range(0, 3) == 0);
      for (int i = 0; i < NPORTS; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom});
        in_flit[i].valid = ((t / 100) % 2 == 0) ? 1'b1 : ($urandom_range(0, 4) != 0);
      end
      #1;
      starved = !sb_empty && in_flit[0].valid && in_flit[1].valid && in_flit[2].valid && in_flit[3].valid;
      exp_redir = starved && cnt >= THRESH;
      check(redirect == exp_redir, "redirect decision");
      if (exp_redir) begin
        check(redir_flit == in_flit[ptr], "redirected flit comes from the round-robin slot");
        if (last_redirect >= 0 && t - last_redirect == THRESH + 1) n_period++;
        last_redirect = t;
        n_redirect++;
      end else begin
        check(!redir_flit.valid, "no redirected flit");
      end
      for (int i = 0; i < NPORTS; i++)
        check(out_flit[i] == ((exp_redir && i == ptr) ? FLIT_NONE : in_flit[i]), "slot contents");
      if (!starved || exp_redir) cnt = 0; else cnt++;
      if (exp_redir) ptr = (ptr + 1) % NPORTS;
    end
    check(n_redirect > 100, "redirections happened");
    check(n_period > 100, "redirection every THRESH+1 cycles under full load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
