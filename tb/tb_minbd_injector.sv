// Testbench for minbd_injector: random occupancy of the four slots and a
// random injection request; the flit must land in the lowest free slot, the
// other slots must be unchanged, and nothing may be placed when all slots
// are full.
module tb_minbd_injector;
  import minbd_pkg::*;

  flit_t in_flit [NPORTS];
  flit_t out_flit [NPORTS];
  flit_t inj_flit;
  logic  inj_done;
  int    checks = 0, failures = 0;

  minbd_injector dut (.in_flit, .inj_flit, .out_flit, .inj_done);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int free_slot;
    int n_full = 0;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < NPORTS; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom});
        in_flit[i].valid = ($urandom_range(0, 2) != 0);
      end
      inj_flit = flit_t'({$urandom, $urandom});
      inj_flit.valid = ($urandom_range(0, 4) != 0);
      #1;
      free_slot = -1;
      for (int i = NPORTS - 1; i >= 0; i--)
        if (!in_flit[i].valid) free_slot = i;
      if (free_slot < 0) n_full++;
      check(inj_done == (inj_flit.valid && free_slot >= 0), "inj_done");
      for (int i = 0; i < NPORTS; i++)
        if (inj_flit.valid && i == free_slot) check(out_flit[i] == inj_flit, $sformatf("placed in slot %0d", i));
        else                                  check(out_flit[i] == in_flit[i], $sformatf("slot %0d unchanged", i));
      #1;
    end
    check(n_full > 50, "all-slots-full case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
