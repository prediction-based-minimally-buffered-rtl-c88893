// Testbench for minbd_buffer_eject: random flits and deflection flags; when
// enabled, the deflected flit on the lowest output port must be removed and
// handed to the buffer, everything else must pass unchanged.
module tb_minbd_buffer_eject;
  import minbd_pkg::*;

  flit_t      in_flit [NPORTS];
  flit_t      out_flit [NPORTS];
  logic [3:0] deflected;
  logic       enable;
  flit_t      buf_flit;
  int         checks = 0, failures = 0;

  minbd_buffer_eject dut (.in_flit, .deflected, .enable, .out_flit, .buf_flit);

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
    int sel;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < NPORTS; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom});
        in_flit[i].valid = ($urandom_range(0, 3) != 0);
        deflected[i] = in_flit[i].valid && ($urandom_range(0, 2) == 0);
      end
      enable = ($urandom_range(0, 3) != 0);
      #1;
      sel = -1;
      if (enable)
        for (int i = 0; i < NPORTS; i++)
          if (sel < 0 && deflected[i]) sel = i;
      if (sel < 0) check(!buf_flit.valid, "no flit buffered");
      else         check(buf_flit == in_flit[sel], $sformatf("buffered port %0d", sel));
      for (int i = 0; i < NPORTS; i++)
        check(out_flit[i] == ((i == sel) ? FLIT_NONE : in_flit[i]), $sformatf("port %0d out", i));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
