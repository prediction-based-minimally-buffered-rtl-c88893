// Testbench for minbd_ejector: random slot contents around a fixed router
// position; the expected ejection is worked out here as "the oldest
// locally-addressed flit, lowest slot on a tie" and every output is compared.
module tb_minbd_ejector;
  import minbd_pkg::*;

  coord_t cur_x, cur_y;
  flit_t  in_flit [NPORTS];
  flit_t  out_flit [NPORTS];
  flit_t  ej_flit;
  int     checks = 0, failures = 0;

  minbd_ejector dut (.cur_x, .cur_y, .in_flit, .out_flit, .ej_flit);

  function automatic flit_t rnd_flit(coord_t x, coord_t y);
    flit_t f;
    f.valid = ($urandom_range(0, 3) != 0);
    f.dst_x = ($urandom_range(0, 1) != 0) ? x : coord_t'($urandom_range(0, 7));
    f.dst_y = ($urandom_range(0, 1) != 0) ? y : coord_t'($urandom_range(0, 7));
    f.src_x = coord_t'($urandom_range(0, 7));
    f.src_y = coord_t'($urandom_range(0, 7));
    f.age   = 8'($urandom_range(0, 3));   // small range: many ties
    f.data  = $urandom;
    if (!f.valid) f = '0;
    return f;
  endfunction

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
    int exp_sel;
    int nlocal;
    int seen_multi = 0;
    for (int t = 0; t < 2000; t++) begin
      cur_x = coord_t'($urandom_range(0, 7));
      cur_y = coord_t'($urandom_range(0, 7));
      for (int i = 0; i < NPORTS; i++) in_flit[i] = rnd_flit(cur_x, cur_y);
      #1;
      exp_sel = -1;
      nlocal  = 0;
      for (int i = 0; i < NPORTS; i++)
        if (in_flit[i].valid && in_flit[i].dst_x == cur_x && in_flit[i].dst_y == cur_y) begin
          nlocal++;
          if (exp_sel < 0 || in_flit[i].age > in_flit[exp_sel].age) exp_sel = i;
        end
      if (nlocal > 1) seen_multi++;
      if (exp_sel < 0) check(ej_flit.valid == 1'b0, "nothing to eject");
      else             check(ej_flit == in_flit[exp_sel], $sformatf("ejected slot %0d", exp_sel));
      for (int i = 0; i < NPORTS; i++)
        check(out_flit[i] == ((i == exp_sel) ? FLIT_NONE : in_flit[i]),
              $sformatf("slot %0d passed through", i));
      #1;
    end
    check(seen_multi > 100, "several local flits at once were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
