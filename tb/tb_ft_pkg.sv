// tb_ft_pkg: checks the elaboration-time functions of ft_pkg (smod,
// pow2_mod, err_mod) against direct arithmetic, and the syndrome uniqueness
// the default bases are chosen for: all +/-2^i, i < RES_W, have distinct
// non-zero syndromes under every pair of BASES3.
module tb_ft_pkg;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint v, ref_r;
    int unsigned m;
    // smod against a non-negative reference
    for (int n = 0; n < 300; n++) begin
      m = $urandom_range(2, 31);
      v = longint'($urandom_range(0, 2000000)) - 1000000;
      ref_r = v;
      while (ref_r < 0) ref_r += m;
      while (ref_r >= m) ref_r -= m;
      check(smod(v, m) == 32'(ref_r), $sformatf("smod(%0d, %0d) = %0d", v, m, smod(v, m)));
    end
    // pow2_mod and err_mod against 64-bit powers
    for (int i = 0; i < 40; i++) begin
      for (int k = 0; k < 3; k++) begin
        m = BASES3[k];
        check(pow2_mod(i, m) == 32'((64'd1 << i) % m), $sformatf("pow2_mod(%0d, %0d)", i, m));
        check(err_mod(i, 1'b0, m) == smod(longint'(64'd1 << i), m), $sformatf("err_mod(+%0d, %0d)", i, m));
        check(err_mod(i, 1'b1, m) == smod(-longint'(64'd1 << i), m), $sformatf("err_mod(-%0d, %0d)", i, m));
      end
    end
    // single-error syndromes unique and non-zero under every pair of bases
    for (int a = 0; a < 3; a++) begin
      for (int b = a + 1; b < 3; b++) begin
        for (int e1 = 0; e1 < 2 * RES_W; e1++) begin
          int unsigned s1a, s1b;
          s1a = err_mod(e1 / 2, e1[0], BASES3[a]);
          s1b = err_mod(e1 / 2, e1[0], BASES3[b]);
          check(s1a != 0 || s1b != 0, "zero syndrome");
          for (int e2 = e1 + 1; e2 < 2 * RES_W; e2++) begin
            check(!(s1a == err_mod(e2 / 2, e2[0], BASES3[a]) &&
                    s1b == err_mod(e2 / 2, e2[0], BASES3[b])),
                  $sformatf("syndromes of errors %0d and %0d collide", e1, e2));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
