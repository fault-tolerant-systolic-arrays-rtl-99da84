// tb_ecn_anykind: 10-bit results, bases 5, 11, 19. Every single error and
// every same-sign double error must be corrected (alpha1 / alpha2); a
// residue-side fault alone must leave the binary result and raise res_fault;
// a single binary error together with a faulty residue digit must be
// corrected through the pair of bases that excludes the faulty one. Where
// another pair also recognises a (different) single error the network must
// refuse (uncorrectable); syndromes that are also double-error syndromes are
// counted and skipped.
module tb_ecn_anykind;
  import ft_pkg::*;
  int checks = 0, failures = 0, skipped = 0, n_refused = 0;
  logic [9:0]      y_bin, y_out;
  logic [2:0][4:0] syn;
  sel_e            sel;
  logic            detected, res_fault, uncorrectable;
  int ms [3] = '{5, 11, 19};

  ecn_anykind #(.BASES(BASES3), .YW(10), .RW(5)) dut (.*);

  function automatic bit is_double(logic [2:0][4:0] s);
    for (int i = 0; i < 10; i++)
      for (int j = i + 1; j < 10; j++)
        for (int sg = 0; sg < 2; sg++) begin
          longint e;
          logic [2:0][4:0] r;
          e = (longint'(1) << i) + (longint'(1) << j);
          if (sg) e = -e;
          for (int k = 0; k < 3; k++) r[k] = 5'(smod(e, ms[k]));
          if (r == s) return 1'b1;
        end
    return 1'b0;
  endfunction

  // number of different single errors recognised by the three pairs
  function automatic int pair_candidates(logic [2:0][4:0] s);
    longint seen [$];
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < 10; i++)
        for (int sg = 0; sg < 2; sg++) begin
          longint e;
          bit m;
          e = longint'(1) << i;
          if (sg) e = -e;
          m = 1'b1;
          for (int k = 0; k < 3; k++)
            if (k != p && int'(s[k]) != int'(smod(e, ms[k]))) m = 1'b0;
          if (m && !(e inside {seen})) seen.push_back(e);
        end
    return seen.size();
  endfunction

  task automatic run(longint e, int bad_k, int bad_v, sel_e exp_sel, bit exp_res);
    int p;
    p = $urandom_range(300, 700);
    y_bin = 10'(longint'(p) + e);
    for (int k = 0; k < 3; k++) syn[k] = 5'(smod(e, ms[k]));
    if (bad_k >= 0) syn[bad_k] = 5'((int'(syn[bad_k]) + bad_v) % ms[bad_k]);
    #1;
    if (bad_k >= 0 && e != 0 && is_double(syn)) begin
      skipped++;
      return;
    end
    checks++;
    if (bad_k >= 0 && e != 0 && pair_candidates(syn) > 1) begin
      n_refused++;
      if (!uncorrectable || y_out != y_bin) begin
        failures++;
        $display("FAIL ambiguous syndrome not refused");
      end
      return;
    end
    if (y_out != 10'(p) || sel != exp_sel || res_fault != exp_res || uncorrectable) begin
      failures++;
      $display("FAIL e=%0d bad=%0d/%0d out=%0d p=%0d sel=%0d", e, bad_k, bad_v, y_out, p, sel);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0, -1, 0, SEL_BIN, 0);
    for (int i = 0; i < 8; i++) begin
      run(longint'(1) << i, -1, 0, SEL_C1, 0);
      run(-(longint'(1) << i), -1, 0, SEL_C1, 0);
    end
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++) begin
        run((longint'(1) << i) + (longint'(1) << j), -1, 0, SEL_C2, 0);
        run(-((longint'(1) << i) + (longint'(1) << j)), -1, 0, SEL_C2, 0);
      end
    for (int k = 0; k < 3; k++)
      for (int v = 1; v < ms[k]; v++) begin
        run(0, k, v, SEL_BIN, 1);
        for (int i = 0; i < 8; i++) run(longint'(1) << i, k, v, SEL_C1, 0);
      end
    $display("skipped=%0d refused=%0d", skipped, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
