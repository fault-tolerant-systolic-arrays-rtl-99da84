// tb_ecn_dsyn: a first fault whose error is +2^i or -2^i depending on the
// data, and later a second fault 2^j with the sign of the first's current
// error (|i - j| > 1). Checks that every output equals the fault-free result
// P and that the selection is alpha0..alpha3 as expected; repeated for random
// faults with a host clear in between.
module tb_ecn_dsyn;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  int n_alpha [4] = '{0, 0, 0, 0};
  logic clk = 0, rst_n = 0, clear = 0;
  logic [19:0]     y_bin, y_out, c_i, c_i2;
  logic [2:0][4:0] syn, s_i, s_i2;
  sel_e            sel;
  logic            detected, uncorrectable, stored;
  int ms [3] = '{5, 11, 19};

  ecn_dsyn #(.NB(3), .BASES(BASES3), .YW(20), .RW(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(longint e, sel_e exp_sel);
    int p;
    @(negedge clk);
    p = $urandom_range(1 << 19, (1 << 19) + (1 << 18) - 1);
    y_bin = 20'(longint'(p) + e);
    for (int k = 0; k < 3; k++) syn[k] = 5'(smod(e, ms[k]));
    #1;
    checks++;
    n_alpha[int'(sel)]++;
    if (y_out != 20'(p) || sel != exp_sel || uncorrectable) begin
      failures++;
      $display("FAIL e=%0d out=%0d p=%0d sel=%0d exp %0d", e, y_out, p, sel, exp_sel);
    end
  endtask

  initial begin
    y_bin = 0; syn = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int i, j;
      longint e1, e2;
      i = $urandom_range(0, 17);
      do j = $urandom_range(0, 17); while (j >= i - 1 && j <= i + 1);
      e1 = longint'(1) << i;
      e2 = longint'(1) << j;
      cyc(0, SEL_BIN);
      cyc(e1, SEL_C1);           // first error, stored with its twin
      cyc(-e1, SEL_C1);          // same fault, other sign
      cyc(e2, SEL_C1);           // second fault alone
      cyc(e1 + e2, SEL_C2);      // both, first fault with the stored sign
      cyc(-e1 - e2, SEL_C3);     // both, first fault with the other sign
      cyc(0, SEL_BIN);
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      checks++;
      if (stored) begin failures++; $display("FAIL clear"); end
    end
    $display("alpha0=%0d alpha1=%0d alpha2=%0d alpha3=%0d", n_alpha[0], n_alpha[1], n_alpha[2], n_alpha[3]);
    if (n_alpha[2] == 0 || n_alpha[3] == 0) begin
      failures++;
      $display("FAIL a selection never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
