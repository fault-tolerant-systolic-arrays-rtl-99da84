// tb_ecn_single: a random 20-bit result P is hit by an error e; the syndrome
// e mod (5, 11) is applied with P + e. No error must pass P unchanged
// (alpha0), any single error +/-2^i must be corrected back to P (alpha1), and
// a syndrome of a residue-side fault (one digit non-zero) must be flagged as
// uncorrectable.
module tb_ecn_single;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic [19:0]     y_bin, y_out, corr;
  logic [1:0][4:0] syn;
  sel_e            sel;
  logic            detected, uncorrectable, hit;
  int ms [2] = '{5, 11};

  ecn_single #(.NB(2), .BASES(BASES2), .YW(20), .RW(5)) dut (.*);

  task automatic run(int p, longint e, bit exp_fix);
    y_bin = 20'(longint'(p) + e);
    for (int k = 0; k < 2; k++) syn[k] = 5'(smod(e, ms[k]));
    #1;
    checks++;
    if (exp_fix) begin
      if (y_out != 20'(p) || detected != (e != 0) || uncorrectable ||
          sel != ((e != 0) ? SEL_C1 : SEL_BIN)) begin
        failures++;
        $display("FAIL p=%0d e=%0d out=%0d sel=%0d", p, e, y_out, sel);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int p, i;
      p = $urandom_range(1 << 19, (1 << 19) - 1 + (1 << 18));
      i = $urandom_range(0, 18);
      run(p, 0, 1);
      run(p, longint'(1) << i, 1);
      run(p, -(longint'(1) << i), 1);
    end
    // residue-side fault: only one digit non-zero, no single binary error fits
    y_bin = 20'd1000;
    syn[0] = 5'd0; syn[1] = 5'd3;
    #1;
    checks++;
    if (!uncorrectable || y_out != 20'd1000) begin
      failures++;
      $display("FAIL residue-side syndrome not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
