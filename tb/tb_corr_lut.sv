// tb_corr_lut: every single error +/-2^i (i < 20) must be recognised and its
// correction must be -e; the zero syndrome and same-sign double errors must
// not be recognised as single errors (the coverage claim for bases 5, 11, 19).
module tb_corr_lut;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0][4:0] syn;
  logic            hit;
  logic [19:0]     corr;
  int ms [3] = '{5, 11, 19};

  corr_lut #(.NB(3), .BASES(BASES3), .YW(20), .RW(5)) dut (.*);

  task automatic apply(longint e);
    for (int k = 0; k < 3; k++) syn[k] = 5'(smod(e, ms[k]));
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0);
    checks++;
    if (hit) begin failures++; $display("FAIL zero syndrome hit"); end
    for (int i = 0; i < 20; i++) begin
      for (int s = 0; s < 2; s++) begin
        longint e;
        e = s ? -(longint'(1) << i) : (longint'(1) << i);
        apply(e);
        checks++;
        if (!hit || corr != 20'(-e)) begin
          failures++;
          $display("FAIL e=%0d hit=%0d corr=%0h", e, hit, corr);
        end
      end
    end
    for (int i = 0; i < 20; i++) begin
      for (int j = i + 1; j < 20; j++) begin
        for (int s = 0; s < 2; s++) begin
          longint e;
          e = (longint'(1) << i) + (longint'(1) << j);
          if (s) e = -e;
          apply(e);
          checks++;
          if (hit) begin
            failures++;
            $display("FAIL double e=%0d seen as single", e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
