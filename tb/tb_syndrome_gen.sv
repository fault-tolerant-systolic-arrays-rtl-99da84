// tb_syndrome_gen: the syndrome of a value against its own residues is zero;
// after adding an error e the syndrome equals e mod b_k for every base.
module tb_syndrome_gen;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic [19:0]          bin_val;
  logic [2:0][4:0]      res_val, syn;
  logic                 nz;
  int ms [3] = '{5, 11, 19};

  syndrome_gen #(.NB(3), .BASES(BASES3), .IW(20), .RW(5)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int p, e;
      p = $urandom_range(20000, 500000);
      e = (t % 2 == 0) ? 0 : $urandom_range(0, 40000) - 20000;
      for (int k = 0; k < 3; k++) res_val[k] = 5'(p % ms[k]);
      bin_val = 20'(p + e);
      #1;
      checks++;
      for (int k = 0; k < 3; k++) begin
        if (int'(syn[k]) != int'(smod(longint'(e), ms[k]))) begin
          failures++;
          $display("FAIL p=%0d e=%0d k=%0d syn=%0d", p, e, k, syn[k]);
        end
      end
      if (nz != (syn != '0)) begin
        failures++;
        $display("FAIL nz");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
