// tb_ecn_consec: drives the consecutive-error network cycle by cycle with a
// result P and the syndrome of the error present in that cycle. Scenario:
// fault-free cycles (alpha0), a first permanent error e1 that is sometimes
// masked (alpha1, stored once), a second error e2 alone (alpha1, not stored)
// and both together (alpha2, corrected with the stored correction), then a
// host clear. Every output must equal P. Repeated for random error pairs.
module tb_ecn_consec;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  int n_alpha [3] = '{0, 0, 0};
  logic clk = 0, rst_n = 0, clear = 0;
  logic [19:0]     y_bin, y_out, c_i;
  logic [2:0][4:0] syn, s_i;
  sel_e            sel;
  logic            detected, uncorrectable, stored;
  int ms [3] = '{5, 11, 19};

  ecn_consec #(.NB(3), .BASES(BASES3), .YW(20), .RW(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle with error e; expect selection exp_sel
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
      $display("FAIL e=%0d out=%0d p=%0d sel=%0d exp %0d unc=%0d", e, y_out, p, sel, exp_sel, uncorrectable);
    end
  endtask

  initial begin
    y_bin = 0; syn = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int i, j;
      longint e1, e2;
      bit neg;
      i = $urandom_range(0, 17);
      do j = $urandom_range(0, 17); while (j == i);
      neg = 1'($urandom);
      e1 = longint'(1) << i;
      e2 = longint'(1) << j;
      if (neg) begin e1 = -e1; e2 = -e2; end
      cyc(0, SEL_BIN);
      cyc(e1, SEL_C1);
      @(posedge clk);
      #1;
      checks++;
      if (!stored || c_i != 20'(-e1)) begin
        failures++;
        $display("FAIL first error not stored");
      end
      cyc(0, SEL_BIN);          // first fault masked by the data
      cyc(e1, SEL_C1);
      cyc(e2, SEL_C1);          // second fault alone: corrected, not stored
      @(posedge clk);
      #1;
      checks++;
      if (c_i != 20'(-e1)) begin
        failures++;
        $display("FAIL register overwritten");
      end
      cyc(e1 + e2, SEL_C2);     // both faults
      cyc(e1 + e2, SEL_C2);
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      checks++;
      if (stored) begin
        failures++;
        $display("FAIL clear");
      end
    end
    // a double error without a stored first error cannot be corrected
    @(negedge clk);
    y_bin = 20'd700000;
    for (int k = 0; k < 3; k++) syn[k] = 5'(smod(longint'(3), ms[k]));
    #1;
    checks++;
    if (!uncorrectable) begin
      failures++;
      $display("FAIL unstored double error not flagged");
    end
    $display("alpha0=%0d alpha1=%0d alpha2=%0d", n_alpha[0], n_alpha[1], n_alpha[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
