// tb_ft_linear_modes: the linear array with each of its other correction
// networks: detection only (mode 0, one base), single-error correction
// (mode 1, bases 5 and 11), double-syndrome consecutive errors (mode 3) and
// any-kind double errors (mode 4), the last two with bases 5, 11, 19.
//
// All four arrays have 4 PEs, 4-bit samples and weights and 10-bit results
// (the width the any-kind network covers with 5, 11, 19). Samples and
// weights are kept in 8..15 so every partial result is at least 64 and a
// negative error of up to 32 never wraps below zero.
// Phases:
//   0..99     fault-free;
//   100..399  fault A in one PE, bit 3; for the mode-3 array its sign
//             follows the data (+8 or -8), for the others it is +8;
//   400..699  fault B (+64) in another PE as well;
//   700..799  fault-free, host clear at 750;
//   800..999  fault A alone again, first appearing with the opposite sign.
// Each result is checked against a model; each mechanism (alpha0..alpha3,
// plain detection, clear) must occur at least once.
module tb_ft_linear_modes;
  import ft_pkg::*;
  localparam int N = 4, DW = 4, YW = 10, T = 1000;
  localparam int BA = 3, BB = 6;
  int checks = 0, failures = 0;
  int n_det = 0, n_c1 = 0, n_c2 = 0, n_c3 = 0, n_any2 = 0, n_clear = 0;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [DW-1:0]        x_in;
  logic [N-1:0][DW-1:0] w_in;
  logic [N-1:0][YW-1:0] ep, es;     // positive-only and signed error inputs

  logic [3:0][YW-1:0] y_out, y_raw;
  sel_e   [3:0]       sel;
  logic   [3:0]       detected, uncorrectable, stored;
  logic [3:0][N-1:0]  pe_fault, pe_first;

  ft_linear #(.N(N), .DW(DW), .YW(YW), .NB(1), .BASES(8'd19), .ECN_MODE(0)) u_m0 (
    .clk, .rst_n, .clear, .x_in, .w_in, .y_err(ep),
    .y_out(y_out[0]), .y_raw(y_raw[0]), .sel(sel[0]), .detected(detected[0]),
    .uncorrectable(uncorrectable[0]), .stored(stored[0]),
    .pe_fault(pe_fault[0]), .pe_first(pe_first[0]));
  ft_linear #(.N(N), .DW(DW), .YW(YW), .NB(2), .BASES(BASES2), .ECN_MODE(1)) u_m1 (
    .clk, .rst_n, .clear, .x_in, .w_in, .y_err(ep),
    .y_out(y_out[1]), .y_raw(y_raw[1]), .sel(sel[1]), .detected(detected[1]),
    .uncorrectable(uncorrectable[1]), .stored(stored[1]),
    .pe_fault(pe_fault[1]), .pe_first(pe_first[1]));
  ft_linear #(.N(N), .DW(DW), .YW(YW), .ECN_MODE(3)) u_m3 (
    .clk, .rst_n, .clear, .x_in, .w_in, .y_err(es),
    .y_out(y_out[2]), .y_raw(y_raw[2]), .sel(sel[2]), .detected(detected[2]),
    .uncorrectable(uncorrectable[2]), .stored(stored[2]),
    .pe_fault(pe_fault[2]), .pe_first(pe_first[2]));
  ft_linear #(.N(N), .DW(DW), .YW(YW), .ECN_MODE(4)) u_m4 (
    .clk, .rst_n, .clear, .x_in, .w_in, .y_err(ep),
    .y_out(y_out[3]), .y_raw(y_raw[3]), .sel(sel[3]), .detected(detected[3]),
    .uncorrectable(uncorrectable[3]), .stored(stored[3]),
    .pe_fault(pe_fault[3]), .pe_first(pe_first[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xs [T];
  int eps [T][N];
  int ess [T][N];

  function automatic int xat(int t);
    return (t < 0) ? 0 : xs[t];
  endfunction

  task automatic check(bit ok, string what, int t);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL t=%0d %s", t, what);
    end
  endtask

  initial begin
    int pa, pb, sign0;
    x_in = 0; w_in = '0; ep = '0; es = '0;
    for (int p = 0; p < N; p++) w_in[p] = DW'($urandom_range(8, 15));
    pa = $urandom_range(0, N - 1);
    do pb = $urandom_range(0, N - 1); while (pb == pa);
    sign0 = 0;      // sign of the first visible mode-3 error since clear
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      int ref_y, errp, errs, na, nb, sa;
      sel_e exp3;
      // ---- drive for edge t ----
      xs[t] = $urandom_range(8, 15);
      for (int p = 0; p < N; p++) begin eps[t][p] = 0; ess[t][p] = 0; end
      if (((t >= 100 && t < 700) || t >= 800) && $urandom_range(0, 3) != 0) begin
        eps[t][pa] = 1 << BA;
        if (t >= 800 && t < 810)  ess[t][pa] = -(1 << BA);
        else ess[t][pa] = ($urandom_range(0, 1) != 0) ? (1 << BA) : -(1 << BA);
      end
      if (t >= 400 && t < 700 && $urandom_range(0, 3) != 0) begin
        eps[t][pb] = 1 << BB;
        ess[t][pb] = 1 << BB;
      end
      x_in = DW'(xs[t]);
      for (int p = 0; p < N; p++) begin
        ep[p] = YW'(eps[t][p]);
        es[p] = YW'(ess[t][p]);
      end
      clear = (t == 750);
      @(posedge clk);
      #1;
      if (t == 750) sign0 = 0;
      // ---- model after edge t ----
      ref_y = 0;
      for (int p = 0; p < N; p++) ref_y += int'(w_in[p]) * xat(t - N - p);
      errp = 0; errs = 0; na = 0; nb = 0; sa = 0;
      if (t - N + pa >= 0) begin
        errp += eps[t - N + pa][pa];
        errs += ess[t - N + pa][pa];
        na = int'(eps[t - N + pa][pa] != 0);
        sa = ess[t - N + pa][pa];
      end
      if (t - N + pb >= 0) begin
        errp += eps[t - N + pb][pb];
        errs += ess[t - N + pb][pb];
        nb = int'(eps[t - N + pb][pb] != 0);
      end
      // mode 0: detection only
      check(y_raw[0] == YW'(ref_y + errp) && y_out[0] == y_raw[0] && sel[0] == SEL_BIN &&
            detected[0] == (errp != 0), "mode0", t);
      if (detected[0]) n_det++;
      // mode 1: single errors are corrected
      check(y_raw[1] == YW'(ref_y + errp), "mode1 raw", t);
      if (na + nb <= 1)
        check(y_out[1] == YW'(ref_y) && sel[1] == ((na + nb != 0) ? SEL_C1 : SEL_BIN), "mode1", t);
      // mode 3: double-syndrome consecutive errors
      if (na + nb == 0)      exp3 = SEL_BIN;
      else if (na + nb == 1) exp3 = SEL_C1;
      else                   exp3 = (sa == sign0) ? SEL_C2 : SEL_C3;
      check(y_raw[2] == YW'(ref_y + errs) && y_out[2] == YW'(ref_y) && sel[2] == exp3 &&
            !uncorrectable[2], $sformatf("mode3 sel=%0d exp=%0d", sel[2], exp3), t);
      if (sign0 == 0 && na != 0) sign0 = sa;
      if (sel[2] == SEL_C1) n_c1++;
      if (sel[2] == SEL_C2) n_c2++;
      if (sel[2] == SEL_C3) n_c3++;
      // mode 4: any-kind doubles (same sign)
      check(y_raw[3] == YW'(ref_y + errp) && y_out[3] == YW'(ref_y) && !uncorrectable[3] &&
            sel[3] == ((na + nb == 0) ? SEL_BIN : (na + nb == 1) ? SEL_C1 : SEL_C2),
            "mode4", t);
      if (sel[3] == SEL_C2) n_any2++;
      if (t == 752) begin
        check(!stored[2], "clear", t);
        if (!stored[2]) n_clear++;
      end
    end
    $display("detected=%0d alpha1=%0d alpha2=%0d alpha3=%0d anykind_double=%0d clear=%0d",
             n_det, n_c1, n_c2, n_c3, n_any2, n_clear);
    if (n_det == 0 || n_c1 == 0 || n_c2 == 0 || n_c3 == 0 || n_any2 == 0 || n_clear == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
