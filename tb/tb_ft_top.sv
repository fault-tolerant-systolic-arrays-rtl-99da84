// tb_ft_top: runs the whole design at its default size: the linear array
// (4 PEs), the 2 x 3 bidimensional array and the narrow any-kind array, all
// with three residue arrays, concurrently from one clock. Each half gets the stimulus and the
// independent models of its own testbench (tb_ft_linear, tb_ft_2d): FIR
// reference and error record for the linear array, fault-free and faulty
// behavioural grids for the bidimensional one. Mechanisms counted (each must
// occur): alpha0/alpha1/alpha2 selection in the first two parts, alpha3
// (fault whose error sign follows the data) in the linear array, single and
// simultaneous double errors corrected by the any-kind array, data masking of a
// permanent fault, element localization, row and column flags, a check-sum
// adder fault seen only by the column check, and the host clear.
module tb_ft_top;
  import ft_pkg::*;
  localparam int N = 4, R = 2, C = 3;
  int checks = 0, failures = 0;
  int n_a0 = 0, n_a1 = 0, n_a2 = 0, n_a3 = 0, n_loc = 0, n_clear = 0, n_masked = 0;
  int m_a0 = 0, m_a1 = 0, m_a2 = 0, n_row = 0, n_col = 0, n_csonly = 0, m_clear = 0;
  bit lin_done = 0, arr_done = 0, ak_done = 0;
  int k_a1 = 0, k_a2 = 0;

  logic clk = 0, rst_n = 0, lin_clear = 0, arr_clear = 0;
  logic [7:0]                 lin_x_in;
  logic [N-1:0][7:0]          lin_w_in;
  logic [N-1:0][19:0]         lin_y_err;
  logic [19:0]                lin_y_out, lin_y_raw;
  sel_e                       lin_sel;
  logic                       lin_detected, lin_uncorrectable, lin_stored;
  logic [N-1:0]               lin_pe_fault, lin_pe_first;
  logic [R-1:0][7:0]          arr_x_in;
  logic [C-1:0][7:0]          arr_w_in;
  logic [R-1:0][C-1:0][19:0]  arr_y_err;
  logic [R-1:0][C-1:0][21:0]  arr_cs_err;
  logic [R-1:0][19:0]         arr_y_out, arr_y_raw;
  sel_e [R-1:0]               arr_sel;
  logic [R-1:0]               arr_detected, arr_uncorrectable, arr_stored, arr_row_fault;
  logic [C-1:0]               arr_col_fault, arr_col_first;
  logic [3:0]                 ak_x_in;
  logic [N-1:0][3:0]          ak_w_in;
  logic [N-1:0][9:0]          ak_y_err;
  logic [9:0]                 ak_y_out, ak_y_raw;
  sel_e                       ak_sel;
  logic                       ak_detected, ak_uncorrectable;
  logic [N-1:0]               ak_pe_fault, ak_pe_first;

  ft_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (lin_done && arr_done && ak_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int T = 1200;
  int xs [T];
  int es [T][N];   // error injected into PE p, sampled at edge t

  function automatic bit single(int v);   // v = +/-2^k
    int a;
    a = (v < 0) ? -v : v;
    return a != 0 && (a & (a - 1)) == 0;
  endfunction

  function automatic int xat(int t);
    return (t < 0) ? 0 : xs[t];
  endfunction
  function automatic int eat(int t, int p);
    return (t < 0) ? 0 : es[t][p];
  endfunction

  // behavioural grid: index 0 = with errors, 1 = fault-free
  longint mx1 [2][R][C], mx2 [2][R][C], mw [2][R][C], my [2][R][C], my1 [2][R][C];
  int ms [3] = '{5, 11, 19};

  function automatic bit differs(longint a, longint b);
    for (int k = 0; k < 3; k++)
      if (smod(a, ms[k]) != smod(b, ms[k])) return 1'b1;
    return 1'b0;
  endfunction

  task automatic model_step(int g);
    longint nx1 [R][C], nx2 [R][C], nw [R][C], ny [R][C], ny1 [R][C];
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < C; c++) begin
        longint xi, wi, yi, y1i;
        xi  = (c == 0) ? longint'(arr_x_in[r]) : mx2[g][r][c-1];
        wi  = (r == 0) ? longint'(arr_w_in[c]) : mw[g][r-1][c];
        yi  = (c == 0) ? 0 : my[g][r][c-1];
        y1i = (r == 0) ? 0 : my1[g][r-1][c];
        nx1[r][c] = xi;
        nx2[r][c] = mx1[g][r][c];
        nw[r][c]  = wi;
        ny[r][c]  = yi + wi * xi + ((g == 0) ? longint'(arr_y_err[r][c]) : 0);
        ny1[r][c] = y1i + my[g][r][c] + ((g == 0) ? longint'(arr_cs_err[r][c]) : 0);
      end
    end
    mx1[g] = nx1; mx2[g] = nx2; mw[g] = nw; my[g] = ny; my1[g] = ny1;
  endtask

  initial begin
    int p1, p2, b1, b2, st;
    lin_x_in = 0; lin_w_in = '0; lin_y_err = '0;
    // samples and weights of at least 128 keep every partial result at or
    // above 2^14, so the negative errors (bit b1 <= 13) never wrap
    for (int p = 0; p < N; p++) lin_w_in[p] = 8'($urandom_range(128, 255));
    p1 = $urandom_range(0, N - 1);
    do p2 = $urandom_range(0, N - 1); while (p2 == p1);
    b1 = $urandom_range(0, 13);
    st = 0;
    do b2 = $urandom_range(0, 17); while (b2 == b1);
    wait (rst_n);
    for (int t = 0; t < T; t++) begin
      int ref_y, err_out, e_first;
      logic [N-1:0] exp_fault, exp_first;
      sel_e exp_sel;
      // ---- drive for edge t ----
      xs[t] = $urandom_range(128, 255);
      for (int p = 0; p < N; p++) es[t][p] = 0;
      // fault 1 follows the data: +2^b1 or -2^b1
      if (t >= 300 && t < 1000 && $urandom_range(0, 3) != 0)
        es[t][p1] = ($urandom_range(0, 1) != 0) ? (1 << b1) : -(1 << b1);
      if (t >= 600 && t < 1000 && $urandom_range(0, 3) != 0) es[t][p2] = 1 << b2;
      lin_x_in = 8'(xs[t]);
      for (int p = 0; p < N; p++) lin_y_err[p] = 20'(es[t][p]);
      lin_clear = (t == 1050);
      @(posedge clk);
      #1;
      // ---- model after edge t ----
      ref_y = 0;
      for (int p = 0; p < N; p++) ref_y += int'(lin_w_in[p]) * xat(t - N - p);
      err_out = 0;
      for (int p = 0; p < N; p++) err_out += eat(t - N + p, p);
      // st: sign of the first error the network stored (0 = none)
      if (err_out == 0) exp_sel = SEL_BIN;
      else if (single(err_out)) exp_sel = SEL_C1;
      else if (single(err_out - st * (1 << b1))) exp_sel = SEL_C2;
      else exp_sel = SEL_C3;
      if (st == 0 && err_out != 0) st = (err_out > 0) ? 1 : -1;
      if (t == 1050) st = 0;
      // error present in the result register of PE p after edge t
      exp_fault = '0;
      for (int p = 0; p < N; p++) begin
        int e;
        e = 0;
        for (int q = 0; q <= p; q++) e += eat(t - (p - q), q);
        exp_fault[p] = (e != 0);
      end
      exp_first = exp_fault & ~(exp_fault - 1'b1);
      checks++;
      if (lin_y_raw != 20'(ref_y + err_out) || lin_y_out != 20'(ref_y) || lin_sel != exp_sel ||
          lin_pe_fault != exp_fault || lin_pe_first != exp_first || lin_uncorrectable) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d raw=%0d out=%0d ref=%0d err=%0d sel=%0d/%0d flt=%b/%b",
                   t, lin_y_raw, lin_y_out, ref_y, err_out, lin_sel, exp_sel, lin_pe_fault, exp_fault);
      end
      if (lin_sel == SEL_BIN) n_a0++;
      if (lin_sel == SEL_C1)  n_a1++;
      if (lin_sel == SEL_C2)  n_a2++;
      if (lin_sel == SEL_C3)  n_a3++;
      if (t >= 300 && t < 600 && es[t][p1] == 0) n_masked++;
      if (lin_pe_first != 0) n_loc++;
      if (t == 1052) begin
        checks++;
        if (lin_stored) begin failures++; $display("FAIL clear"); end
        else n_clear++;
      end
    end
    $display("linear: alpha0=%0d alpha1=%0d alpha2=%0d alpha3=%0d localized=%0d masked=%0d clear=%0d",
             n_a0, n_a1, n_a2, n_a3, n_loc, n_masked, n_clear);
    if (n_a0 == 0 || n_a1 == 0 || n_a2 == 0 || n_a3 == 0 || n_loc == 0 || n_masked == 0 || n_clear == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    lin_done = 1;
  end

  initial begin
    int fa_c, fb_c, ba, bb, bc, bd, fc_c, fd_c;
    longint ye_prev [R], yf_prev [R], ce_prev [C], cf_prev [C];
    arr_x_in = '0; arr_w_in = '0; arr_y_err = '0; arr_cs_err = '0;
    for (int g = 0; g < 2; g++)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          mx1[g][r][c] = 0; mx2[g][r][c] = 0; mw[g][r][c] = 0; my[g][r][c] = 0; my1[g][r][c] = 0;
        end
    for (int r = 0; r < R; r++) begin ye_prev[r] = 0; yf_prev[r] = 0; end
    for (int c = 0; c < C; c++) begin ce_prev[c] = 0; cf_prev[c] = 0; end
    for (int c = 0; c < C; c++) arr_w_in[c] = 8'($urandom);
    fa_c = $urandom_range(0, C - 1);
    do fb_c = $urandom_range(0, C - 1); while (fb_c == fa_c);
    fc_c = $urandom_range(0, C - 1);
    fd_c = $urandom_range(0, C - 1);
    ba = $urandom_range(0, 17);
    do bb = $urandom_range(0, 17); while (bb == ba);
    bc = $urandom_range(0, 19);
    bd = $urandom_range(0, 17);
    wait (rst_n);
    for (int t = 0; t < 1600; t++) begin
      logic [C-1:0] exp_col, exp_colfirst;
      // ---- drive for edge t ----
      for (int r = 0; r < R; r++) arr_x_in[r] = 8'($urandom);
      arr_y_err = '0; arr_cs_err = '0;
      if (t >= 200 && t < 700 && $urandom_range(0, 3) != 0) arr_y_err[0][fa_c] = 20'(1) << ba;
      if (t >= 400 && t < 700 && $urandom_range(0, 3) != 0) arr_y_err[0][fb_c] = 20'(1) << bb;
      arr_clear = (t == 750);
      if (t >= 800 && t < 1000 && $urandom_range(0, 3) != 0) arr_cs_err[1][fc_c] = 22'(1) << bc;
      if (t >= 1100 && t < 1300 && $urandom_range(0, 3) != 0) arr_y_err[1][fd_c] = 20'(1) << bd;
      model_step(0);
      model_step(1);
      @(posedge clk);
      #1;
      // ---- outputs registered after edge t come from the models after t-1 ----
      exp_col = '0;
      for (int c = 0; c < C; c++) exp_col[c] = differs(ce_prev[c], cf_prev[c]);
      exp_colfirst = exp_col & ~(exp_col - 1'b1);
      for (int r = 0; r < R; r++) begin
        longint err;
        sel_e exp_sel;
        err = ye_prev[r] - yf_prev[r];
        if (err == 0) exp_sel = SEL_BIN;
        else if ((err & (err - 1)) == 0) exp_sel = SEL_C1;
        else exp_sel = SEL_C2;
        checks++;
        if (arr_y_raw[r] != 20'(ye_prev[r]) || arr_y_out[r] != 20'(yf_prev[r]) || arr_sel[r] != exp_sel ||
            arr_row_fault[r] != differs(ye_prev[r], yf_prev[r]) || arr_uncorrectable[r]) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d row %0d raw=%0d/%0d out=%0d/%0d sel=%0d/%0d", t, r,
                     arr_y_raw[r], ye_prev[r], arr_y_out[r], yf_prev[r], arr_sel[r], exp_sel);
        end
        if (arr_sel[r] == SEL_BIN) m_a0++;
        if (arr_sel[r] == SEL_C1)  m_a1++;
        if (arr_sel[r] == SEL_C2)  m_a2++;
        if (arr_row_fault[r]) n_row++;
      end
      checks++;
      if (arr_col_fault != exp_col || arr_col_first != exp_colfirst) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d col=%b/%b", t, arr_col_fault, exp_col);
      end
      if (arr_col_fault != 0) n_col++;
      if (arr_col_fault != 0 && arr_row_fault == 0 && t >= 800 && t < 1010) n_csonly++;
      if (t == 752) begin
        checks++;
        if (arr_stored != 0) begin failures++; $display("FAIL clear"); end
        else m_clear++;
      end
      for (int r = 0; r < R; r++) begin ye_prev[r] = my[0][r][C-1]; yf_prev[r] = my[1][r][C-1]; end
      for (int c = 0; c < C; c++) begin ce_prev[c] = my1[0][R-1][c]; cf_prev[c] = my1[1][R-1][c]; end
    end
    $display("array: alpha0=%0d alpha1=%0d alpha2=%0d row_flags=%0d col_flags=%0d checksum_only=%0d clear=%0d",
             m_a0, m_a1, m_a2, n_row, n_col, n_csonly, m_clear);
    if (m_a0 == 0 || m_a1 == 0 || m_a2 == 0 || n_row == 0 || n_col == 0 || n_csonly == 0 || m_clear == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    arr_done = 1;
  end

  // ---------------- any-kind array ----------------
  // Transient errors hit two PEs in random cycles at a random bit each time
  // (PE pa bits 0..3, PE pb bits 4..6, all positive), so results carry no,
  // one or two simultaneous errors that never repeat a fixed pattern; all
  // are corrected. A network for consecutive errors cannot do this.
  int ks [T];
  int kes [T][N];

  initial begin
    int pa, pb;
    ak_x_in = 0; ak_w_in = '0; ak_y_err = '0;
    for (int p = 0; p < N; p++) ak_w_in[p] = 4'($urandom);
    pa = $urandom_range(0, N - 1);
    do pb = $urandom_range(0, N - 1); while (pb == pa);
    // 4 x 15 x 15 + 2^3 + 2^6 stays below 2^10
    wait (rst_n);
    for (int t = 0; t < T; t++) begin
      int ref_y, err_out, nerr;
      ks[t] = $urandom_range(0, 15);
      for (int p = 0; p < N; p++) kes[t][p] = 0;
      if (t >= 200 && t < 900 && $urandom_range(0, 2) == 0) kes[t][pa] = 1 << $urandom_range(0, 3);
      if (t >= 400 && t < 900 && $urandom_range(0, 2) == 0) kes[t][pb] = 1 << $urandom_range(4, 6);
      ak_x_in = 4'(ks[t]);
      for (int p = 0; p < N; p++) ak_y_err[p] = 10'(kes[t][p]);
      @(posedge clk);
      #1;
      ref_y = 0; err_out = 0; nerr = 0;
      for (int p = 0; p < N; p++)
        if (t - N - p >= 0) ref_y += int'(ak_w_in[p]) * ks[t - N - p];
      for (int p = 0; p < N; p++)
        if (t - N + p >= 0 && kes[t - N + p][p] != 0) begin
          err_out += kes[t - N + p][p];
          nerr++;
        end
      checks++;
      if (ak_y_raw != 10'(ref_y + err_out) || ak_y_out != 10'(ref_y) || ak_uncorrectable ||
          ak_detected != (nerr != 0) ||
          ak_sel != ((nerr == 0) ? SEL_BIN : (nerr == 1) ? SEL_C1 : SEL_C2)) begin
        failures++;
        if (failures < 10)
          $display("FAIL any-kind t=%0d raw=%0d out=%0d ref=%0d err=%0d sel=%0d",
                   t, ak_y_raw, ak_y_out, ref_y, err_out, ak_sel);
      end
      if (ak_sel == SEL_C1) k_a1++;
      if (ak_sel == SEL_C2) k_a2++;
    end
    $display("any-kind: single=%0d double=%0d", k_a1, k_a2);
    if (k_a1 == 0 || k_a2 == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    ak_done = 1;
  end
endmodule
