// tb_ft_2d: end-to-end test of the fault-tolerant 2 x 3 bidimensional array
// (default parameters: bases 5, 11, 19, check-sum variant A, consecutive-error
// correction per row).
//
// The testbench runs two behavioural models of the binary grid, one with the
// injected errors and one without; the residue grids must track the
// fault-free one modulo each base. Each cycle it checks the raw and corrected
// row outputs, the multiplexer selection of every row, the row flags and the
// column flags (col_fault / col_first) against the models. Phases: fault-free;
// a fault in row 0 (intermittent); a second fault in row 0, another column
// (double error, alpha2); clear; a fault in a check-sum adder of row 1 (seen
// by the column check only); a result fault in row 1; fault-free.
module tb_ft_2d;
  import ft_pkg::*;
  localparam int R = 2, C = 3;
  int checks = 0, failures = 0;
  int n_a0 = 0, n_a1 = 0, n_a2 = 0, n_row = 0, n_col = 0, n_csonly = 0, n_clear = 0;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [R-1:0][7:0]          x_in;
  logic [C-1:0][7:0]          w_in;
  logic [R-1:0][C-1:0][19:0]  y_err;
  logic [R-1:0][C-1:0][21:0]  cs_err;
  logic [R-1:0][19:0]         y_out, y_raw;
  sel_e [R-1:0]               sel;
  logic [R-1:0]               detected, uncorrectable, stored, row_fault;
  logic [C-1:0]               col_fault, col_first;

  ft_2d dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
        xi  = (c == 0) ? longint'(x_in[r]) : mx2[g][r][c-1];
        wi  = (r == 0) ? longint'(w_in[c]) : mw[g][r-1][c];
        yi  = (c == 0) ? 0 : my[g][r][c-1];
        y1i = (r == 0) ? 0 : my1[g][r-1][c];
        nx1[r][c] = xi;
        nx2[r][c] = mx1[g][r][c];
        nw[r][c]  = wi;
        ny[r][c]  = yi + wi * xi + ((g == 0) ? longint'(y_err[r][c]) : 0);
        ny1[r][c] = y1i + my[g][r][c] + ((g == 0) ? longint'(cs_err[r][c]) : 0);
      end
    end
    mx1[g] = nx1; mx2[g] = nx2; mw[g] = nw; my[g] = ny; my1[g] = ny1;
  endtask

  initial begin
    int fa_c, fb_c, ba, bb, bc, bd, fc_c, fd_c;
    longint ye_prev [R], yf_prev [R], ce_prev [C], cf_prev [C];
    x_in = '0; w_in = '0; y_err = '0; cs_err = '0;
    for (int g = 0; g < 2; g++)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          mx1[g][r][c] = 0; mx2[g][r][c] = 0; mw[g][r][c] = 0; my[g][r][c] = 0; my1[g][r][c] = 0;
        end
    for (int r = 0; r < R; r++) begin ye_prev[r] = 0; yf_prev[r] = 0; end
    for (int c = 0; c < C; c++) begin ce_prev[c] = 0; cf_prev[c] = 0; end
    for (int c = 0; c < C; c++) w_in[c] = 8'($urandom);
    fa_c = $urandom_range(0, C - 1);
    do fb_c = $urandom_range(0, C - 1); while (fb_c == fa_c);
    fc_c = $urandom_range(0, C - 1);
    fd_c = $urandom_range(0, C - 1);
    ba = $urandom_range(0, 17);
    do bb = $urandom_range(0, 17); while (bb == ba);
    bc = $urandom_range(0, 19);
    bd = $urandom_range(0, 17);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1600; t++) begin
      logic [C-1:0] exp_col, exp_colfirst;
      // ---- drive for edge t ----
      for (int r = 0; r < R; r++) x_in[r] = 8'($urandom);
      y_err = '0; cs_err = '0;
      if (t >= 200 && t < 700 && $urandom_range(0, 3) != 0) y_err[0][fa_c] = 20'(1) << ba;
      if (t >= 400 && t < 700 && $urandom_range(0, 3) != 0) y_err[0][fb_c] = 20'(1) << bb;
      clear = (t == 750);
      if (t >= 800 && t < 1000 && $urandom_range(0, 3) != 0) cs_err[1][fc_c] = 22'(1) << bc;
      if (t >= 1100 && t < 1300 && $urandom_range(0, 3) != 0) y_err[1][fd_c] = 20'(1) << bd;
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
        if (y_raw[r] != 20'(ye_prev[r]) || y_out[r] != 20'(yf_prev[r]) || sel[r] != exp_sel ||
            row_fault[r] != differs(ye_prev[r], yf_prev[r]) || uncorrectable[r]) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d row %0d raw=%0d/%0d out=%0d/%0d sel=%0d/%0d", t, r,
                     y_raw[r], ye_prev[r], y_out[r], yf_prev[r], sel[r], exp_sel);
        end
        if (sel[r] == SEL_BIN) n_a0++;
        if (sel[r] == SEL_C1)  n_a1++;
        if (sel[r] == SEL_C2)  n_a2++;
        if (row_fault[r]) n_row++;
      end
      checks++;
      if (col_fault != exp_col || col_first != exp_colfirst) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d col=%b/%b", t, col_fault, exp_col);
      end
      if (col_fault != 0) n_col++;
      if (col_fault != 0 && row_fault == 0 && t >= 800 && t < 1010) n_csonly++;
      if (t == 752) begin
        checks++;
        if (stored != 0) begin failures++; $display("FAIL clear"); end
        else n_clear++;
      end
      for (int r = 0; r < R; r++) begin ye_prev[r] = my[0][r][C-1]; yf_prev[r] = my[1][r][C-1]; end
      for (int c = 0; c < C; c++) begin ce_prev[c] = my1[0][R-1][c]; cf_prev[c] = my1[1][R-1][c]; end
    end
    $display("alpha0=%0d alpha1=%0d alpha2=%0d row_flags=%0d col_flags=%0d checksum_only=%0d clear=%0d",
             n_a0, n_a1, n_a2, n_row, n_col, n_csonly, n_clear);
    if (n_a0 == 0 || n_a1 == 0 || n_a2 == 0 || n_row == 0 || n_col == 0 || n_csonly == 0 || n_clear == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
