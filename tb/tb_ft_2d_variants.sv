// tb_ft_2d_variants: the 2 x 3 bidimensional array with the two check-sum
// structures that also check the check-sum adders: CHK_B (second adder,
// Y'' along the rows) and CHK_C (one three-input adder whose sum goes both
// down and right).
//
// For each variant the testbench runs two behavioural grids, with and
// without the injected errors, including both check-sum streams. Every cycle
// it checks, for both arrays, the raw and corrected row outputs, the
// selection, the row flags (row syndrome or Y'' check), the column flags and
// col_first. Phases: fault-free; a fault in one check-sum adder (the row
// results stay correct, yet both a column and the row of the element are
// flagged); a fault in one PE result; fault-free. Mechanisms counted: row
// located through Y'' alone, column flags, single-error correction, in both
// variants.
module tb_ft_2d_variants;
  import ft_pkg::*;
  localparam int R = 2, C = 3;
  int checks = 0, failures = 0;
  int n_y2row [2] = '{0, 0};
  int n_col [2]   = '{0, 0};
  int n_c1 [2]    = '{0, 0};

  logic clk = 0, rst_n = 0;
  logic [R-1:0][7:0]          x_in;
  logic [C-1:0][7:0]          w_in;
  logic [R-1:0][C-1:0][19:0]  y_err;
  logic [R-1:0][C-1:0][21:0]  cs_err;
  logic [1:0][R-1:0][19:0]    y_out, y_raw;
  sel_e [1:0][R-1:0]          sel;
  logic [1:0][R-1:0]          detected, uncorrectable, stored, row_fault;
  logic [1:0][C-1:0]          col_fault, col_first;

  ft_2d #(.VARIANT(CHK_B)) u_b (
    .clk, .rst_n, .clear(1'b0), .x_in, .w_in, .y_err, .cs_err,
    .y_out(y_out[0]), .y_raw(y_raw[0]), .sel(sel[0]), .detected(detected[0]),
    .uncorrectable(uncorrectable[0]), .stored(stored[0]), .row_fault(row_fault[0]),
    .col_fault(col_fault[0]), .col_first(col_first[0]));
  ft_2d #(.VARIANT(CHK_C)) u_c (
    .clk, .rst_n, .clear(1'b0), .x_in, .w_in, .y_err, .cs_err,
    .y_out(y_out[1]), .y_raw(y_raw[1]), .sel(sel[1]), .detected(detected[1]),
    .uncorrectable(uncorrectable[1]), .stored(stored[1]), .row_fault(row_fault[1]),
    .col_fault(col_fault[1]), .col_first(col_first[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural grids [variant][g]: variant 0 = CHK_B, 1 = CHK_C;
  // g 0 = with errors, 1 = fault-free
  longint mx1 [R][C], mx2 [R][C], mw [R][C];
  longint my [2][2][R][C], my1 [2][2][R][C], my2 [2][2][R][C];
  int ms [3] = '{5, 11, 19};

  function automatic bit differs(longint a, longint b);
    for (int k = 0; k < 3; k++)
      if (smod(a, ms[k]) != smod(b, ms[k])) return 1'b1;
    return 1'b0;
  endfunction

  // data movement is the same for all grids; g selects injected errors
  task automatic model_step();
    longint nx1 [R][C], nx2 [R][C], nw [R][C];
    longint ny [2][2][R][C], ny1 [2][2][R][C], ny2 [2][2][R][C];
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < C; c++) begin
        longint xi, wi;
        xi = (c == 0) ? longint'(x_in[r]) : mx2[r][c-1];
        wi = (r == 0) ? longint'(w_in[c]) : mw[r-1][c];
        nx1[r][c] = xi;
        nx2[r][c] = mx1[r][c];
        nw[r][c]  = wi;
        for (int v = 0; v < 2; v++) begin
          for (int g = 0; g < 2; g++) begin
            longint yi, y1i, y2i, cs, s1;
            yi  = (c == 0) ? 0 : my[v][g][r][c-1];
            y1i = (r == 0) ? 0 : my1[v][g][r-1][c];
            y2i = (c == 0) ? 0 : my2[v][g][r][c-1];
            cs  = (g == 0) ? longint'(cs_err[r][c]) : 0;
            ny[v][g][r][c] = yi + wi * xi + ((g == 0) ? longint'(y_err[r][c]) : 0);
            if (v == 0) begin
              s1 = y1i + my[v][g][r][c] + cs;
              ny1[v][g][r][c] = s1;
              ny2[v][g][r][c] = y2i + s1;
            end else begin
              s1 = my[v][g][r][c] + y1i + y2i + cs;
              ny1[v][g][r][c] = s1;
              ny2[v][g][r][c] = s1;
            end
          end
        end
      end
    end
    mx1 = nx1; mx2 = nx2; mw = nw; my = ny; my1 = ny1; my2 = ny2;
  endtask

  initial begin
    int fr, fc, bc, gr, gc, bd;
    longint ye_prev [2][R], yf_prev [2][R], y2e_prev [2][R], y2f_prev [2][R];
    longint ce_prev [2][C], cf_prev [2][C];
    x_in = '0; w_in = '0; y_err = '0; cs_err = '0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        mx1[r][c] = 0; mx2[r][c] = 0; mw[r][c] = 0;
        for (int v = 0; v < 2; v++)
          for (int g = 0; g < 2; g++) begin
            my[v][g][r][c] = 0; my1[v][g][r][c] = 0; my2[v][g][r][c] = 0;
          end
      end
    for (int v = 0; v < 2; v++) begin
      for (int r = 0; r < R; r++) begin
        ye_prev[v][r] = 0; yf_prev[v][r] = 0; y2e_prev[v][r] = 0; y2f_prev[v][r] = 0;
      end
      for (int c = 0; c < C; c++) begin ce_prev[v][c] = 0; cf_prev[v][c] = 0; end
    end
    for (int c = 0; c < C; c++) w_in[c] = 8'($urandom);
    fr = $urandom_range(0, R - 1);  fc = $urandom_range(0, C - 1);  bc = $urandom_range(0, 17);
    gr = $urandom_range(0, R - 1);  gc = $urandom_range(0, C - 1);  bd = $urandom_range(0, 17);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      // ---- drive for edge t ----
      for (int r = 0; r < R; r++) x_in[r] = 8'($urandom);
      y_err = '0; cs_err = '0;
      if (t >= 200 && t < 450 && $urandom_range(0, 3) != 0) cs_err[fr][fc] = 22'(1) << bc;
      if (t >= 600 && t < 850 && $urandom_range(0, 3) != 0) y_err[gr][gc] = 20'(1) << bd;
      model_step();
      @(posedge clk);
      #1;
      // ---- outputs registered after edge t come from the models after t-1 ----
      for (int v = 0; v < 2; v++) begin
        logic [C-1:0] exp_col, exp_first;
        exp_col = '0;
        for (int c = 0; c < C; c++) exp_col[c] = differs(ce_prev[v][c], cf_prev[v][c]);
        exp_first = exp_col & ~(exp_col - 1'b1);
        for (int r = 0; r < R; r++) begin
          longint err;
          bit exp_row;
          sel_e exp_sel;
          err = ye_prev[v][r] - yf_prev[v][r];
          exp_sel = (err == 0) ? SEL_BIN : SEL_C1;
          exp_row = differs(ye_prev[v][r], yf_prev[v][r]) ||
                    differs(y2e_prev[v][r], y2f_prev[v][r]);
          checks++;
          if (y_raw[v][r] != 20'(ye_prev[v][r]) || y_out[v][r] != 20'(yf_prev[v][r]) ||
              sel[v][r] != exp_sel || row_fault[v][r] != exp_row || uncorrectable[v][r]) begin
            failures++;
            if (failures < 10)
              $display("FAIL t=%0d variant %0d row %0d raw=%0d/%0d out=%0d/%0d sel=%0d/%0d flag=%b/%b",
                       t, v, r, y_raw[v][r], ye_prev[v][r], y_out[v][r], yf_prev[v][r],
                       sel[v][r], exp_sel, row_fault[v][r], exp_row);
          end
          if (row_fault[v][r] && err == 0) n_y2row[v]++;
          if (sel[v][r] == SEL_C1) n_c1[v]++;
        end
        checks++;
        if (col_fault[v] != exp_col || col_first[v] != exp_first) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d variant %0d col=%b/%b", t, v, col_fault[v], exp_col);
        end
        if (col_fault[v] != 0) n_col[v]++;
        for (int r = 0; r < R; r++) begin
          ye_prev[v][r]  = my[v][0][r][C-1];  yf_prev[v][r]  = my[v][1][r][C-1];
          y2e_prev[v][r] = my2[v][0][r][C-1]; y2f_prev[v][r] = my2[v][1][r][C-1];
        end
        for (int c = 0; c < C; c++) begin
          ce_prev[v][c] = my1[v][0][R-1][c]; cf_prev[v][c] = my1[v][1][R-1][c];
        end
      end
    end
    for (int v = 0; v < 2; v++) begin
      $display("variant %s: row_by_check_sum=%0d col_flags=%0d alpha1=%0d",
               (v == 0) ? "B" : "C", n_y2row[v], n_col[v], n_c1[v]);
      if (n_y2row[v] == 0 || n_col[v] == 0 || n_c1[v] == 0) begin
        failures++;
        $display("FAIL a mechanism never happened");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
