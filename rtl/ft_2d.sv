// ft_2d: fault-tolerant horizontal-computing bidimensional systolic array
// with fault localization.
//
// An R x C grid of bin_loc_pe: x enters each row on the left and moves right
// (two registers per PE), results move right (one register per PE), weights
// enter each column at the top and move down one row per cycle. Every row is
// therefore a linear array with its own input stream and the row results come
// out at the right edge. NB residue grids of res_loc_pe, fed through
// binary-to-residue converters (x per row, W per column, for each grid),
// repeat the computation modulo the bases.
//
// Row check and correction: each row output has its own syndrome generator
// and error correction network (ECN_MODE as in ft_linear; default two
// consecutive errors). A non-zero row syndrome marks the row of a faulty
// element.
// Column check: the check-sum adders of the PEs (VARIANT, see bin_loc_pe)
// accumulate the PE results down each column. At the bottom edge the binary
// check sum Y' is compared with the residue check sums; the OR over the
// residue grids of the non-zero differences is col_fault[c] (the faulty
// column identifier). With VARIANT CHK_B or CHK_C the Y'' sums at the right
// edge are checked too and also raise row_fault. An error entering at column
// c also travels right with the row result, so columns c and beyond all
// disagree; col_first marks (one-hot) the first disagreeing column, which with
// the flagged row identifies the faulty element (col_first is this design's
// addition).
//
// Timing: all outputs are registered one cycle after the right/bottom edge
// registers of the grid. With x_r(t) the row-r input sampled at clock edge t
// and constant weights, y_raw[r] and y_out[r] after edge t+C hold
// y_r(t) = sum_c W_c x_r(t-c). Row r sees a change of the weights r cycles
// after row 0; col_fault refers to check sums that lag by up to R cycles.
//
// y_err and cs_err inject additive errors into PE results and check-sum
// adders (tie to zero in use).
module ft_2d
  import ft_pkg::*;
#(
  parameter int unsigned     R        = 2,
  parameter int unsigned     C        = 3,
  parameter int unsigned     DW       = 8,
  parameter int unsigned     YW       = 20,
  parameter int unsigned     CW       = 22,
  parameter int unsigned     RW       = 5,
  parameter int unsigned     NB       = 3,
  parameter base_t [NB-1:0]  BASES    = BASES3,
  parameter int unsigned     ECN_MODE = 2,
  parameter chk_variant_e    VARIANT  = CHK_A
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic [R-1:0][DW-1:0]          x_in,
  input  logic [C-1:0][DW-1:0]          w_in,
  input  logic [R-1:0][C-1:0][YW-1:0]   y_err,
  input  logic [R-1:0][C-1:0][CW-1:0]   cs_err,
  output logic [R-1:0][YW-1:0]          y_out,
  output logic [R-1:0][YW-1:0]          y_raw,
  output sel_e [R-1:0]                  sel,
  output logic [R-1:0]                  detected,
  output logic [R-1:0]                  uncorrectable,
  output logic [R-1:0]                  stored,
  output logic [R-1:0]                  row_fault,
  output logic [C-1:0]                  col_fault,
  output logic [C-1:0]                  col_first
);

  localparam int unsigned XREG = 2;

  if (ECN_MODE > 4 || (ECN_MODE == 4 && NB != 3) || (ECN_MODE >= 2 && NB < 2)) begin : g_bad_mode
    $error("unsupported ECN_MODE / NB combination");
  end

  // ---------------- binary grid ----------------
  // index [r][c]: input of PE (r,c) from the left / from above
  logic [R-1:0][C:0][DW-1:0] bx;
  logic [R-1:0][C:0][YW-1:0] by;
  logic [R-1:0][C:0][CW-1:0] by2;
  logic [R:0][C-1:0][DW-1:0] bw;
  logic [R:0][C-1:0][CW-1:0] by1;

  for (genvar r = 0; r < int'(R); r++) begin : g_brow
    assign bx[r][0]  = x_in[r];
    assign by[r][0]  = '0;
    assign by2[r][0] = '0;
  end
  for (genvar c = 0; c < int'(C); c++) begin : g_bcol
    assign bw[0][c]  = w_in[c];
    assign by1[0][c] = '0;
  end

  for (genvar r = 0; r < int'(R); r++) begin : g_br
    for (genvar c = 0; c < int'(C); c++) begin : g_bc
      bin_loc_pe #(.DW(DW), .YW(YW), .CW(CW), .XREG(XREG), .VARIANT(VARIANT)) u_pe (
        .clk, .rst_n,
        .x_in(bx[r][c]), .w_in(bw[r][c]), .y_in(by[r][c]),
        .y1_in(by1[r][c]), .y2_in(by2[r][c]),
        .y_err(y_err[r][c]), .cs_err(cs_err[r][c]),
        .x_out(bx[r][c+1]), .w_out(bw[r+1][c]), .y_out(by[r][c+1]),
        .y1_out(by1[r+1][c]), .y2_out(by2[r][c+1])
      );
    end
  end

  // ---------------- residue grids ----------------
  logic [NB-1:0][R-1:0][C:0][RW-1:0] rx, ry, ry2;
  logic [NB-1:0][R:0][C-1:0][RW-1:0] rw, ry1;

  for (genvar k = 0; k < int'(NB); k++) begin : g_res
    localparam int unsigned M = int'(BASES[k]);
    for (genvar r = 0; r < int'(R); r++) begin : g_rrow
      bin2res #(.IW(DW), .M(M), .RW(RW)) u_cx (.x(x_in[r]), .r(rx[k][r][0]));
      assign ry[k][r][0]  = '0;
      assign ry2[k][r][0] = '0;
    end
    for (genvar c = 0; c < int'(C); c++) begin : g_rcol
      bin2res #(.IW(DW), .M(M), .RW(RW)) u_cw (.x(w_in[c]), .r(rw[k][0][c]));
      assign ry1[k][0][c] = '0;
    end
    for (genvar r = 0; r < int'(R); r++) begin : g_rr
      for (genvar c = 0; c < int'(C); c++) begin : g_rc
        res_loc_pe #(.M(M), .RW(RW), .XREG(XREG), .VARIANT(VARIANT)) u_pe (
          .clk, .rst_n,
          .x_in(rx[k][r][c]), .w_in(rw[k][r][c]), .y_in(ry[k][r][c]),
          .y1_in(ry1[k][r][c]), .y2_in(ry2[k][r][c]),
          .x_out(rx[k][r][c+1]), .w_out(rw[k][r+1][c]), .y_out(ry[k][r][c+1]),
          .y1_out(ry1[k][r+1][c]), .y2_out(ry2[k][r][c+1])
        );
      end
    end
  end

  // ---------------- row checks and correction ----------------
  logic [R-1:0][YW-1:0] y_cor;
  sel_e [R-1:0]         sel_c;
  logic [R-1:0]         syn_nz, unc_c, y2_nz;

  for (genvar r = 0; r < int'(R); r++) begin : g_rowchk
    logic [NB-1:0][RW-1:0] eres, syn, eres2, syn2;
    for (genvar k = 0; k < int'(NB); k++) begin : g_k
      assign eres[k]  = ry[k][r][C];
      assign eres2[k] = ry2[k][r][C];
    end
    syndrome_gen #(.NB(NB), .BASES(BASES), .IW(YW), .RW(RW)) u_syn (
      .bin_val(by[r][C]), .res_val(eres), .syn, .nz(syn_nz[r])
    );
    if (VARIANT != CHK_A) begin : g_y2
      syndrome_gen #(.NB(NB), .BASES(BASES), .IW(CW), .RW(RW)) u_syn2 (
        .bin_val(by2[r][C]), .res_val(eres2), .syn(syn2), .nz(y2_nz[r])
      );
    end else begin : g_noy2
      assign syn2     = '0;
      assign y2_nz[r] = 1'b0;
    end

    if (ECN_MODE == 2) begin : g_consec
      ecn_consec #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_ecn (
        .clk, .rst_n, .clear, .y_bin(by[r][C]), .syn,
        .y_out(y_cor[r]), .sel(sel_c[r]), .detected(), .uncorrectable(unc_c[r]),
        .stored(stored[r]), .s_i(), .c_i()
      );
    end else if (ECN_MODE == 3) begin : g_dsyn
      ecn_dsyn #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_ecn (
        .clk, .rst_n, .clear, .y_bin(by[r][C]), .syn,
        .y_out(y_cor[r]), .sel(sel_c[r]), .detected(), .uncorrectable(unc_c[r]),
        .stored(stored[r]), .s_i(), .s_i2(), .c_i(), .c_i2()
      );
    end else if (ECN_MODE == 4) begin : g_anykind
      ecn_anykind #(.BASES(BASES), .YW(YW), .RW(RW)) u_ecn (
        .y_bin(by[r][C]), .syn, .y_out(y_cor[r]), .sel(sel_c[r]), .detected(),
        .res_fault(), .uncorrectable(unc_c[r])
      );
      assign stored[r] = 1'b0;
    end else if (ECN_MODE == 1) begin : g_single
      ecn_single #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_ecn (
        .y_bin(by[r][C]), .syn, .y_out(y_cor[r]), .sel(sel_c[r]), .detected(),
        .uncorrectable(unc_c[r]), .hit(), .corr()
      );
      assign stored[r] = 1'b0;
    end else begin : g_detect
      assign y_cor[r]  = by[r][C];
      assign sel_c[r]  = SEL_BIN;
      assign unc_c[r]  = syn_nz[r];
      assign stored[r] = 1'b0;
    end
  end

  // ---------------- column checks: faulty column identifier ----------------
  logic [C-1:0] col_nz;
  for (genvar c = 0; c < int'(C); c++) begin : g_colchk
    logic [NB-1:0][RW-1:0] eres, syn;
    for (genvar k = 0; k < int'(NB); k++) begin : g_k
      assign eres[k] = ry1[k][R][c];
    end
    syndrome_gen #(.NB(NB), .BASES(BASES), .IW(CW), .RW(RW)) u_syn (
      .bin_val(by1[R][c]), .res_val(eres), .syn, .nz(col_nz[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out         <= '0;
      y_raw         <= '0;
      sel           <= {R{SEL_BIN}};
      detected      <= '0;
      uncorrectable <= '0;
      row_fault     <= '0;
      col_fault     <= '0;
    end else begin
      for (int r = 0; r < int'(R); r++) begin
        y_out[r] <= y_cor[r];
        y_raw[r] <= by[r][C];
        sel[r]   <= sel_c[r];
      end
      detected      <= syn_nz;
      uncorrectable <= unc_c;
      row_fault     <= syn_nz | y2_nz;
      col_fault     <= col_nz;
    end
  end

  always_comb begin
    col_first = '0;
    for (int c = int'(C) - 1; c >= 0; c--) begin
      if (col_fault[c]) col_first = C'(1) << c;
    end
  end

endmodule
