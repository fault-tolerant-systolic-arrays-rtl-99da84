// ft_linear: fault-tolerant linear systolic array with fault localization.
//
// A binary linear array of N bin_pe computes, with its weights held at the
// PEs, y(t) = sum_p W_p * x(t - p) (x enters on the left and moves right
// through two registers per PE, partial results move right through one).
// NB residue arrays of res_pe repeat the computation modulo the bases; their
// inputs come from binary-to-residue converters (one for x per array, one per
// PE for the weights). At the right edge the syndrome generator compares the
// residues of the binary result with the residue arrays, and the error
// correction network corrects the binary result:
//   ECN_MODE 0  detection only (output = binary result, 'detected' flag),
//   ECN_MODE 1  single-error correction (ecn_single),
//   ECN_MODE 2  two consecutive errors (ecn_consec, the default),
//   ECN_MODE 3  two consecutive double-syndrome errors (ecn_dsyn),
//   ECN_MODE 4  "any kind" double errors (ecn_anykind; needs NB = 3 and a
//               result width the bases cover for it, 10 bits for 5, 11, 19).
// With LOCALIZE = 1 every PE result is also checked against the same position
// in all residue arrays; pe_fault[p] is set while position p disagrees. An
// error entering at PE p travels with the partial result, so positions p and
// beyond all disagree; pe_first marks (one-hot) the first disagreeing
// position, which is the element the host has to switch out. pe_first is
// this design's addition.
//
// Timing: with x(t) the input sampled at clock edge t, y_raw and y_out after
// edge t+N hold y(t) = sum_p W_p x(t-p) (binary and corrected); the other
// status outputs are registered with them. pe_fault and pe_first are
// combinational from the PE registers and refer to the values the PEs hold
// in the current cycle.
// Weights are expected to be stable (as in an FIR filter); if they change,
// the PEs see them at once.
//
// y_err injects additive errors at the PE outputs (tie to zero in use).
module ft_linear
  import ft_pkg::*;
#(
  parameter int unsigned     N        = 4,
  parameter int unsigned     DW       = 8,
  parameter int unsigned     YW       = 20,
  parameter int unsigned     RW       = 5,
  parameter int unsigned     NB       = 3,
  parameter base_t [NB-1:0]  BASES    = BASES3,
  parameter int unsigned     ECN_MODE = 2,
  parameter bit              LOCALIZE = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,           // host: forget stored error
  input  logic [DW-1:0]         x_in,
  input  logic [N-1:0][DW-1:0]  w_in,
  input  logic [N-1:0][YW-1:0]  y_err,
  output logic [YW-1:0]         y_out,           // corrected result
  output logic [YW-1:0]         y_raw,           // binary array result
  output sel_e                  sel,
  output logic                  detected,
  output logic                  uncorrectable,
  output logic                  stored,
  output logic [N-1:0]          pe_fault,        // position disagrees
  output logic [N-1:0]          pe_first         // first disagreeing position
);

  localparam int unsigned XREG = 2;

  if (ECN_MODE > 4 || (ECN_MODE == 4 && NB != 3) || (ECN_MODE >= 2 && NB < 2)) begin : g_bad_mode
    $error("unsupported ECN_MODE / NB combination");
  end

  // ---------------- binary array ----------------
  logic [N:0][DW-1:0] bx;
  logic [N:0][YW-1:0] by;
  logic [N-1:0][DW-1:0] bw_unused;

  assign bx[0] = x_in;
  assign by[0] = '0;

  for (genvar p = 0; p < int'(N); p++) begin : g_bin
    bin_pe #(.DW(DW), .YW(YW), .XREG(XREG)) u_pe (
      .clk, .rst_n,
      .x_in(bx[p]), .w_in(w_in[p]), .y_in(by[p]), .y_err(y_err[p]),
      .x_out(bx[p+1]), .w_out(bw_unused[p]), .y_out(by[p+1])
    );
  end

  // ---------------- residue arrays ----------------
  logic [NB-1:0][N:0][RW-1:0]   rx, ry;
  logic [NB-1:0][N-1:0][RW-1:0] rw, rw_unused;

  for (genvar k = 0; k < int'(NB); k++) begin : g_res
    localparam int unsigned M = int'(BASES[k]);
    bin2res #(.IW(DW), .M(M), .RW(RW)) u_cx (.x(x_in), .r(rx[k][0]));
    assign ry[k][0] = '0;
    for (genvar p = 0; p < int'(N); p++) begin : g_pe
      bin2res #(.IW(DW), .M(M), .RW(RW)) u_cw (.x(w_in[p]), .r(rw[k][p]));
      res_pe #(.M(M), .RW(RW), .XREG(XREG)) u_pe (
        .clk, .rst_n,
        .x_in(rx[k][p]), .w_in(rw[k][p]), .y_in(ry[k][p]),
        .x_out(rx[k][p+1]), .w_out(rw_unused[k][p]), .y_out(ry[k][p+1])
      );
    end
  end

  // ---------------- syndrome generator ----------------
  logic [NB-1:0][RW-1:0] edge_res, syn;
  logic                  syn_nz;
  for (genvar k = 0; k < int'(NB); k++) begin : g_edge
    assign edge_res[k] = ry[k][N];
  end

  syndrome_gen #(.NB(NB), .BASES(BASES), .IW(YW), .RW(RW)) u_syn (
    .bin_val(by[N]), .res_val(edge_res), .syn, .nz(syn_nz)
  );

  // ---------------- fault localization ----------------
  if (LOCALIZE) begin : g_loc
    for (genvar p = 0; p < int'(N); p++) begin : g_pos
      logic [NB-1:0][RW-1:0] pres, psyn;
      for (genvar k = 0; k < int'(NB); k++) begin : g_k
        assign pres[k] = ry[k][p+1];
      end
      syndrome_gen #(.NB(NB), .BASES(BASES), .IW(YW), .RW(RW)) u_psyn (
        .bin_val(by[p+1]), .res_val(pres), .syn(psyn), .nz(pe_fault[p])
      );
    end
  end else begin : g_noloc
    assign pe_fault = '0;
  end

  always_comb begin
    pe_first = '0;
    for (int p = int'(N) - 1; p >= 0; p--) begin
      if (pe_fault[p]) pe_first = N'(1) << p;
    end
  end

  // ---------------- error correction network ----------------
  logic [YW-1:0] y_cor;
  sel_e          sel_c;
  logic          unc_c;

  if (ECN_MODE == 2) begin : g_consec
    ecn_consec #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_ecn (
      .clk, .rst_n, .clear, .y_bin(by[N]), .syn,
      .y_out(y_cor), .sel(sel_c), .detected(), .uncorrectable(unc_c),
      .stored, .s_i(), .c_i()
    );
  end else if (ECN_MODE == 3) begin : g_dsyn
    ecn_dsyn #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_ecn (
      .clk, .rst_n, .clear, .y_bin(by[N]), .syn,
      .y_out(y_cor), .sel(sel_c), .detected(), .uncorrectable(unc_c),
      .stored(stored), .s_i(), .s_i2(), .c_i(), .c_i2()
    );
  end else if (ECN_MODE == 4) begin : g_anykind
    ecn_anykind #(.BASES(BASES), .YW(YW), .RW(RW)) u_ecn (
      .y_bin(by[N]), .syn, .y_out(y_cor), .sel(sel_c), .detected(),
      .res_fault(), .uncorrectable(unc_c)
    );
    assign stored = 1'b0;
  end else if (ECN_MODE == 1) begin : g_single
    ecn_single #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_ecn (
      .y_bin(by[N]), .syn, .y_out(y_cor), .sel(sel_c), .detected(),
      .uncorrectable(unc_c), .hit(), .corr()
    );
    assign stored = 1'b0;
  end else begin : g_detect
    assign y_cor  = by[N];
    assign sel_c  = SEL_BIN;
    assign unc_c  = syn_nz;
    assign stored = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out         <= '0;
      y_raw         <= '0;
      sel           <= SEL_BIN;
      detected      <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      y_out         <= y_cor;
      y_raw         <= by[N];
      sel           <= sel_c;
      detected      <= syn_nz;
      uncorrectable <= unc_c;
    end
  end

endmodule
