// ecn_anykind: correction network for "any kind" double errors (two faults
// that may be permanent, transient or intermittent and may appear together).
//
// Four combinational circuits work on the syndrome of three bases:
//   - three single-error tables, one per pair of bases (corr_lut with two
//     digits); every pair must be able to correct any single error, so a
//     single binary error is recognised by all three pairs, and by the pair
//     that excludes a faulty residue array even when one is faulty;
//   - one double-error table: the syndromes of all same-sign double errors
//     +/-(2^i + 2^j), i != j, each mapped to its correction.
// Decision (MUX controller), in order:
//   syndrome zero                              -> binary result (alpha0)
//   all three pairs recognise the same error   -> binary + correction (alpha1)
//   double-error table recognises the syndrome -> binary + correction (alpha2)
//   only one digit non-zero (residue-side fault)-> binary result, res_fault
//   pairs that recognise a single error agree  -> binary + its correction (alpha1)
//   otherwise (including disagreeing pairs)    -> binary result, uncorrectable
// The pairwise single tables and the decision order are this design's
// reading; the document states only the four circuits and the conditions the
// bases must meet. With the bases 5, 11, 19 the conditions hold for results
// of up to 10 bits, hence the default YW = 10. Combinational.
module ecn_anykind
  import ft_pkg::*;
#(
  parameter base_t [2:0]     BASES = BASES3,
  parameter int unsigned     YW    = 10,
  parameter int unsigned     RW    = 5
) (
  input  logic [YW-1:0]         y_bin,
  input  logic [2:0][RW-1:0]    syn,
  output logic [YW-1:0]         y_out,
  output sel_e                  sel,
  output logic                  detected,
  output logic                  res_fault,
  output logic                  uncorrectable
);

  // ---- three pairwise single-error tables; pair p leaves out base p ----
  logic [2:0]          phit;
  logic [2:0][YW-1:0]  pcorr;

  for (genvar p = 0; p < 3; p++) begin : g_pair
    localparam int A = (p == 0) ? 1 : 0;
    localparam int B = (p == 2) ? 1 : 2;
    localparam base_t [1:0] PB = {BASES[B], BASES[A]};
    logic [1:0][RW-1:0] psyn;
    assign psyn = {syn[B], syn[A]};
    corr_lut #(.NB(2), .BASES(PB), .YW(YW), .RW(RW)) u_lut (
      .syn(psyn), .hit(phit[p]), .corr(pcorr[p])
    );
  end

  // ---- double-error table ----
  localparam int unsigned ND = YW * (YW - 1);   // pairs i<j times two signs
  logic [ND-1:0]          dmatch;
  logic [ND-1:0][YW-1:0]  dcorr;

  for (genvar i = 0; i < int'(YW); i++) begin : g_i
    for (genvar j = i + 1; j < int'(YW); j++) begin : g_j
      for (genvar sg = 0; sg < 2; sg++) begin : g_s
        // entry index: 2 * (position of pair (i,j) in row-major order) + sign
        localparam int IDX = 2 * (i * int'(YW) - (i * (i + 1)) / 2 + (j - i - 1)) + sg;
        localparam longint E = (sg != 0) ? -((longint'(1) << i) + (longint'(1) << j))
                                         :  ((longint'(1) << i) + (longint'(1) << j));
        logic [2:0][RW-1:0] rs;
        for (genvar k = 0; k < 3; k++) begin : g_k
          assign rs[k] = RW'(smod(E, int'(BASES[k])));
        end
        assign dmatch[IDX] = (syn == rs);
        assign dcorr[IDX]  = YW'(-E);
      end
    end
  end

  logic          dhit;
  logic [YW-1:0] dc;
  always_comb begin
    dhit = |dmatch;
    dc   = '0;
    for (int n = 0; n < int'(ND); n++) if (dmatch[n]) dc = dc | dcorr[n];
  end

  // ---- MUX controller ----
  logic [YW-1:0] corr;
  logic [1:0]    nzcount;
  always_comb begin
    nzcount       = 2'(syn[0] != '0) + 2'(syn[1] != '0) + 2'(syn[2] != '0);
    detected      = (nzcount != 0);
    res_fault     = 1'b0;
    uncorrectable = 1'b0;
    sel           = SEL_BIN;
    corr          = '0;
    if (detected) begin
      if (&phit && pcorr[0] == pcorr[1] && pcorr[1] == pcorr[2]) begin
        sel  = SEL_C1;
        corr = pcorr[0];
      end else if (dhit) begin
        sel  = SEL_C2;
        corr = dc;
      end else if (nzcount == 2'd1) begin
        res_fault = 1'b1;
      end else if (|phit) begin
        // use the pairs that recognise a single error; they must agree
        sel = SEL_C1;
        for (int p = 2; p >= 0; p--) if (phit[p]) corr = pcorr[p];
        for (int p = 0; p < 3; p++) begin
          if (phit[p] && pcorr[p] != corr) begin
            sel           = SEL_BIN;
            uncorrectable = 1'b1;
          end
        end
      end else begin
        uncorrectable = 1'b1;
      end
    end
  end

  // ---- adder and multiplexer ----
  assign y_out = (sel == SEL_BIN) ? y_bin : y_bin + corr;

endmodule
