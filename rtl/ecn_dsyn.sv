// ecn_dsyn: correction network for two consecutive double-syndrome errors.
//
// A fault whose error sign depends on the data (+2^i for some inputs, -2^i
// for others) produces two different syndromes. When the first error is
// detected (PLA1 recognises a single-error syndrome s' with correction c'),
// two registers are loaded with both syndromes the fault can produce and
// their corrections: (s_i, c_i) = (s', c') and (s'_i, c'_i) = (-s', -c').
// Afterwards:
//   alpha0 (SEL_BIN): zero syndrome, binary result as it is;
//   alpha1 (SEL_C1) : single-error syndrome, binary + c';
//   alpha2 (SEL_C2) : s - s_i is a single error (PLA2 -> c''),
//                     binary + c_i + c'';
//   alpha3 (SEL_C3) : s - s'_i is a single error (PLA3 -> c'''),
//                     binary + c'_i + c'''.
// Anything else passes the binary result and raises 'uncorrectable'. The
// second syndrome is derived from the first by negation, which is this
// design's reading of "two registers to store the possible syndromes of the
// first error"; the assignment of alpha1..alpha3 is also this design's. The
// datapath is combinational, the registers load on the clock edge after the
// first detection and are emptied by reset or the synchronous 'clear'.
module ecn_dsyn
  import ft_pkg::*;
#(
  parameter int unsigned     NB    = 3,
  parameter base_t [NB-1:0]  BASES = BASES3,
  parameter int unsigned     YW    = 20,
  parameter int unsigned     RW    = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic [YW-1:0]         y_bin,
  input  logic [NB-1:0][RW-1:0] syn,
  output logic [YW-1:0]         y_out,
  output sel_e                  sel,
  output logic                  detected,
  output logic                  uncorrectable,
  output logic                  stored,
  output logic [NB-1:0][RW-1:0] s_i,      // first syndrome of the first fault
  output logic [NB-1:0][RW-1:0] s_i2,     // its other possible syndrome
  output logic [YW-1:0]         c_i,
  output logic [YW-1:0]         c_i2
);

  logic                  hit1, hit2, hit3;
  logic [YW-1:0]         c1, c2, c3, y_add1;
  logic [NB-1:0][RW-1:0] d2, d3, sneg;

  // PLA1 and the first adder
  ecn_single #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_pla1 (
    .y_bin, .syn, .y_out(y_add1), .sel(), .detected(detected),
    .uncorrectable(), .hit(hit1), .corr(c1)
  );

  for (genvar k = 0; k < int'(NB); k++) begin : g_sub
    localparam int unsigned M = int'(BASES[k]);
    mod_sub #(.M(M), .RW(RW)) u_neg  (.a('0),     .b(syn[k]),  .d(sneg[k]));
    mod_sub #(.M(M), .RW(RW)) u_sub2 (.a(syn[k]), .b(s_i[k]),  .d(d2[k]));
    mod_sub #(.M(M), .RW(RW)) u_sub3 (.a(syn[k]), .b(s_i2[k]), .d(d3[k]));
  end

  corr_lut #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_pla2 (.syn(d2), .hit(hit2), .corr(c2));
  corr_lut #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_pla3 (.syn(d3), .hit(hit3), .corr(c3));

  // MUX controller
  always_comb begin
    uncorrectable = 1'b0;
    sel           = SEL_BIN;
    if (detected) begin
      if (hit1)                sel = SEL_C1;
      else if (stored && hit2) sel = SEL_C2;
      else if (stored && hit3) sel = SEL_C3;
      else                     uncorrectable = 1'b1;
    end
  end

  // Registers of the first error: both syndromes it can produce
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stored <= 1'b0;
      s_i    <= '0;
      s_i2   <= '0;
      c_i    <= '0;
      c_i2   <= '0;
    end else if (clear) begin
      stored <= 1'b0;
      s_i    <= '0;
      s_i2   <= '0;
      c_i    <= '0;
      c_i2   <= '0;
    end else if (!stored && detected && hit1) begin
      stored <= 1'b1;
      s_i    <= syn;
      s_i2   <= sneg;
      c_i    <= c1;
      c_i2   <= YW'(0) - c1;
    end
  end

  // Adders and multiplexer
  logic [YW-1:0] y_add2, y_add3;
  assign y_add2 = y_bin + c_i + c2;
  assign y_add3 = y_bin + c_i2 + c3;

  always_comb begin
    unique case (sel)
      SEL_C1:  y_out = y_add1;
      SEL_C2:  y_out = y_add2;
      SEL_C3:  y_out = y_add3;
      default: y_out = y_bin;
    endcase
  end

endmodule
