// ecn_consec: correction network for two consecutive single-syndrome errors.
//
// PLA1 with its adder is the single-error network (ecn_single): it recognises the syndrome s' of a single error and gives its
// correction c'. The first time this happens, s' and c' are stored in a
// register (s_i, c_i); after that the register is not written again until the
// host clears it. When a syndrome arrives that is neither zero nor a single
// error, a second fault is present: the stored syndrome is subtracted digit
// by digit (mod_sub), PLA2 turns the difference into the second correction
// c'', and the output is binary + c_i + c''. The MUX controller selects
//   alpha0 (SEL_BIN): syndrome zero, binary result as it is;
//   alpha1 (SEL_C1) : single error, binary + c';
//   alpha2 (SEL_C2) : double error, binary + c_i + c''.
// Anything else passes the binary result and raises 'uncorrectable'. Double
// errors are assumed to have the same sign (the bases are chosen for that).
// The datapath is combinational; only the register is clocked. Reset and the
// synchronous 'clear' input empty the register; both are this design's choice.
module ecn_consec
  import ft_pkg::*;
#(
  parameter int unsigned     NB    = 3,
  parameter base_t [NB-1:0]  BASES = BASES3,
  parameter int unsigned     YW    = 20,
  parameter int unsigned     RW    = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,          // host: forget the stored error
  input  logic [YW-1:0]         y_bin,
  input  logic [NB-1:0][RW-1:0] syn,
  output logic [YW-1:0]         y_out,
  output sel_e                  sel,
  output logic                  detected,
  output logic                  uncorrectable,
  output logic                  stored,         // a first error is registered
  output logic [NB-1:0][RW-1:0] s_i,            // its syndrome
  output logic [YW-1:0]         c_i             // its correction
);

  logic                  hit1, hit2;
  logic [YW-1:0]         c1, c2;
  logic [NB-1:0][RW-1:0] sdiff;

  logic [YW-1:0] y_add1;

  ecn_single #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_pla1 (
    .y_bin, .syn, .y_out(y_add1), .sel(), .detected(detected),
    .uncorrectable(), .hit(hit1), .corr(c1)
  );

  for (genvar k = 0; k < int'(NB); k++) begin : g_sub
    mod_sub #(.M(int'(BASES[k])), .RW(RW)) u_sub (.a(syn[k]), .b(s_i[k]), .d(sdiff[k]));
  end

  corr_lut #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_pla2 (
    .syn(sdiff), .hit(hit2), .corr(c2)
  );

  // MUX controller
  always_comb begin
    uncorrectable = 1'b0;
    sel           = SEL_BIN;
    if (detected) begin
      if (hit1)                sel = SEL_C1;
      else if (stored && hit2) sel = SEL_C2;
      else                     uncorrectable = 1'b1;
    end
  end

  // Register of the first error
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stored <= 1'b0;
      s_i    <= '0;
      c_i    <= '0;
    end else if (clear) begin
      stored <= 1'b0;
      s_i    <= '0;
      c_i    <= '0;
    end else if (!stored && detected && hit1) begin
      stored <= 1'b1;
      s_i    <= syn;
      c_i    <= c1;
    end
  end

  // Adders and multiplexer
  logic [YW-1:0] y_add2;
  assign y_add2 = y_bin + c_i + c2;

  always_comb begin
    unique case (sel)
      SEL_C1:  y_out = y_add1;
      SEL_C2:  y_out = y_add2;
      default: y_out = y_bin;
    endcase
  end

endmodule
