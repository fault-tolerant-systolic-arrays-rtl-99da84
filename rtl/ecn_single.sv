// ecn_single: error correction network for single errors.
//
// The syndrome of one binary result drives a correction table (corr_lut).
// The MUX controller selects the binary result as it is when the syndrome is
// zero (alpha0), and the output of the adder, binary result + correction,
// when the syndrome is that of a single error (alpha1). A non-zero syndrome
// that matches no single error cannot be corrected: the binary result is
// passed and 'uncorrectable' is raised, so the host can reconfigure (this
// fallback is this design's choice). With one residue array (NB = 1) the same
// network serves as a detector. Combinational.
module ecn_single
  import ft_pkg::*;
#(
  parameter int unsigned     NB    = 2,
  parameter base_t [NB-1:0]  BASES = BASES2,
  parameter int unsigned     YW    = 20,
  parameter int unsigned     RW    = 5
) (
  input  logic [YW-1:0]         y_bin,         // binary array result
  input  logic [NB-1:0][RW-1:0] syn,           // its syndrome
  output logic [YW-1:0]         y_out,         // corrected result
  output sel_e                  sel,           // multiplexer selection
  output logic                  detected,      // syndrome not zero
  output logic                  uncorrectable, // detected but not a single error
  output logic                  hit,           // syndrome is that of a single error
  output logic [YW-1:0]         corr           // its correction
);

  logic [YW-1:0] y_add;

  corr_lut #(.NB(NB), .BASES(BASES), .YW(YW), .RW(RW)) u_gen (
    .syn, .hit, .corr
  );

  assign y_add = y_bin + corr;

  // MUX controller
  always_comb begin
    detected      = |syn;
    uncorrectable = detected && !hit;
    sel           = (detected && hit) ? SEL_C1 : SEL_BIN;
  end

  // Multiplexer
  assign y_out = (sel == SEL_C1) ? y_add : y_bin;

endmodule
