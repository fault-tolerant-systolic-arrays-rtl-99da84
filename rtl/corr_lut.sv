// corr_lut: single-error correction table (the "PLA" of the correction
// generator).
//
// For every single error e = +/-2^i, i < YW, its syndrome (e mod b_k for each
// base) is a constant computed at elaboration. The incoming syndrome is
// compared with all 2*YW constants in parallel; on a match the output is the
// correction -e (two's complement, YW bits) to be added to the faulty result.
// With bases that satisfy the uniqueness conditions at most one entry can
// match. Combinational. The document allows a ROM, a PLA or a custom circuit;
// the parallel compare is this design's choice.
module corr_lut
  import ft_pkg::*;
#(
  parameter int unsigned     NB    = 3,
  parameter base_t [NB-1:0]  BASES = BASES3,
  parameter int unsigned     YW    = 20,
  parameter int unsigned     RW    = 5
) (
  input  logic [NB-1:0][RW-1:0] syn,
  output logic                  hit,   // syndrome is that of a single error
  output logic [YW-1:0]         corr   // correction to add (0 when no hit)
);

  // match[2*i + sgn]: syndrome equals that of (sgn ? -2^i : +2^i)
  logic [2*YW-1:0] match;

  for (genvar i = 0; i < int'(YW); i++) begin : g_bit
    for (genvar sg = 0; sg < 2; sg++) begin : g_sign
      logic [NB-1:0][RW-1:0] ref_syn;
      for (genvar k = 0; k < int'(NB); k++) begin : g_base
        assign ref_syn[k] = RW'(err_mod(i, sg != 0, int'(BASES[k])));
      end
      assign match[2*i+sg] = (syn == ref_syn);
    end
  end

  always_comb begin
    corr = '0;
    for (int i = 0; i < int'(YW); i++) begin
      if (match[2*i])   corr = corr | (YW'(0) - (YW'(1) << i)); // error +2^i
      if (match[2*i+1]) corr = corr | (YW'(1) << i);            // error -2^i
    end
  end

  assign hit = |match;

endmodule
