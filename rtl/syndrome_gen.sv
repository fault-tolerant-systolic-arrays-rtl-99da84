// syndrome_gen: syndrome generator for one binary result.
//
// The binary result P' is converted to its residues modulo each base (bin2res)
// and the result of the matching residue array, P mod b_k, is subtracted
// modulo b_k (mod_sub). The NB differences form the syndrome
// s_k = R[P' - P]_{b_k}; all zero means no error was detected. Combinational.
module syndrome_gen
  import ft_pkg::*;
#(
  parameter int unsigned        NB    = 3,
  parameter base_t [NB-1:0]     BASES = BASES3,
  parameter int unsigned        IW    = 20,
  parameter int unsigned        RW    = 5
) (
  input  logic [IW-1:0]          bin_val,   // binary array result
  input  logic [NB-1:0][RW-1:0]  res_val,   // residue array results
  output logic [NB-1:0][RW-1:0]  syn,       // syndrome, one digit per base
  output logic                   nz         // syndrome not zero
);

  for (genvar k = 0; k < int'(NB); k++) begin : g_base
    logic [RW-1:0] br;
    bin2res #(.IW(IW), .M(int'(BASES[k])), .RW(RW)) u_conv (.x(bin_val), .r(br));
    mod_sub #(.M(int'(BASES[k])), .RW(RW)) u_sub (.a(br), .b(res_val[k]), .d(syn[k]));
  end

  assign nz = |syn;

endmodule
