// bin2res: binary-to-residue converter, r = x mod M.
//
// Used at the edges of the residue arrays (to convert X, W and the binary
// results) and as the correcting circuit inside the residue processing
// element. Each set bit i of x contributes the constant 2^i mod M; the
// contributions are accumulated by a chain of modulo-M additions, so the
// circuit is a network of adders with no divider. Purely combinational.
// The document gives only the function; the adder chain is this design's
// own choice.
module bin2res #(
  parameter int unsigned IW = 20,  // width of the binary input
  parameter int unsigned M  = 19,  // base, 2 <= M < 2^RW
  parameter int unsigned RW = 5    // width of the residue
) (
  input  logic [IW-1:0] x,
  output logic [RW-1:0] r
);

  // Constant residues of the bit weights.
  function automatic logic [RW-1:0] wt(int unsigned i);
    return RW'(ft_pkg::pow2_mod(i, M));
  endfunction

  always_comb begin
    logic [RW:0] acc;
    acc = '0;
    for (int unsigned i = 0; i < IW; i++) begin
      if (x[i]) begin
        acc = acc + {1'b0, wt(i)};
        if (acc >= (RW+1)'(M)) acc = acc - (RW+1)'(M);
      end
    end
    r = acc[RW-1:0];
  end

endmodule
