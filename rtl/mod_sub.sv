// mod_sub: modulo-M subtractor, d = (a - b) mod M for residues a, b < M.
//
// One '-' box of the syndrome generator: a is the residue of a binary result,
// b the result of a residue array. Subtracts and adds M back on a borrow.
// Combinational.
module mod_sub #(
  parameter int unsigned M  = 19,
  parameter int unsigned RW = 5
) (
  input  logic [RW-1:0] a,
  input  logic [RW-1:0] b,
  output logic [RW-1:0] d
);

  logic [RW:0] t;
  always_comb begin
    t = {1'b0, a} - {1'b0, b};
    if (t[RW]) d = t[RW-1:0] + RW'(M);
    else       d = t[RW-1:0];
  end

endmodule
