// mod_add: modulo-M adder, s = (a + b) mod M for residues a, b < M.
//
// Built by the constant-offset method: with k = RW the adder forms
// t = a + b + (2^k - M). A carry out of bit k-1 means a + b >= M and the low
// k bits of t are already the result. Without a carry the sum is restored by
// adding M and discarding the new carry. Combinational.
module mod_add #(
  parameter int unsigned M  = 19,
  parameter int unsigned RW = 5    // 2^(RW-1) < M <= 2^RW is not required; M < 2^RW
) (
  input  logic [RW-1:0] a,
  input  logic [RW-1:0] b,
  output logic [RW-1:0] s
);

  localparam logic [RW-1:0] OFFS = RW'((1 << RW) - M);

  logic [RW:0] t;
  always_comb begin
    t = {1'b0, a} + {1'b0, b} + {1'b0, OFFS};
    if (t[RW]) s = t[RW-1:0];
    else       s = t[RW-1:0] + RW'(M);
  end

endmodule
