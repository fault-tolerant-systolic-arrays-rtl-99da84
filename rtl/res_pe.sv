// res_pe: residue processing element, the modulo-M twin of bin_pe.
//
// Function: Xout <- Xin, Wout <- Win, Yout <- R[Yin + Win * Xin]_M on
// residues of width RW. Following the second structure the document offers,
// the multiply and add are ordinary binary operations on the short residues
// and their (2*RW+1)-bit result goes through a correcting circuit (bin2res)
// that returns its residue. Registering and the XREG stages on the X path
// mirror bin_pe exactly, so the residue array is cycle-aligned with the binary
// array. Reset is asynchronous, active low.
module res_pe #(
  parameter int unsigned M    = 19,
  parameter int unsigned RW   = 5,
  parameter int unsigned XREG = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] x_in,
  input  logic [RW-1:0] w_in,
  input  logic [RW-1:0] y_in,
  output logic [RW-1:0] x_out,
  output logic [RW-1:0] w_out,
  output logic [RW-1:0] y_out
);

  localparam int unsigned SW = 2 * RW + 1;

  logic [SW-1:0] sum;
  logic [RW-1:0] sum_r;

  assign sum = SW'(w_in) * SW'(x_in) + SW'(y_in);

  bin2res #(.IW(SW), .M(M), .RW(RW)) u_corr (.x(sum), .r(sum_r));

  logic [RW-1:0] xq [XREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(XREG); i++) xq[i] <= '0;
      w_out <= '0;
      y_out <= '0;
    end else begin
      xq[0] <= x_in;
      for (int i = 1; i < int'(XREG); i++) xq[i] <= xq[i-1];
      w_out <= w_in;
      y_out <= sum_r;
    end
  end

  assign x_out = xq[XREG-1];

endmodule
