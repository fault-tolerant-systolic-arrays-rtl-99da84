// bin_pe: binary processing element of the systolic array.
//
// Function (as in the document): X and W are passed on unchanged and the
// result is Yout <- Yin + Win * Xin, in full precision (no truncation while
// the result fits in YW bits). All outputs are registered on the rising clock
// edge: Y and W after one cycle, X after XREG cycles, so that an array can let
// X travel slower than Y (XREG = 2 makes a row of PEs an FIR filter). The
// number of X stages and the registering are this design's choices.
//
// y_err is a fault-injection input: its value is added to the result, so the
// additive error model P' = P +/- 2^i can be exercised. Tie it to zero in use.
// Reset is asynchronous, active low, and clears every register.
module bin_pe #(
  parameter int unsigned DW   = 8,
  parameter int unsigned YW   = 20,
  parameter int unsigned XREG = 1    // register stages on the X path, >= 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] x_in,
  input  logic [DW-1:0] w_in,
  input  logic [YW-1:0] y_in,
  input  logic [YW-1:0] y_err,
  output logic [DW-1:0] x_out,
  output logic [DW-1:0] w_out,
  output logic [YW-1:0] y_out
);

  logic [DW-1:0] xq [XREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(XREG); i++) xq[i] <= '0;
      w_out <= '0;
      y_out <= '0;
    end else begin
      xq[0] <= x_in;
      for (int i = 1; i < int'(XREG); i++) xq[i] <= xq[i-1];
      w_out <= w_in;
      y_out <= y_in + YW'(w_in * x_in) + y_err;
    end
  end

  assign x_out = xq[XREG-1];

endmodule
