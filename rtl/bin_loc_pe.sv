// bin_loc_pe: binary processing element with check-sum adders for fault
// localization in a bidimensional array.
//
// A bin_pe computes Yout <- Yin + Win*Xin as usual. Extra adders build check
// sums of the PE results, which the residue arrays reproduce modulo their
// bases, so that a check at the bottom edge points at the column of a faulty
// element. Three structures, selected by VARIANT:
//   CHK_A  Y'out  <- Y'in + Yout                      (one extra adder)
//   CHK_B  Y'out  <- Y'in + Yout,
//          Y''out <- Y''in + (Y'in + Yout)            (a third adder checks the second)
//   CHK_C  Y'out = Y''out <- Yout + Y'in + Y''in      (one three-input adder)
// Y' travels down the column, Y'' along the row. The adders take the PE's
// registered Yout and are registered themselves, so check sums lag the
// results by one cycle per row (Y') or column (Y''). Unused check-sum outputs
// are driven to zero (Y'' in CHK_A). Which outputs the three-input adder of
// CHK_C drives, and all registering, are this design's reading; the adder
// structures follow the document.
//
// y_err and cs_err are fault-injection inputs added to the result and to the
// first check-sum adder; tie them to zero in use.
module bin_loc_pe
  import ft_pkg::*;
#(
  parameter int unsigned  DW      = 8,
  parameter int unsigned  YW      = 20,
  parameter int unsigned  CW      = 22,
  parameter int unsigned  XREG    = 1,
  parameter chk_variant_e VARIANT = CHK_A
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] x_in,
  input  logic [DW-1:0] w_in,
  input  logic [YW-1:0] y_in,
  input  logic [CW-1:0] y1_in,
  input  logic [CW-1:0] y2_in,
  input  logic [YW-1:0] y_err,
  input  logic [CW-1:0] cs_err,
  output logic [DW-1:0] x_out,
  output logic [DW-1:0] w_out,
  output logic [YW-1:0] y_out,
  output logic [CW-1:0] y1_out,
  output logic [CW-1:0] y2_out
);

  bin_pe #(.DW(DW), .YW(YW), .XREG(XREG)) u_pe (
    .clk, .rst_n, .x_in, .w_in, .y_in, .y_err, .x_out, .w_out, .y_out
  );

  logic [CW-1:0] s1, s2;

  always_comb begin
    s1 = y1_in + CW'(y_out) + cs_err;
    s2 = '0;
    unique case (VARIANT)
      CHK_A: s2 = '0;
      CHK_B: s2 = y2_in + s1;
      CHK_C: begin
        s1 = CW'(y_out) + y1_in + y2_in + cs_err;
        s2 = s1;
      end
      default: s2 = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1_out <= '0;
      y2_out <= '0;
    end else begin
      y1_out <= s1;
      y2_out <= s2;
    end
  end

endmodule
