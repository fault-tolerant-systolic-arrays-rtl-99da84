// res_loc_pe: residue twin of bin_loc_pe.
//
// A res_pe computes the residue result; the check-sum adders of the chosen
// VARIANT (see bin_loc_pe) are modulo-M adders (mod_add), so each check sum is
// the residue of the corresponding binary check sum when no fault is present.
// Timing is identical to bin_loc_pe. Reset is asynchronous, active low.
module res_loc_pe
  import ft_pkg::*;
#(
  parameter int unsigned  M       = 19,
  parameter int unsigned  RW      = 5,
  parameter int unsigned  XREG    = 1,
  parameter chk_variant_e VARIANT = CHK_A
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] x_in,
  input  logic [RW-1:0] w_in,
  input  logic [RW-1:0] y_in,
  input  logic [RW-1:0] y1_in,
  input  logic [RW-1:0] y2_in,
  output logic [RW-1:0] x_out,
  output logic [RW-1:0] w_out,
  output logic [RW-1:0] y_out,
  output logic [RW-1:0] y1_out,
  output logic [RW-1:0] y2_out
);

  res_pe #(.M(M), .RW(RW), .XREG(XREG)) u_pe (
    .clk, .rst_n, .x_in, .w_in, .y_in, .x_out, .w_out, .y_out
  );

  // a1 = Y'in + Yout; a2 = a1 + Y''in (CHK_B: Y''out, CHK_C: the 3-input sum)
  logic [RW-1:0] a1, a2;
  mod_add #(.M(M), .RW(RW)) u_add1 (.a(y1_in), .b(y_out), .s(a1));
  mod_add #(.M(M), .RW(RW)) u_add2 (.a(a1),    .b(y2_in), .s(a2));

  logic [RW-1:0] s1, s2;
  always_comb begin
    unique case (VARIANT)
      CHK_A:   begin s1 = a1; s2 = '0; end
      CHK_B:   begin s1 = a1; s2 = a2; end
      CHK_C:   begin s1 = a2; s2 = a2; end
      default: begin s1 = a1; s2 = '0; end
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
