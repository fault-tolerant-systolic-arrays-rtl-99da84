// tb_bin_loc_pe: the three check-sum structures side by side on the same
// random inputs. Checks the PE result and, one cycle later than the PE's own
// registered result, Y' and Y'' for each variant against a model:
//   A: Y' = Y'in + Yout;  B: Y' as A, Y'' = Y''in + Y';  C: both = Yout + Y'in + Y''in.
module tb_bin_loc_pe;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0]  x_in, w_in;
  logic [19:0] y_in, y_err;
  logic [21:0] y1_in, y2_in, cs_err;
  logic [2:0][7:0]  x_out, w_out;
  logic [2:0][19:0] y_out;
  logic [2:0][21:0] y1_out, y2_out;

  bin_loc_pe #(.VARIANT(CHK_A)) ua (.clk, .rst_n, .x_in, .w_in, .y_in, .y1_in, .y2_in, .y_err, .cs_err,
    .x_out(x_out[0]), .w_out(w_out[0]), .y_out(y_out[0]), .y1_out(y1_out[0]), .y2_out(y2_out[0]));
  bin_loc_pe #(.VARIANT(CHK_B)) ub (.clk, .rst_n, .x_in, .w_in, .y_in, .y1_in, .y2_in, .y_err, .cs_err,
    .x_out(x_out[1]), .w_out(w_out[1]), .y_out(y_out[1]), .y1_out(y1_out[1]), .y2_out(y2_out[1]));
  bin_loc_pe #(.VARIANT(CHK_C)) uc (.clk, .rst_n, .x_in, .w_in, .y_in, .y1_in, .y2_in, .y_err, .cs_err,
    .x_out(x_out[2]), .w_out(w_out[2]), .y_out(y_out[2]), .y1_out(y1_out[2]), .y2_out(y2_out[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] yprev;
    logic [21:0] e1 [3], e2 [3];
    x_in = 0; w_in = 0; y_in = 0; y_err = 0; y1_in = 0; y2_in = 0; cs_err = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      yprev  = y_out[0];           // registered PE result used by the adders
      x_in   = 8'($urandom);
      w_in   = 8'($urandom);
      y_in   = 20'($urandom_range(0, 400000));
      y1_in  = 22'($urandom_range(0, 1000000));
      y2_in  = 22'($urandom_range(0, 1000000));
      y_err  = (t % 5 == 2) ? 20'(1) << $urandom_range(0, 17) : '0;
      cs_err = (t % 9 == 4) ? 22'(1) << $urandom_range(0, 19) : '0;
      e1[0] = y1_in + 22'(yprev) + cs_err;  e2[0] = '0;
      e1[1] = e1[0];                        e2[1] = y2_in + e1[0];
      e1[2] = 22'(yprev) + y1_in + y2_in + cs_err;  e2[2] = e1[2];
      @(posedge clk);
      #1;
      for (int v = 0; v < 3; v++) begin
        checks++;
        if (y_out[v] != y_in + 20'(w_in) * 20'(x_in) + y_err ||
            y1_out[v] != e1[v] || y2_out[v] != e2[v] ||
            w_out[v] != w_in || x_out[v] != x_in) begin
          failures++;
          $display("FAIL t=%0d variant %0d y1=%0d/%0d y2=%0d/%0d", t, v, y1_out[v], e1[v], y2_out[v], e2[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
