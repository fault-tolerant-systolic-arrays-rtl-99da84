// tb_res_loc_pe: residue check-sum PEs (base 19) in the three variants on
// random residues; Y' and Y'' are compared with the modulo-19 model.
module tb_res_loc_pe;
  import ft_pkg::*;
  localparam int M = 19;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] x_in, w_in, y_in, y1_in, y2_in;
  logic [2:0][4:0] x_out, w_out, y_out, y1_out, y2_out;

  res_loc_pe #(.M(M), .VARIANT(CHK_A)) ua (.clk, .rst_n, .x_in, .w_in, .y_in, .y1_in, .y2_in,
    .x_out(x_out[0]), .w_out(w_out[0]), .y_out(y_out[0]), .y1_out(y1_out[0]), .y2_out(y2_out[0]));
  res_loc_pe #(.M(M), .VARIANT(CHK_B)) ub (.clk, .rst_n, .x_in, .w_in, .y_in, .y1_in, .y2_in,
    .x_out(x_out[1]), .w_out(w_out[1]), .y_out(y_out[1]), .y1_out(y1_out[1]), .y2_out(y2_out[1]));
  res_loc_pe #(.M(M), .VARIANT(CHK_C)) uc (.clk, .rst_n, .x_in, .w_in, .y_in, .y1_in, .y2_in,
    .x_out(x_out[2]), .w_out(w_out[2]), .y_out(y_out[2]), .y1_out(y1_out[2]), .y2_out(y2_out[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int yprev;
    int e1 [3], e2 [3];
    x_in = 0; w_in = 0; y_in = 0; y1_in = 0; y2_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      yprev = int'(y_out[0]);
      x_in  = 5'($urandom_range(0, M - 1));
      w_in  = 5'($urandom_range(0, M - 1));
      y_in  = 5'($urandom_range(0, M - 1));
      y1_in = 5'($urandom_range(0, M - 1));
      y2_in = 5'($urandom_range(0, M - 1));
      e1[0] = (int'(y1_in) + yprev) % M;  e2[0] = 0;
      e1[1] = e1[0];                       e2[1] = (e1[0] + int'(y2_in)) % M;
      e1[2] = (yprev + int'(y1_in) + int'(y2_in)) % M;  e2[2] = e1[2];
      @(posedge clk);
      #1;
      for (int v = 0; v < 3; v++) begin
        checks++;
        if (int'(y_out[v]) != (int'(y_in) + int'(w_in) * int'(x_in)) % M ||
            int'(y1_out[v]) != e1[v] || int'(y2_out[v]) != e2[v]) begin
          failures++;
          $display("FAIL t=%0d variant %0d y1=%0d/%0d y2=%0d/%0d", t, v, y1_out[v], e1[v], y2_out[v], e2[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
