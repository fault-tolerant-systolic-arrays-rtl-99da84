// tb_res_pe: random residues into residue PEs for bases 5, 11 and 19; checks
// Yout = (Yin + Win*Xin) mod M one cycle later and Xout/Wout passing.
module tb_res_pe;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0][4:0] x_in, w_in, y_in, x_out, w_out, y_out;
  int ms [3] = '{5, 11, 19};

  res_pe #(.M(5),  .RW(5), .XREG(1)) u0 (.clk, .rst_n, .x_in(x_in[0]), .w_in(w_in[0]), .y_in(y_in[0]),
                                         .x_out(x_out[0]), .w_out(w_out[0]), .y_out(y_out[0]));
  res_pe #(.M(11), .RW(5), .XREG(1)) u1 (.clk, .rst_n, .x_in(x_in[1]), .w_in(w_in[1]), .y_in(y_in[1]),
                                         .x_out(x_out[1]), .w_out(w_out[1]), .y_out(y_out[1]));
  res_pe #(.M(19), .RW(5), .XREG(1)) u2 (.clk, .rst_n, .x_in(x_in[2]), .w_in(w_in[2]), .y_in(y_in[2]),
                                         .x_out(x_out[2]), .w_out(w_out[2]), .y_out(y_out[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_in = '0; w_in = '0; y_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        x_in[k] = 5'($urandom_range(0, ms[k] - 1));
        w_in[k] = 5'($urandom_range(0, ms[k] - 1));
        y_in[k] = 5'($urandom_range(0, ms[k] - 1));
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < 3; k++) begin
        int e;
        e = (int'(y_in[k]) + int'(w_in[k]) * int'(x_in[k])) % ms[k];
        checks++;
        if (int'(y_out[k]) != e || x_out[k] != x_in[k] || w_out[k] != w_in[k]) begin
          failures++;
          $display("FAIL M=%0d y=%0d exp %0d", ms[k], y_out[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
