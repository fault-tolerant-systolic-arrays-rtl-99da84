// tb_bin_pe: random stimulus on a binary PE with two X stages; checks
// Yout = Yin + Win*Xin + error one cycle later, Wout one cycle later and Xout
// two cycles later, against a model kept in the testbench.
module tb_bin_pe;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0]  x_in, w_in, x_out, w_out;
  logic [19:0] y_in, y_err, y_out;

  bin_pe #(.DW(8), .YW(20), .XREG(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  xh [2];
    logic [7:0]  wh;
    logic [19:0] yh;
    x_in = 0; w_in = 0; y_in = 0; y_err = 0;
    xh = '{default: 0}; wh = 0; yh = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      x_in  = 8'($urandom);
      w_in  = 8'($urandom);
      y_in  = 20'($urandom_range(0, 500000));
      y_err = (t % 7 == 3) ? 20'(1) << $urandom_range(0, 18) : '0;
      @(posedge clk);
      #1;
      yh    = y_in + 20'(w_in) * 20'(x_in) + y_err;
      wh    = w_in;
      xh[1] = xh[0];
      xh[0] = x_in;
      checks++;
      if (y_out !== yh || w_out !== wh || x_out !== xh[1]) begin
        failures++;
        $display("FAIL t=%0d y=%0d/%0d w=%0d/%0d x=%0d/%0d", t, y_out, yh, w_out, wh, x_out, xh[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
