// tb_ft_linear: end-to-end test of the fault-tolerant linear array at its
// default size (4 PEs, bases 5, 11, 19, consecutive-error correction).
//
// The array runs as an FIR filter with random weights and samples. The
// testbench keeps its own FIR model and its own record of the injected
// errors, and checks every cycle that
//   - y_raw equals the model plus the injected errors that have reached the
//     edge, and y_out equals the model (the error is corrected);
//   - the multiplexer selection is alpha0 / alpha1 / alpha2 as the number of
//     visible errors demands;
//   - pe_fault / pe_first point at the faulty element.
// Phases: fault-free; one permanent fault that the data masks now and then;
// a second fault in another element (same sign); host clear; fault-free.
// The run fails if any of these mechanisms never occurs.
module tb_ft_linear;
  import ft_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;
  int n_a0 = 0, n_a1 = 0, n_a2 = 0, n_loc = 0, n_clear = 0, n_masked = 0;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [7:0]          x_in;
  logic [N-1:0][7:0]   w_in;
  logic [N-1:0][19:0]  y_err;
  logic [19:0]         y_out, y_raw;
  sel_e                sel;
  logic                detected, uncorrectable, stored;
  logic [N-1:0]        pe_fault, pe_first;

  ft_linear dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int T = 1200;
  int xs [T];
  int es [T][N];   // error injected into PE p, sampled at edge t

  function automatic int xat(int t);
    return (t < 0) ? 0 : xs[t];
  endfunction
  function automatic int eat(int t, int p);
    return (t < 0) ? 0 : es[t][p];
  endfunction

  initial begin
    int p1, p2, b1, b2;
    x_in = 0; w_in = '0; y_err = '0;
    for (int p = 0; p < N; p++) w_in[p] = 8'($urandom);
    p1 = $urandom_range(0, N - 1);
    do p2 = $urandom_range(0, N - 1); while (p2 == p1);
    b1 = $urandom_range(0, 17);
    do b2 = $urandom_range(0, 17); while (b2 == b1);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      int ref_y, err_out, e_first;
      logic [N-1:0] exp_fault, exp_first;
      sel_e exp_sel;
      // ---- drive for edge t ----
      xs[t] = $urandom_range(0, 255);
      for (int p = 0; p < N; p++) es[t][p] = 0;
      if (t >= 300 && t < 1000 && $urandom_range(0, 3) != 0) es[t][p1] = 1 << b1;
      if (t >= 600 && t < 1000 && $urandom_range(0, 3) != 0) es[t][p2] = 1 << b2;
      x_in = 8'(xs[t]);
      for (int p = 0; p < N; p++) y_err[p] = 20'(es[t][p]);
      clear = (t == 1050);
      @(posedge clk);
      #1;
      // ---- model after edge t ----
      ref_y = 0;
      for (int p = 0; p < N; p++) ref_y += int'(w_in[p]) * xat(t - N - p);
      err_out = 0;
      for (int p = 0; p < N; p++) err_out += eat(t - N + p, p);
      if (err_out == 0) exp_sel = SEL_BIN;
      else if (err_out == (1 << b1) || err_out == (1 << b2)) exp_sel = SEL_C1;
      else exp_sel = SEL_C2;
      // error present in the result register of PE p after edge t
      exp_fault = '0;
      for (int p = 0; p < N; p++) begin
        int e;
        e = 0;
        for (int q = 0; q <= p; q++) e += eat(t - (p - q), q);
        exp_fault[p] = (e != 0);
      end
      exp_first = exp_fault & ~(exp_fault - 1'b1);
      checks++;
      if (y_raw != 20'(ref_y + err_out) || y_out != 20'(ref_y) || sel != exp_sel ||
          pe_fault != exp_fault || pe_first != exp_first || uncorrectable) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d raw=%0d out=%0d ref=%0d err=%0d sel=%0d/%0d flt=%b/%b",
                   t, y_raw, y_out, ref_y, err_out, sel, exp_sel, pe_fault, exp_fault);
      end
      if (sel == SEL_BIN) n_a0++;
      if (sel == SEL_C1)  n_a1++;
      if (sel == SEL_C2)  n_a2++;
      if (t >= 300 && t < 600 && es[t][p1] == 0) n_masked++;
      if (pe_first != 0) n_loc++;
      if (t == 1052) begin
        checks++;
        if (stored) begin failures++; $display("FAIL clear"); end
        else n_clear++;
      end
    end
    $display("alpha0=%0d alpha1=%0d alpha2=%0d localized=%0d masked=%0d clear=%0d",
             n_a0, n_a1, n_a2, n_loc, n_masked, n_clear);
    if (n_a0 == 0 || n_a1 == 0 || n_a2 == 0 || n_loc == 0 || n_masked == 0 || n_clear == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
