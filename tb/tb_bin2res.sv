// tb_bin2res: checks the binary-to-residue converter for the three default
// bases against the % operator, on corner values and 3000 random words.
module tb_bin2res;
  int checks = 0, failures = 0;
  logic [19:0] x;
  logic [4:0]  r5, r11, r19;

  bin2res #(.IW(20), .M(5),  .RW(5)) u5  (.x, .r(r5));
  bin2res #(.IW(20), .M(11), .RW(5)) u11 (.x, .r(r11));
  bin2res #(.IW(20), .M(19), .RW(5)) u19 (.x, .r(r19));

  task automatic check_one(logic [19:0] v);
    x = v;
    #1;
    checks++;
    if (r5 != 5'(v % 5) || r11 != 5'(v % 11) || r19 != 5'(v % 19)) begin
      failures++;
      $display("FAIL x=%0d got %0d %0d %0d", v, r5, r11, r19);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0);
    check_one('1);
    for (int i = 0; i < 20; i++) check_one(20'(1) << i);
    for (int i = 0; i < 3000; i++) check_one(20'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
