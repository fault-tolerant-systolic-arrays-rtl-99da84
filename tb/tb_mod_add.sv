// tb_mod_add: exhaustive check of the modulo adder for bases 5, 11, 19 and 31.
module tb_mod_add;
  int checks = 0, failures = 0;
  logic [4:0] a, b, s5, s11, s19, s31;

  mod_add #(.M(5),  .RW(5)) u5  (.a, .b, .s(s5));
  mod_add #(.M(11), .RW(5)) u11 (.a, .b, .s(s11));
  mod_add #(.M(19), .RW(5)) u19 (.a, .b, .s(s19));
  mod_add #(.M(31), .RW(5)) u31 (.a, .b, .s(s31));

  function automatic logic [4:0] pick(int m);
    case (m)
      5:  return s5;
      11: return s11;
      19: return s19;
      default: return s31;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ms [4] = '{5, 11, 19, 31};
    foreach (ms[j]) begin
      for (int i = 0; i < ms[j]; i++) begin
        for (int k = 0; k < ms[j]; k++) begin
          a = 5'(i); b = 5'(k);
          #1;
          checks++;
          if (pick(ms[j]) != 5'((i + k) % ms[j])) begin
            failures++;
            $display("FAIL M=%0d %0d+%0d got %0d", ms[j], i, k, pick(ms[j]));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
