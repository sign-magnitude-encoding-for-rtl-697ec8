// tb_tcsd_add_digit: exhaustive check of the TCSD adder slice over all
// P, Q in [-7,7] and C_in in {-1,0,1}: P + Q + C_in = S + 10*C_out, S in
// [-7,7], C_out independent of C_in, and C_out = sign-of-transfer rule.
module tb_tcsd_add_digit;
  import dm_pkg::*;

  int checks = 0, failures = 0;
  tcsd_t p, q, s;
  scar_t cin, cout;

  tcsd_add_digit dut (.p(p), .q(q), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s p=%0d q=%0d cin=%b s=%0d cout=%b", what,
                                  signed'(p), signed'(q), cin, signed'(s), cout);
    end
  endtask

  initial begin
    for (int pv = -7; pv <= 7; pv++)
      for (int qv = -7; qv <= 7; qv++) begin
        int first_c;
        first_c = 99;
        for (int c = -1; c <= 1; c++) begin
          int sv, cv;
          p = 4'(pv);
          q = 4'(qv);
          cin = '{pos: (c == 1), neg: (c != -1)};
          #1;
          sv = int'(signed'(s));
          cv = int'(cout.pos) + int'(cout.neg) - 1;
          check(sv >= -7 && sv <= 7, "range");
          check(pv + qv + c == sv + 10 * cv, "sum");
          check(cv >= -1 && cv <= 1 && !(cout.pos && !cout.neg), "carry encoding");
          if (first_c == 99) first_c = cv;
          check(cv == first_c, "carry independent of cin");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
