// tb_smsd_add_digit: exhaustive check of the 4-in-1 SMSD adder slice.
// Every sign/magnitude pair with magnitudes 0..6 and every carry-in in
// {-1,0,1} is applied; the test checks P + Q + C_in = S + 10*C_out, that S is
// a two's complement digit in [-7,7], that C_out ignores C_in, and the exact
// carry-out rule of the four sign cases.
module tb_smsd_add_digit;
  import dm_pkg::*;

  int checks = 0, failures = 0;
  smsd_t p, q;
  scar_t cin, cout;
  tcsd_t s;

  smsd_add_digit dut (.p(p), .q(q), .cin(cin), .s(s), .cout(cout));

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
      if (failures < 10) $display("FAIL %s p=%b q=%b cin=%b s=%b cout=%b", what, p, q, cin, s, cout);
    end
  endtask

  initial begin
    for (int sp = 0; sp < 2; sp++)
      for (int pm = 0; pm <= 6; pm++)
        for (int sq = 0; sq < 2; sq++)
          for (int qm = 0; qm <= 6; qm++) begin
            int pv, qv, first_c;
            pv = sp ? -pm : pm;
            qv = sq ? -qm : qm;
            first_c = 99;
            for (int c = -1; c <= 1; c++) begin
              int sv, cv, exp_c;
              p = '{s: 1'(sp), m: 3'(pm)};
              q = '{s: 1'(sq), m: 3'(qm)};
              cin = '{pos: (c == 1), neg: (c != -1)};
              #1;
              sv = int'(signed'(s));
              cv = int'(cout.pos) + int'(cout.neg) - 1;
              check(sv >= -7 && sv <= 7, "range");
              check(pv + qv + c == sv + 10 * cv, "sum");
              // carry rule of the sign cases
              exp_c = (sp == 0 && sq == 0 && (pm >= 4 || qm >= 4)) ? 1 :
                      (sp == 1 && sq == 1 && (pm >= 4 || qm >= 4)) ? -1 : 0;
              check(cv == exp_c, "carry rule");
              if (first_c == 99) first_c = cv;
              check(cv == first_c, "carry independent of cin");
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
