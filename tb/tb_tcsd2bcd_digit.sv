// tb_tcsd2bcd_digit: exhaustive over P, Q in [-7,7] and C_in in {-1,0,1}.
// With W = P + Q + C_in - 10*C_out, the test checks W in [-9,7], C_out
// independent of C_in, gamma = (W < 0), pi = (W == 0), T = W mod 10 and
// T' = (W - 1) mod 10, W being recovered from the outputs independently.
module tb_tcsd2bcd_digit;
  import dm_pkg::*;

  int checks = 0, failures = 0;
  tcsd_t p, q;
  scar_t cin, cout;
  logic prop, gen;
  logic [3:0] t0, t1;

  tcsd2bcd_digit dut (.p(p), .q(q), .cin(cin), .cout(cout), .prop(prop), .gen(gen),
                      .t0(t0), .t1(t1));

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
      if (failures < 10) $display("FAIL %s p=%0d q=%0d cin=%b", what, signed'(p), signed'(q), cin);
    end
  endtask

  initial begin
    for (int pv = -7; pv <= 7; pv++)
      for (int qv = -7; qv <= 7; qv++) begin
        int first_c;
        first_c = 99;
        for (int c = -1; c <= 1; c++) begin
          int cv, w;
          p = 4'(pv);
          q = 4'(qv);
          cin = '{pos: (c == 1), neg: (c != -1)};
          #1;
          cv = int'(cout.pos) + int'(cout.neg) - 1;
          w = pv + qv + c - 10 * cv;
          check(w >= -9 && w <= 7, "W range");
          if (first_c == 99) first_c = cv;
          check(cv == first_c, "carry independent of cin");
          check(gen == (w < 0), "gamma");
          check(prop == (w == 0), "pi");
          check(int'(t0) == ((w + 10) % 10), "T");
          check(int'(t1) == ((w + 19) % 10), "T-1");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
