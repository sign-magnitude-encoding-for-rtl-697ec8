// tb_depth_reduce: exhaustive check of the deepest-column merge.
// For all X_{N-1}, Y_0, X_0, X_1 and both values of the recoding carry:
//   S lies in [-6,6] and S' in [-6,6];
//   S + 10*S' equals H + c*(X_0 + 10*L'(X_1)), where H is the top digit of
//   Y'_0 * X worked out here from the definition of the multiples
//   (H = floor(m/10) + [m mod 10 >= 4], m = |Y'_0| * X_{N-1}) and
//   L'(X_1) is X_1, or X_1 - 10 when X_1 >= 4.
module tb_depth_reduce;
  import dm_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] x_top, y0, x0, x1;
  logic ycarry;
  smsd_t s_dig, s1_dig;

  depth_reduce dut (.x_top(x_top), .y0(y0), .x0(x0), .x1(x1), .ycarry(ycarry),
                    .s_dig(s_dig), .s1_dig(s1_dig));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xt = 0; xt < 10; xt++)
      for (int yv = 0; yv < 10; yv++)
        for (int a = 0; a < 10; a++)
          for (int b = 0; b < 10; b++)
            for (int c = 0; c < 2; c++) begin
              int yr, m, h, s, s1, lp, e;
              x_top = 4'(xt); y0 = 4'(yv); x0 = 4'(a); x1 = 4'(b); ycarry = 1'(c);
              #1;
              yr = (yv >= 5) ? yv - 10 : yv;
              m = ((yr < 0) ? -yr : yr) * xt;
              h = m / 10 + ((m % 10 >= 4) ? 1 : 0);
              if (yr < 0) h = -h;
              lp = (b >= 4) ? b - 10 : b;
              e = h + c * (a + 10 * lp);
              s  = s_dig.s ? -int'(s_dig.m) : int'(s_dig.m);
              s1 = s1_dig.s ? -int'(s1_dig.m) : int'(s1_dig.m);
              checks++;
              if (s < -6 || s > 6 || s1 < -6 || s1 > 6 || s + 10 * s1 != e ||
                  (c == 0 && s1 != 0)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL xt=%0d y0=%0d x0=%0d x1=%0d c=%0d S=%0d S'=%0d exp=%0d",
                           xt, yv, a, b, c, s, s1, e);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
