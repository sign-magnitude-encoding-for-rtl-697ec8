// tb_y_recoder: checks the multiplier recoding digit by digit.
// Every (Y_i, Y_{i-1}) pair of BCD digits is placed in a 16-digit
// multiplier, plus random multipliers; for every digit the expected value
// Y_i + [Y_{i-1} >= 5] - 10*[Y_i >= 5] is formed here and compared with
// the sign and one-hot magnitude produced (exactly one magnitude line for
// a non-zero digit, none for zero). The recoded digits and the carry must
// also rebuild the multiplier's value.
module tb_y_recoder;
  import dm_pkg::*;

  localparam int unsigned N = 16;
  int checks = 0, failures = 0;
  logic [4*N-1:0] y;
  yrec_t yr [N];
  logic carry;

  y_recoder #(.N(N)) dut (.y(y), .yr(yr), .carry(carry));

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
      if (failures < 10) $display("FAIL %s y=%h", what, y);
    end
  endtask

  task automatic verify();
    longint sum, ref_val;
    sum = 0;
    ref_val = 0;
    #1;
    for (int i = N - 1; i >= 0; i--) begin
      int yi, w, e, got, ones;
      yi = int'(y[4*i +: 4]);
      w  = (i > 0) ? int'(y[4*(i-1) +: 4] >= 5) : 0;
      e  = yi + w - ((yi >= 5) ? 10 : 0);
      ones = $countones(yr[i].oh);
      got = 0;
      for (int k = 1; k <= 5; k++) if (yr[i].oh[k]) got = k;
      if (yr[i].s) got = -got;
      check(ones == ((e != 0) ? 1 : 0), "one-hot");
      check(got == e, "digit value");
      check(!(e == 0 && yr[i].s), "zero has sign 0");
      sum = sum * 10 + longint'(got);
      ref_val = ref_val * 10 + longint'(yi);
    end
    check(carry == (y[4*N-4 +: 4] >= 5), "carry");
    check(sum + (carry ? 64'd10_000_000_000_000_000 : 0) == ref_val, "value");
  endtask

  initial begin
    for (int a = 0; a < 10; a++)
      for (int b = 0; b < 10; b++) begin
        y = '0;
        for (int i = 0; i < N; i += 2) begin
          y[4*i +: 4] = 4'(b);
          if (i + 1 < N) y[4*(i+1) +: 4] = 4'(a);
        end
        verify();
      end
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) y[4*i +: 4] = 4'($urandom_range(9));
      verify();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
