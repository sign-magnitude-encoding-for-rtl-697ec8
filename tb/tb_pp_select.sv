// tb_pp_select: checks multiple selection and dynamic negation.
// Random SMSD multiples are applied with every recoded digit -5..5; each
// output digit must equal the chosen multiple's digit times the recoded
// digit's sign (magnitude 0 when the digit is 0).
module tb_pp_select;
  import dm_pkg::*;

  localparam int unsigned N = 16;
  int checks = 0, failures = 0;
  yrec_t yd;
  smsd_t mult [5][N+1];
  smsd_t pp [N+1];

  pp_select #(.N(N)) dut (.yd(yd), .mult(mult), .pp(pp));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 5; k++)
        for (int i = 0; i <= N; i++) begin
          mult[k][i].m = 3'($urandom_range(6));
          mult[k][i].s = 1'($urandom_range(1));
        end
      for (int v = -5; v <= 5; v++) begin
        int mag;
        mag = (v < 0) ? -v : v;
        yd.s = (v < 0);
        yd.oh = '0;
        if (mag != 0) yd.oh[mag] = 1'b1;
        #1;
        for (int i = 0; i <= N; i++) begin
          int got, e;
          got = pp[i].s ? -int'(pp[i].m) : int'(pp[i].m);
          e = 0;
          if (mag != 0) e = v / mag * (mult[mag-1][i].s ? -int'(mult[mag-1][i].m) : int'(mult[mag-1][i].m));
          checks++;
          if (got != e) begin
            failures++;
            if (failures < 10) $display("FAIL v=%0d i=%0d got=%0d exp=%0d", v, i, got, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
