// tb_x_multiples: checks the carry-free multiples 1X..5X.
// For random and directed multiplicands every digit of every multiple must
// lie in [-6,6] (top digit in [0,5]), a zero digit must have sign 0, and the
// signed digits must add up to k*X, computed here in binary.
module tb_x_multiples;
  import dm_pkg::*;

  localparam int unsigned N = 16;
  int checks = 0, failures = 0;
  logic [4*N-1:0] x;
  smsd_t mult [5][N+1];

  x_multiples #(.N(N)) dut (.x(x), .mult(mult));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what, input int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s k=%0d x=%h", what, k, x);
    end
  endtask

  task automatic verify();
    longint xv, mv;
    #1;
    xv = 0;
    for (int i = N - 1; i >= 0; i--) xv = xv * 10 + longint'(x[4*i +: 4]);
    for (int k = 1; k <= 5; k++) begin
      bit ok;
      mv = 0;
      ok = 1;
      for (int i = N; i >= 0; i--) begin
        int d;
        d = mult[k-1][i].s ? -int'(mult[k-1][i].m) : int'(mult[k-1][i].m);
        if (d < -6 || d > 6) ok = 0;
        if (mult[k-1][i].s && mult[k-1][i].m == 0) ok = 0;
        mv = mv * 10 + longint'(d);
      end
      check(ok, "digit range", k);
      check(!mult[k-1][N].s && mult[k-1][N].m <= 5, "top digit", k);
      check(mv == longint'(k) * xv, "value", k);
    end
  endtask

  initial begin
    x = '0; verify();
    x = {N{4'h9}}; verify();
    for (int a = 0; a < 10; a++)
      for (int b = 0; b < 10; b++) begin
        for (int i = 0; i < N; i++) x[4*i +: 4] = (i % 2) ? 4'(a) : 4'(b);
        verify();
      end
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) x[4*i +: 4] = 4'($urandom_range(9));
      verify();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
