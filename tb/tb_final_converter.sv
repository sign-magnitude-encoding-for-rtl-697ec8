// tb_final_converter: two random TCSD rows (digits in [-7,7], the second
// zero below position 8, as the reduction tree delivers them) are
// converted; the BCD result must equal the rows' value modulo 10^32,
// computed here in 128-bit arithmetic. Directed rows force long borrow
// chains through the low, middle and top parts and both values of b_23.
module tb_final_converter;
  import dm_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned W = 2 * N;
  int checks = 0, failures = 0;
  int n_b23 [2] = '{0, 0};
  tcsd_t acc0 [W];
  tcsd_t acc1 [W];
  logic [8*N-1:0] prod;

  final_converter #(.N(N)) dut (.acc0(acc0), .acc1(acc1), .prod(prod));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic verify();
    logic signed [131:0] v, m, got;
    #1;
    v = 0;
    m = 1;
    for (int j = W - 1; j >= 0; j--) begin
      v = v * 10 + 132'(int'(signed'(acc0[j])) + int'(signed'(acc1[j])));
      m = m * 10;
    end
    v = v % m;
    if (v < 0) v = v + m;
    got = 0;
    for (int j = W - 1; j >= 0; j--) got = got * 10 + 132'(prod[4*j +: 4]);
    checks++;
    if (got != v) begin
      failures++;
      if (failures < 10) $display("FAIL got=%0d exp=%0d", got, v);
    end
    for (int j = 0; j < W; j++) begin
      checks++;
      if (prod[4*j +: 4] > 9) failures++;
    end
  endtask

  initial begin
    // long borrow chain: -1 at the bottom, zeros above
    foreach (acc0[j]) begin acc0[j] = '0; acc1[j] = '0; end
    acc0[0] = 4'(-1);
    verify();
    foreach (acc0[j]) begin acc0[j] = 4'(-7); acc1[j] = (j >= 8) ? 4'(-7) : '0; end
    verify();
    foreach (acc0[j]) begin acc0[j] = 4'd7; acc1[j] = (j >= 8) ? 4'd7 : '0; end
    verify();
    for (int t = 0; t < 5000; t++) begin
      foreach (acc0[j]) begin
        acc0[j] = 4'($urandom_range(14) - 7);
        acc1[j] = (j >= 8) ? 4'($urandom_range(14) - 7) : '0;
        if (t % 2 == 1 && $urandom_range(3) != 0) begin
          // mostly cancelling columns: long propagate runs
          acc1[j] = (j >= 8) ? -acc0[j] : '0;
        end
      end
      verify();
      n_b23[dut.b23]++;
    end
    checks++;
    if (n_b23[0] == 0 || n_b23[1] == 0) begin
      failures++;
      $display("FAIL b23 selection not exercised both ways");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
