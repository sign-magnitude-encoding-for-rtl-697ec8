// tb_tcsd_to_bcd_low: random and extreme TCSD digit strings (8 digits in
// [-7,7]); the BCD output must be the string's value modulo 10^8 and the
// borrow out must be set exactly when the value is negative.
module tb_tcsd_to_bcd_low;
  import dm_pkg::*;

  localparam int unsigned K = 8;
  int checks = 0, failures = 0;
  tcsd_t d [K];
  logic [3:0] p [K];
  logic bout;

  tcsd_to_bcd_low #(.K(K)) dut (.d(d), .p(p), .bout(bout));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic verify();
    longint v, e, got;
    #1;
    v = 0;
    for (int i = K - 1; i >= 0; i--) v = v * 10 + longint'(signed'(d[i]));
    e = (v < 0) ? v + 100_000_000 : v;
    got = 0;
    for (int i = K - 1; i >= 0; i--) got = got * 10 + longint'(p[i]);
    checks++;
    if (got != e || bout != (v < 0)) begin
      failures++;
      if (failures < 10) $display("FAIL v=%0d got=%0d bout=%0d", v, got, bout);
    end
    for (int i = 0; i < K; i++) begin
      checks++;
      if (p[i] > 9) failures++;
    end
  endtask

  initial begin
    foreach (d[i]) d[i] = 4'(-7);
    verify();
    foreach (d[i]) d[i] = 4'd7;
    verify();
    foreach (d[i]) d[i] = 4'd0;
    d[K-1] = 4'(-1);
    verify();
    for (int t = 0; t < 5000; t++) begin
      foreach (d[i]) d[i] = 4'($urandom_range(14) - 7);
      verify();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
