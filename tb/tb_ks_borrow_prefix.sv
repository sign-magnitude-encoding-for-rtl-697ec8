// tb_ks_borrow_prefix: random and directed (pi, gamma) vectors with both
// borrow-in values, checked against a ripple borrow chain
// b_{i+1} = gamma_i | pi_i & b_i computed in the testbench.
module tb_ks_borrow_prefix;
  localparam int unsigned M = 15;
  int checks = 0, failures = 0;
  logic [M-1:0] prop, gen;
  logic bin;
  logic [M:0] b;

  ks_borrow_prefix #(.M(M)) dut (.prop(prop), .gen(gen), .bin(bin), .b(b));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic verify();
    logic [M:0] e;
    #1;
    e[0] = bin;
    for (int i = 0; i < M; i++) e[i+1] = gen[i] | (prop[i] & e[i]);
    checks++;
    if (b !== e) begin
      failures++;
      if (failures < 10) $display("FAIL p=%b g=%b bin=%b b=%b exp=%b", prop, gen, bin, b, e);
    end
  endtask

  initial begin
    prop = '1; gen = '0; bin = 1; verify();
    prop = '1; gen = '0; bin = 0; verify();
    for (int t = 0; t < 5000; t++) begin
      logic [M-1:0] r;
      r = M'($urandom);
      // pi and gamma are exclusive, as W == 0 and W < 0 are
      gen = M'($urandom) & ~r;
      prop = r;
      if (t % 3 == 0) prop = ~gen;      // long propagate runs
      bin = 1'($urandom_range(1));
      verify();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
