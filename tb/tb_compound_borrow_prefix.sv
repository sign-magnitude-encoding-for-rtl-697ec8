// tb_compound_borrow_prefix: random and directed (pi, gamma) vectors over 8
// positions; both borrow vectors are checked against ripple chains started
// with an incoming borrow of 0 and of 1.
module tb_compound_borrow_prefix;
  localparam int unsigned M = 8;
  int checks = 0, failures = 0;
  logic [M-1:0] prop, gen;
  logic [M:0] b_if0, b_if1;

  compound_borrow_prefix #(.M(M)) dut (.prop(prop), .gen(gen), .b_if0(b_if0), .b_if1(b_if1));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic verify();
    logic [M:0] e0, e1;
    #1;
    e0[0] = 1'b0;
    e1[0] = 1'b1;
    for (int i = 0; i < M; i++) begin
      e0[i+1] = gen[i] | (prop[i] & e0[i]);
      e1[i+1] = gen[i] | (prop[i] & e1[i]);
    end
    checks += 2;
    if (b_if0 !== e0) failures++;
    if (b_if1 !== e1) failures++;
    if (failures != 0 && failures < 10 && (b_if0 !== e0 || b_if1 !== e1))
      $display("FAIL p=%b g=%b b0=%b/%b b1=%b/%b", prop, gen, b_if0, e0, b_if1, e1);
  endtask

  initial begin
    prop = '1; gen = '0; verify();
    for (int t = 0; t < 3000; t++) begin
      logic [M-1:0] r;
      r = M'($urandom);
      prop = r;
      gen = M'($urandom) & ~r;
      if (t % 3 == 0) prop = ~gen;
      verify();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
