// tb_dec_mult16: end-to-end test of the 16 x 16-digit BCD multiplier at its
// default size.
//
// Operands are random BCD numbers (plus directed corner cases: zeros, all
// nines, fives, digit patterns that force every recoding case). The
// expected product is computed independently: both operands are converted
// to binary, multiplied in 128-bit arithmetic and converted back to BCD.
// Besides the product, the test counts how often each mechanism of the
// design was exercised and fails if one never was:
//   - recoding carry present (Y_15 >= 5, depth reduction merges two digits)
//   - depth-reduction carry c into position 17
//   - negative recoded multiplier digits, and each multiple 1X..5X selected
//   - a borrow out of the low part (b_8 = 1)
//   - a borrow propagated through a zero digit in the KS part
//   - both selections of the compound top part (b_23 = 0 and 1)
module tb_dec_mult16;
  import dm_pkg::*;

  localparam int unsigned N = 16;

  int checks = 0, failures = 0;
  logic [4*N-1:0] x, y;
  logic [8*N-1:0] p;

  dec_mult16 dut (.x(x), .y(y), .p(p));

  int n_ycarry = 0, n_dcarry = 0, n_negdig = 0, n_b8 = 0, n_prop = 0;
  int n_b23_0 = 0, n_b23_1 = 0;
  int n_mult [1:5] = '{0, 0, 0, 0, 0};

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] bcd2bin(input logic [127:0] v, input int nd);
    logic [127:0] r;
    r = '0;
    for (int i = nd - 1; i >= 0; i--) r = r * 10 + 128'(v[4*i +: 4]);
    return r;
  endfunction

  function automatic logic [127:0] bin2bcd(input logic [127:0] v, input int nd);
    logic [127:0] r;
    r = '0;
    for (int i = 0; i < nd; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [4*N-1:0] rand_bcd(input int mode);
    logic [4*N-1:0] r;
    for (int i = 0; i < N; i++) begin
      case (mode)
        0: r[4*i +: 4] = 4'($urandom_range(9));
        1: r[4*i +: 4] = 4'($urandom_range(9, 5));
        2: r[4*i +: 4] = 4'($urandom_range(4));
        default: r[4*i +: 4] = ($urandom_range(1) != 0) ? 4'd9 : 4'd0;
      endcase
    end
    return r;
  endfunction

  task automatic apply(input logic [4*N-1:0] xa, input logic [4*N-1:0] ya);
    logic [127:0] exp_p;
    x = xa;
    y = ya;
    #1;
    exp_p = bin2bcd(bcd2bin(128'(xa), N) * bcd2bin(128'(ya), N), 2 * N);
    checks++;
    if (p !== exp_p[8*N-1:0]) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h p=%h exp=%h", x, y, p, exp_p);
    end
    // mechanism counters (observed inside the design)
    if (dut.ycarry) n_ycarry++;
    if (dut.u_depth.c) n_dcarry++;
    for (int r = 0; r < N; r++) begin
      if (dut.yr[r].s && dut.yr[r].oh != '0) n_negdig++;
      for (int k = 1; k <= 5; k++) if (dut.yr[r].oh[k]) n_mult[k]++;
    end
    if (dut.u_fin.b8) n_b8++;
    for (int j = 8; j < 23; j++)
      if (dut.u_fin.prop[j] && dut.u_fin.b_mid[j-8]) n_prop++;
    if (dut.u_fin.b23) n_b23_1++; else n_b23_0++;
  endtask

  task automatic mech(input string name, input int cnt);
    checks++;
    $display("mechanism %-28s %0d", name, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    // directed cases
    apply('0, '0);
    apply({N{4'h9}}, {N{4'h9}});
    apply({N{4'h9}}, {N{4'h5}});
    apply({N{4'h5}}, {N{4'h9}});
    apply(64'h1, {N{4'h9}});
    apply({N{4'h9}}, 64'h1);
    apply(64'h9999999999999999, 64'h5000000000000005);
    apply(64'h1234567890123456, 64'h9876543210987654);
    apply(64'h0000000000000001, 64'h0000000000000001);
    for (int i = 0; i < 20000; i++) apply(rand_bcd(i % 4), rand_bcd((i / 4) % 4));
    mech("recoding carry (17th row)", n_ycarry);
    mech("depth-reduction carry c", n_dcarry);
    mech("negative multiplier digit", n_negdig);
    mech("multiple 1X", n_mult[1]);
    mech("multiple 2X", n_mult[2]);
    mech("multiple 3X", n_mult[3]);
    mech("multiple 4X", n_mult[4]);
    mech("multiple 5X", n_mult[5]);
    mech("low-part borrow b8", n_b8);
    mech("borrow through zero digit", n_prop);
    mech("top part, b23 = 0", n_b23_0);
    mech("top part, b23 = 1", n_b23_1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
