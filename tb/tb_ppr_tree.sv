// tb_ppr_tree: checks the reduction of 16 SMSD rows to two TCSD rows.
// Random rows with digits in [-6,6] (row r at positions r..r+16, row 0 over
// all 32 positions, as the multiplier builds them) and all-extreme rows are
// applied. The value of acc0 + acc1 must equal the value of the input rows
// modulo 10^32 (computed here in 128-bit arithmetic); every output digit
// must be in [-7,7]; acc1 must be zero below position 8; and the early
// digits must be final: acc0[0] is the two's complement of row 0's digit 0.
module tb_ppr_tree;
  import dm_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned W = 2 * N;
  int checks = 0, failures = 0;
  smsd_t rows [N][W];
  tcsd_t acc0 [W];
  tcsd_t acc1 [W];

  ppr_tree #(.N(N)) dut (.rows(rows), .acc0(acc0), .acc1(acc1));

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
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic signed [131:0] modw(input logic signed [131:0] v);
    logic signed [131:0] m;
    m = 132'sd1;
    for (int i = 0; i < W; i++) m = m * 10;
    v = v % m;
    if (v < 0) v = v + m;
    return v;
  endfunction

  task automatic verify();
    logic signed [131:0] vin, vout;
    bit ok;
    #1;
    vin = 0;
    vout = 0;
    ok = 1;
    for (int j = W - 1; j >= 0; j--) begin
      int col;
      col = 0;
      for (int r = 0; r < N; r++) col += rows[r][j].s ? -int'(rows[r][j].m) : int'(rows[r][j].m);
      vin = vin * 10 + 132'(col);
      vout = vout * 10 + 132'(int'(signed'(acc0[j])) + int'(signed'(acc1[j])));
      if (acc0[j] == 4'b1000 || acc1[j] == 4'b1000) ok = 0;
      if (j < N / 2 && acc1[j] != 4'd0) ok = 0;
    end
    check(ok, "digit range / acc1 zero below 8");
    check(modw(vin) == modw(vout), "value");
    check(int'(signed'(acc0[0])) == (rows[0][0].s ? -int'(rows[0][0].m) : int'(rows[0][0].m)),
          "position 0 passes through");
  endtask

  task automatic fill(input int mode);
    for (int r = 0; r < N; r++)
      for (int j = 0; j < W; j++) begin
        rows[r][j] = '0;
        if (j >= r && (r == 0 || j <= r + N)) begin
          case (mode)
            0: rows[r][j] = '{s: 1'($urandom_range(1)), m: 3'($urandom_range(6))};
            1: rows[r][j] = '{s: 1'b0, m: 3'd6};
            2: rows[r][j] = '{s: 1'b1, m: 3'd6};
            default: rows[r][j] = '{s: 1'($urandom_range(1)), m: 3'($urandom_range(6, 4))};
          endcase
        end
      end
  endtask

  initial begin
    fill(1); verify();
    fill(2); verify();
    for (int t = 0; t < 1000; t++) begin
      fill((t % 2 == 0) ? 0 : 3);
      verify();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
