// dec_mult16: parallel N x N-digit BCD multiplier (N = 16) built on
// sign-magnitude signed digits.
//
// Dataflow (all combinational):
//  1. y_recoder turns the multiplier into N digits in [-5,5] (sign plus
//     one-hot magnitude) and a 10^N carry; x_multiples forms 1X..5X as
//     N+1 digits in [-6,6] sign-magnitude, carry-free.
//  2. N pp_select instances pick a multiple per recoded digit and apply
//     its sign with one XOR per digit.
//  3. The recoding carry would add row N+1 (c * X * 10^N). depth_reduce
//     merges its two lowest digits with the top digit of row 0 in the
//     10^N column; the rest of that row fills positions N+2..2N-1 of row 0,
//     which is otherwise empty there, so only N rows remain.
//  4. ppr_tree reduces the N rows to two TCSD rows (16 -> 8 -> 4 -> 2).
//  5. final_converter adds the two rows directly into the BCD product.
// Everything is computed modulo 10^(2N); the digit of the extra row at
// position 2N is dropped since the product is below 10^(2N).
//
// Interface: x, y BCD operands (digit i at [4i+3:4i]); p BCD product.
// Timing: purely combinational, no clock.
module dec_mult16
  import dm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] x,
  input  logic [4*N-1:0] y,
  output logic [8*N-1:0] p
);

  localparam int unsigned W = 2 * N;

  yrec_t yr [N];
  logic  ycarry;
  smsd_t mult [5][N+1];
  smsd_t pp [N][N+1];
  smsd_t s_dig, s1_dig;
  smsd_t rows [N][W];
  tcsd_t acc0 [W];
  tcsd_t acc1 [W];

  y_recoder #(.N(N)) u_yrec (.y(y), .yr(yr), .carry(ycarry));

  x_multiples #(.N(N)) u_xmul (.x(x), .mult(mult));

  for (genvar r = 0; r < N; r++) begin : g_pp
    pp_select #(.N(N)) u_sel (.yd(yr[r]), .mult(mult), .pp(pp[r]));
  end

  depth_reduce u_depth (
    .x_top(x[4*N-1 -: 4]), .y0(y[3:0]), .x0(x[3:0]), .x1(x[7:4]),
    .ycarry(ycarry), .s_dig(s_dig), .s1_dig(s1_dig)
  );

  // Matrix rows aligned to product positions.
  always_comb begin
    for (int r = 0; r < N; r++) begin
      for (int j = 0; j < W; j++) begin
        rows[r][j] = '0;
        if (j >= r && j <= r + N) rows[r][j] = pp[r][j-r];
      end
    end
    // Row 0: Y'_0 * X below position N, merged column N, then the extra row.
    rows[0][N]   = s_dig;
    rows[0][N+1] = s1_dig;
    for (int j = N + 2; j < W; j++) begin
      rows[0][j] = mult[0][j-N] & {4{ycarry}};
    end
  end

  ppr_tree #(.N(N)) u_ppr (.rows(rows), .acc0(acc0), .acc1(acc1));

  final_converter #(.N(N)) u_fin (.acc0(acc0), .acc1(acc1), .prod(p));

endmodule
