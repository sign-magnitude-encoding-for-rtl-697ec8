// x_multiples: carry-free multiples 1X..5X of the BCD multiplicand, each as
// N+1 sign-magnitude signed digits in [-6,6].
//
// For a multiple k and every position i, k*X_i = 10*H_i + L_i is split into a
// low part L_i in [0,9] and a high part H_i in [0,4]. When L_i >= 4 the pair
// is recoded to L'_i = L_i - 10, H'_i = H_i + 1, so L'_i lies in [-6,3]. The
// output digit is T_i = L'_i + H'_{i-1}, which depends only on X_i and
// X_{i-1}: no carry travels further than one digit, so the hard multiple 3X
// costs no more delay than 2X or 4X. The extra top digit is H'_{N-1}
// (at most 5, reached only by 5X).
//
// The per-digit logic is written from this recoding rule; a synthesis tool
// flattens it to the eight-input functions of (X_i, X_{i-1}).
//
// Interface: x is N packed BCD digits; mult[k-1][i] is digit i of k*X.
// Timing: purely combinational.
module x_multiples
  import dm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] x,
  output smsd_t          mult [5][N+1]
);

  // Recoded parts of k*d for k = 1..5, d = 0..9, built at elaboration:
  // L' = (k*d mod 10) - 10*[k*d mod 10 >= 4] in [-6,3],
  // H' = floor(k*d / 10) + [k*d mod 10 >= 4] in [0,5].
  typedef logic [5:1][9:0][4:0] part_tab_t;

  function automatic part_tab_t make_tab(input bit high);
    part_tab_t t;
    t = '0;
    for (int k = 1; k <= 5; k++) begin
      for (int d = 0; d < 10; d++) begin
        int r;
        r = (k * d) % 10;
        if (high) t[k][d] = 5'((k * d) / 10 + ((r >= 4) ? 1 : 0));
        else      t[k][d] = 5'((r >= 4) ? r - 10 : r);
      end
    end
    return t;
  endfunction

  localparam part_tab_t LOW_TAB  = make_tab(1'b0);
  localparam part_tab_t HIGH_TAB = make_tab(1'b1);

  always_comb begin
    for (int k = 1; k <= 5; k++) begin
      for (int i = 0; i <= N; i++) begin
        logic signed [4:0] t;
        t = '0;
        if (i < N) t = t + signed'(LOW_TAB[k][x[4*i +: 4]]);
        if (i > 0) t = t + signed'(HIGH_TAB[k][x[4*(i-1) +: 4]]);
        mult[k-1][i].s = t[4];
        mult[k-1][i].m = t[4] ? 3'(-t) : t[2:0];
      end
    end
  end

endmodule
