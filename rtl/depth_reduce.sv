// depth_reduce: on-the-fly merge of the two digits of the deepest column.
//
// The 10^N-weighted column of the partial product matrix holds two digits:
// the top digit H of Y'_0 * X (the multiple picked by the lowest recoded
// multiplier digit) and, when the multiplier recoding carries out
// (Y_{N-1} >= 5), the lowest digit of the extra row X * 10^N. This block
// computes the column sum in parallel with the ordinary partial product
// generation, so the reduction tree starts from N rows instead of N+1.
//
//  * H depends only on X_{N-1} and Y_0 (eight inputs). It is the recoded
//    high part of |Y'_0| * X_{N-1} with the sign of Y'_0 (Y'_0 = Y_0 or
//    Y_0 - 10, never +5), so H takes the ten values -5..4 and is produced
//    as ten one-hot lines.
//  * With the extra row present, its lowest digit X_0 is kept in BCD and
//    added, in parallel, to each of the ten constants -5..4; the one-hot H
//    picks the result. Each sum X_0 + h is reduced by 10 with a carry c = 1
//    when it reaches 7, so S lies in [-5,6].
//  * The next digit of the extra row is S' = L'(X_1) + c, where
//    L'(X_1) = X_1 - 10 when X_1 >= 4 (the low part of the 1X recoding,
//    with no transfer from X_0). Both values of S' are formed from X_1 and
//    c selects one; S' lies in [-6,4].
//  * Without the extra row, S = H and S' = 0.
// The structure (one-hot H, constant adders, recoded X_1) follows the
// published block; the carry threshold 7 is this design's choice.
//
// Interface: 4-bit BCD digits in, SMSD digits S (position N) and
// S' (position N+1) out. Timing: purely combinational.
module depth_reduce
  import dm_pkg::*;
(
  input  logic [3:0] x_top,
  input  logic [3:0] y0,
  input  logic [3:0] x0,
  input  logic [3:0] x1,
  input  logic       ycarry,
  output smsd_t      s_dig,
  output smsd_t      s1_dig
);

  function automatic smsd_t to_smsd(input int v);
    smsd_t r;
    r.s = (v < 0);
    r.m = 3'((v < 0) ? -v : v);
    return r;
  endfunction

  // One-hot H for every (Y_0, X_{N-1}); bit h+5 stands for H = h.
  typedef logic [9:0][9:0][9:0] hot_tab_t;

  function automatic hot_tab_t make_hot_tab();
    hot_tab_t t;
    t = '0;
    for (int y = 0; y < 10; y++)
      for (int xt = 0; xt < 10; xt++) begin
        int mag, prod, h;
        mag  = (y >= 5) ? 10 - y : y;
        prod = mag * xt;
        h    = prod / 10 + ((prod % 10 >= 4) ? 1 : 0);
        if (y >= 5) h = -h;
        t[y][xt][h+5] = 1'b1;
      end
    return t;
  endfunction

  // X_0 + h for each constant h = -5..4: {c, S} with S in SMSD.
  typedef logic [9:0][9:0][4:0] add_tab_t;

  function automatic add_tab_t make_add_tab();
    add_tab_t t;
    t = '0;
    for (int h = -5; h <= 4; h++)
      for (int x = 0; x < 10; x++) begin
        int sum;
        sum = x + h;
        if (sum >= 7) t[h+5][x] = {1'b1, to_smsd(sum - 10)};
        else          t[h+5][x] = {1'b0, to_smsd(sum)};
      end
    return t;
  endfunction

  localparam hot_tab_t HOT_TAB = make_hot_tab();
  localparam add_tab_t ADD_TAB = make_add_tab();

  logic [9:0] hot;
  smsd_t      s_plain, s_sum, s1_c0, s1_c1;
  logic       c;

  assign hot = (y0 <= 4'd9 && x_top <= 4'd9) ? HOT_TAB[y0][x_top] : '0;

  always_comb begin
    logic [4:0] acc;
    s_plain = '0;
    acc     = '0;
    for (int h = -5; h <= 4; h++) begin
      if (hot[h+5]) s_plain = s_plain | to_smsd(h);
      acc = acc | (ADD_TAB[h+5][(x0 <= 4'd9) ? x0 : 4'd0] & {5{hot[h+5]}});
    end
    {c, s_sum} = acc;
  end

  // S' candidates: L'(X_1) and L'(X_1) + 1.
  always_comb begin
    int l;
    l = (x1 >= 4'd4) ? int'(x1) - 10 : int'(x1);
    s1_c0 = to_smsd(l);
    s1_c1 = to_smsd(l + 1);
  end

  assign s_dig  = ycarry ? s_sum : s_plain;
  assign s1_dig = !ycarry ? '0 : (c ? s1_c1 : s1_c0);

endmodule
