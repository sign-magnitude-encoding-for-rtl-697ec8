// compound_borrow_prefix: borrows of the top positions for both values of
// the incoming borrow.
//
// The top digits are converted while the borrow into their lowest position
// (b_23 for a 16-digit multiplier) is still on its way. A Kogge-Stone tree
// of ceil(log2 M) levels forms the group generate Gamma and propagate Pi of
// every prefix of the M positions; the borrow into the position above the
// prefix is Gamma if the incoming borrow is 0 and Gamma | Pi if it is 1.
// The caller forms both BCD results and picks one with the real borrow.
//
// The first LV-1 levels are plain Kogge-Stone. The last level uses a
// compound ("diamond") node that gives both borrows at once:
//   t     = Pi_hi & Gamma_lo
//   b^0   = Gamma_hi | t
//   b^-1  = (Gamma_hi | (Pi_hi & Pi_lo)) | t
// Pi is one gate level ahead of Gamma, so the bracketed OR is ready when t
// is. b^-1 therefore costs one OR more than b^0 but no extra delay. A plain
// tree would add an OR after the last level. Prefixes that are already
// complete before the last level give b^-1 = Gamma | Pi directly.
//
// Interface: prop/gen of positions 0..M-1 (position 0 = the one that
// receives the unknown borrow); b_if0[i]/b_if1[i] = borrow into position i
// (i = 0..M) for an incoming borrow of 0/1. M must be at least 2.
// Timing: combinational, ceil(log2 M) prefix levels.
module compound_borrow_prefix #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] prop,
  input  logic [M-1:0] gen,
  output logic [M:0]   b_if0,
  output logic [M:0]   b_if1
);

  localparam int unsigned LV = $clog2(M);

  logic [M-1:0] g [LV];
  logic [M-1:0] pp [LV];

  assign g[0]  = gen;
  assign pp[0] = prop;

  for (genvar l = 0; l < LV - 1; l++) begin : g_level
    for (genvar i = 0; i < M; i++) begin : g_node
      if (i >= (1 << l)) begin : g_black
        assign g[l+1][i]  = g[l][i] | (pp[l][i] & g[l][i-(1<<l)]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i-(1<<l)];
      end else begin : g_buf
        assign g[l+1][i]  = g[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  // last level: diamond nodes
  localparam int unsigned H = 1 << (LV - 1);

  assign b_if0[0] = 1'b0;
  assign b_if1[0] = 1'b1;

  for (genvar i = 0; i < M; i++) begin : g_last
    if (i >= H) begin : g_diamond
      logic t;
      assign t          = pp[LV-1][i] & g[LV-1][i-H];
      assign b_if0[i+1] = g[LV-1][i] | t;
      assign b_if1[i+1] = (g[LV-1][i] | (pp[LV-1][i] & pp[LV-1][i-H])) | t;
    end else begin : g_done
      assign b_if0[i+1] = g[LV-1][i];
      assign b_if1[i+1] = g[LV-1][i] | pp[LV-1][i];
    end
  end

endmodule
