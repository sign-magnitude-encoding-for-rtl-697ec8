// ks_borrow_prefix: Kogge-Stone decimal borrow network.
//
// Each position i supplies a borrow generate gamma_i (its digit sum is
// negative) and propagate pi_i (its digit sum is zero); the borrow into
// position i+1 is gamma_i | pi_i & b_i. The borrow-in is placed in front as
// an extra element (generate = bin, propagate = 0), and a Kogge-Stone tree
// of ceil(log2(M+1)) levels forms every prefix at once: with M = 15 the 16
// elements fill a 4-level tree.
//
// Interface: prop/gen per position (bit 0 lowest), bin borrow-in;
// b[i] = borrow into position i (b[0] = bin), b[M] = borrow out.
// Timing: combinational, log-depth.
module ks_borrow_prefix #(
  parameter int unsigned M = 15
) (
  input  logic [M-1:0] prop,
  input  logic [M-1:0] gen,
  input  logic         bin,
  output logic [M:0]   b
);

  localparam int unsigned LV = $clog2(M + 1);

  logic [M:0] g [LV+1];
  logic [M:0] pp [LV+1];

  assign g[0]  = {gen, bin};
  assign pp[0] = {prop, 1'b0};

  for (genvar l = 0; l < LV; l++) begin : g_level
    for (genvar i = 0; i <= M; i++) begin : g_node
      if (i >= (1 << l)) begin : g_black
        assign g[l+1][i]  = g[l][i] | (pp[l][i] & g[l][i-(1<<l)]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i-(1<<l)];
      end else begin : g_buf
        assign g[l+1][i]  = g[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  assign b = g[LV];

endmodule
