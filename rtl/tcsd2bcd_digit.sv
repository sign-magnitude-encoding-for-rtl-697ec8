// tcsd2bcd_digit: one slice of the TCSD + TCSD -> BCD converter.
//
// Replaces a last reduction level plus a redundant-to-BCD conversion by one
// step. Two [-7,7] digits P, Q and a signed carry-in give
//   W = P + Q + C_in - 10*C_out  in [-9,7],
// where the carry-out comes from the upper bits only: 4U = 4(-2p3 + p2)
// + 4(-2q3 + q2) is split as 2Z + 10*C_out with Z in [-4,0] (C_out = +1 when
// both digits are non-negative and p2|q2 is set, -1 when both are negative
// and not p2&q2), and V' = p0 + q0 + 2(p1 + q1) in [0,6]. Then
// W = 2Z + V' + C_in, a 5-bit two's complement value with sign w4.
// For the borrow network the slice gives gamma = (W < 0) (generates a
// borrow) and pi = (W == 0) (passes a borrow on). The two BCD candidates
// are T = W mod 10 (W, or W + 10 when negative) and T - 1 mod 10; the
// borrow into the position selects one of them.
// The carry and V' follow the published preprocessing; Z and W are
// written from their arithmetic definition.
//
// Interface: p, q TCSD; cin/cout posibit-negabit pairs; prop = pi,
// gen = gamma; t0/t1 = BCD digit for borrow-in 0/1. Timing: combinational.
module tcsd2bcd_digit
  import dm_pkg::*;
(
  input  tcsd_t      p,
  input  tcsd_t      q,
  input  scar_t      cin,
  output scar_t      cout,
  output logic       prop,
  output logic       gen,
  output logic [3:0] t0,
  output logic [3:0] t1
);

  logic cpos, cneg;
  assign cpos = ~p[3] & ~q[3] & (p[2] | q[2]);
  assign cneg = p[3] & q[3] & ~(p[2] & q[2]);
  assign cout = '{pos: cpos, neg: ~cneg};

  always_comb begin
    logic signed [5:0] u4, z2, vv, w;
    u4 = 6'sd4 * ((p[3] ? -6'sd2 : 6'sd0) + 6'(p[2]) + (q[3] ? -6'sd2 : 6'sd0) + 6'(q[2]));
    z2 = u4 - (cpos ? 6'sd10 : 6'sd0) + (cneg ? 6'sd10 : 6'sd0);
    vv = 6'(p[0]) + 6'(q[0]) + 6'sd2 * (6'(p[1]) + 6'(q[1]));
    w  = z2 + vv + 6'(cin.pos) + 6'(cin.neg) - 6'sd1;
    gen  = w[5];
    prop = (w == 6'sd0);
    t0   = gen ? 4'(w + 6'sd10) : w[3:0];
    t1   = (t0 == 4'd0) ? 4'd9 : t0 - 4'd1;
  end

endmodule
