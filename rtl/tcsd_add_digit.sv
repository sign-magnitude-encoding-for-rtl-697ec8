// tcsd_add_digit: one digit slice of the carry-free [-7,7] TCSD adder.
//
// Adds two two's complement digits P, Q in [-7,7] and a signed carry-in;
// the result S in [-7,7] and C_out satisfy P + Q + C_in = S + 10*C_out,
// with C_out a function of P and Q only. The structure is that of the 4-in-1
// adder: a preprocessing stage, then the same 4-bit adder (dm_pkg::sd_sum4).
//   V' = p0 + q0 + 2*q1, held as V'+1 (three bits, the lowest a negabit),
//       using the published preprocessing equations for v0..v2.
//   U  = (-4p3 + 2p2 + p1) + (-4q3 + 2q2) in [-8,5], split as
//       U = Z + 5*C_out, Z held as Z+3 in three bits. C_out = +1 when both
//       digits are non-negative and p2|q2; -1 when both are negative and
//       not p2&q2&p1, or when exactly one is negative and p2, q2, p1 are 0.
// The z and v terms are the published two-level equations; the carry
// terms are the ones that agree with them (U = Z + 5*C_out for every
// operand pair, and every sum stays in [-7,7]; the test checks this
// exhaustively).
//
// Interface: p, q TCSD; cin/cout posibit-negabit pairs. Timing: combinational.
module tcsd_add_digit
  import dm_pkg::*;
(
  input  tcsd_t p,
  input  tcsd_t q,
  input  scar_t cin,
  output tcsd_t s,
  output scar_t cout
);

  logic [2:0] zb, vb;
  logic       cpos, cneg;

  logic p3, p2, p1, p0, q3, q2, q1, q0;
  assign {p3, p2, p1, p0} = p;
  assign {q3, q2, q1, q0} = q;

  assign cpos = ~p3 & ~q3 & (p2 | q2);
  assign cneg = (p3 & q3 & ~(p2 & q2 & p1)) | ((p3 ^ q3) & ~p2 & ~q2 & ~p1);

  assign zb[0] = ((p2 | q2) & ((p3 & ~q3 & ~p1) | (~p3 & (q3 ^ p1))))
               | (~p3 & ~q3 & ~p2 & ~q2 & ~p1) | (p3 & q3 & p1 & ~(p2 & q2));
  assign zb[1] = ((p2 ^ q2) & ((p3 & (q3 | p1)) | (q3 & p1))) | (p2 & q2 & ~p1 & ~(p3 & q3))
               | (~p3 & ~q3 & ((p2 & q2) | (~p2 & ~q2 & ~p1)));
  assign zb[2] = (~p3 & ~q3 & ~p2 & ~q2 & p1) | (p3 & q3 & p2 & q2 & ~p1)
               | ((p3 ^ q3) & ((p2 & q2 & p1) | (~p2 & ~q2 & ~p1)));

  assign vb[0] = ~(p0 ^ q0);
  assign vb[1] = q1 ^ (p0 | q0);
  assign vb[2] = q1 & (p0 | q0);

  assign s    = sd_sum4(zb, vb, cin);
  assign cout = '{pos: cpos, neg: ~cneg};

endmodule
