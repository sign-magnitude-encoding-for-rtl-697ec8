// smsd_add_digit: one digit slice of the 4-in-1 SMSD + SMSD -> TCSD adder.
//
// Adds two sign-magnitude digits P, Q in [-6,6] and a signed carry-in
// C_in in {-1,0,1}; the result is a [-7,7] two's complement digit S and a
// signed carry-out with P + Q + C_in = S + 10*C_out. C_out depends on P and
// Q only, so the adder is carry-free.
//
// Stage 1 applies the signs to the magnitude bits: a negative sign turns
// the magnitude's posibits into negabits. The bits split into two
// collections:
//   U = (-1)^sp (2p2 + p1) + (-1)^sq 2q2, decomposed as U = Z + 5*C_out
//       (C_out = +1 for ++ with p2|q2, -1 for -- with p2|q2, else 0);
//   V = (-1)^sp p0 + (-1)^sq (2q1 + q0), recoded to V' of equal value.
// Z and V' are held in three bits each, some of them negabits depending on
// the sign case; as offsets of the logical bits: ++ Z+3, V'+1; +- Z+2,
// V'+3; -+ Z+3, V'+1; -- Z+1, V'+5. In every case the negabit weights of
// 2Z + V' + C_in add up to 8, so stage 2 is one 4-bit adder for all four
// sign combinations (see dm_pkg::sd_sum4).
// C_out, Z and V' are the published two-level equations. The carry's
// negabit is held as its logical state, 1 meaning "no negative carry".
//
// Interface: p, q SMSD; cin/cout posibit-negabit pairs (negabit 1 = 0).
// Timing: combinational; cout does not depend on cin.
module smsd_add_digit
  import dm_pkg::*;
(
  input  smsd_t p,
  input  smsd_t q,
  input  scar_t cin,
  output tcsd_t s,
  output scar_t cout
);

  logic sp, sq, p2, p1, p0, q2, q1, q0;
  assign {sp, p2, p1, p0} = p;
  assign {sq, q2, q1, q0} = q;

  logic       cpos, cneg;
  logic [2:0] zb, vb;

  // Signed carry: +1 only for ++, -1 only for --.
  assign cpos = ~sp & ~sq & (p2 | q2);
  assign cneg = sp & sq & (p2 | q2);

  // Z in the case-dependent encoding of the sign table (logical bits
  // Z+3, Z+2, Z+3, Z+1 for ++, +-, -+, --).
  assign zb[0] = (sp & ~sq & ~p1) | (~sp & p1 & (sq | p2 | q2)) | (sq & p1 & (p2 | q2))
               | (~(p2 | q2 | p1) & (sp | ~sq));
  assign zb[1] = (p2 & q2 & (~sp | ~sq | ~p1)) | (~(p2 | q2) & ((~sp & ~p1) | (sp ^ sq)))
               | (sp & sq & p1 & (p2 ^ q2));
  assign zb[2] = (sq & p2 & ~q2 & ~(sp & p1)) | (sp & ~p2 & q2 & ~(sq & p1))
               | (~(sp | sq) & ~(p2 | q2) & p1);

  // V -> V' recoding.
  assign vb[0] = ~(p0 ^ q0);
  assign vb[1] = ((q1 ^ q0) & ~(sq ^ p0)) | ((sq ^ p0) & ~(sp ^ q1));
  assign vb[2] = (sq & ~q1 & ((p0 & ~q0) | (sp & ~p0)))
               | (~sq & q1 & ((~p0 & q0) | (~sp & p0)));

  assign s    = sd_sum4(zb, vb, cin);
  assign cout = '{pos: cpos, neg: ~cneg};

endmodule
