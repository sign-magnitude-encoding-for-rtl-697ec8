// dm_pkg: digit types shared by the decimal multiplier.
//
// Three digit encodings travel through the datapath:
//   smsd_t  sign-magnitude signed digit, value (-1)^s * m, |m| <= 6 here
//           (a sign of 1 with m = 0 is a legal "negative zero").
//   tcsd_t  4-bit two's complement signed digit, value in [-7,7].
//   scar_t  signed carry in {-1,0,1} held as a posibit/negabit pair:
//           value = pos + (neg - 1), so a zero carry is {pos=0, neg=1}.
//   yrec_t  recoded multiplier digit: sign and one-hot magnitude 1..5,
//           all magnitude bits 0 for the value 0.
package dm_pkg;

  typedef struct packed {
    logic       s;
    logic [2:0] m;
  } smsd_t;

  typedef logic [3:0] tcsd_t;

  typedef struct packed {
    logic pos;
    logic neg;
  } scar_t;

  typedef struct packed {
    logic       s;
    logic [5:1] oh;
  } yrec_t;

  localparam scar_t CARRY_ZERO = '{pos: 1'b0, neg: 1'b1};

  // Second stage shared by both carry-free adders: a 4-bit ripple of full
  // adders working on logical bit states. z (weight 2,4,8), v (weight 1,2,4)
  // and the carry pair (weight 1) are posibits or negabits; whichever mix the
  // first stage chose, the encodings are picked so the negabit weights add up
  // to 8, so the logical sum is S + 8 with S in [-7,7]. The top half adder
  // becomes an OR (its carry is never set) and the weight-8 result is a
  // negabit, i.e. the complement of the two's complement sign bit.
  function automatic tcsd_t sd_sum4(input logic [2:0] z, input logic [2:0] v,
                                    input scar_t cin);
    logic s0, s1, s2, s3, c1, c2, c3;
    {c1, s0} = 2'(v[0]) + 2'(cin.pos) + 2'(cin.neg);
    {c2, s1} = 2'(z[0]) + 2'(v[1]) + 2'(c1);
    {c3, s2} = 2'(z[1]) + 2'(v[2]) + 2'(c2);
    s3 = z[2] | c3;
    return {~s3, s2, s1, s0};
  endfunction

endpackage
