// pp_select: partial product selection with dynamic negation.
//
// The one-hot magnitude of a recoded multiplier digit picks one of the
// precomputed multiples 1X..5X (an AND-OR 5:1 multiplexer, no magnitude
// selected gives 0). Because the multiples are sign-magnitude, negating
// the selected multiple costs a single XOR per digit, on the sign bit only,
// instead of one XOR per bit as with two's complement digits.
//
// Interface: yd is the recoded multiplier digit, mult the N+1 digit
// multiples, pp the selected and signed N+1 digit partial product.
// Timing: purely combinational.
module pp_select
  import dm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  yrec_t yd,
  input  smsd_t mult [5][N+1],
  output smsd_t pp   [N+1]
);

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      smsd_t sel;
      sel = '0;
      for (int k = 1; k <= 5; k++) begin
        sel = sel | (mult[k-1][i] & {4{yd.oh[k]}});
      end
      pp[i].m = sel.m;
      pp[i].s = sel.s ^ yd.s;
    end
  end

endmodule
