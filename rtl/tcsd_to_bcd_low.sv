// tcsd_to_bcd_low: direct conversion of the lowest product digits.
//
// The K lowest positions of the reduced matrix hold a single [-7,7] digit
// each, and these digits become final early, one or a few per reduction
// level. They are turned into BCD with the borrow recurrence
//   b_0 = 0,  W_i = D_i - b_i,
//   (b_{i+1}, P_i) = (0, W_i) if W_i >= 0, else (1, W_i + 10),
// where a borrow b = 1 stands for -1. The borrow chain is short (K = 8) and
// starts long before the upper digits are ready, so it is a plain ripple.
//
// Interface: d[i] TCSD digit i; p[i] BCD digit i; bout borrow out of digit
// K-1 (the b_8 feeding the upper part). Timing: combinational.
module tcsd_to_bcd_low
  import dm_pkg::*;
#(
  parameter int unsigned K = 8
) (
  input  tcsd_t      d [K],
  output logic [3:0] p [K],
  output logic       bout
);

  always_comb begin
    logic b;
    b = 1'b0;
    for (int i = 0; i < K; i++) begin
      logic signed [4:0] w;
      w = 5'(signed'(d[i])) - (b ? 5'sd1 : 5'sd0);
      b = w[4];
      p[i] = b ? 4'(w + 5'sd10) : w[3:0];
    end
    bout = b;
  end

endmodule
