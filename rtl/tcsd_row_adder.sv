// tcsd_row_adder: W-digit row of TCSD adder slices (reduction levels II, III).
//
// Columns below LO have one operand only and pass through unchanged (they
// are final product digits). From LO up each column has a carry-free TCSD
// slice; the carry into LO is zero and the carry out of column W-1 is
// dropped (modulo 10^W).
//
// Interface: a, b, s TCSD rows. Timing: combinational, one slice deep.
module tcsd_row_adder
  import dm_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned LO = 2
) (
  input  tcsd_t a [W],
  input  tcsd_t b [W],
  output tcsd_t s [W]
);

  scar_t c [W+1];
  assign c[LO] = CARRY_ZERO;

  for (genvar j = 0; j < W; j++) begin : g_col
    if (j < LO) begin : g_pass
      assign s[j] = a[j];
    end else begin : g_add
      tcsd_add_digit u_add (.p(a[j]), .q(b[j]), .cin(c[j]), .s(s[j]), .cout(c[j+1]));
    end
  end

endmodule
