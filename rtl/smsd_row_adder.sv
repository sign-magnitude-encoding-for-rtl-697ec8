// smsd_row_adder: W-digit row of 4-in-1 slices (first reduction level).
//
// Adds two SMSD rows aligned to product positions. Below position LO the
// second row holds no digit, so those columns are not added: their SMSD
// digit is only turned into two's complement and is final from here on.
// From LO up every column has a slice; the carry into column LO is zero and
// the carry out of column W-1 is dropped (results are taken modulo 10^W).
//
// Interface: a, b SMSD rows; s TCSD row. Timing: combinational, one slice
// deep (carries move one position only).
module smsd_row_adder
  import dm_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned LO = 1
) (
  input  smsd_t a [W],
  input  smsd_t b [W],
  output tcsd_t s [W]
);

  scar_t c [W+1];
  assign c[LO] = CARRY_ZERO;

  for (genvar j = 0; j < W; j++) begin : g_col
    if (j < LO) begin : g_pass
      assign s[j] = a[j].s ? -4'(a[j].m) : 4'(a[j].m);
    end else begin : g_add
      smsd_add_digit u_add (.p(a[j]), .q(b[j]), .cin(c[j]), .s(s[j]), .cout(c[j+1]));
    end
  end

endmodule
