// ppr_tree: partial product reduction, N SMSD rows down to two TCSD rows.
//
// Row r of the input starts at product position r (row 0 at 0). Level I
// adds rows 2k and 2k+1 with the 4-in-1 SMSD adder, giving N/2 TCSD rows;
// every later level adds adjacent rows with the TCSD adder, halving the
// count, until two rows remain (for N = 16: 16 -> 8 -> 4 -> 2, three
// levels). All adders are carry-free, so each level costs one slice delay.
// In a level whose second operand starts at position LO the columns below
// LO are not added; those digits are already final, which is what lets the
// lowest product digits be converted to BCD while reduction goes on
// (position 0 after level I, 1 after level II, 2..3 after level III, and
// 4..7 are single in the last two rows). The adjacent pairing is this
// design's choice.
//
// Interface: rows[r][j] is the SMSD digit of row r at position j (zero
// outside the row); acc0/acc1 are the two remaining TCSD rows, acc1 being
// zero below position N/2. Width 2N: results are modulo 10^(2N).
// Timing: purely combinational.
module ppr_tree
  import dm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  smsd_t rows [N][2*N],
  output tcsd_t acc0 [2*N],
  output tcsd_t acc1 [2*N]
);

  localparam int unsigned W = 2 * N;
  localparam int unsigned L = $clog2(N) - 1;  // levels, N rows -> 2 rows

  // g_lvl[l].r[k]: row k after level l (l = 0 is level I).
  for (genvar l = 0; l < L; l++) begin : g_lvl
    tcsd_t r [N >> (l + 1)][W];
    for (genvar k = 0; k < (N >> (l + 1)); k++) begin : g_row
      // the second operand starts where its first input row started
      if (l == 0) begin : g_smsd
        smsd_row_adder #(.W(W), .LO(2 * k + 1)) u_row (
          .a(rows[2*k]), .b(rows[2*k+1]), .s(r[k])
        );
      end else begin : g_tcsd
        tcsd_row_adder #(.W(W), .LO((2 * k + 1) << l)) u_row (
          .a(g_lvl[l-1].r[2*k]), .b(g_lvl[l-1].r[2*k+1]), .s(r[k])
        );
      end
    end
  end

  assign acc0 = g_lvl[L-1].r[0];
  assign acc1 = g_lvl[L-1].r[1];

endmodule
