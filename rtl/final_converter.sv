// final_converter: two accumulated TCSD rows -> 2N-digit BCD product.
//
// Instead of a last 2:1 reduction level followed by a redundant-to-BCD
// conversion, the two rows are added straight into BCD in three parts that
// follow the arrival times of their digits (split points for N = 16):
//  * positions 0..7 hold one digit each (acc1 is zero there) and are
//    converted by a short ripple borrow chain (tcsd_to_bcd_low), giving b_8;
//  * positions 8..22: each column goes through a tcsd2bcd_digit slice
//    (W in [-9,7], pi, gamma, T and T-1); a 4-level Kogge-Stone network fed
//    with the 15 (pi, gamma) pairs and b_8 gives every borrow, which picks
//    T or T-1;
//  * positions 23..31: the same slices, but the borrows into 24..31 are
//    formed for both values of b_23 by a 3-level compound prefix network,
//    so two BCD results exist before b_23 arrives; b_23 selects one.
// The carry out of position 31 and the final borrow are dropped: the
// product is below 10^(2N), so it equals the value of the rows modulo
// 10^(2N). So pi and gamma of position 31 feed nothing; the slice there is
// kept for T and T-1 only.
//
// Interface: acc0/acc1 TCSD rows by position; prod BCD, digit i at
// [4i+3:4i]. Timing: combinational. Only N = 16 is supported.
module final_converter
  import dm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  tcsd_t            acc0 [2*N],
  input  tcsd_t            acc1 [2*N],
  output logic [8*N-1:0]   prod
);

  localparam int unsigned W   = 2 * N;   // 32 product digits
  localparam int unsigned LOW = N / 2;   // 8 single-digit positions
  localparam int unsigned MID = 23;      // first position of the top part

  // ---- part 1: positions 0..7 -------------------------------------------
  tcsd_t      low_d [LOW];
  logic [3:0] low_p [LOW];
  logic       b8;

  for (genvar i = 0; i < LOW; i++) begin : g_low
    assign low_d[i] = acc0[i];
    assign prod[4*i +: 4] = low_p[i];
  end

  tcsd_to_bcd_low #(.K(LOW)) u_low (.d(low_d), .p(low_p), .bout(b8));

  // ---- digit slices for positions 8..31 ---------------------------------
  scar_t      c  [W+1];
  logic [W-1:LOW] prop, gen;
  logic [3:0] t0 [W];
  logic [3:0] t1 [W];

  assign c[LOW] = CARRY_ZERO;

  for (genvar j = LOW; j < W; j++) begin : g_slice
    tcsd2bcd_digit u_dig (
      .p(acc0[j]), .q(acc1[j]), .cin(c[j]), .cout(c[j+1]),
      .prop(prop[j]), .gen(gen[j]), .t0(t0[j]), .t1(t1[j])
    );
  end

  // ---- part 2: positions 8..22 ------------------------------------------
  logic [MID-LOW:0] b_mid;   // b_mid[k] = borrow into position LOW + k

  ks_borrow_prefix #(.M(MID - LOW)) u_ks (
    .prop(prop[MID-1:LOW]), .gen(gen[MID-1:LOW]), .bin(b8), .b(b_mid)
  );

  for (genvar j = LOW; j < MID; j++) begin : g_mid
    assign prod[4*j +: 4] = b_mid[j-LOW] ? t1[j] : t0[j];
  end

  // ---- part 3: positions 23..31 -----------------------------------------
  logic             b23;
  logic [W-MID-1:0] b_if0, b_if1;  // borrow into position MID + k

  assign b23 = b_mid[MID-LOW];

  compound_borrow_prefix #(.M(W - MID - 1)) u_cmp (
    .prop(prop[W-2:MID]), .gen(gen[W-2:MID]), .b_if0(b_if0), .b_if1(b_if1)
  );

  for (genvar j = MID; j < W; j++) begin : g_top
    logic [3:0] sum0, sum1;   // BCD digit for b_23 = 0 / 1
    assign sum0 = b_if0[j-MID] ? t1[j] : t0[j];
    assign sum1 = b_if1[j-MID] ? t1[j] : t0[j];
    assign prod[4*j +: 4] = b23 ? sum1 : sum0;
  end

endmodule
