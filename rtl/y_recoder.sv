// y_recoder: multiplier digit recoding, BCD [0,9] -> signed digit [-5,5].
//
// Each BCD digit Y_i is replaced by Y'_i = Y_i + w_i - 10*[Y_i >= 5], where
// w_i = [Y_{i-1} >= 5] is the transfer from the next lower digit (w_0 = 0).
// The result is given as a sign and five one-hot magnitude lines, so the
// partial product selector is a plain 5:1 one-hot multiplexer. The logic per
// digit is the two-level form of the recoding equations (omega, v'1..v'5 and
// the sign); the transfer out of the top digit is the 10^N-weighted carry
// that creates the extra partial product c*X*10^N.
//
// Interface: y is N packed BCD digits (digit i at [4i+3:4i]); yr[i] is the
// recoded digit i; carry is the transfer out of digit N-1.
// Timing: purely combinational.
module y_recoder
  import dm_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [4*N-1:0] y,
  output yrec_t          yr [N],
  output logic           carry
);

  for (genvar i = 0; i < N; i++) begin : g_dig
    logic v3, v2, v1, v0, w;
    assign {v3, v2, v1, v0} = y[4*i +: 4];
    if (i == 0) begin : g_w0
      assign w = 1'b0;
    end else begin : g_wi
      logic w3, w2, w1, w0;
      assign {w3, w2, w1, w0} = y[4*(i-1) +: 4];
      assign w = w3 | (w2 & (w1 | w0));
    end
    assign yr[i].oh[1] = ~(v2 | v1) & (w ^ v0);
    assign yr[i].oh[2] = (w & v0 & (~(v3 | v2 | v1) | (v2 & v1)))
                       | (~(w | v0) & (v3 | (~v2 & v1)));
    assign yr[i].oh[3] = v1 & (w ^ v0);
    assign yr[i].oh[4] = (~(w | v0) & v2) | (w & v0 & (v2 ^ v1));
    assign yr[i].oh[5] = v2 & ~v1 & (w ^ v0);
    assign yr[i].s     = (v3 & ~(w & v0)) | (v2 & (v1 | v0));
  end

  assign carry = y[4*N-1] | (y[4*N-2] & (y[4*N-3] | y[4*N-4]));

endmodule
