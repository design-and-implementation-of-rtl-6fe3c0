// fixed_width_rpr: fixed-width reduced-precision replica (RPR) with error compensation.
//
// An N x N unsigned multiplier that keeps only the N most significant bits of its
// 2N-bit product. To save area and delay, most of the partial products that fall
// below the kept part are never built. The truncation error is compensated instead:
//
//   column index c = i + j of partial product a[i] & b[j]
//   columns N .. 2N-2 : main part, kept
//   column  N-1       : input correction vector (ICV, beta). These terms carry the
//                       largest weight of the truncated part and are injected
//                       directly at their own weight.
//   column  N-2       : minor input correction vector (MICV). It is reduced to one
//                       bit, alpha = OR of its partial products.
//   columns 0 .. N-3  : dropped
//
//   y = floor( (main + beta*2^(N-1) + (1 + alpha)*2^(N-1)) / 2^N )
//
// The constant 1 at weight 2^(N-1) is the rounding offset. Alpha stands in for the
// expected value of columns 0..N-2, which with uniform inputs is (N-2)/4 units of
// 2^(N-1), one unit at N = 6; alpha is 1 with probability 1 - (3/4)^(N-1). For N = 6,
// over all inputs: mean error -0.12 LSB, largest error 1.52 LSB, mean squared error
// 0.15 LSB^2, against 2.24 LSB^2 when every column below N is simply dropped. At other
// word lengths (5 to 10) the mean squared error stays between 0.15 and 0.38 LSB^2.
//
// Interface: a, b (N bits, the N MSBs of the main multiplier's operands) -> y (N bits,
// approximately round(a*b / 2^N)). alpha is brought out so that the compensation can be
// observed. Purely combinational, with no path through the compensation longer than
// the main array.
//
// The word length of six, and the use of an ICV injected directly plus an MICV, follow
// the design description. The exact alpha function (OR of column N-2) and the
// rounding constant are this design's choices, as the description gives no equation.
module fixed_width_rpr #(
  parameter int unsigned N = ant_pkg::RPR_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y,
  output logic         alpha
);

  logic [2*N-1:0] sum;

  always_comb begin
    sum   = '0;
    alpha = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        // main part and ICV (beta), each at its own column weight
        if (i + j >= N - 1)
          sum = sum + ((2*N)'(a[i] & b[j]) << (i + j));
        // MICV: column N-2 folded into one bit
        if (i + j == N - 2)
          alpha = alpha | (a[i] & b[j]);
      end
    end
    sum = sum + ((2*N)'({1'b0, 1'b1} + {1'b0, alpha}) << (N - 1));
  end

  assign y = sum[2*N-1:N];

endmodule : fixed_width_rpr
