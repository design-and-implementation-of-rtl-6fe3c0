// mdsp_multiplier: main DSP block (MDSP) of the ANT multiplier.
//
// A full-width N x N unsigned array multiplier. Row i of the partial-product array is
// x AND y[i], weighted by 2^i; the rows are accumulated one after another, so the
// longest path runs through all N rows. In an ANT system this is the block that is
// run at an over-scaled (lowered) supply voltage, where that long path may miss the
// sampling edge. The replica and the decision block then catch the wrong result.
//
// Interface: x, y (N bits, unsigned) -> p (2N bits). Purely combinational; the
// enclosing ANT multiplier registers operands and result.
//
// The 12-bit full-width main multiplier follows the design description. Unsigned
// operands and the plain row-by-row array structure are this design's choices.
module mdsp_multiplier #(
  parameter int unsigned N = ant_pkg::MDSP_N
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  logic [2*N-1:0] row [N];
  logic [2*N-1:0] acc [N+1];

  always_comb begin
    acc[0] = '0;
    for (int unsigned i = 0; i < N; i++) begin
      row[i]   = {{N{1'b0}}, (x & {N{y[i]}})} << i;
      acc[i+1] = acc[i] + row[i];
    end
  end

  assign p = acc[N];

endmodule : mdsp_multiplier
