// ant_decision: decision block of the ANT (algorithmic noise tolerant) multiplier.
//
// Compares the main block's result ya with the replica's estimate yr, both aligned to
// the same W-bit weight. When they differ by more than TH, the main result is taken to
// hold a timing (soft) error and the replica's estimate is output instead; otherwise
// the main result passes unchanged.
//
//   y   = (|ya - yr| > TH) ? yr : ya
//   err = (|ya - yr| > TH)
//
// TH must exceed the largest distance between a correct product and the replica's
// estimate. For the 12-bit multiplier with a 6-bit replica this is below 3.5 * 2^18:
// replica rounding under 1.52 * 2^18, plus dropped operand LSBs under 1.96 * 2^18.
// The default 2^20 is therefore never crossed without an error, and any error of 2^20
// or more is corrected.
//
// Interface: ya, yr (W bits, unsigned) -> y (W bits), err. Purely combinational.
// The role of the block (the replica corrects the main block's errors) follows the
// design description. The absolute-difference rule and the threshold value are this
// design's choices.
module ant_decision #(
  parameter int unsigned W  = ant_pkg::PROD_W,
  parameter int unsigned TH = ant_pkg::ANT_TH
) (
  input  logic [W-1:0] ya,
  input  logic [W-1:0] yr,
  output logic [W-1:0] y,
  output logic         err
);

  logic [W-1:0] diff_abs;

  always_comb begin
    diff_abs = (ya >= yr) ? (ya - yr) : (yr - ya);
    err  = (64'(diff_abs) > 64'(TH));
    y    = err ? yr : ya;
  end

endmodule : ant_decision
