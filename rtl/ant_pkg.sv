// ant_pkg: constants shared by the ANT (algorithmic noise tolerant) multiplier.
//
// The operand width of the main multiplier (12 bits) and the word length of the
// fixed-width reduced-precision replica (6 bits) are the values of the design this
// RTL follows. The decision threshold is this design's own choice: it is the
// smallest power of two above the largest distance that can occur between a correct
// 24-bit product and the shifted 6-bit replica estimate (see ant_decision.sv).
package ant_pkg;

  localparam int unsigned MDSP_N   = 12;          // operand width of the main block
  localparam int unsigned RPR_N    = 6;           // word length of the fixed-width RPR
  localparam int unsigned PROD_W   = 2 * MDSP_N;  // full-width product
  localparam int unsigned ANT_TH   = 32'd1 << 20; // |MDSP - RPR| above this is an error

endpackage : ant_pkg
