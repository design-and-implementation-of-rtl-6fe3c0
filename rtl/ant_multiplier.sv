// ant_multiplier: 12 x 12-bit algorithmic noise tolerant (ANT) multiplier with a
// fixed-width reduced-precision replica (RPR).
//
// The full-width main multiplier (MDSP) is meant to run at an over-scaled supply
// voltage, where its longest paths may miss the sampling edge and corrupt high-order
// product bits. In parallel, a 6-bit fixed-width replica multiplies the 6 MSBs of each
// operand and estimates the product. Its paths are much shorter, so it stays correct
// at the lowered voltage. The decision block outputs the main product unless it lies
// further than TH from the replica estimate, in which case the estimate is output.
//
//   x_q, y_q  --+--> mdsp_multiplier ----------------- ya (2N) --+
//               |                                                +--> ant_decision --> p
//               +--> MSBs --> fixed_width_rpr --> << (2N-RPR_N) yr +
//
// Timing: operands are registered on in_valid, the MDSP, replica and decision are one
// combinational stage, and the result is registered. out_valid, p and err_detected
// appear two clock edges after the operands are presented with in_valid. A new
// operand pair may be given every cycle. Reset is asynchronous, active low, and
// clears the valid flags and the data registers.
//
// The replica's alpha output (whether its minor correction fired) is not used by the
// datapath; it is kept as a named net so that a testbench can observe it, which is why
// a lint tool reports it as unread.
//
// Widths 12 and 6 follow the design description; the register stages, handshake,
// reset and threshold are this design's choices.
module ant_multiplier #(
  parameter int unsigned N     = ant_pkg::MDSP_N,
  parameter int unsigned RPR_N = ant_pkg::RPR_N,
  parameter int unsigned TH    = ant_pkg::ANT_TH
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           out_valid,
  output logic [2*N-1:0] p,
  output logic           err_detected
);

  logic [N-1:0]     x_q, y_q;
  logic             v_q;
  logic [2*N-1:0]   mdsp_p;
  logic [RPR_N-1:0] rpr_y;
  logic             rpr_alpha;
  logic [2*N-1:0]   rpr_p;
  logic [2*N-1:0]   dec_y;
  logic             dec_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        x_q <= x;
        y_q <= y;
      end
    end
  end

  mdsp_multiplier #(.N(N)) u_mdsp (
    .x (x_q),
    .y (y_q),
    .p (mdsp_p)
  );

  fixed_width_rpr #(.N(RPR_N)) u_rpr (
    .a     (x_q[N-1 -: RPR_N]),
    .b     (y_q[N-1 -: RPR_N]),
    .y     (rpr_y),
    .alpha (rpr_alpha)
  );

  // the RPR output carries the weight of product bit 2N-RPR_N
  assign rpr_p = {rpr_y, {(2*N-RPR_N){1'b0}}};

  ant_decision #(.W(2*N), .TH(TH)) u_dec (
    .ya  (mdsp_p),
    .yr  (rpr_p),
    .y   (dec_y),
    .err (dec_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      p            <= '0;
      err_detected <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        p            <= dec_y;
        err_detected <= dec_err;
      end
    end
  end

endmodule : ant_multiplier
