// tb_ant_multiplier: end-to-end self-checking test of the ANT multiplier at its
// default size (12 x 12 bits, 6-bit replica, threshold 2^20).
//
// Operand pairs arrive on random cycles, including back-to-back runs. Voltage
// over-scaling is a supply effect that RTL cannot show, so the testbench imitates
// its result: in the cycle an operation sits in the combinational stage, the main
// multiplier's output net is forced to a corrupted product. Three cases are mixed:
//   clean  - no error; the exact product must come out with err_detected = 0
//   small  - one product bit below 2^18 flipped; the distance stays under the
//            threshold, so the corrupted value passes (tolerated noise)
//   large  - one or more of bits 21..23 flipped; the decision block must output the
//            replica estimate, computed here from the exact product's operands,
//            with err_detected = 1
// Every output must also lie within 3.5 * 2^18 of the exact product, except for
// tolerated small errors, which lie within 2^18.
// The latency is checked as exactly two clock edges from in_valid to out_valid.
// The SNR of the ANT output and of the uncorrected main output are reported; the ANT
// output must have the higher one.
// Each mechanism (clean pass, tolerated error, corrected error, back-to-back issue,
// replica with alpha = 0 and alpha = 1) must occur at least once.
module tb_ant_multiplier;

  localparam int unsigned N     = 12;
  localparam int unsigned RPR_N = 6;
  localparam int unsigned NOPS  = 20000;

  typedef enum logic [1:0] {CLEAN, SMALL, LARGE} fault_e;

  typedef struct {
    logic [N-1:0]   x;
    logic [N-1:0]   y;
    fault_e         kind;
    logic [2*N-1:0] mdsp_val;
  } op_t;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           in_valid = 1'b0;
  logic [N-1:0]   x = '0;
  logic [N-1:0]   y = '0;
  logic           out_valid;
  logic [2*N-1:0] p;
  logic           err_detected;

  logic [2*N-1:0] forced_val;

  int checks = 0;
  int failures = 0;
  int n_clean = 0, n_small = 0, n_large = 0, n_b2b = 0, n_alpha0 = 0, n_alpha1 = 0;
  // signal and noise energy of the ANT output and of the uncorrected main output
  real sig_pow = 0.0, noise_ant = 0.0, noise_mdsp = 0.0;

  ant_multiplier dut (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid, .p, .err_detected
  );

  always #5 clk = ~clk;

  // replica estimate of the 2N-bit product, computed from the exact arithmetic:
  // drop the partial products of columns 0..RPR_N-2 of the MSB product, add
  // (1 + alpha) * 2^(RPR_N-1), keep the upper RPR_N bits, align to bit 2N-RPR_N
  function automatic longint unsigned rpr_estimate(input int xa, input int yb, output int alpha);
    int a, b, prod, low;
    a = xa >> (N - RPR_N);
    b = yb >> (N - RPR_N);
    prod = a * b;
    low = 0;
    alpha = 0;
    for (int i = 0; i < RPR_N; i++)
      for (int j = 0; j < RPR_N; j++)
        if (((a >> i) & 1) == 1 && ((b >> j) & 1) == 1) begin
          if (i + j <= RPR_N - 2) low += 1 << (i + j);
          if (i + j == RPR_N - 2) alpha = 1;
        end
    prod = (prod - low + ((1 + alpha) << (RPR_N - 1))) >> RPR_N;
    return longint'(prod) << (2 * N - RPR_N);
  endfunction

  op_t stage1, stage2;
  logic v1 = 1'b0, v2 = 1'b0;
  int issued = 0, retired = 0;
  logic prev_valid = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (issued < NOPS) begin
      @(negedge clk);
      if ($urandom_range(0, 3) != 0) begin
        in_valid = 1'b1;
        x = N'($urandom);
        y = N'($urandom);
        if (issued % 97 == 0) x = '1;
        if (issued % 89 == 0) y = '0;
        if (prev_valid) n_b2b++;
        issued++;
      end else begin
        in_valid = 1'b0;
      end
      prev_valid = in_valid;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (retired != NOPS) begin
      failures++;
      $display("retired %0d of %0d operations", retired, NOPS);
    end
    $display("clean=%0d tolerated=%0d corrected=%0d back_to_back=%0d alpha0=%0d alpha1=%0d",
             n_clean, n_small, n_large, n_b2b, n_alpha0, n_alpha1);
    $display("SNR with ANT correction %f dB, main block alone %f dB",
             10.0 * $log10(sig_pow / noise_ant), 10.0 * $log10(sig_pow / noise_mdsp));
    checks++;
    if (noise_ant >= noise_mdsp) begin
      failures++;
      $display("ANT correction did not improve the SNR");
    end
    checks++;
    if (n_clean == 0 || n_small == 0 || n_large == 0 || n_b2b == 0 ||
        n_alpha0 == 0 || n_alpha1 == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the two register stages, and choice of the imitated VOS error
  always @(posedge clk) begin
    if (rst_n) begin
      v2 <= v1;
      stage2 <= stage1;
      v1 <= in_valid;
      if (in_valid) begin
        op_t o;
        int r;
        longint unsigned exact;
        o.x = x;
        o.y = y;
        exact = longint'(x) * longint'(y);
        r = $urandom_range(0, 9);
        if (r < 6) begin
          o.kind = CLEAN;
          o.mdsp_val = (2*N)'(exact);
        end else if (r < 8) begin
          o.kind = SMALL;
          o.mdsp_val = (2*N)'(exact) ^ ((2*N)'(1) << $urandom_range(0, 17));
        end else begin
          o.kind = LARGE;
          o.mdsp_val = (2*N)'(exact) ^ ((2*N)'($urandom_range(1, 7)) << 21);
        end
        stage1 <= o;
      end
    end
  end

  // drive the main multiplier's output while the operation is in the stage
  always @(negedge clk) begin
    if (v1 && stage1.kind != CLEAN) begin
      forced_val = stage1.mdsp_val;
      force dut.mdsp_p = forced_val;
    end else begin
      release dut.mdsp_p;
    end
    if (v1)
      if (dut.rpr_alpha) n_alpha1++; else n_alpha0++;
  end

  // check outputs and latency
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != v2) begin
        failures++;
        $display("latency: out_valid=%0b expected %0b at %0t", out_valid, v2, $time);
      end
      if (out_valid && v2) begin
        longint unsigned exact, expect_p, est;
        longint d;
        logic expect_err;
        int alpha;
        retired++;
        exact = longint'(stage2.x) * longint'(stage2.y);
        est = rpr_estimate(int'(stage2.x), int'(stage2.y), alpha);
        case (stage2.kind)
          CLEAN: begin expect_p = exact;           expect_err = 1'b0; n_clean++; end
          SMALL: begin expect_p = longint'(stage2.mdsp_val); expect_err = 1'b0; n_small++; end
          default: begin expect_p = est;           expect_err = 1'b1; n_large++; end
        endcase
        checks++;
        if (longint'(p) != expect_p || err_detected != expect_err) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH x=%0d y=%0d kind=%s p=%0d err=%0b expected p=%0d err=%0b",
                     stage2.x, stage2.y, stage2.kind.name(), p, err_detected,
                     expect_p, expect_err);
        end
        sig_pow += real'(exact) * real'(exact);
        noise_ant += (real'(p) - real'(exact)) ** 2;
        noise_mdsp += (real'(stage2.mdsp_val) - real'(exact)) ** 2;
        d = longint'(p) - longint'(exact);
        if (d < 0) d = -d;
        checks++;
        if (d >= (longint'(7) << (2 * N - RPR_N - 1))) begin
          failures++;
          $display("output %0d too far from exact product %0d", p, exact);
        end
      end
    end
  end

  initial begin
    #((NOPS * 2 + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_ant_multiplier
