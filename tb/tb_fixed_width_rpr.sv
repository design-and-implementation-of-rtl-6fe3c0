// tb_fixed_width_rpr: exhaustive self-checking test of the 6-bit fixed-width replica.
//
// For all 4096 operand pairs, the expected output is computed arithmetically from the
// exact product: the sum of the partial products a[i]*b[j]*2^(i+j) of columns
// 0..N-2 is subtracted from a*b, the compensation (1 + alpha) * 2^(N-1) is added, and
// the result is shifted right by N. alpha is 1 when any pair a[i], b[j] with
// i + j = N-2 is 1 1.
// The test also checks the error statistics against the exact rounded product: largest
// error below 1.6 LSB, mean squared error below 0.2 LSB^2, and MSE below that of the
// uncompensated truncation. Both values of alpha must occur.
module tb_fixed_width_rpr;

  localparam int unsigned N = 6;

  logic [N-1:0] a, b;
  logic [N-1:0] y;
  logic         alpha;
  int checks = 0;
  int failures = 0;
  int alpha_seen [2] = '{0, 0};

  fixed_width_rpr #(.N(N)) dut (.a(a), .b(b), .y(y), .alpha(alpha));

  real sq_sum = 0.0;
  real sq_sum_trunc = 0.0;
  real max_err = 0.0;

  task automatic check_pair(input int ia, input int ib);
    int prod, low, exp_alpha, exp_y, trunc_y;
    real err, err_trunc;
    a = N'(ia);
    b = N'(ib);
    #1;
    prod = ia * ib;
    // sum of the partial products a[i]*b[j]*2^(i+j) of columns 0..N-2, and alpha
    low = 0;
    exp_alpha = 0;
    trunc_y = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (((ia >> i) & 1) == 1 && ((ib >> j) & 1) == 1) begin
          if (i + j <= N - 2) low += 1 << (i + j);
          if (i + j == N - 2) exp_alpha = 1;
          if (i + j >= N) trunc_y += 1 << (i + j);
        end
    exp_y = (prod - low + ((1 + exp_alpha) << (N - 1))) >> N;
    trunc_y = trunc_y >> N;   // plain truncation: columns >= N only, no compensation
    checks++;
    if (int'(y) != exp_y || int'(alpha) != exp_alpha) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH a=%0d b=%0d y=%0d expected=%0d alpha=%0d expected=%0d",
                 ia, ib, y, exp_y, alpha, exp_alpha);
    end
    alpha_seen[alpha]++;
    err = real'(prod) / real'(1 << N) - real'(y);
    err_trunc = real'(prod) / real'(1 << N) - real'(trunc_y);
    sq_sum += err * err;
    sq_sum_trunc += err_trunc * err_trunc;
    if (err > max_err) max_err = err;
    if (-err > max_err) max_err = -err;
  endtask

  initial begin
    for (int ia = 0; ia < (1 << N); ia++)
      for (int ib = 0; ib < (1 << N); ib++)
        check_pair(ia, ib);
    $display("compensated RPR: MSE=%f LSB^2 max|err|=%f LSB; plain truncation MSE=%f",
             sq_sum / 4096.0, max_err, sq_sum_trunc / 4096.0);
    checks++;
    if (max_err >= 1.6) failures++;
    checks++;
    if (sq_sum / 4096.0 >= 0.2) failures++;
    checks++;
    if (sq_sum >= sq_sum_trunc) failures++;
    checks++;
    if (alpha_seen[0] == 0 || alpha_seen[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_fixed_width_rpr
