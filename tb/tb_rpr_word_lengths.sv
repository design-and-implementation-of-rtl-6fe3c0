// tb_rpr_word_lengths: the fixed-width replica at word lengths 5 to 10 bits.
//
// Six replicas, N = 5 .. 10, share one 10-bit operand bus; each takes the low N bits.
// For each word length in turn, all 4^N operand pairs are applied. Each output is
// compared with the arithmetic reference: a*b minus the partial products of columns
// 0..N-2, plus (1 + alpha) * 2^(N-1), shifted right by N. The mean squared error
// against the exact a*b / 2^N is accumulated, together with that of plain truncation
// (only columns >= N kept). Every output must match, the compensated MSE must be
// below 0.4 LSB^2, and it must be under a quarter of the truncated MSE. The table of
// both MSE values is printed.
module tb_rpr_word_lengths;

  localparam int NW   = 6;     // word lengths 5 .. 10
  localparam int NMIN = 5;
  localparam int NMAX = NMIN + NW - 1;

  logic [NMAX-1:0] a_bus, b_bus;
  logic [NMAX-1:0] y_all     [NW];
  logic            alpha_all [NW];

  int checks = 0;
  int failures = 0;
  real se, st;

  for (genvar k = 0; k < NW; k++) begin : g_wl
    logic [NMIN+k-1:0] y_k;
    fixed_width_rpr #(.N(NMIN + k)) dut (
      .a     (a_bus[NMIN+k-1:0]),
      .b     (b_bus[NMIN+k-1:0]),
      .y     (y_k),
      .alpha (alpha_all[k])
    );
    assign y_all[k] = NMAX'(y_k);
  end

  task automatic check_pair(input int k, input int ia, input int ib);
    int n;
    longint prod, low, exp_alpha, exp_y, trunc_y;
    real e;
    n = NMIN + k;
    a_bus = NMAX'(ia);
    b_bus = NMAX'(ib);
    #1;
    prod = longint'(ia) * longint'(ib);
    low = 0;
    exp_alpha = 0;
    trunc_y = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (((ia >> i) & 1) == 1 && ((ib >> j) & 1) == 1) begin
          if (i + j <= n - 2) low += longint'(1) << (i + j);
          if (i + j == n - 2) exp_alpha = 1;
          if (i + j >= n) trunc_y += longint'(1) << (i + j);
        end
    exp_y = (prod - low + ((1 + exp_alpha) << (n - 1))) >> n;
    trunc_y = trunc_y >> n;
    checks++;
    if (longint'(y_all[k]) != exp_y || longint'(alpha_all[k]) != exp_alpha) begin
      failures++;
      if (failures < 10)
        $display("N=%0d MISMATCH a=%0d b=%0d y=%0d expected=%0d", n, ia, ib, y_all[k], exp_y);
    end
    e = real'(prod) / real'(1 << n) - real'(y_all[k]);
    se += e * e;
    e = real'(prod) / real'(1 << n) - real'(trunc_y);
    st += e * e;
  endtask

  initial begin
    real mse, mse_tr;
    $display("word length | compensated MSE (LSB^2) | truncated MSE (LSB^2)");
    for (int k = 0; k < NW; k++) begin
      se = 0.0;
      st = 0.0;
      for (int ia = 0; ia < (1 << (NMIN + k)); ia++)
        for (int ib = 0; ib < (1 << (NMIN + k)); ib++)
          check_pair(k, ia, ib);
      mse = se / real'(1 << (2 * (NMIN + k)));
      mse_tr = st / real'(1 << (2 * (NMIN + k)));
      $display("%11d | %23.4f | %21.4f", NMIN + k, mse, mse_tr);
      checks++;
      if (mse >= 0.4) failures++;
      checks++;
      if (mse * 4.0 >= mse_tr) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_rpr_word_lengths
