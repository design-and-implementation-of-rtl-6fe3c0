// tb_ant_decision: self-checking test of the ANT decision block.
//
// Drives pairs whose distance lies at, just below and just above the threshold in
// both directions, plus random pairs and pairs near each other. Expected output and
// error flag come from a signed 64-bit distance computed in the testbench. Both
// outcomes (main result kept, replica selected) must occur.
module tb_ant_decision;

  localparam int unsigned W  = 24;
  localparam int unsigned TH = 1 << 20;
  localparam longint unsigned THL = longint'(TH);

  logic [W-1:0] ya, yr, y;
  logic         err;
  int checks = 0;
  int failures = 0;
  int n_keep = 0;
  int n_repl = 0;

  ant_decision #(.W(W), .TH(TH)) dut (.ya(ya), .yr(yr), .y(y), .err(err));

  task automatic apply(input longint unsigned a, input longint unsigned r);
    longint d;
    logic exp_err;
    logic [W-1:0] exp_y;
    ya = W'(a);
    yr = W'(r);
    #1;
    d = longint'(ya) - longint'(yr);
    if (d < 0) d = -d;
    exp_err = (d > longint'(TH));
    exp_y = exp_err ? yr : ya;
    checks++;
    if (err != exp_err || y != exp_y) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH ya=%0d yr=%0d y=%0d err=%0b expected y=%0d err=%0b",
                 ya, yr, y, err, exp_y, exp_err);
    end
    if (err) n_repl++; else n_keep++;
  endtask

  initial begin
    longint unsigned base;
    for (int k = 0; k < 200; k++) begin
      base = longint'($urandom_range(3 << 20, (1 << W) - (3 << 20)));
      apply(base + THL, base);
      apply(base + THL + 1, base);
      apply(base + THL - 1, base);
      apply(base, base + THL);
      apply(base, base + THL + 1);
      apply(base, base - THL - 1);
    end
    apply(0, 0);
    apply((1 << W) - 1, 0);
    apply(0, (1 << W) - 1);
    for (int k = 0; k < 5000; k++)
      apply(longint'($urandom) & ((1 << W) - 1), longint'($urandom) & ((1 << W) - 1));
    for (int k = 0; k < 5000; k++) begin
      base = longint'($urandom) & ((1 << W) - 1);
      apply(base, (base + longint'($urandom_range(0, 3 << 19))) & ((1 << W) - 1));
    end
    checks++;
    if (n_keep == 0 || n_repl == 0) failures++;
    $display("kept=%0d replaced=%0d", n_keep, n_repl);
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

endmodule : tb_ant_decision
