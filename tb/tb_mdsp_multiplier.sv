// tb_mdsp_multiplier: self-checking test of the full-width main multiplier.
//
// Applies the corner operands (0, 1, all ones, single bits) in every combination and
// 20000 random pairs. Each product is compared with the 64-bit integer product taken
// in the testbench. A watchdog ends the run with a failure if it stalls.
module tb_mdsp_multiplier;

  localparam int unsigned N = 12;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0;
  int failures = 0;

  mdsp_multiplier #(.N(N)) dut (.x(x), .y(y), .p(p));

  task automatic apply(input logic [N-1:0] a, input logic [N-1:0] b);
    longint unsigned expect_p;
    x = a;
    y = b;
    #1;
    expect_p = longint'(a) * longint'(b);
    checks++;
    if (longint'(p) != expect_p) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH x=%0d y=%0d p=%0d expected=%0d", a, b, p, expect_p);
    end
  endtask

  logic [N-1:0] corners [6];

  initial begin
    corners[0] = '0;
    corners[1] = N'(1);
    corners[2] = '1;
    corners[3] = N'(1) << (N-1);
    corners[4] = N'({(N/2){2'b10}});
    corners[5] = N'({(N/2){2'b01}});
    foreach (corners[i])
      foreach (corners[j])
        apply(corners[i], corners[j]);
    for (int k = 0; k < 20000; k++)
      apply(N'($urandom), N'($urandom));
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

endmodule : tb_mdsp_multiplier
