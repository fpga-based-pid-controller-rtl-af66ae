// tb_iir_filter: self-checking testbench of the first-order integer filter with the
// position-controller coefficients (G(z) = (9.639 - 9.543 z^-1)/(1 - 0.865 z^-1), N = 16).
//
// 1. Unit step, 31 samples: N^2 y(k) must equal an integer model of the scaled recursion
//    (rounding by adding half and shifting), stay within 0.4 of the exact floating-point step
//    response, start at 2468/256 = 9.64 and settle at 249/256 = 0.97, which is the "fine"
//    behaviour (the crude, rounded-output version would stall near 3.6).
// 2. 2000 random inputs in -3..3 (so that |N^2 y| stays below 2^15, the range the 16-bit
//    taps assume) with irregular spacing of `en`: y, n2y and `valid` against the
//    integer model.
module tb_iir_filter;
  logic               clk = 1'b0;
  logic               rst = 1'b1;
  logic               en = 1'b0;
  logic signed [7:0]  u = '0;
  logic signed [7:0]  y;
  logic signed [20:0] n2y;
  logic               valid;
  int                 checks = 0, failures = 0;

  always #10 clk = ~clk;

  iir_filter dut (.clk, .rst, .en, .u, .y, .n2y, .valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // integer model of N^2 y(k) = <N^2 b0> u(k) + <N^2 b1> u(k-1) + <-N a1> <N^2 y(k-1) / N>
  longint m_u1, m_ny, m_acc;
  function automatic longint rdiv(input longint x, input int sh);  // round half up of x / 2^sh
    return (x + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction
  task automatic model_step(input longint uk);
    m_acc = 2468 * uk - 2443 * m_u1 + 14 * m_ny;
    m_ny  = rdiv(m_acc, 4);
    m_u1  = uk;
  endtask

  task automatic apply(input logic signed [7:0] uk);
    @(negedge clk);
    u  = uk;
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    model_step(longint'(uk));
    check(valid, "valid one clock after en");
    check(longint'(n2y) == m_acc, $sformatf("n2y=%0d model=%0d", n2y, m_acc));
    check(longint'(y) == rdiv(m_acc, 8), $sformatf("y=%0d model=%0d", y, rdiv(m_acc, 8)));
    @(negedge clk);
    check(!valid, "valid is a single pulse");
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ye, up;
    m_u1 = 0; m_ny = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // 1. unit step
    ye = 0.0; up = 0.0;
    for (int k = 0; k <= 30; k++) begin
      apply(8'sd1);
      ye = 9.639 - 9.543 * up + 0.865 * ye;
      up = 1.0;
      check((real'(n2y) / 256.0 - ye) < 0.4 && (ye - real'(n2y) / 256.0) < 0.4,
            $sformatf("step k=%0d: %f vs exact %f", k, real'(n2y) / 256.0, ye));
      if (k == 0)  check(n2y == 21'sd2468, $sformatf("step k=0 n2y=%0d", n2y));
      if (k == 30) check(n2y == 21'sd249, $sformatf("step k=30 n2y=%0d", n2y));
    end
    // 2. random inputs, restart from rest
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    m_u1 = 0; m_ny = 0;
    for (int k = 0; k < 2000; k++) begin
      apply(8'($signed($urandom_range(0, 6)) - 3));
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
