// tb_pwmd: self-checking testbench of the PWM device.
//
// A reduced instance (12-bit counter, 16 clocks per level) is swept through many duty values
// and a full-size instance (20-bit counter, 4096 clocks per level, 47 Hz) runs two complete
// periods. Over any 2^CNT_W consecutive clocks the output must be high for exactly
// db * 2^(CNT_W-8) clocks, and one period must be 2^CNT_W clocks long.
module tb_pwmd;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [7:0] db_s, db_f;
  logic       pwm_s, pwm_f;
  int         checks = 0, failures = 0;

  always #10 clk = ~clk;

  pwmd #(.CNT_W(12)) dut_s (.clk, .rst, .db(db_s), .pwm_out(pwm_s));
  pwmd               dut_f (.clk, .rst, .db(db_f), .pwm_out(pwm_f));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int high, rises, first_rise, second_rise;
    db_s = 8'd0;
    db_f = 8'd128;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // reduced instance: sweep
    for (int k = 0; k < 40; k++) begin
      db_s <= (k == 0) ? 8'd0 : (k == 1) ? 8'd255 : (k == 2) ? 8'd1 : 8'($urandom);
      repeat (2) @(posedge clk);
      high = 0;
      repeat (4096) begin
        @(posedge clk);
        if (pwm_s) high++;
      end
      check(high == int'(db_s) * 16, $sformatf("db=%0d high %0d of 4096", db_s, high));
    end
    // full-size instance, db = 128: half duty, 2^20-clock period
    first_rise = -1; second_rise = -1; high = 0; rises = 0;
    for (int c = 0; c < 3 * (1 << 20); c++) begin
      logic prev;
      prev = pwm_f;
      @(posedge clk);
      if (c >= (1 << 20) && c < 2 * (1 << 20) && pwm_f) high++;
      if (pwm_f && !prev) begin
        rises++;
        if (first_rise < 0) first_rise = c;
        else if (second_rise < 0) second_rise = c;
      end
    end
    check(high == 128 * 4096, $sformatf("full size: high %0d of 1048576", high));
    check(second_rise - first_rise == (1 << 20), $sformatf("full size period %0d", second_rise - first_rise));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
