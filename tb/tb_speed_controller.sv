// tb_speed_controller: closed-loop testbench of the DC-motor speed controller with shortened
// timers (sampling every 1000 clocks, push-button scan 64/16 clocks, 10-clock display digits,
// 12-bit PWM counter).
//
// The testbench closes the loop with a discrete motor model: at every conversion start the
// speed code moves 1/128 of the way towards the last duty command Y (tachometer and divider
// scaled so that full duty gives code 255). An AD7823 model returns the speed code. Checks:
//   - after every sample, Ybuf = PsiRef + 64 (PsiRef - Psi) and Y = Ybuf clamped to 0..255,
//     computed here from the reference and the code the converter was given;
//   - both clamp limits are reached (mechanism counters must be non-zero);
//   - the speed settles to the reference (the feed-forward term removes the offset);
//   - the PWM output is high for Y*16 of 4096 clocks;
//   - the display shows the reference in rpm (PsiRef * 10).
module tb_speed_controller;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [1:0]  pb = 2'b00;
  logic [7:0]  row;
  logic [3:0]  col;
  logic        convst_n, adc_sclk, adc_dout, pwm_out, sample_int, pb_fast;
  logic [7:0]  psi_ref, psi, y;
  logic signed [17:0] ybuf;
  logic [7:0]  vin;
  int          early;
  int          checks = 0, failures = 0;
  int          n_sat_hi = 0, n_sat_lo = 0, n_linear = 0, n_samples = 0;

  always #10 clk = ~clk;

  speed_controller #(.SAMPLE_CYC(1000), .PB_SLOW(64), .PB_FAST(16), .DIGIT_CYC(10), .PWM_CNT_W(12)) dut (
    .clk, .rst, .pb, .row, .col, .adc_convst_n(convst_n), .adc_sclk, .adc_dout, .pwm_out,
    .psi_ref, .psi, .ybuf, .y, .sample_int, .pb_fast
  );
  ad7823_model adc (.convst_n, .sclk(adc_sclk), .vin, .dout(adc_dout), .early_reads(early));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // motor model: speed in 1/256 code units
  int speed_x256 = 0;
  logic [7:0] converted;
  always @(negedge convst_n) begin
    converted   = vin;
    speed_x256 += (int'(y) * 256 - speed_x256) / 128;
    vin         = 8'(speed_x256 / 256);
  end

  // controller law checked after every sample
  always @(negedge sample_int) if (!rst) begin
    int ex_buf, ex_y;
    repeat (3) @(posedge clk);
    ex_buf = int'(psi_ref) + 64 * (int'(psi_ref) - int'(converted));
    ex_y   = ex_buf < 0 ? 0 : ex_buf > 255 ? 255 : ex_buf;
    n_samples++;
    check(psi == converted, $sformatf("psi=%0d converted=%0d", psi, converted));
    check(int'(ybuf) == ex_buf, $sformatf("ybuf=%0d expected %0d", ybuf, ex_buf));
    check(int'(y) == ex_y, $sformatf("y=%0d expected %0d", y, ex_y));
    if (ex_buf > 255) n_sat_hi++;
    else if (ex_buf < 0) n_sat_lo++;
    else n_linear++;
  end

  function automatic logic [6:0] seg_of(input int d);
    case (d)
      0: return 7'h7E; 1: return 7'h30; 2: return 7'h6D; 3: return 7'h79; 4: return 7'h33;
      5: return 7'h5B; 6: return 7'h5F; 7: return 7'h70; 8: return 7'h7F; default: return 7'h7B;
    endcase
  endfunction

  task automatic check_display(input int value);
    int digits [4];
    digits[0] = 0;
    digits[1] = value % 10;
    digits[2] = (value / 10) % 10;
    digits[3] = value / 100;
    repeat (80) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++)
        if (col == ~(4'b0001 << i))
          check(row == {1'b1, ~seg_of(digits[i])}, $sformatf("display digit %0d row %b", i, row));
    end
  endtask

  task automatic check_pwm();
    int high;
    logic [7:0] y0;
    y0 = y;
    high = 0;
    repeat (4096) begin
      @(posedge clk);
      if (pwm_out) high++;
    end
    if (y == y0) check(high == int'(y0) * 16, $sformatf("pwm high %0d for y=%0d", high, y0));
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = 8'd0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // raise the reference to 180 with the UP button
    pb = 2'b10;
    wait (psi_ref == 8'd180);
    pb = 2'b00;
    check(psi_ref == 8'd180, "reference entered");
    check_display(180);
    repeat (300_000) @(posedge clk);
    check(int'(psi) >= 179 && int'(psi) <= 181, $sformatf("settled speed %0d for reference 180", psi));
    check_pwm();
    // lower the reference to 60: the controller brakes with Y = 0
    pb = 2'b01;
    wait (psi_ref == 8'd60);
    pb = 2'b00;
    check_display(60);
    repeat (400_000) @(posedge clk);
    check(int'(psi) >= 59 && int'(psi) <= 61, $sformatf("settled speed %0d for reference 60", psi));
    check_pwm();
    check(n_sat_hi > 0 && n_sat_lo > 0 && n_linear > 0,
          $sformatf("clamp high %0d, clamp low %0d, linear %0d", n_sat_hi, n_sat_lo, n_linear));
    check(early == 0, "A/D read timing");
    $display("samples=%0d clamp_hi=%0d clamp_lo=%0d linear=%0d", n_samples, n_sat_hi, n_sat_lo, n_linear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
