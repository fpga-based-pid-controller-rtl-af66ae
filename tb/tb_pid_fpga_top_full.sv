// tb_pid_fpga_top_full: the whole design at its real-time defaults (50 MHz clock, 500 Hz
// sampling, 167.77 ms / 41.9 ms button scan, 1 ms display digits, 20-bit PWM counters).
//
// One complete operation of the speed controller: the UP button is held until the reference
// has stepped to 7 (five slow scans, then the scan shortens), the loop runs with the motor
// standing still (clamp high), then with the motor at the reference speed, where
// Y = PsiRef = 7 and one full 2^20-clock PWM period must be high for 7 * 4096 clocks. Every
// sample is checked against the control law, the sampling period must be 100 000 clocks and a
// display digit must stay lit for 50 000 clocks. The position controller and the D/A adapter
// run alongside: every position sample is checked against an integer model of both filters
// and the mixer, and every D/A packet is decoded and checked.
module tb_pid_fpga_top_full;
  import pid_pkg::*;
  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [1:0]        spd_pb = 2'b00;
  logic [7:0]        spd_row, spd_psi_ref, spd_psi, spd_y;
  logic [3:0]        spd_col;
  logic signed [17:0] spd_ybuf;
  logic              spd_convst_n, spd_sclk, spd_dout, spd_pwm, spd_int, spd_pb_fast;
  logic [7:0]        pos_h_ref = 8'd100;
  logic signed [7:0] pos_theta_ref = 8'sd3;
  logic              pos_convst_n, pos_sclk, pos_dout, pos_pwm1, pos_pwm2, pos_int;
  logic              enc_a = 1'b0, enc_b = 1'b0, enc_i = 1'b0;
  logic [7:0]        pos_h, pos_v1, pos_v2;
  logic signed [7:0] pos_theta, pos_gh, pos_gtheta;
  dac_ctrl_t         dac_cb = '0;
  logic [7:0]        dac_db = 8'h5A;
  logic              dac_sync_n, dac_sclk, dac_sout, dac_load;
  logic [7:0]        spd_vin = 8'd0, pos_vin = 8'd98;
  int                early1, early2;
  int                checks = 0, failures = 0;
  int                n_sat_hi = 0, n_linear = 0, n_frames = 0, n_pos = 0, n_samples = 0;

  always #10 clk = ~clk;

  pid_fpga_top dut (
    .clk, .rst,
    .spd_pb, .spd_row, .spd_col, .spd_adc_convst_n(spd_convst_n), .spd_adc_sclk(spd_sclk),
    .spd_adc_dout(spd_dout), .spd_pwm, .spd_psi_ref, .spd_psi, .spd_y, .spd_ybuf,
    .spd_int, .spd_pb_fast,
    .pos_h_ref, .pos_theta_ref, .pos_adc_convst_n(pos_convst_n), .pos_adc_sclk(pos_sclk),
    .pos_adc_dout(pos_dout), .pos_enc_a(enc_a), .pos_enc_b(enc_b), .pos_enc_i(enc_i),
    .pos_pwm1, .pos_pwm2, .pos_h, .pos_theta, .pos_gh, .pos_gtheta, .pos_v1, .pos_v2, .pos_int,
    .dac_cb, .dac_db, .dac_sync_n, .dac_sclk, .dac_sout, .dac_load
  );
  ad7823_model adc_spd (.convst_n(spd_convst_n), .sclk(spd_sclk), .vin(spd_vin), .dout(spd_dout), .early_reads(early1));
  ad7823_model adc_pos (.convst_n(pos_convst_n), .sclk(pos_sclk), .vin(pos_vin), .dout(pos_dout), .early_reads(early2));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  longint cyc = 0;
  int     n_fast = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (spd_pb_fast) n_fast++;

  // speed samples
  logic [7:0] spd_conv;
  longint     t_conv_prev = -1;
  always @(negedge spd_convst_n) begin
    spd_conv = spd_vin;
    if (t_conv_prev >= 0) check(cyc - t_conv_prev == 100_000, $sformatf("sampling period %0d", cyc - t_conv_prev));
    t_conv_prev = cyc;
  end
  always @(negedge spd_int) if (!rst) begin
    int ex_buf, ex_y;
    repeat (3) @(posedge clk);
    ex_buf = int'(spd_psi_ref) + 64 * (int'(spd_psi_ref) - int'(spd_conv));
    ex_y   = ex_buf < 0 ? 0 : ex_buf > 255 ? 255 : ex_buf;
    n_samples++;
    check(spd_psi == spd_conv && int'(spd_ybuf) == ex_buf && int'(spd_y) == ex_y,
          $sformatf("psi=%0d ybuf=%0d y=%0d expected %0d %0d %0d", spd_psi, spd_ybuf, spd_y, spd_conv, ex_buf, ex_y));
    if (ex_buf > 255) n_sat_hi++;
    else if (ex_buf >= 0) n_linear++;
  end

  // position samples (plant held still)
  longint fh_u1 = 0, fh_ny = 0, ft_u1 = 0, ft_ny = 0;
  logic [7:0] pos_conv;
  always @(negedge pos_convst_n) pos_conv = pos_vin;
  function automatic longint clampl(input longint v, input longint lo, input longint hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction
  task automatic filt(input longint u, inout longint u1, inout longint ny, output longint yout);
    longint acc;
    acc  = 2468 * u - 2443 * u1 + 14 * ny;
    ny   = (acc + 8) >>> 4;
    u1   = u;
    yout = (acc + 128) >>> 8;
  endtask
  always @(posedge pos_int) if (!rst) begin
    longint yh, yt;
    filt(clampl(longint'(pos_h_ref) - longint'(pos_conv), -6, 6), fh_u1, fh_ny, yh);
    filt(clampl(longint'(pos_theta_ref), -6, 6), ft_u1, ft_ny, yt);
    repeat (3) @(posedge clk);
    n_pos++;
    check(longint'(pos_gh) == yh && longint'(pos_gtheta) == yt &&
          longint'(pos_v1) == clampl(yh + yt, 0, 255) && longint'(pos_v2) == clampl(yh - yt, 0, 255),
          $sformatf("position gh=%0d gt=%0d v1=%0d v2=%0d, model %0d %0d", pos_gh, pos_gtheta, pos_v1, pos_v2, yh, yt));
  end

  // D/A stream
  logic [15:0] rx, expected;
  int          nbits = 0;
  bit          framing = 0;
  always @(negedge dac_sync_n) begin expected = {dac_cb, dac_db}; nbits = 0; framing = 1; end
  always @(posedge dac_sclk) if (!dac_sync_n) begin rx = {rx[14:0], dac_sout}; nbits++; end
  always @(posedge dac_sync_n) if (framing) begin
    n_frames++;
    if (n_frames % 1000 == 0) begin
      check(nbits == 16 && rx == expected, $sformatf("dac packet %04h expected %04h", rx, expected));
      dac_cb = dac_ctrl_t'($urandom);
      dac_db = 8'($urandom);
    end
  end

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, high;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // enter the reference 7 (rpm 70) with the UP button
    spd_pb = 2'b10;
    wait (spd_psi_ref == 8'd7);
    spd_pb = 2'b00;
    check(n_fast > 0, "button scan shortened while UP was held");
    // display: the tens digit (column 1) shows 7 for 50 000 clocks
    @(negedge clk);
    wait (spd_col == 4'b1101);
    t0 = cyc;
    check(spd_row == 8'b1000_1111, $sformatf("display tens digit row %b", spd_row));
    wait (spd_col != 4'b1101);
    check(cyc - t0 == 50_000, $sformatf("digit dwell %0d", cyc - t0));
    // motor reaches the reference speed
    spd_vin = 8'd7;
    repeat (2) @(negedge spd_int);
    repeat (5) @(posedge clk);
    check(spd_y == 8'd7, $sformatf("y=%0d at reference speed", spd_y));
    // one full PWM period
    wait (spd_pwm == 1'b0);
    wait (spd_pwm == 1'b1);
    t0 = cyc; high = 0;
    repeat (1 << 20) begin
      @(posedge clk);
      if (spd_pwm) high++;
    end
    check(high == 7 * 4096, $sformatf("PWM high %0d of 1048576", high));
    $display("speed samples=%0d clamp_hi=%0d linear=%0d  position samples=%0d  dac frames=%0d",
             n_samples, n_sat_hi, n_linear, n_pos, n_frames);
    check(n_sat_hi > 0 && n_linear > 0 && n_pos > 0 && n_frames > 1000, "all parts active");
    check(early1 == 0 && early2 == 0, "A/D read timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
