// tb_pid_fpga_top: end-to-end testbench of the whole design with shortened timers
// (sampling every 1000 clocks, push-button scan 64/16 clocks, 10-clock display digits,
// 12-bit PWM counters).
//
// All three parts run at once:
//   - speed controller in closed loop with a first-order motor model and an A/D model; the
//     reference is raised and lowered with the buttons; every sample is checked against
//     Ybuf = PsiRef + 64 (PsiRef - Psi), Y = clamp(Ybuf), and the speed must settle on the
//     reference;
//   - position controller with an A/D model for the elevation and quadrature waveforms for
//     the slope; the mixed motor commands are checked against clamp(Gh +- Gtheta) from the
//     observed filter outputs, and the filter outputs against an independent integer model;
//   - D/A adapter: every serial packet is decoded and compared with the control and data
//     bytes at the start of its frame.
// Each mechanism is counted and must occur: speed clamp high and low, linear region, fast
// button scan, position error clamp, encoder index reset, D/A frames.
module tb_pid_fpga_top;
  import pid_pkg::*;
  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [1:0]        spd_pb = 2'b00;
  logic [7:0]        spd_row, spd_psi_ref, spd_psi, spd_y;
  logic [3:0]        spd_col;
  logic signed [17:0] spd_ybuf;
  logic              spd_convst_n, spd_sclk, spd_dout, spd_pwm, spd_int, spd_pb_fast;
  logic [7:0]        pos_h_ref = 8'd100;
  logic signed [7:0] pos_theta_ref = 8'sd0;
  logic              pos_convst_n, pos_sclk, pos_dout, pos_pwm1, pos_pwm2, pos_int;
  logic              enc_a = 1'b0, enc_b = 1'b0, enc_i = 1'b0;
  logic [7:0]        pos_h, pos_v1, pos_v2;
  logic signed [7:0] pos_theta, pos_gh, pos_gtheta;
  dac_ctrl_t         dac_cb;
  logic [7:0]        dac_db;
  logic              dac_sync_n, dac_sclk, dac_sout, dac_load;
  logic [7:0]        spd_vin = 8'd0, pos_vin = 8'd100;
  int                early1, early2;
  int                checks = 0, failures = 0;
  int n_pos_lin = 0, n_sat_hi = 0, n_sat_lo = 0, n_linear = 0, n_fast = 0, n_err_clamp = 0, n_index = 0,
      n_frames = 0, n_pos = 0;

  always #10 clk = ~clk;

  pid_fpga_top #(.SAMPLE_CYC(1000), .PB_SLOW(64), .PB_FAST(16), .DIGIT_CYC(10), .PWM_CNT_W(12)) dut (
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

  // ---------------- speed loop ----------------
  int         speed_x256 = 0;
  logic [7:0] spd_conv;
  always @(negedge spd_convst_n) begin
    spd_conv    = spd_vin;
    speed_x256 += (int'(spd_y) * 256 - speed_x256) / 128;
    spd_vin     = 8'(speed_x256 / 256);
  end
  always @(negedge spd_int) if (!rst) begin
    int ex_buf, ex_y;
    repeat (3) @(posedge clk);
    ex_buf = int'(spd_psi_ref) + 64 * (int'(spd_psi_ref) - int'(spd_conv));
    ex_y   = ex_buf < 0 ? 0 : ex_buf > 255 ? 255 : ex_buf;
    check(spd_psi == spd_conv, "speed sample");
    check(int'(spd_ybuf) == ex_buf && int'(spd_y) == ex_y,
          $sformatf("ybuf=%0d y=%0d expected %0d %0d", spd_ybuf, spd_y, ex_buf, ex_y));
    if (ex_buf > 255) n_sat_hi++;
    else if (ex_buf < 0) n_sat_lo++;
    else n_linear++;
  end
  always @(posedge clk) if (spd_pb_fast) n_fast++;

  // ---------------- position loop ----------------
  longint fh_u1 = 0, fh_ny = 0, ft_u1 = 0, ft_ny = 0, enc_count = 0;
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
    longint eh, et, yh, yt, th;
    th = longint'($signed(8'(enc_count)));
    eh = longint'(pos_h_ref) - longint'(pos_conv);
    et = longint'(pos_theta_ref) - th;
    if (eh > 6 || eh < -6 || et > 6 || et < -6) n_err_clamp++;
    else n_pos_lin++;
    filt(clampl(eh, -6, 6), fh_u1, fh_ny, yh);
    filt(clampl(et, -6, 6), ft_u1, ft_ny, yt);
    repeat (3) @(posedge clk);
    n_pos++;
    check(longint'(pos_gh) == yh && longint'(pos_gtheta) == yt,
          $sformatf("gh=%0d gtheta=%0d expected %0d %0d", pos_gh, pos_gtheta, yh, yt));
    check(longint'(pos_v1) == clampl(yh + yt, 0, 255) && longint'(pos_v2) == clampl(yh - yt, 0, 255),
          $sformatf("v1=%0d v2=%0d", pos_v1, pos_v2));
  end

  // ---------------- D/A stream ----------------
  logic [15:0] rx, expected;
  int          nbits = 0;
  bit          framing = 0;
  always @(negedge dac_sync_n) begin expected = {dac_cb, dac_db}; nbits = 0; framing = 1; end
  always @(posedge dac_sclk) if (!dac_sync_n) begin rx = {rx[14:0], dac_sout}; nbits++; end
  always @(posedge dac_sync_n) if (framing) begin
    n_frames++;
    check(nbits == 16 && rx == expected, $sformatf("dac packet %04h expected %04h", rx, expected));
  end
  always @(negedge clk) if ($urandom_range(0, 15) == 0) begin
    dac_cb = dac_ctrl_t'($urandom);
    dac_db = 8'($urandom);
  end

  task automatic wait_clk(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // position plant stimulus: moves between samples only
  initial begin
    @(negedge rst);
    forever begin
      @(negedge pos_int);
      wait_clk(5);
      pos_vin = 8'(int'(pos_h_ref) + $urandom_range(0, 16) - 8);
      begin
        automatic bit dir = (enc_count > 8) ? 1'b0 : (enc_count < -8) ? 1'b1 : 1'($urandom);
        repeat ($urandom_range(0, 6)) begin
          if (dir) begin
            enc_a = 1; wait_clk(4); enc_b = 1; wait_clk(4); enc_a = 0; wait_clk(4); enc_b = 0; wait_clk(4);
            enc_count++;
          end else begin
            enc_b = 1; wait_clk(4); enc_a = 1; wait_clk(4); enc_b = 0; wait_clk(4); enc_a = 0; wait_clk(4);
            enc_count--;
          end
        end
      end
      if ($urandom_range(0, 60) == 0) begin
        enc_i = 1; wait_clk(6); enc_i = 0; wait_clk(4);
        enc_count = 0; n_index++;
      end
    end
  end

  initial begin
    dac_cb = '0;
    dac_db = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    spd_pb = 2'b10;
    wait (spd_psi_ref == 8'd200);
    spd_pb = 2'b00;
    repeat (300_000) @(posedge clk);
    check(int'(spd_psi) >= 199 && int'(spd_psi) <= 201, $sformatf("speed %0d for reference 200", spd_psi));
    spd_pb = 2'b01;
    wait (spd_psi_ref == 8'd90);
    spd_pb = 2'b00;
    repeat (400_000) @(posedge clk);
    check(int'(spd_psi) >= 89 && int'(spd_psi) <= 91, $sformatf("speed %0d for reference 90", spd_psi));
    $display("speed: clamp_hi=%0d clamp_lo=%0d linear=%0d fast_scan_clocks=%0d", n_sat_hi, n_sat_lo, n_linear, n_fast);
    $display("position: samples=%0d unclamped=%0d err_clamp=%0d index=%0d   dac frames=%0d", n_pos, n_pos_lin, n_err_clamp, n_index, n_frames);
    check(n_sat_hi > 0, "speed clamp high occurred");
    check(n_sat_lo > 0, "speed clamp low occurred");
    check(n_linear > 0, "speed linear region occurred");
    check(n_fast > 0, "fast button scan occurred");
    check(n_err_clamp > 0, "position error clamp occurred");
    check(n_index > 0, "encoder index reset occurred");
    check(n_pos_lin > 0, "position errors inside the clamp occurred");
    check(n_frames > 1000, "D/A frames sent");
    check(early1 == 0 && early2 == 0, "A/D read timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
