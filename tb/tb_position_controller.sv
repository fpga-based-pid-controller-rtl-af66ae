// tb_position_controller: testbench of the helicopter elevation/slope controller with
// shortened timers (sampling every 1000 clocks, 12-bit PWM counters).
//
// An AD7823 model supplies the elevation code h; the testbench drives quadrature encoder
// waveforms to move the slope count theta (including index pulses). After every sample it
// recomputes, independently of the RTL, the two clamped errors, the two filter recursions
// (N^2 y(k) = 2468 u(k) - 2443 u(k-1) + 14 <N^2 y(k-1)/16>) and the mixed, clamped motor
// commands v1 = Gh + Gtheta, v2 = Gh - Gtheta, and compares them with the controller. It
// counts how often the error clamp, the lower output clamp and the index reset occurred, and
// checks the PWM duty of both rotors once.
module tb_position_controller;
  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [7:0]        h_ref = 8'd100;
  logic signed [7:0] theta_ref = 8'sd0;
  logic              convst_n, adc_sclk, adc_dout;
  logic              enc_a = 1'b0, enc_b = 1'b0, enc_i = 1'b0;
  logic              pwm1, pwm2, sample_int;
  logic [7:0]        h, v1, v2;
  logic signed [7:0] theta, gh, gtheta;
  logic [7:0]        vin = 8'd100;
  int                early;
  int                checks = 0, failures = 0;
  int                n_err_clamp = 0, n_v_hi = 0, n_v_lo = 0, n_index = 0, n_samples = 0;

  always #10 clk = ~clk;

  position_controller #(.SAMPLE_CYC(1000), .PWM_CNT_W(12)) dut (
    .clk, .rst, .h_ref, .theta_ref, .adc_convst_n(convst_n), .adc_sclk, .adc_dout,
    .enc_a, .enc_b, .enc_i, .pwm1, .pwm2, .h, .theta, .gh, .gtheta, .v1, .v2, .sample_int
  );
  ad7823_model adc (.convst_n, .sclk(adc_sclk), .vin, .dout(adc_dout), .early_reads(early));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // reference state of both filters
  longint fh_u1 = 0, fh_ny = 0, ft_u1 = 0, ft_ny = 0;
  longint enc_count = 0;   // reference encoder count
  logic [7:0] converted;

  always @(negedge convst_n) converted = vin;

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

  always @(posedge sample_int) if (!rst) begin
    longint eh, et, yh, yt, e1, e2, th;
    th = longint'($signed(8'(enc_count)));
    eh = longint'(h_ref) - longint'(converted);
    et = longint'(theta_ref) - th;
    if (eh > 6 || eh < -6 || et > 6 || et < -6) n_err_clamp++;
    eh = clampl(eh, -6, 6);
    et = clampl(et, -6, 6);
    filt(eh, fh_u1, fh_ny, yh);
    filt(et, ft_u1, ft_ny, yt);
    e1 = clampl(yh + yt, 0, 255);
    e2 = clampl(yh - yt, 0, 255);
    repeat (3) @(posedge clk);
    n_samples++;
    check(h == converted, $sformatf("h=%0d expected %0d", h, converted));
    check(longint'(theta) == th, $sformatf("theta=%0d expected %0d", theta, th));
    check(longint'(gh) == yh, $sformatf("gh=%0d expected %0d", gh, yh));
    check(longint'(gtheta) == yt, $sformatf("gtheta=%0d expected %0d", gtheta, yt));
    check(longint'(v1) == e1 && longint'(v2) == e2, $sformatf("v1=%0d v2=%0d expected %0d %0d", v1, v2, e1, e2));
    if (yh + yt < 0 || yh - yt < 0) n_v_lo++;
  end

  task automatic wait_clk(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic enc_step(input bit cw);
    if (cw) begin
      enc_a = 1; wait_clk(4); enc_b = 1; wait_clk(4); enc_a = 0; wait_clk(4); enc_b = 0; wait_clk(4);
      enc_count++;
    end else begin
      enc_b = 1; wait_clk(4); enc_a = 1; wait_clk(4); enc_b = 0; wait_clk(4); enc_a = 0; wait_clk(4);
      enc_count--;
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int high1, high2;
    logic [7:0] v1_before, v2_before;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // Move the plant between samples only, so every sample sees settled inputs.
    for (int k = 0; k < 600; k++) begin
      @(negedge sample_int);
      wait_clk(5);
      // elevation: slow wander with occasional jumps
      if (k % 50 == 0) vin = 8'($urandom_range(60, 140));
      else vin = 8'(int'(vin) + $urandom_range(0, 2) - 1);
      // slope: a few encoder steps in a random direction
      begin
        automatic bit dir = 1'($urandom);
        repeat ($urandom_range(0, 8)) enc_step(dir);
      end
      if (k % 97 == 96) begin
        enc_i = 1; wait_clk(6); enc_i = 0; wait_clk(4);
        enc_count = 0; n_index++;
      end
      if (k % 120 == 60) begin
        h_ref     = 8'($urandom_range(80, 120));
        theta_ref = 8'($signed($urandom_range(0, 20)) - 10);
      end
    end
    // PWM of both rotors against the registered commands, with the plant held still until the
    // filters have settled and the commands no longer change
    vin = h_ref - 8'd5;
    repeat (80) @(negedge sample_int);
    wait_clk(5);
    v1_before = v1; v2_before = v2;
    high1 = 0; high2 = 0;
    repeat (4096) begin
      @(posedge clk);
      if (pwm1) high1++;
      if (pwm2) high2++;
    end
    check(v1 == v1_before && v2 == v2_before, "commands steady during the PWM measurement");
    check(high1 == int'(v1) * 16 && high2 == int'(v2) * 16,
          $sformatf("pwm high %0d/%0d for v1=%0d v2=%0d", high1, high2, v1, v2));
    check(n_err_clamp > 0 && n_v_lo > 0 && n_index > 0,
          $sformatf("error clamp %0d, output clamp %0d, index %0d", n_err_clamp, n_v_lo, n_index));
    check(early == 0, "A/D read timing");
    $display("samples=%0d err_clamp=%0d out_clamp_lo=%0d index=%0d", n_samples, n_err_clamp, n_v_lo, n_index);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
