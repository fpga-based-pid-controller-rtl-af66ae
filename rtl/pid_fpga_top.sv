// pid_fpga_top: the FPGA building blocks for PID control, assembled as two controllers plus a
// D/A adapter, side by side on one 50 MHz clock.
//
//   spd_*  DC-motor speed controller (speed_controller): push-button reference, seven-segment
//          display, tachometer through the serial A/D converter, proportional law, PWM drive.
//   pos_*  helicopter elevation/slope controller (position_controller): potentiometer through
//          a second A/D converter, optical encoder, two G(z) filters, two PWM rotor drives.
//   dac_*  D/A interface adapter (daia) for the dual serial D/A converter, driven from its own
//          control-byte and data-byte inputs; neither controller uses an analog output.
//
// The two controllers share nothing but the clock and reset. Parameters are passed down so a
// testbench can shorten the slow timers; their defaults are the real-time values.
module pid_fpga_top
  import pid_pkg::*;
#(
  parameter int unsigned SAMPLE_CYC = CLK_HZ / 500,
  parameter int unsigned PB_SLOW    = 1 << 23,
  parameter int unsigned PB_FAST    = 1 << 21,
  parameter int unsigned DIGIT_CYC  = 50_000,
  parameter int unsigned PWM_CNT_W  = 20
) (
  input  logic              clk,
  input  logic              rst,
  // speed controller
  input  logic [1:0]        spd_pb,
  output logic [7:0]        spd_row,
  output logic [3:0]        spd_col,
  output logic              spd_adc_convst_n,
  output logic              spd_adc_sclk,
  input  logic              spd_adc_dout,
  output logic              spd_pwm,
  output logic [7:0]        spd_psi_ref,
  output logic [7:0]        spd_psi,
  output logic [7:0]        spd_y,
  output logic signed [17:0] spd_ybuf,
  output logic              spd_int,
  output logic              spd_pb_fast,
  // position controller
  input  logic [7:0]        pos_h_ref,
  input  logic signed [7:0] pos_theta_ref,
  output logic              pos_adc_convst_n,
  output logic              pos_adc_sclk,
  input  logic              pos_adc_dout,
  input  logic              pos_enc_a,
  input  logic              pos_enc_b,
  input  logic              pos_enc_i,
  output logic              pos_pwm1,
  output logic              pos_pwm2,
  output logic [7:0]        pos_h,
  output logic signed [7:0] pos_theta,
  output logic signed [7:0] pos_gh,
  output logic signed [7:0] pos_gtheta,
  output logic [7:0]        pos_v1,
  output logic [7:0]        pos_v2,
  output logic              pos_int,
  // D/A adapter
  input  dac_ctrl_t         dac_cb,
  input  logic [7:0]        dac_db,
  output logic              dac_sync_n,
  output logic              dac_sclk,
  output logic              dac_sout,
  output logic              dac_load
);

  speed_controller #(
    .SAMPLE_CYC(SAMPLE_CYC), .PB_SLOW(PB_SLOW), .PB_FAST(PB_FAST),
    .DIGIT_CYC(DIGIT_CYC), .PWM_CNT_W(PWM_CNT_W)
  ) u_speed (
    .clk, .rst, .pb(spd_pb), .row(spd_row), .col(spd_col),
    .adc_convst_n(spd_adc_convst_n), .adc_sclk(spd_adc_sclk), .adc_dout(spd_adc_dout),
    .pwm_out(spd_pwm), .psi_ref(spd_psi_ref), .psi(spd_psi), .ybuf(spd_ybuf), .y(spd_y),
    .sample_int(spd_int), .pb_fast(spd_pb_fast)
  );

  position_controller #(
    .SAMPLE_CYC(SAMPLE_CYC), .PWM_CNT_W(PWM_CNT_W)
  ) u_position (
    .clk, .rst, .h_ref(pos_h_ref), .theta_ref(pos_theta_ref),
    .adc_convst_n(pos_adc_convst_n), .adc_sclk(pos_adc_sclk), .adc_dout(pos_adc_dout),
    .enc_a(pos_enc_a), .enc_b(pos_enc_b), .enc_i(pos_enc_i),
    .pwm1(pos_pwm1), .pwm2(pos_pwm2), .h(pos_h), .theta(pos_theta),
    .gh(pos_gh), .gtheta(pos_gtheta), .v1(pos_v1), .v2(pos_v2), .sample_int(pos_int)
  );

  daia u_daia (
    .clk, .rst, .cb(dac_cb), .db(dac_db), .sync_n(dac_sync_n), .sclk(dac_sclk),
    .sout(dac_sout), .load(dac_load)
  );

endmodule
