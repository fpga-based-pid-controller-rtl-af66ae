// position_controller: elevation and slope controller of a dual-rotor helicopter model.
//
// Two rotors, each on its own DC motor driven by a PWM device, lift a beam. The elevation h is
// read from a potentiometer through the serial A/D converter (adia); the slope angle theta is
// counted by the optical encoder adapter (oeia). The two loops are decoupled: each error goes
// through its own copy of the digital filter
//     G(z) = (9.639 - 9.543 z^-1) / (1 - 0.865 z^-1)    (iir_filter, N = 16)
// The elevation correction acts on both rotors in the same direction, the slope correction in
// opposite directions:
//     v1 = clamp(Gh + Gtheta),  v2 = clamp(Gh - Gtheta),   clamp to 0..255,
// since rotor 1 raises theta and rotor 2 lowers it.
//
// Sequencing: a square-wave sampling clock of CLK_HZ / SAMPLE_CYC (500 Hz) starts the A/D
// converter. When its `int` pulse rises, both errors are formed (clamped to -128..127) and
// both filters step once; one clock later the two motor commands are registered. The
// references h_ref (unsigned, in A/D codes) and theta_ref (signed, in encoder counts) are
// inputs. The sensors, the filter, the decoupled structure and the same/opposite-direction
// mixing follow the document; the error clamp to +-ERR_LIM (6), which keeps N^2 y inside the
// 16 bits the filter's rounding taps read (a jump of the filter input by d moves N^2 y by about
// 2468 d), the output clamp, the 500 Hz rate, the mixing by plain
// sum and difference and the reference inputs are this design's choices.
module position_controller
  import pid_pkg::*;
#(
  parameter int unsigned SAMPLE_CYC = CLK_HZ / 500,
  parameter int unsigned PWM_CNT_W  = 20,
  parameter int signed   C0         = 2468,
  parameter int signed   C1         = -2443,
  parameter int signed   CA         = 14,
  parameter int signed   ERR_LIM    = 6
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        h_ref,
  input  logic signed [7:0] theta_ref,
  // AD7823 serial A/D converter (elevation potentiometer)
  output logic              adc_convst_n,
  output logic              adc_sclk,
  input  logic              adc_dout,
  // optical encoder (slope angle)
  input  logic              enc_a,
  input  logic              enc_b,
  input  logic              enc_i,
  // rotor motor drives
  output logic              pwm1,
  output logic              pwm2,
  // observation
  output logic [7:0]        h,
  output logic signed [7:0] theta,
  output logic signed [7:0] gh,
  output logic signed [7:0] gtheta,
  output logic [7:0]        v1,
  output logic [7:0]        v2,
  output logic              sample_int
);

  logic              sample_clk;
  logic [31:0]       div_cnt;
  logic              int_q;
  logic              step;
  logic signed [7:0] e_h, e_theta;
  logic              vh, vt;

  adia u_adia (
    .clk, .rst, .sample(sample_clk), .convst_n(adc_convst_n), .sclk(adc_sclk),
    .sin(adc_dout), .db(h), .intr(sample_int)
  );

  oeia #(.W(8)) u_oeia (
    .clk, .rst, .ch_a(enc_a), .ch_b(enc_b), .index(enc_i), .db(theta)
  );

  assign step    = sample_int && !int_q;
  function automatic logic signed [7:0] clamp_err(input logic signed [31:0] e);
    if (e > ERR_LIM)       return 8'(ERR_LIM);
    else if (e < -ERR_LIM) return 8'(-ERR_LIM);
    else                   return 8'(e);
  endfunction

  assign e_h     = clamp_err(32'($signed({1'b0, h_ref})) - 32'($signed({1'b0, h})));
  assign e_theta = clamp_err(32'(theta_ref) - 32'(theta));

  iir_filter #(.C0(C0), .C1(C1), .CA(CA)) u_filt_h (
    .clk, .rst, .en(step), .u(e_h), .y(gh), .n2y(), .valid(vh)
  );

  iir_filter #(.C0(C0), .C1(C1), .CA(CA)) u_filt_theta (
    .clk, .rst, .en(step), .u(e_theta), .y(gtheta), .n2y(), .valid(vt)
  );

  pwmd #(.CNT_W(PWM_CNT_W), .DATA_W(8)) u_pwm1 (.clk, .rst, .db(v1), .pwm_out(pwm1));
  pwmd #(.CNT_W(PWM_CNT_W), .DATA_W(8)) u_pwm2 (.clk, .rst, .db(v2), .pwm_out(pwm2));

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt    <= '0;
      sample_clk <= 1'b0;
    end else if (div_cnt == SAMPLE_CYC/2 - 1) begin
      div_cnt    <= '0;
      sample_clk <= !sample_clk;
    end else begin
      div_cnt <= div_cnt + 1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      int_q <= 1'b0;
      v1    <= '0;
      v2    <= '0;
    end else begin
      int_q <= sample_int;
      if (vh && vt) begin
        v1 <= sat_u8(32'(gh) + 32'(gtheta));
        v2 <= sat_u8(32'(gh) - 32'(gtheta));
      end
    end
  end

endmodule
