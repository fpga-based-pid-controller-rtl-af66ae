// speed_controller: proportional closed-loop DC-motor speed controller.
//
// The reference speed PsiRef is entered with the UP/DOWN push-buttons (pbia, 0..REF_MAX in
// steps of 10 rpm, so 250 means 2500 rpm) and shown on the four seven-segment digits (ssia)
// in rpm, i.e. with a trailing 0. The measured speed Psi is the tachometer voltage read by the
// serial A/D converter (adia); the analog divider maps rated speed to code 250. The control
// law is
//     Ybuf = PsiRef + K * (PsiRef - Psi),   Y = Ybuf clamped to 0..255,
// and Y is the duty-cycle input of the PWM device (pwmd) that switches the motor MOSFET.
//
// Sequencing: a square-wave sampling clock of CLK_HZ / SAMPLE_CYC (500 Hz) drives the adapter's
// `sample` input. The adapter's `int` pulse paces the arithmetic: on its rising edge Ybuf is
// computed and stored (unclamped); on its falling edge the clamped value is registered as Y.
// Ybuf is updated 1 clock and Y 3 clocks after the A/D result (and `int`) appear, because
// `int` is 2 clocks wide. The display drops the BCD thousands digit of PsiRef, which is
// always 0, to make room for the trailing 0.
// K = 64, the reference range, the feed-forward PsiRef term, the clamp, the module set and
// the rising/falling-edge split follow the document; the 500 Hz sampling rate and the rpm
// display format are this design's choices.
module speed_controller
  import pid_pkg::*;
#(
  parameter int unsigned K          = 64,
  parameter int unsigned SAMPLE_CYC = CLK_HZ / 500,
  parameter logic [7:0]  REF_MAX    = 8'd250,
  parameter int unsigned PB_SLOW    = 1 << 23,
  parameter int unsigned PB_FAST    = 1 << 21,
  parameter int unsigned DIGIT_CYC  = 50_000,
  parameter int unsigned PWM_CNT_W  = 20
) (
  input  logic              clk,
  input  logic              rst,
  // push-buttons: [1] = UP, [0] = DOWN
  input  logic [1:0]        pb,
  // seven-segment display
  output logic [7:0]        row,
  output logic [3:0]        col,
  // AD7823 serial A/D converter
  output logic              adc_convst_n,
  output logic              adc_sclk,
  input  logic              adc_dout,
  // motor drive
  output logic              pwm_out,
  // observation of the named loop signals
  output logic [7:0]        psi_ref,
  output logic [7:0]        psi,
  output logic signed [17:0] ybuf,
  output logic [7:0]        y,
  output logic              sample_int,
  output logic              pb_fast     // push-button scan running at its shortened period
);

  bcd4_t       ref_bcd;
  logic        sample_clk;
  logic [31:0] div_cnt;
  logic        int_q;

  pbia #(.SCAN_SLOW(PB_SLOW), .SCAN_FAST(PB_FAST), .MAX_VAL(REF_MAX)) u_pbia (
    .clk, .rst, .pb, .db(psi_ref), .bcd(ref_bcd), .fast(pb_fast)
  );

  ssia #(.DIGIT_CYC(DIGIT_CYC)) u_ssia (
    .clk, .rst, .bcd({ref_bcd[11:0], 4'h0}), .row, .col
  );

  adia u_adia (
    .clk, .rst, .sample(sample_clk), .convst_n(adc_convst_n), .sclk(adc_sclk),
    .sin(adc_dout), .db(psi), .intr(sample_int)
  );

  pwmd #(.CNT_W(PWM_CNT_W), .DATA_W(8)) u_pwmd (
    .clk, .rst, .db(y), .pwm_out
  );

  // Sampling clock: square wave, SAMPLE_CYC clocks per period.
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

  // Control law on the rising edge of int, clamp and register on its falling edge.
  always_ff @(posedge clk) begin
    if (rst) begin
      int_q <= 1'b0;
      ybuf  <= '0;
      y     <= '0;
    end else begin
      int_q <= sample_int;
      if (sample_int && !int_q)
        ybuf <= 18'($signed({10'd0, psi_ref}))
              + 18'(K) * (18'($signed({10'd0, psi_ref})) - 18'($signed({10'd0, psi})));
      if (!sample_int && int_q)
        y <= sat_u8(32'(ybuf));
    end
  end

endmodule
