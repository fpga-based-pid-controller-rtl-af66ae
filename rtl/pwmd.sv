// pwmd: pulse width modulation device.
//
// A CNT_W-bit counter runs freely at the clock rate; one PWM period is 2^CNT_W clocks
// (2^20 / 50 MHz = 20.97 ms, about 47 Hz). The DATA_W-bit modulating value `db` is scaled by
// 2^(CNT_W-DATA_W) (appending zero bits, 2^12 for the defaults) and compared with the counter:
// `pwm_out` is 1 while the scaled value is larger than the counter. The duty cycle is therefore
// db/256 exactly, from 0 (always low) to 255/256.
//
// Timing: `pwm_out` is registered; a new `db` takes effect on the next clock. Counter width,
// scaling and the compare rule follow the document; the registered output and reset to zero
// are this design's choices.
module pwmd #(
  parameter int unsigned CNT_W  = 20,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] db,
  output logic              pwm_out
);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] scaled;

  assign scaled = {db, {(CNT_W-DATA_W){1'b0}}};

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      pwm_out <= 1'b0;
    end else begin
      cnt     <= cnt + 1'b1;
      pwm_out <= (scaled > cnt);
    end
  end

endmodule
