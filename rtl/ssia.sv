// ssia: seven-segment interface adapter for four multiplexed common-anode digits.
//
// The 16-bit BCD input holds four digits, digit 0 (bits 3:0) shown on the rightmost display
// (column 0). Only one digit is lit at a time: every DIGIT_CYC clocks (50 000 = 1 ms at 50 MHz,
// a 1 kHz multiplex rate) the adapter moves to the next column. `col` selects the lit digit
// (active low, one bit low at a time, driving the high-side column transistors) and `row`
// drives the shared segment cathodes (active low). Row bit assignment: 6 = a (top),
// 5 = b (upper right), 4 = c (lower right), 3 = d (bottom), 2 = e (lower left),
// 1 = f (upper left), 0 = g (middle), 7 = decimal point (kept off). A nibble above 9 is blank.
//
// Timing: `row` and `col` are registered and change together. The 16-bit BCD input, four
// columns, eight rows, their numbering and the 1 kHz rate follow the document; the active-low
// polarities and the blanking of non-decimal nibbles are this design's choices.
module ssia
  import pid_pkg::*;
#(
  parameter int unsigned DIGIT_CYC = 50_000
) (
  input  logic       clk,
  input  logic       rst,
  input  bcd4_t      bcd,
  output logic [7:0] row,
  output logic [3:0] col
);

  logic [31:0] cnt;
  logic [1:0]  digit;
  logic [3:0]  nib;
  logic [6:0]  seg;   // active-high a..g in bits 6..0

  always_comb begin
    nib = bcd[4*digit +: 4];
    unique case (nib)
      4'd0: seg = 7'b111_1110;
      4'd1: seg = 7'b011_0000;
      4'd2: seg = 7'b110_1101;
      4'd3: seg = 7'b111_1001;
      4'd4: seg = 7'b011_0011;
      4'd5: seg = 7'b101_1011;
      4'd6: seg = 7'b101_1111;
      4'd7: seg = 7'b111_0000;
      4'd8: seg = 7'b111_1111;
      4'd9: seg = 7'b111_1011;
      default: seg = 7'b000_0000;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      digit <= '0;
      row   <= 8'hFF;
      col   <= 4'hF;
    end else begin
      if (cnt == DIGIT_CYC - 1) begin
        cnt   <= '0;
        digit <= digit + 2'd1;
      end else begin
        cnt <= cnt + 1;
      end
      row <= {1'b1, ~seg};
      col <= ~(4'b0001 << digit);
    end
  end

endmodule
