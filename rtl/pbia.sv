// pbia: push-button interface adapter (UP/DOWN entry of an 8-bit value).
//
// Two push-buttons, `pb[1]` = UP and `pb[0]` = DOWN (active high, pulled down externally),
// set an 8-bit input register `db`. The buttons are not read continuously but scanned once per
// scan period, which is longer than the contact bounce, so bounce is never seen. At each scan
// an UP-only press increments `db` (saturating at MAX_VAL), a DOWN-only press decrements it
// (saturating at 0); both or neither leave it unchanged. A held button therefore repeats at the
// scan rate. The last HIST = 5 scan samples (the current one and the 4 before it) are used: when all of them show the same single
// button held, the scan period drops from SCAN_SLOW (2^23 clocks = 167.77 ms at 50 MHz) to
// SCAN_FAST (2^21 clocks = 41.9 ms), so a long press runs faster; the slow period returns as
// soon as one sample breaks the run. `bcd` is the BCD code of `db` (4 digits, the thousands
// digit always 0) for a seven-segment display.
//
// Timing: `db` and `bcd` change on the clock after a scan tick. The default 167.77 ms scan,
// the 5-sample history and the BCD output follow the document; the fast period, the
// "5 equal samples" rule, saturation and the two-flip-flop input synchronizer are this design's
// choices.
module pbia
  import pid_pkg::*;
#(
  parameter int unsigned SCAN_SLOW = 1 << 23,
  parameter int unsigned SCAN_FAST = 1 << 21,
  parameter int unsigned HIST      = 5,
  parameter logic [7:0]  MAX_VAL   = 8'd255
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] pb,
  output logic [7:0] db,
  output bcd4_t      bcd,
  output logic       fast     // 1 while the shortened scan period is in use
);

  logic [1:0]      pb_s1, pb_s2;
  logic [31:0]     scan_cnt;
  logic [HIST-2:0] up_hist, dn_hist;   // the HIST-1 samples before the current one
  logic            tick;
  logic            up, dn;

  assign tick = (scan_cnt == 0);
  assign up   = pb_s2[1] && !pb_s2[0];
  assign dn   = pb_s2[0] && !pb_s2[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      pb_s1    <= '0;
      pb_s2    <= '0;
      scan_cnt <= SCAN_SLOW - 1;
      up_hist  <= '0;
      dn_hist  <= '0;
      db       <= '0;
      fast     <= 1'b0;
    end else begin
      pb_s1 <= pb;
      pb_s2 <= pb_s1;
      if (tick) begin
        up_hist <= {up_hist[HIST-3:0], up};
        dn_hist <= {dn_hist[HIST-3:0], dn};
        if (up && db < MAX_VAL) db <= db + 8'd1;
        if (dn && db > 8'd0)    db <= db - 8'd1;
        // Run of HIST equal presses, counting the one taken now.
        if ((up && &up_hist[HIST-2:0]) || (dn && &dn_hist[HIST-2:0])) begin
          fast     <= 1'b1;
          scan_cnt <= SCAN_FAST - 1;
        end else begin
          fast     <= 1'b0;
          scan_cnt <= SCAN_SLOW - 1;
        end
      end else begin
        scan_cnt <= scan_cnt - 1;
      end
    end
  end

  assign bcd = bin_to_bcd(db);

endmodule
