// pid_pkg: constants and helper functions shared by the PID controller building blocks.
//
// The document fixes a 50 MHz master clock (CLK50) and 8-bit data on every converter and
// user-interface bus; those numbers live here. The helper functions are this design's own:
//   bin_to_bcd  - combinational double-dabble conversion of an 8-bit value to 4 BCD digits,
//                 used by the push-button adapter to feed the seven-segment adapter.
//   sat_u8      - clamps a signed intermediate to the unsigned range 0..255 of a PWM duty.
package pid_pkg;

  localparam int unsigned CLK_HZ = 50_000_000;  // CLK50
  localparam int unsigned DATA_W = 8;           // width of every data bus (DB)

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [15:0]       bcd4_t;            // four BCD digits, digit 0 in bits 3:0

  // Control byte of the AD7303 16-bit packet (packet bits 15..8, sent first).
  typedef struct packed {
    logic ext_ref;   // 15: 0 = internal reference, 1 = external reference
    logic unused;    // 14: uncommitted
    logic ldac;      // 13: load both DAC outputs synchronously
    logic pdb;       // 12: power down converter B
    logic pda;       // 11: power down converter A
    logic sel_b;     // 10: 0 = converter A, 1 = converter B
    logic cr1;       //  9: data loading function, bit 1
    logic cr0;       //  8: data loading function, bit 0
  } dac_ctrl_t;

  function automatic bcd4_t bin_to_bcd(input logic [7:0] bin);
    logic [27:0] sr;  // {thousands, hundreds, tens, ones, binary}
    sr = {20'd0, bin};
    for (int i = 0; i < 8; i++) begin
      for (int d = 0; d < 4; d++) begin
        if (sr[8+4*d +: 4] >= 4'd5) sr[8+4*d +: 4] = sr[8+4*d +: 4] + 4'd3;
      end
      sr = sr << 1;
    end
    return sr[23:8];
  endfunction

  function automatic data_t sat_u8(input logic signed [31:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage
