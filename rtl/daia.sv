// daia: D/A interface adapter for an AD7303-style dual 8-bit serial converter.
//
// The adapter sends one 16-bit packet every FRAME_CYC = 34 clocks (680 ns at 50 MHz,
// 1.47 M updates/s), continuously. Each frame starts with `sync_n` high for two clocks (one
// serial-clock period); `sync_n` then goes low, and at that moment the control byte `cb` and
// the data byte `db` are copied into the output shift register (OSR). The 16 bits follow MSB
// first on `sout`, control bits 15..8 then data bits 7..0 (bit meanings: see dac_ctrl_t in
// pid_pkg). `sclk` is a free-running 25 MHz clock (CLK50/2); `sout` changes while `sclk` is low
// and is stable at every rising `sclk` edge, where the converter shifts it in.
//
// Frame cycle c (0..33): c = 0,1 sync_n high; c = 2 OSR loaded, bit 15 on sout;
// bit 15-i is on sout for c = 2+2i and 3+2i, and `sclk` rises at c = 3+2i.
// Packet format, MSB first, SYNC framing, the 25 MHz serial clock and the 680 ns period follow
// the document; loading the buses at the falling edge of SYNC follows its timing figure; the
// continuous (free-running) transmission is this design's reading of the adapter having no
// start input.
module daia #(
  parameter int unsigned FRAME_CYC = 34
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] cb,
  input  logic [7:0] db,
  output logic       sync_n,
  output logic       sclk,
  output logic       sout,
  output logic       load      // one-clock pulse when cb/db are copied into the OSR
);

  logic [5:0]  cnt;
  logic [5:0]  nc;
  logic [15:0] osr;

  assign nc   = (cnt == 6'(FRAME_CYC - 1)) ? 6'd0 : cnt + 6'd1;
  assign sout = osr[15];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= 6'(FRAME_CYC - 1);
      osr    <= '0;
      sync_n <= 1'b1;
      sclk   <= 1'b0;
      load   <= 1'b0;
    end else begin
      cnt    <= nc;
      sync_n <= (nc < 6'd2);
      sclk   <= nc[0];
      load   <= (nc == 6'd2);
      if (nc == 6'd2)                      osr <= {cb, db};
      else if (nc > 6'd2 && nc[0] == 1'b0) osr <= {osr[14:0], 1'b0};
    end
  end

endmodule
