// ad7823_model: behavioural model of an AD7823-style 8-bit serial A/D converter (not
// synthesizable, for testbenches only).
//
// A falling edge of `convst_n` samples the analog input, here the 8-bit code `vin`. The
// conversion takes CONV_NS; every rising edge of `sclk` afterwards puts the next result bit,
// MSB first, on `dout`. `early_reads` counts rising `sclk` edges that arrive before the
// conversion has finished, which a correct interface never produces.
module ad7823_model #(
  parameter realtime CONV_NS = 4000.0
) (
  input  logic       convst_n,
  input  logic       sclk,
  input  logic [7:0] vin,
  output logic       dout,
  output int         early_reads
);

  logic [7:0] sr;
  realtime    t_start;

  initial begin
    sr          = '0;
    dout        = 1'b0;
    early_reads = 0;
    t_start     = 0.0;
  end

  always @(negedge convst_n) begin
    sr      <= vin;
    t_start  = $realtime;
  end

  always @(posedge sclk) begin
    if ($realtime - t_start < CONV_NS) early_reads <= early_reads + 1;
    dout <= #1 sr[7];
    sr   <= {sr[6:0], 1'b0};
  end

endmodule
