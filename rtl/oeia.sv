// oeia: optical encoder interface adapter for a phase-quadrature incremental encoder.
//
// The encoder channels A, B and the index I are brought into the clock domain through two
// flip-flops each. On every rising edge of channel A the adapter looks at channel B: B low
// means clockwise rotation and the position `db` is incremented, B high means
// counter-clockwise and `db` is decremented. While the index input is high `db` is held at
// zero; the index is evaluated before, and takes priority over, the channel-A action. This
// re-zeroes the count once per revolution and removes drift caused by noise.
//
// `db` is a W-bit two's complement count that wraps around. It changes 3 clocks after the
// channel-A edge (two synchronizer stages plus the edge-detect register). The count rule and the
// index priority follow the document; the synchronizers, the 8-bit width and the wrap-around
// are this design's choices.
module oeia #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ch_a,
  input  logic         ch_b,
  input  logic         index,
  output logic [W-1:0] db
);

  logic [1:0] a_sync, b_sync, i_sync;
  logic       a_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_sync <= '0;
      b_sync <= '0;
      i_sync <= '0;
      a_q    <= 1'b0;
      db     <= '0;
    end else begin
      a_sync <= {a_sync[0], ch_a};
      b_sync <= {b_sync[0], ch_b};
      i_sync <= {i_sync[0], index};
      a_q    <= a_sync[1];
      if (i_sync[1])                db <= '0;
      else if (a_sync[1] && !a_q) begin
        if (!b_sync[1])             db <= db + 1'b1;
        else                        db <= db - 1'b1;
      end
    end
  end

endmodule
