// adia: A/D interface adapter for an AD7823-style serial 8-bit converter.
//
// A rising edge on `sample` starts one acquisition. The adapter pulls `convst_n` low for
// CONVST_CYC clocks (1 us at 50 MHz), then waits WAIT_CYC clocks (4 us) for the converter's
// successive-approximation cycle, then clocks the 8 result bits in MSB first on `sclk`
// (25 MHz: one clock high, one clock low). The converter presents each bit after a rising
// `sclk` edge; the adapter shifts it into the input shift register (ISR) when it drives `sclk`
// low again. After the 8th bit the ISR is copied to the output register (ODR, driven on `db`)
// and `intr` is held high for INT_CYC clocks. Rising edges of `sample` that arrive while an
// acquisition is running are ignored.
//
// Timing: `convst_n` falls on the clock after `sample` is seen high (sample is taken as
// synchronous to clk). `db` changes and `intr` rises 267 clocks after that, `intr` falls 2
// clocks later, and the next `sample` edge can start a new acquisition 270 clocks (5.4 us)
// after the previous one, i.e. up to 185 kS/s.
// The 1 us / 4 us phases, 8-bit MSB-first transfer, ISR->ODR copy and int pulse follow the
// document; the 25 MHz serial clock, the sampling edge and the int pulse width (chosen so the
// whole period is the document's 5.4 us) are this design's choices.
module adia #(
  parameter int unsigned CONVST_CYC = 50,
  parameter int unsigned WAIT_CYC   = 200,
  parameter int unsigned NBITS      = 8,
  parameter int unsigned INT_CYC    = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sample,
  output logic             convst_n,
  output logic             sclk,
  input  logic             sin,
  output logic [NBITS-1:0] db,
  output logic             intr
);

  typedef enum logic [2:0] {S_IDLE, S_CONV, S_WAIT, S_SHIFT, S_LATCH, S_INT} state_t;

  state_t            state;
  logic [15:0]       cnt;
  logic [NBITS-1:0]  isr;
  logic              sample_q;
  logic              start;

  assign start = sample && !sample_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cnt      <= '0;
      isr      <= '0;
      db       <= '0;
      sample_q <= 1'b0;
      convst_n <= 1'b1;
      sclk     <= 1'b0;
      intr     <= 1'b0;
    end else begin
      sample_q <= sample;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_CONV;
          convst_n <= 1'b0;
          cnt      <= 16'(CONVST_CYC - 1);
        end
        S_CONV: if (cnt == 0) begin
          state    <= S_WAIT;
          convst_n <= 1'b1;
          cnt      <= 16'(WAIT_CYC - 1);
        end else cnt <= cnt - 1'b1;
        S_WAIT: if (cnt == 0) begin
          state <= S_SHIFT;
          sclk  <= 1'b1;
          cnt   <= 16'(2*NBITS - 1);
        end else cnt <= cnt - 1'b1;
        S_SHIFT: begin
          if (sclk) begin
            sclk <= 1'b0;
            isr  <= {isr[NBITS-2:0], sin};
          end else begin
            sclk <= 1'b1;
          end
          if (cnt == 0) begin
            state <= S_LATCH;
            sclk  <= 1'b0;
          end else cnt <= cnt - 1'b1;
        end
        S_LATCH: begin
          db    <= isr;
          intr  <= 1'b1;
          state <= S_INT;
          cnt   <= 16'(INT_CYC - 1);
        end
        S_INT: if (cnt == 0) begin
          intr  <= 1'b0;
          state <= S_IDLE;
        end else cnt <= cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
