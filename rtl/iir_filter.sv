// iir_filter: first-order digital filter y(k) = b0 u(k) + b1 u(k-1) - a1 y(k-1) in integers.
//
// Division is avoided by scaling with N = 2^LOG2N and, to stop the rounding error of y from
// building up through the recursion, the filter keeps N^2*y(k) rather than y(k):
//   N^2 y(k) = <N^2 b0> u(k) + <N^2 b1> u(k-1) + <-N a1> * <N^2 y(k-1) / N>
// where <> is rounding to an integer. The coefficients are given already scaled and rounded
// (C0 = <N^2 b0>, C1 = <N^2 b1>, CA = <-N a1>). Register set: u(k-1) (8 bits), N y(k-1)
// (12 bits), N^2 y(k) (21 bits). N y(k-1) is N^2 y(k) divided by N and rounded: bits
// [LOG2N+11:LOG2N] plus bit [LOG2N-1]. The 8-bit output is N^2 y(k) divided by N^2 and rounded:
// bits [2*LOG2N+7:2*LOG2N] plus bit [2*LOG2N-1]. Neither result is saturated; both wrap as the
// fixed register widths do.
//
// Defaults are the position-controller filter G(z) = (9.639 - 9.543 z^-1)/(1 - 0.865 z^-1)
// with N = 16: C0 = 2468, C1 = -2443, CA = 14.
// Interface: on a clock with `en` high the signed input `u` is taken as u(k); one clock later
// `y` (signed) and `n2y` hold the new result and `valid` pulses. Structure, widths, N and the
// rounding taps follow the document; single-cycle evaluation, the `en`/`valid` handshake and
// signed input/output are this design's choices.
module iir_filter #(
  parameter int unsigned    LOG2N = 4,
  parameter int unsigned    U_W   = 8,
  parameter int unsigned    ACC_W = 21,
  parameter int unsigned    NY_W  = 12,
  parameter int signed      C0    = 2468,
  parameter int signed      C1    = -2443,
  parameter int signed      CA    = 14
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [U_W-1:0]   u,
  output logic signed [U_W-1:0]   y,
  output logic signed [ACC_W-1:0] n2y,
  output logic                    valid
);

  logic signed [U_W-1:0]   u_prev;   // u(k-1)
  logic signed [NY_W-1:0]  ny_prev;  // N y(k-1)
  logic signed [ACC_W-1:0] acc;
  logic signed [NY_W-1:0]  ny_next;
  logic signed [U_W-1:0]   y_next;

  always_comb begin
    acc = ACC_W'(ACC_W'(C0) * ACC_W'(u))
        + ACC_W'(ACC_W'(C1) * ACC_W'(u_prev))
        + ACC_W'(ACC_W'(CA) * ACC_W'(ny_prev));
    ny_next = acc[LOG2N+NY_W-1:LOG2N] + NY_W'(acc[LOG2N-1]);
    y_next  = acc[2*LOG2N+U_W-1:2*LOG2N] + U_W'(acc[2*LOG2N-1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      u_prev  <= '0;
      ny_prev <= '0;
      n2y     <= '0;
      y       <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        u_prev  <= u;
        ny_prev <= ny_next;
        n2y     <= acc;
        y       <= y_next;
      end
    end
  end

endmodule
