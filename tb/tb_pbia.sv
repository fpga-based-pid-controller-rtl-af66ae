// tb_pbia: self-checking testbench of the push-button adapter, with shortened scan periods
// (64 clocks normally, 16 clocks after five equal samples) and MAX_VAL = 250.
//
// A reference model written from the specification (scan tick, two-stage input synchronizer,
// increment/decrement with saturation, switch to the fast period after the same single button
// is seen on five consecutive scans) runs alongside and is compared with `db`, `fast` and `bcd`
// on every clock. The stimulus holds buttons for random times, adds contact bounce at every
// press and release, presses both buttons together and drives the value into both limits.
// The BCD output is checked against decimal digits obtained by division.
module tb_pbia;
  localparam int SLOW = 64, FAST = 16;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [1:0]  pb = 2'b00;
  logic [7:0]  db;
  logic [15:0] bcd;
  logic        fast;
  int          checks = 0, failures = 0;
  int          n_fast = 0, n_max = 0, n_min = 0;

  always #10 clk = ~clk;

  pbia #(.SCAN_SLOW(SLOW), .SCAN_FAST(FAST), .MAX_VAL(8'd250)) dut (.clk, .rst, .pb, .db, .bcd, .fast);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // reference model
  logic [1:0] m_s1, m_s2;
  int         m_cnt, m_db, m_run_up, m_run_dn;
  bit         m_fast;
  always @(posedge clk) begin
    if (rst) begin
      m_s1 <= 0; m_s2 <= 0; m_cnt <= SLOW - 1; m_db <= 0; m_run_up <= 0; m_run_dn <= 0; m_fast <= 0;
    end else begin
      m_s1 <= pb;
      m_s2 <= m_s1;
      if (m_cnt == 0) begin
        automatic bit up = (m_s2 == 2'b10);
        automatic bit dn = (m_s2 == 2'b01);
        automatic int ru = up ? m_run_up + 1 : 0;
        automatic int rd = dn ? m_run_dn + 1 : 0;
        m_run_up <= ru;
        m_run_dn <= rd;
        if (up) m_db <= (m_db < 250) ? m_db + 1 : 250;
        if (dn) m_db <= (m_db > 0) ? m_db - 1 : 0;
        m_fast <= (ru >= 5 || rd >= 5);
        m_cnt  <= (ru >= 5 || rd >= 5) ? FAST - 1 : SLOW - 1;
      end else begin
        m_cnt <= m_cnt - 1;
      end
    end
  end

  always @(negedge clk) if (!rst) begin
    check(int'(db) == m_db, $sformatf("db=%0d model=%0d", db, m_db));
    check(fast == m_fast, $sformatf("fast=%0d model=%0d", fast, m_fast));
    check(bcd == {4'd0, 4'(db / 100), 4'((db / 10) % 10), 4'(db % 10)}, $sformatf("bcd=%04h db=%0d", bcd, db));
    if (fast) n_fast++;
    if (db == 8'd250) n_max++;
    if (db == 8'd0) n_min++;
  end

  task automatic press(input logic [1:0] btn, input int clocks);
    // bounce, hold, bounce
    repeat (6) begin pb = $urandom_range(0, 1) ? btn : 2'b00; @(posedge clk); end
    pb = btn;
    repeat (clocks) @(posedge clk);
    repeat (6) begin pb = $urandom_range(0, 1) ? btn : 2'b00; @(posedge clk); end
    pb = 2'b00;
    repeat ($urandom_range(10, 200)) @(posedge clk);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    press(2'b01, 300);          // DOWN at 0: stays at 0
    press(2'b10, 10_000);       // long UP: accelerates and reaches the 250 limit
    press(2'b10, 500);          // UP at the limit
    press(2'b11, 500);          // both: no change
    for (int k = 0; k < 60; k++) press($urandom_range(0, 1) ? 2'b10 : 2'b01, $urandom_range(20, 700));
    press(2'b01, 10_000);       // long DOWN to 0
    check(n_fast > 0 && n_max > 0 && n_min > 0, $sformatf("fast=%0d max=%0d min=%0d", n_fast, n_max, n_min));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
