// tb_ssia: self-checking testbench of the seven-segment adapter (DIGIT_CYC shortened to 10).
//
// On every clock exactly one column must be active (low), the columns must follow each other
// 0,1,2,3 with a dwell of DIGIT_CYC clocks, and the active-low row pattern must light exactly
// the segments of the BCD digit of that column, taken from a table of segment letters
// (a=row 6, b=5, c=4, d=3, e=2, f=1, g=0, dp=7 always off). Nibbles above 9 must be blank.
module tb_ssia;
  localparam int DC = 10;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [15:0] bcd;
  logic [7:0]  row;
  logic [3:0]  col;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  ssia #(.DIGIT_CYC(DC)) dut (.clk, .rst, .bcd, .row, .col);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  string segs [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg", "", "", "", "", "", ""};

  function automatic logic [7:0] expected_row(input logic [3:0] d);
    logic [7:0] r;
    r = 8'hFF;
    foreach (segs[d][i]) r[6 - (segs[d][i] - "a")] = 1'b0;
    return r;
  endfunction

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_col, dwell, switches;
    bcd = 16'h0123;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    prev_col = -1; dwell = 0; switches = 0;
    for (int c = 0; c < 20_000; c++) begin
      int d;
      @(negedge clk);
      // row and col are registered together from the digit index and the BCD value of the
      // previous clock edge; the BCD input changes only at this point, right after checking
      d = -1;
      for (int i = 0; i < 4; i++) if (col == ~(4'b0001 << i)) d = i;
      check(d >= 0, $sformatf("col=%b not one-cold", col));
      if (d >= 0) begin
        if (c % 400 != 1)
          check(row == expected_row(bcd[4*d +: 4]), $sformatf("digit %0d value %0h row %b", d, bcd[4*d +: 4], row));
        if (d == prev_col) dwell++;
        else begin
          if (prev_col >= 0) begin
            check(d == (prev_col + 1) % 4, $sformatf("column %0d after %0d", d, prev_col));
            if (switches > 0) check(dwell == DC, $sformatf("dwell %0d", dwell));
            switches++;
          end
          dwell = 1;
        end
        prev_col = d;
      end
      if (c % 400 == 0) bcd = (c % 1200 == 0) ? 16'h9AF5 : 16'($urandom);
    end
    check(switches > 100, $sformatf("%0d column switches", switches));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
