// tb_daia: self-checking testbench of the D/A interface adapter.
//
// The testbench plays the AD7303 input shift register: while SYNC is low it shifts `sout` in
// on every rising SCLK edge, and when SYNC returns high it checks that exactly 16 bits arrived
// and that they equal {cb, db} as they were when SYNC fell. The control and data buses change
// at random moments. It also checks the 34-clock (680 ns) frame period, the 2-clock SYNC-high
// gap and the 25 MHz serial clock.
module tb_daia;
  import pid_pkg::*;
  logic      clk = 1'b0;
  logic      rst = 1'b1;
  dac_ctrl_t cb;
  logic [7:0] db;
  logic      sync_n, sclk, sout, load;
  int        checks = 0, failures = 0;

  always #10 clk = ~clk;

  daia dut (.clk, .rst, .cb(cb), .db, .sync_n, .sclk, .sout, .load);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  int          cyc = 0;
  always @(posedge clk) cyc++;

  logic [15:0] rx, expected;
  int          nbits = 0, frames = 0, t_fall = -1, t_rise = -1, t_prev_fall = -1;
  int          sclk_rises = 0;

  always @(negedge sync_n) begin
    expected    = {cb, db};
    nbits       = 0;
    t_prev_fall = t_fall;
    t_fall      = cyc;
    if (t_prev_fall >= 0) check(t_fall - t_prev_fall == 34, $sformatf("frame period %0d", t_fall - t_prev_fall));
    if (t_rise >= 0) check(t_fall - t_rise == 2, $sformatf("SYNC high %0d cycles", t_fall - t_rise));
  end
  always @(posedge sclk) begin
    sclk_rises++;
    if (!sync_n) begin
      rx = {rx[14:0], sout};
      nbits++;
    end
  end
  always @(posedge sync_n) begin
    t_rise = cyc;
    if (t_fall >= 0) begin
      frames++;
      check(nbits == 16, $sformatf("%0d bits in frame", nbits));
      check(rx == expected, $sformatf("packet %04h expected %04h", rx, expected));
    end
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, r0;
    cb = '{ext_ref: 1'b0, unused: 1'b0, ldac: 1'b1, pdb: 1'b0, pda: 1'b0, sel_b: 1'b0, cr1: 1'b0, cr0: 1'b0};
    db = 8'hA5;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (3000) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) begin
        cb = dac_ctrl_t'($urandom);
        db = 8'($urandom);
      end
    end
    // serial clock rate: one rising edge every 2 clocks
    c0 = cyc; r0 = sclk_rises;
    repeat (1000) @(posedge clk);
    check(sclk_rises - r0 == 500, $sformatf("%0d SCLK edges in 1000 clocks", sclk_rises - r0));
    check(frames > 80, $sformatf("%0d frames received", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
