// tb_adia: self-checking testbench of the A/D interface adapter.
//
// An AD7823 model converts random 8-bit codes. For each acquisition the testbench checks the
// result on `db` when `int` rises, the 1 us CONVST pulse (50 clocks), the 267-clock delay from
// CONVST to `int`, the 8 SCLK pulses, that no bit is read before the 4 us conversion time,
// that a second `sample` edge during an acquisition is ignored, and that acquisitions can
// follow each other every 5.4 us (270 clocks, 185 kS/s).
module tb_adia;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       sample = 1'b0;
  logic       convst_n, sclk, sin, intr;
  logic [7:0] db, vin;
  int         early;
  int         checks = 0, failures = 0;

  always #10 clk = ~clk;

  adia dut (.clk, .rst, .sample, .convst_n, .sclk, .sin, .db, .intr);
  ad7823_model adc (.convst_n, .sclk, .vin, .dout(sin), .early_reads(early));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // cycle counters
  int cyc = 0, t_conv = 0, t_int = 0, n_conv = 0, n_sclk = 0, t_convst_rise = 0;
  always @(posedge clk) cyc++;
  always @(negedge convst_n) begin t_conv = cyc; n_conv++; n_sclk = 0; end
  always @(posedge convst_n) t_convst_rise = cyc;
  always @(posedge sclk) n_sclk++;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int convs_before;
    vin = 8'h00;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    // 20 separate acquisitions with random codes, including 0x00 and 0xFF
    for (int k = 0; k < 20; k++) begin
      vin = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      @(posedge clk) sample <= 1'b1;
      convs_before = n_conv;
      // extra sample edge in the middle of the acquisition must be ignored
      repeat (100) @(posedge clk);
      sample <= 1'b0;
      repeat (3) @(posedge clk);
      sample <= 1'b1;
      repeat (3) @(posedge clk);
      sample <= 1'b0;
      @(posedge intr);
      t_int = cyc;
      check(n_conv == convs_before + 1, "exactly one conversion started per sample edge");
      check(db == vin, $sformatf("db=%02h expected %02h", db, vin));
      check(t_convst_rise - t_conv == 50, $sformatf("CONVST low %0d cycles", t_convst_rise - t_conv));
      check(t_int - t_conv == 267, $sformatf("CONVST to int %0d cycles", t_int - t_conv));
      check(n_sclk == 8, $sformatf("%0d SCLK pulses", n_sclk));
      @(negedge intr);
      repeat (20) @(posedge clk);
    end
    // back-to-back: sample held as a 270-clock square wave, one acquisition per period
    begin
      int t0, t1;
      fork
        begin
          for (int k = 0; k < 6; k++) begin
            sample <= 1'b1; repeat (135) @(posedge clk);
            sample <= 1'b0; repeat (135) @(posedge clk);
          end
        end
        begin
          @(posedge intr) t0 = cyc;
          @(posedge intr) t1 = cyc;
          check(t1 - t0 == 270, $sformatf("back-to-back period %0d cycles", t1 - t0));
        end
      join
    end
    check(early == 0, "no serial read before the end of conversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
