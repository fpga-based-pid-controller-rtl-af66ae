// tb_oeia: self-checking testbench of the optical encoder adapter.
//
// The testbench generates quadrature waveforms: a clockwise step is A rise, B rise, A fall,
// B fall (A leads B by 90 degrees); a counter-clockwise step has B leading. A reference count
// (+1 per clockwise cycle, -1 per counter-clockwise cycle, 8-bit wrap) is compared with `db`
// after every step. Index pulses, alone and overlapping a rising A edge, must clear the count.
module tb_oeia;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       a = 1'b0, b = 1'b0, idx = 1'b0;
  logic [7:0] db;
  logic [7:0] model = 8'd0;
  int         checks = 0, failures = 0;
  int         n_cw = 0, n_ccw = 0, n_idx = 0;

  always #10 clk = ~clk;

  oeia dut (.clk, .rst, .ch_a(a), .ch_b(b), .index(idx), .db);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic wait_clk(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic step(input bit cw, input int gap);
    if (cw) begin
      a = 1; wait_clk(gap); b = 1; wait_clk(gap); a = 0; wait_clk(gap); b = 0; wait_clk(gap);
      model = model + 8'd1; n_cw++;
    end else begin
      b = 1; wait_clk(gap); a = 1; wait_clk(gap); b = 0; wait_clk(gap); a = 0; wait_clk(gap);
      model = model - 8'd1; n_ccw++;
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait_clk(3);
    rst = 1'b0;
    wait_clk(3);
    // long clockwise run wraps past 255
    for (int k = 0; k < 300; k++) begin
      step(1'b1, 4);
      check(db == model, $sformatf("cw: db=%0d model=%0d", db, model));
    end
    // random directions and speeds
    for (int k = 0; k < 600; k++) begin
      step(1'($urandom), $urandom_range(4, 12));
      check(db == model, $sformatf("rand: db=%0d model=%0d", db, model));
      if (k % 150 == 149) begin
        // index pulse on its own
        idx = 1; wait_clk(6); idx = 0; wait_clk(4);
        model = 8'd0; n_idx++;
        check(db == 8'd0, $sformatf("index alone: db=%0d", db));
      end
    end
    // index overlapping a clockwise rising A edge: index wins
    for (int k = 0; k < 5; k++) step(1'b1, 4);
    idx = 1; wait_clk(2);
    a = 1; wait_clk(6); b = 1; wait_clk(2); idx = 0; wait_clk(4); a = 0; wait_clk(4); b = 0; wait_clk(6);
    n_idx++;
    check(db == 8'd0, $sformatf("index over A edge: db=%0d", db));
    check(n_cw > 0 && n_ccw > 0 && n_idx > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
