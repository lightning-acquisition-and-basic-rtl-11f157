// tb_sample_timer: checks the conversion strobe spacing of sample_timer.
// Measures the cycles between consecutive ticks for several periods,
// including one below the 1 MS/s floor, and checks that no tick comes while
// the timer is disabled and that the first tick follows enable by 1 cycle.
module tb_sample_timer;
  localparam int unsigned MIN_P = 40;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b0;
  logic [15:0] period = 16'd40;
  logic        tick;
  int          checks = 0, failures = 0;

  sample_timer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Enable the timer with period p and check n tick intervals equal exp.
  task automatic run_period(input int p, input int exp, input int n);
    int gap;
    period = 16'(p);
    @(negedge clk) enable = 1'b1;
    gap = 0;
    do begin @(posedge clk); #1; gap++; end while (!tick && gap < 100000);
    check(gap == 1, $sformatf("first tick after enable in %0d cycles", gap));
    for (int k = 0; k < n; k++) begin
      gap = 0;
      do begin @(posedge clk); #1; gap++; end while (!tick && gap < 100000);
      check(gap == exp, $sformatf("period %0d: gap %0d, expected %0d", p, gap, exp));
    end
    @(negedge clk) enable = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // disabled: no tick for a long time
    begin
      int seen;
      seen = 0;
      repeat (200) begin @(posedge clk); #1; if (tick) seen++; end
      check(seen == 0, "tick while disabled");
    end
    run_period(40, 40, 5);       // 1 MS/s at 40 MHz
    run_period(100, 100, 5);
    run_period(7, MIN_P, 5);     // below the floor
    run_period(0, MIN_P, 3);
    run_period(1000, 1000, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
