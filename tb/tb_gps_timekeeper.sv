// tb_gps_timekeeper: checks lock, time loading, microsecond counting,
// second rollover without a pulse, loss of lock and re-lock.
// The clock is scaled to 2 ticks per microsecond so that a simulated second
// takes two million cycles. Expected time is computed from the cycle count
// since the pulse that locked the keeper.
module tb_gps_timekeeper;
  import lightning_pkg::*;
  localparam int unsigned CLK_HZ = 2_000_000;
  localparam int unsigned TPU = CLK_HZ / 1_000_000;
  localparam int unsigned TO_US = 1_500_000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       pps = 1'b0;
  logic [31:0] gps_sec = '0;
  logic       gps_sec_valid = 1'b0;
  timestamp_t now;
  logic       locked;
  int         checks = 0, failures = 0;
  longint     cyc = 0;
  longint     t0;          // cycle at which the loaded time is first visible
  logic [31:0] base;

  gps_timekeeper #(.CLK_HZ(CLK_HZ), .LOCK_TIMEOUT_US(TO_US)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Pulse PPS for 4 cycles announcing second s; the loaded time becomes
  // visible 3 cycles after the pin rises (2 synchroniser stages + load).
  task automatic pulse(input logic [31:0] s);
    @(negedge clk);
    gps_sec = s; gps_sec_valid = 1'b1; pps = 1'b1;
    t0 = cyc + 3;
    base = s;
    repeat (4) @(negedge clk);
    pps = 1'b0;
  endtask

  task automatic check_time(input string where);
    longint us;
    #1;
    us = (cyc - t0) / TPU;
    check(now.sec == base + 32'(us / 1_000_000) && now.usec == 20'(us % 1_000_000),
          $sformatf("%s: time %0d.%06d expected %0d.%06d", where, now.sec, now.usec,
                    base + 32'(us / 1_000_000), us % 1_000_000));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (50) @(posedge clk);
    #1 check(!locked, "locked before any pulse");
    // a pulse without a valid second does not lock
    @(negedge clk) pps = 1'b1;
    repeat (4) @(negedge clk);
    pps = 1'b0;
    repeat (10) @(posedge clk);
    #1 check(!locked, "locked on a pulse without a valid second");
    pulse(32'd1_000_000_000);
    wait (cyc >= t0);
    @(negedge clk);
    check(locked, "not locked after pulse");
    for (int k = 0; k < 20; k++) begin
      repeat ($urandom_range(1, 97)) @(posedge clk);
      check_time("after lock");
    end
    // pulses at exact second boundaries keep the count continuous
    for (int s = 1; s <= 2; s++) begin
      wait (cyc >= t0 + longint'(1_000_000 * TPU) - 3);
      pulse(base + 1);
      repeat (37) @(posedge clk);
      check_time($sformatf("after pulse %0d", s));
      check(locked, "lock kept");
    end
    // no more pulses: rollover at one second, lock lost after the timeout
    wait (cyc >= t0 + longint'(1_000_000 * TPU) - 5);
    repeat (3) begin @(posedge clk); check_time("before rollover"); end
    repeat (5) begin @(posedge clk); check_time("around rollover"); end
    check(locked, "lock lost before timeout");
    wait (cyc >= t0 + longint'(TO_US * TPU) + 10);
    @(posedge clk); #1;
    check(!locked, "lock kept without pulses past the timeout");
    check_time("free running");
    // re-lock
    pulse(32'd77);
    @(posedge clk); #1;
    check(locked && now.sec == 32'd77, "re-lock");
    check_time("after re-lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
