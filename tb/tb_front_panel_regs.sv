// tb_front_panel_regs: checks the register map of front_panel_regs:
// reset values (5 V threshold, 70 samples, 1 us period), write and read
// back of the three controls, one-cycle Start / Stop / clear pulses, the
// status and counter registers, and that read-only addresses ignore writes.
module tb_front_panel_regs;
  import lightning_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        wr_en = 1'b0;
  logic [2:0]  wr_addr = '0;
  logic [31:0] wr_data = '0;
  logic [2:0]  rd_addr = '0;
  logic [31:0] rd_data;
  sample_t     threshold;
  logic [15:0] num_samples, sample_period;
  logic        start, stop, clear_overflow;
  logic        locked = 1'b0;
  trig_state_t state = TRG_IDLE;
  logic        overflow = 1'b0;
  logic [15:0] triggers = '0, missed = '0, dropped = '0;
  logic [31:0] now_sec = '0;
  int          checks = 0, failures = 0;
  int          n_start = 0, n_stop = 0, n_clear = 0;

  front_panel_regs dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n) begin
      n_start += int'(start);
      n_stop  += int'(stop);
      n_clear += int'(clear_overflow);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = a; wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  // read register a and compare it with exp
  task automatic rdchk(input logic [2:0] a, input logic [31:0] exp, input string what);
    rd_addr = a;
    #1;
    check(rd_data == exp, $sformatf("%s: read %h expected %h", what, rd_data, exp));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(threshold == 16'sd16384, "threshold reset (5 V)");
    check(num_samples == 16'd70, "num_samples reset");
    check(sample_period == 16'd40, "period reset");
    rdchk(3'd1, 32'd16384, "threshold reset");
    rdchk(3'd2, 32'd70, "num_samples reset");
    rdchk(3'd3, 32'd40, "period reset");
    // controls
    for (int k = 0; k < 20; k++) begin
      automatic logic [15:0] t = 16'($urandom), n = 16'($urandom), p = 16'($urandom);
      wr(3'd1, {16'hdead, t});
      wr(3'd2, {16'hbeef, n});
      wr(3'd3, {16'h1234, p});
      check(threshold == sample_t'(t), "threshold write");
      check(num_samples == n, "num_samples write");
      check(sample_period == p, "period write");
      rdchk(3'd1, {16'd0, t}, "threshold read");
      rdchk(3'd2, {16'd0, n}, "num_samples read");
      rdchk(3'd3, {16'd0, p}, "period read");
    end
    // pulses
    wr(3'd0, 32'h1);
    wr(3'd0, 32'h2);
    wr(3'd0, 32'h4);
    wr(3'd0, 32'h7);
    repeat (3) @(negedge clk);
    check(n_start == 2 && n_stop == 2 && n_clear == 2,
          $sformatf("pulses start %0d stop %0d clear %0d", n_start, n_stop, n_clear));
    rdchk(3'd0, 32'd0, "control reads 0");
    // indicators
    locked = 1'b1; state = TRG_ACQUIRE; overflow = 1'b1;
    triggers = 16'd321; missed = 16'd7; dropped = 16'd9; now_sec = 32'h5eed_1234;
    rdchk(3'd4, 32'b1_10_1, "status");
    rdchk(3'd5, 32'd321, "triggers");
    rdchk(3'd6, {16'd7, 16'd9}, "losses");
    rdchk(3'd7, 32'h5eed_1234, "time");
    // read-only registers ignore writes
    wr(3'd4, '1); wr(3'd5, '1); wr(3'd6, '1); wr(3'd7, '1);
    rdchk(3'd5, 32'd321, "read-only triggers");
    rdchk(3'd7, 32'h5eed_1234, "read-only time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
