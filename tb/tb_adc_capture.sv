// tb_adc_capture: checks conversion start, time stamping and hand-over of
// samples by adc_capture. A small ADC model answers each convert pulse
// after a random latency with a random code; the testbench remembers the
// time applied at each tick and compares every output with it. Ticks sent
// while a conversion is outstanding must be counted as missed.
module tb_adc_capture;
  import lightning_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            tick = 1'b0;
  timestamp_t      now = '0;
  logic            adc_convert;
  logic            adc_valid = 1'b0;
  sample_t         adc_data = '0;
  stamped_sample_t out;
  logic            out_valid;
  logic [15:0]     missed;
  int              checks = 0, failures = 0;

  stamped_sample_t expq[$];
  int              converts = 0;
  int              exp_missed = 0;
  int              latency = 5;

  adc_capture dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // time source: advances every cycle
  always @(posedge clk) begin
    if (now.usec == 20'd999_999) begin now.usec <= '0; now.sec <= now.sec + 1; end
    else now.usec <= now.usec + 1;
  end

  // ADC model: returns a random code `latency` cycles after convert
  always @(posedge clk) begin
    if (rst_n && adc_convert) begin
      automatic sample_t code = sample_t'($urandom);
      automatic int lat = latency;
      converts++;
      fork
        begin
          repeat (lat - 1) @(posedge clk);
          #1 adc_valid = 1'b1; adc_data = code;
          expq[$].data = code;
          @(posedge clk);
          #1 adc_valid = 1'b0;
        end
      join_none
    end
  end

  // outputs must match the queued expectations in order
  always @(posedge clk) begin
    #2;
    if (out_valid) begin
      if (expq.size() == 0) check(1'b0, "output with nothing expected");
      else begin
        automatic stamped_sample_t e = expq.pop_front();
        check(out == e, $sformatf("sample %h @%0d.%06d expected %h @%0d.%06d",
              out.data, out.ts.sec, out.ts.usec, e.data, e.ts.sec, e.ts.usec));
      end
    end
  end

  // send a tick; `served` says whether the block should accept it
  task automatic send_tick(input bit served);
    @(negedge clk);
    tick = 1'b1;
    if (served) begin
      automatic stamped_sample_t e;
      e.ts = now;
      e.data = '0;
      expq.push_back(e);
    end else exp_missed++;
    @(negedge clk);
    tick = 1'b0;
  endtask

  initial begin
    now.sec = 32'd1234;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 30; k++) begin
      latency = $urandom_range(2, 20);
      send_tick(1'b1);
      repeat (latency + 3 + $urandom_range(0, 10)) @(negedge clk);
    end
    // overrun: two ticks inside one conversion
    latency = 20;
    send_tick(1'b1);
    repeat (3) @(negedge clk);
    send_tick(1'b0);
    send_tick(1'b0);
    repeat (30) @(negedge clk);
    send_tick(1'b1);
    repeat (30) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d samples never delivered", expq.size()));
    check(converts == 32, $sformatf("%0d conversions, expected 32", converts));
    check(int'(missed) == exp_missed, $sformatf("missed %0d expected %0d", missed, exp_missed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
