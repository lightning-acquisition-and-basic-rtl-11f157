// tb_trigger_ctrl: checks the threshold trigger against a reference model.
// A stream of random samples (mostly below threshold, with bursts above)
// is fed one every few cycles; the model decides independently which
// samples must come out, with which event number and index. Covered:
// start refused without lock, trigger, post-trigger count, re-arm, level
// re-trigger, stop in the middle of an event, num_samples of 0 and 1,
// negative threshold.
module tb_trigger_ctrl;
  import lightning_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            start = 1'b0, stop = 1'b0, locked = 1'b0;
  sample_t         threshold = 16'sd16384;
  logic [15:0]     num_samples = 16'd70;
  stamped_sample_t in = '0;
  logic            in_valid = 1'b0;
  capture_rec_t    out;
  logic            out_valid;
  trig_state_t     state;
  logic [15:0]     triggers;
  int              checks = 0, failures = 0;

  // reference model
  bit              m_run = 0;
  int              m_left = 0;      // samples still to pass in this event
  int              m_event = 0;
  int              m_index = 0;
  capture_rec_t    expq[$];
  int              n_out = 0, n_events = 0;

  trigger_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    #2;
    if (out_valid) begin
      n_out++;
      if (expq.size() == 0) check(1'b0, "unexpected output");
      else begin
        automatic capture_rec_t e = expq.pop_front();
        check(out == e, $sformatf("got ev %0d idx %0d data %0d, expected ev %0d idx %0d data %0d",
              out.event_id, out.index, out.smp.data, e.event_id, e.index, e.smp.data));
      end
    end
  end

  task automatic press(input bit is_start);
    @(negedge clk);
    if (is_start) start = 1'b1; else stop = 1'b1;
    if (is_start && locked) m_run = 1;
    if (!is_start) begin m_run = 0; m_left = 0; end
    @(negedge clk);
    start = 1'b0; stop = 1'b0;
  endtask

  task automatic feed(input sample_t d);
    int n;
    capture_rec_t e;
    n = (num_samples == 0) ? 1 : int'(num_samples);
    @(negedge clk);
    in.data = d;
    in.ts.sec = 32'd500;
    in.ts.usec = 20'($urandom_range(0, 999_999));
    in_valid = 1'b1;
    if (m_run) begin
      if (m_left == 0 && d > threshold) begin
        m_left = n; m_index = 0; m_event++; n_events++;
      end
      if (m_left > 0) begin
        e.smp = in; e.event_id = 16'(m_event - 1); e.index = 16'(m_index);
        expq.push_back(e);
        m_index++; m_left--;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  function automatic sample_t rnd_sample(input int pct_above);
    if ($urandom_range(1, 100) <= pct_above)
      return sample_t'($urandom_range(int'(threshold) + 1, 32767));
    return sample_t'(int'(threshold) - $urandom_range(0, 20000));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // start refused while unlocked
    press(1'b1);
    repeat (5) feed(16'sd30000);
    check(state == TRG_IDLE, "started without lock");
    locked = 1'b1;
    press(1'b1);
    #1 check(state == TRG_ARMED, "not armed after start");
    num_samples = 16'd70;
    repeat (1500) feed(rnd_sample(1));
    // level re-trigger: stays above threshold for 200 samples
    repeat (200) feed(16'sd20000);
    // stop in the middle of an event
    feed(16'sd30000);
    repeat (10) feed(rnd_sample(0));
    press(1'b0);
    repeat (20) feed(16'sd30000);
    check(state == TRG_IDLE, "not idle after stop");
    press(1'b1);
    num_samples = 16'd0;
    repeat (100) feed(rnd_sample(10));
    num_samples = 16'd1;
    repeat (100) feed(rnd_sample(10));
    num_samples = 16'd5;
    threshold = -16'sd1000;
    repeat (300) feed(sample_t'($urandom_range(0, 2000)) - 16'sd2000);
    repeat (5) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d records missing", expq.size()));
    check(int'(triggers) == n_events, $sformatf("triggers %0d expected %0d", triggers, n_events));
    check(n_events > 20 && n_out > 500, $sformatf("too little activity: %0d events", n_events));
    $display("events %0d records %0d", n_events, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
