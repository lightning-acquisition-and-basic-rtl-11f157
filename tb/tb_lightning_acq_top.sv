// tb_lightning_acq_top: end-to-end test of the acquisition node at its
// default parameters (40 MHz clock, 1 MS/s, 5 V threshold, 70 samples).
//
// Models around the design: a GPS receiver (one PPS with its second), a
// 16-bit ADC that answers each convert after 10 cycles with a synthetic
// lightning pulse train (damped pulses of about 5.8 V peak every 250 us on
// a noise floor, every fourth pulse long enough to stay above threshold
// for more than one capture), a DMA FIFO with random ready, and a host
// driving the register port.
//
// The testbench keeps its own time reference from the PPS, stamps every
// conversion it sees, runs its own trigger model over the returned codes
// and compares every element pair leaving the DMA port with the records it
// expects. Sequence: Start before lock (refused), lock, Start, capture,
// Stop, change of Sample Period to 2 us, Start, capture, and finally a
// long FIFO stall that forces records to be dropped. Each mechanism is
// counted and a mechanism that never happened is a failure.
module tb_lightning_acq_top;
  import lightning_pkg::*;

  localparam int TPU = 40;            // clock cycles per microsecond

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        host_wr_en = 1'b0;
  logic [2:0]  host_wr_addr = '0;
  logic [31:0] host_wr_data = '0;
  logic [2:0]  host_rd_addr = '0;
  logic [31:0] host_rd_data;
  logic        gps_pps = 1'b0;
  logic [31:0] gps_sec = '0;
  logic        gps_sec_valid = 1'b0;
  logic        adc_convert;
  logic        adc_valid = 1'b0;
  sample_t     adc_data = '0;
  dma_word_t   dma_data;
  logic        dma_valid;
  logic        dma_ready = 1'b0;
  logic        timekeeper_locked;

  lightning_acq_top dut (.*);

  int     checks = 0, failures = 0;
  longint cyc = 0;
  longint t0 = 0;                     // cycle the GPS time was loaded
  longint base_us = 0;                // loaded time in microseconds
  bit     running = 0;                // the model's view of Start/Stop
  int     ready_pct = 70;
  bit     hold_ready = 0;
  bit     drop_phase = 0;             // records may be dropped from now on

  // conversions and model state
  longint conv_us[$];                 // stamps of outstanding conversions
  int     conv_n = 0;                 // conversions since the last Start
  int     n_conv_total = 0;
  longint last_conv_cyc = -1;
  int     period_cycles = TPU;
  int     m_left = 0, m_index = 0, m_event = 0;
  bit     m_prev_end = 0;             // the previous sample ended an event
  capture_rec_t expq[$];
  int     n_expected = 0, n_received = 0;

  // mechanism counters
  int mech_refused = 0, mech_lock = 0, mech_trigger = 0, mech_rearm = 0;
  int mech_below = 0, mech_level = 0, mech_stall = 0, mech_drop = 0;
  int mech_period = 0, mech_stop = 0, mech_rate = 0;

  always #12.5 clk = ~clk;            // 40 MHz
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    host_wr_en = 1'b1; host_wr_addr = a; host_wr_data = d;
    @(negedge clk);
    host_wr_en = 1'b0;
  endtask

  task automatic host_read(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    host_rd_addr = a;
    #1 d = host_rd_data;
  endtask

  // synthetic lightning pulse train, in ADC codes (3276.8 codes per volt)
  function automatic sample_t wave(input int n);
    int k, len, v, pk;
    k   = n % 250;
    len = ((n / 250) % 4 == 3) ? 200 : 60;
    pk  = 19000;
    if (k < 8)        v = pk * k / 8;
    else if (k < len) v = pk - (pk * (k - 8)) / ((len == 200) ? 1200 : len + 20);
    else              v = 0;
    v += $urandom_range(0, 1000) - 500;
    return sample_t'(v);
  endfunction

  // ADC model: answer each convert after 10 cycles
  always @(posedge clk) begin
    if (rst_n && adc_convert) begin
      automatic sample_t code = wave(conv_n);
      automatic longint stamp = base_us + (cyc - 1 - t0) / TPU;
      conv_n++;
      n_conv_total++;
      conv_us.push_back(stamp);
      if (last_conv_cyc >= 0) begin
        check(cyc - last_conv_cyc == longint'(period_cycles),
              $sformatf("conversion spacing %0d cycles, expected %0d", cyc - last_conv_cyc, period_cycles));
        if (cyc - last_conv_cyc == TPU) mech_rate++;
      end
      last_conv_cyc = cyc;
      fork
        begin
          repeat (9) @(posedge clk);
          #1 adc_valid = 1'b1; adc_data = code;
          model_sample(code);
          @(posedge clk);
          #1 adc_valid = 1'b0;
        end
      join_none
    end
  end

  // trigger reference model, run on each returned code
  function automatic void model_sample(input sample_t code);
    longint stamp = conv_us.pop_front();
    capture_rec_t e;
    bit started = 0;
    if (!running) return;
    if (m_left == 0) begin
      if (code > 16'sd16384) begin
        m_left = 70; m_index = 0; m_event++; started = 1;
        mech_trigger++;
        if (m_prev_end) mech_level++; else if (m_event > 1) mech_rearm++;
      end else mech_below++;
    end
    m_prev_end = 0;
    if (m_left > 0) begin
      e.smp.data = code;
      e.smp.ts.sec = 32'(stamp / 1_000_000);
      e.smp.ts.usec = 20'(stamp % 1_000_000);
      e.event_id = 16'(m_event - 1);
      e.index = 16'(m_index);
      expq.push_back(e);
      n_expected++;
      m_index++;
      m_left--;
      if (m_left == 0) m_prev_end = 1;
    end
  endfunction

  // DMA FIFO model: random ready, element pairs compared in order; records
  // may be missing only where the packer reports drops
  dma_word_t time_word;
  bit        have_time = 0;
  longint    last_stamp = -1;
  int        last_event = -1, last_index = -1;
  always @(negedge clk) dma_ready = !hold_ready && ($urandom_range(1, 100) <= ready_pct);
  always @(posedge clk) begin
    if (rst_n && dma_valid && !dma_ready) mech_stall++;
    if (rst_n && dma_valid && dma_ready) begin
      if (!have_time) begin
        check(dma_data[63], "time element expected");
        time_word = dma_data;
        have_time = 1;
      end else begin
        automatic capture_rec_t got;
        automatic bit found = 0;
        have_time = 0;
        check(!dma_data[63], "data element expected");
        got.smp.ts.sec = time_word[31:0];
        got.smp.ts.usec = time_word[51:32];
        got.smp.data = dma_data[15:0];
        got.index = dma_data[31:16];
        got.event_id = dma_data[47:32];
        n_received++;
        while (expq.size() > 0 && !found) begin
          automatic capture_rec_t e = expq.pop_front();
          if (e == got) found = 1;
          else if (!drop_phase)
            check(1'b0, $sformatf("record ev %0d idx %0d skipped", e.event_id, e.index));
        end
        check(found, $sformatf("record ev %0d idx %0d data %0d at %0d.%06d not expected",
              got.event_id, got.index, got.smp.data, got.smp.ts.sec, got.smp.ts.usec));
        // samples of one event carry consecutive microsecond stamps at 1 MS/s
        if (period_cycles == TPU && int'(got.event_id) == last_event
            && int'(got.index) == last_index + 1)
          check(longint'(got.smp.ts.sec) * 1_000_000 + got.smp.ts.usec == last_stamp + 1,
                "stamps of consecutive samples not 1 us apart");
        last_event = int'(got.event_id);
        last_index = int'(got.index);
        last_stamp = longint'(got.smp.ts.sec) * 1_000_000 + got.smp.ts.usec;
      end
    end
  end

  task automatic wait_quiet();
    // wait until a conversion has just returned, so Start/Stop fall
    // between samples
    @(posedge adc_valid);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [31:0] r;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    // Start before lock: refused
    host_write(3'd0, 32'h1);
    repeat (200) @(negedge clk);
    host_read(3'd4, r);
    check(r[2:1] == 2'(TRG_IDLE) && n_conv_total == 0, "started without lock");
    if (r[2:1] == 2'(TRG_IDLE) && n_conv_total == 0) mech_refused++;
    // GPS pulse announcing 18:39:00 of some day
    @(negedge clk);
    gps_sec = 32'd1_790_102_340; gps_sec_valid = 1'b1; gps_pps = 1'b1;
    t0 = cyc + 3; base_us = longint'(gps_sec) * 1_000_000;
    repeat (8) @(negedge clk);
    gps_pps = 1'b0;
    check(timekeeper_locked, "not locked after PPS");
    if (timekeeper_locked) mech_lock++;
    // capture at 1 MS/s
    host_write(3'd0, 32'h1);
    running = 1;
    repeat (1500 * TPU) @(negedge clk);
    wait_quiet();
    host_write(3'd0, 32'h2);
    running = 0;
    repeat (5) @(negedge clk);
    host_read(3'd4, r);
    check(r[2:1] == 2'(TRG_IDLE), "not idle after Stop Capture");
    begin
      automatic int n_before = n_conv_total;
      repeat (500) @(negedge clk);
      check(n_conv_total == n_before, "conversions after Stop Capture");
      if (n_conv_total == n_before && r[2:1] == 2'(TRG_IDLE)) mech_stop++;
    end
    // 2 us sample period
    host_write(3'd3, 32'd80);
    period_cycles = 2 * TPU;
    last_conv_cyc = -1;
    conv_n = 0; m_left = 0; m_prev_end = 0;
    host_write(3'd0, 32'h1);
    running = 1;
    repeat (1000 * 2 * TPU) @(negedge clk);
    mech_period = (mech_trigger > 0 && n_conv_total > 2000) ? 1 : 0;
    // no drops so far
    host_read(3'd6, r);
    check(r == 0, $sformatf("losses before the stall: %h", r));
    // long FIFO stall: records must be dropped and reported
    wait (m_left > 5);
    drop_phase = 1;
    hold_ready = 1;
    repeat (20 * 2 * TPU) @(negedge clk);
    hold_ready = 0;
    repeat (400 * 2 * TPU) @(negedge clk);
    wait_quiet();
    host_write(3'd0, 32'h2);
    running = 0;
    repeat (200) @(negedge clk);
    host_read(3'd4, r);
    check(r[3], "overflow not reported");
    host_read(3'd6, r);
    check(int'(r[15:0]) == n_expected - n_received,
          $sformatf("dropped %0d, expected %0d", r[15:0], n_expected - n_received));
    check(r[31:16] == 0, "missed conversions");
    if (r[15:0] > 0) mech_drop++;
    host_read(3'd5, r);
    check(int'(r) == m_event, $sformatf("trigger count %0d expected %0d", r, m_event));
    host_write(3'd0, 32'h4);
    host_read(3'd4, r);
    check(!r[3], "overflow not cleared");
    check(expq.size() == 0 || n_received < n_expected, "records left over");

    $display("conversions %0d events %0d records expected %0d received %0d",
             n_conv_total, m_event, n_expected, n_received);
    $display("mechanisms: refused %0d lock %0d trigger %0d rearm %0d below %0d level %0d stall %0d drop %0d period %0d stop %0d rate %0d",
             mech_refused, mech_lock, mech_trigger, mech_rearm, mech_below, mech_level,
             mech_stall, mech_drop, mech_period, mech_stop, mech_rate);
    check(mech_refused > 0, "start refused never happened");
    check(mech_lock > 0, "lock never happened");
    check(mech_trigger > 1, "fewer than two triggers");
    check(mech_rearm > 0, "re-arm never happened");
    check(mech_below > 0, "no sample dropped below threshold");
    check(mech_level > 0, "level re-trigger never happened");
    check(mech_stall > 0, "DMA stall never happened");
    check(mech_drop > 0, "DMA drop never happened");
    check(mech_period > 0, "sample period change never happened");
    check(mech_stop > 0, "stop never happened");
    check(mech_rate > 0, "1 MS/s never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
