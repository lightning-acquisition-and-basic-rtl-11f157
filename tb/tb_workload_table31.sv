// tb_workload_table31: the reference capture of the node, replayed end to
// end at the default parameters. The front panel is left at its reset
// setting (threshold 5 V, 70 samples, 1 us period). The GPS second is
// chosen so that minute:second reads 18:39, and the input pulse is shaped
// so that it first exceeds 5 V at microsecond 447778 with the amplitudes
// 5.153, 5.354, 5.518, 5.647, 5.736, 5.788, 5.803 V on consecutive
// microseconds; a second pulse follows about 700 us later.
//
// Expected: no record before the crossing; the first record of event 0 is
// 5.153 V stamped 18:39.447778, the next six follow the list above on
// consecutive microseconds; 70 records in all with consecutive stamps;
// then the trigger re-arms, ignores the decaying tail and fires once more
// on the second pulse, again for 70 records. Codes are the 16-bit, +/-10 V
// scale: round(volts * 3276.8).
module tb_workload_table31;
  import lightning_pkg::*;

  localparam int     TPU = 40;
  localparam longint SEC0 = 64'd1_790_122_719;    // UTC second ..:18:39
  localparam longint T_CROSS = 447_778;            // first sample above 5 V
  localparam longint T_SECOND = 448_500;           // second pulse crossing

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
  logic        dma_ready = 1'b1;
  logic        timekeeper_locked;

  lightning_acq_top dut (.*);

  int     checks = 0, failures = 0;
  longint cyc = 0;
  longint t0 = 0;
  real    table_v[7] = '{5.15299987, 5.35415649, 5.518127441, 5.647171021,
                         5.736434937, 5.787857056, 5.80305481};

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic sample_t code_of(input real v);
    return sample_t'($rtoi(v * 3276.8 + 0.5));
  endfunction

  // input voltage at microsecond u of the second
  function automatic real volts(input longint u);
    if (u >= T_CROSS - 8 && u < T_CROSS)            // rising edge, below 5 V
      return 4.0 + 0.12 * real'(u - (T_CROSS - 8));
    if (u >= T_CROSS && u < T_CROSS + 7)
      return table_v[int'(u - T_CROSS)];
    if (u >= T_CROSS + 7 && u < T_CROSS + 200)       // slow decay through 5 V
      return 5.80 - 0.02 * real'(u - (T_CROSS + 6));
    if (u >= T_SECOND && u < T_SECOND + 30)
      return 6.5;
    return 0.3;
  endfunction

  // ADC model: code of the input at the microsecond the conversion started
  always @(posedge clk) begin
    if (rst_n && adc_convert) begin
      automatic longint u = (cyc - 1 - t0) / longint'(TPU);
      automatic sample_t c = code_of(volts(u));
      fork
        begin
          repeat (9) @(posedge clk);
          #1 adc_valid = 1'b1; adc_data = c;
          @(posedge clk);
          #1 adc_valid = 1'b0;
        end
      join_none
    end
  end

  // DMA side: collect records
  dma_word_t tw;
  bit        have_time = 0;
  int        n_rec = 0;
  int        n_ev[2] = '{0, 0};
  longint    prev_us = -1;
  always @(posedge clk) begin
    if (rst_n && dma_valid && dma_ready) begin
      if (!have_time) begin
        tw = dma_data; have_time = 1;
      end else begin
        automatic longint us = longint'(tw[51:32]);
        automatic int ev = int'(dma_data[47:32]);
        automatic int idx = int'(dma_data[31:16]);
        automatic sample_t d = sample_t'(dma_data[15:0]);
        have_time = 0;
        n_rec++;
        check(longint'(tw[31:0]) == SEC0, "second of stamp");
        check((tw[31:0] / 60) % 60 == 18 && tw[31:0] % 60 == 39, "stamp is not 18:39");
        check(ev < 2, $sformatf("unexpected event %0d", ev));
        if (ev < 2) n_ev[ev]++;
        if (idx > 0) check(us == prev_us + 1, $sformatf("stamp %0d not 1 us after %0d", us, prev_us));
        check(d == code_of(volts(us)), $sformatf("code %0d at %0d us, expected %0d", d, us, code_of(volts(us))));
        if (ev == 0 && idx == 0)
          check(us == T_CROSS, $sformatf("event 0 starts at %0d us, expected %0d", us, T_CROSS));
        if (ev == 0 && idx < 7) begin
          check(d == code_of(table_v[idx]), $sformatf("sample %0d: code %0d", idx, d));
          $display("logged %f V  18:39 %0dus", real'(d) / 3276.8, us);
        end
        if (ev == 1 && idx == 0)
          check(us == T_SECOND, $sformatf("event 1 starts at %0d us, expected %0d", us, T_SECOND));
        prev_us = us;
      end
    end
  end

  initial begin
    logic [31:0] r;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    gps_sec = 32'(SEC0); gps_sec_valid = 1'b1; gps_pps = 1'b1;
    t0 = cyc + 3;
    repeat (8) @(negedge clk);
    gps_pps = 1'b0;
    check(timekeeper_locked, "not locked");
    // Start with the reset settings
    @(negedge clk); host_wr_en = 1'b1; host_wr_addr = 3'd0; host_wr_data = 32'h1;
    @(negedge clk); host_wr_en = 1'b0;
    wait (cyc >= t0 + (T_SECOND + 300) * TPU);
    @(negedge clk); host_rd_addr = 3'd5;
    #1 r = host_rd_data;
    check(r == 2, $sformatf("trigger count %0d, expected 2", r));
    check(n_ev[0] == 70 && n_ev[1] == 70, $sformatf("event sizes %0d %0d, expected 70 70", n_ev[0], n_ev[1]));
    check(n_rec == 140, $sformatf("%0d records, expected 140", n_rec));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (19_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
