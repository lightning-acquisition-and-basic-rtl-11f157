// tb_dma_packer: checks the DMA element layout and the back-pressure and
// drop behaviour of dma_packer. Random capture records arrive at random
// gaps while the FIFO side takes elements with a random ready. The
// testbench decodes each pair of elements on its own (bit 63 flag, field
// positions) and compares them with the records it expects to survive; a
// record is expected to be dropped when, by the testbench's count of
// elements still owed, the packer is holding one that cannot finish in
// that cycle.
module tb_dma_packer;
  import lightning_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  capture_rec_t in = '0;
  logic         in_valid = 1'b0;
  logic         clear_overflow = 1'b0;
  dma_word_t    dma_data;
  logic         dma_valid;
  logic         dma_ready = 1'b0;
  logic         overflow;
  logic [15:0]  dropped;
  int           checks = 0, failures = 0;

  capture_rec_t expq[$];
  int           owed = 0;          // elements the packer still has to write
  int           exp_dropped = 0;
  int           ready_pct = 100;
  bit           have_time = 0;
  dma_word_t    time_word;
  int           n_pairs = 0, stalls = 0;

  dma_packer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // FIFO side: random ready, decode elements in pairs
  always @(negedge clk) dma_ready = ($urandom_range(1, 100) <= ready_pct);

  always @(posedge clk) begin
    if (rst_n) begin
      automatic bit hs = dma_valid && dma_ready;
      if (dma_valid && !dma_ready) stalls++;
      // acceptance model for a record arriving in this cycle
      if (in_valid) begin
        if (owed == 0 || (owed == 1 && hs)) begin
          expq.push_back(in);
          owed += 2;
        end else exp_dropped++;
      end
      if (hs) begin
        owed--;
        if (!have_time) begin
          check(dma_data[63] == 1'b1, "first element is not a time element");
          time_word = dma_data;
          have_time = 1;
        end else begin
          check(dma_data[63] == 1'b0, "second element is not a data element");
          have_time = 0;
          n_pairs++;
          if (expq.size() == 0) check(1'b0, "element pair with nothing expected");
          else begin
            automatic capture_rec_t e = expq.pop_front();
            check(time_word[31:0] == e.smp.ts.sec && time_word[51:32] == e.smp.ts.usec
                  && time_word[62:52] == '0,
                  $sformatf("time element %h for %0d.%06d", time_word, e.smp.ts.sec, e.smp.ts.usec));
            check(dma_data[15:0] == e.smp.data && dma_data[31:16] == e.index
                  && dma_data[47:32] == e.event_id && dma_data[62:48] == '0,
                  $sformatf("data element %h", dma_data));
          end
        end
      end
    end
  end

  task automatic send(input int gap);
    @(negedge clk);
    in.smp.data = sample_t'($urandom);
    in.smp.ts.sec = $urandom;
    in.smp.ts.usec = 20'($urandom_range(0, 999_999));
    in.event_id = 16'($urandom);
    in.index = 16'($urandom);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // full rate FIFO, records every 40 cycles: nothing dropped
    repeat (50) send(39);
    check(!overflow && dropped == 0, "drop at full FIFO rate");
    // back-to-back records: the packer must accept one as the last
    // element of the previous one is written
    ready_pct = 100;
    repeat (20) send(0);
    // slow, random FIFO with random gaps: some drops
    ready_pct = 30;
    repeat (400) send($urandom_range(0, 8));
    ready_pct = 100;
    repeat (20) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d records never written", expq.size()));
    check(int'(dropped) == exp_dropped, $sformatf("dropped %0d expected %0d", dropped, exp_dropped));
    check(overflow == (exp_dropped > 0), "overflow flag");
    check(exp_dropped > 0 && stalls > 0, "no drop or stall exercised");
    @(negedge clk) clear_overflow = 1'b1;
    @(negedge clk) clear_overflow = 1'b0;
    check(!overflow, "overflow not cleared");
    $display("pairs %0d dropped %0d stalls %0d", n_pairs, exp_dropped, stalls);
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
