// lightning_acq_top: FPGA section of a lightning sensor node.
//
// A magnetic-loop antenna and analog front end feed one channel of a
// 16-bit ADC module. This top samples that channel at the front-panel
// Sample Period (1 MS/s by default), stamps every sample with GPS time in
// microseconds, and applies a basic amplitude trigger: once started, it
// forwards nothing until a sample exceeds the Threshold, then forwards that
// sample and the rest of Number Of Samples to acquire, each with its time
// stamp, into the DMA FIFO that carries them to the real-time controller,
// and re-arms for the next crossing. Samples below the threshold are never
// buffered, so only the parts of the record around lightning pulses leave
// the FPGA.
//
// Pipeline: sample_timer -> adc_capture (stamp from gps_timekeeper) ->
// trigger_ctrl -> dma_packer -> DMA FIFO write port. front_panel_regs
// holds the controls and indicators on a 32-bit host register port.
//
// Interfaces: host register port (see front_panel_regs), GPS receiver
// (asynchronous `pps`, `gps_sec` for the second the pulse begins),
// ADC module (`adc_convert` out, `adc_valid`/`adc_data` in), DMA FIFO write
// port (`dma_data`/`dma_valid`/`dma_ready`, two 64-bit elements per sample,
// see dma_packer) and the Timekeeper Locked LED. One clock, CLK_HZ, with an
// active-low asynchronous reset.
//
// Latency from the ADC returning a sample to its time element on the DMA
// port: 3 clock cycles. At 1 MS/s and 40 MHz each sample leaves 40 cycles
// for its two FIFO elements. The 40 MHz clock is this design's assumption.
module lightning_acq_top
  import lightning_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 40_000_000,
  parameter int unsigned LOCK_TIMEOUT_US = 1_500_000
) (
  input  logic              clk,
  input  logic              rst_n,
  // host register port
  input  logic              host_wr_en,
  input  logic [2:0]        host_wr_addr,
  input  logic [31:0]       host_wr_data,
  input  logic [2:0]        host_rd_addr,
  output logic [31:0]       host_rd_data,
  // GPS receiver
  input  logic              gps_pps,
  input  logic [SEC_W-1:0]  gps_sec,
  input  logic              gps_sec_valid,
  // ADC module
  output logic              adc_convert,
  input  logic              adc_valid,
  input  sample_t           adc_data,
  // DMA FIFO write port
  output dma_word_t         dma_data,
  output logic              dma_valid,
  input  logic              dma_ready,
  // front panel LED
  output logic              timekeeper_locked
);

  localparam int unsigned TICKS_PER_US = CLK_HZ / 1_000_000;

  sample_t             threshold;
  logic [COUNT_W-1:0]  num_samples;
  logic [PERIOD_W-1:0] sample_period;
  logic                start, stop, clear_overflow;
  trig_state_t         state;
  logic                overflow;
  logic [COUNT_W-1:0]  triggers, missed, dropped;

  timestamp_t          now;
  logic                tick;
  stamped_sample_t     smp;
  logic                smp_valid;
  capture_rec_t        rec;
  logic                rec_valid;

  front_panel_regs #(
    .DEFAULT_PERIOD (PERIOD_W'(TICKS_PER_US))
  ) u_regs (
    .clk, .rst_n,
    .wr_en   (host_wr_en),
    .wr_addr (host_wr_addr),
    .wr_data (host_wr_data),
    .rd_addr (host_rd_addr),
    .rd_data (host_rd_data),
    .threshold, .num_samples, .sample_period,
    .start, .stop, .clear_overflow,
    .locked  (timekeeper_locked),
    .state, .overflow, .triggers, .missed, .dropped,
    .now_sec (now.sec)
  );

  gps_timekeeper #(
    .CLK_HZ          (CLK_HZ),
    .LOCK_TIMEOUT_US (LOCK_TIMEOUT_US)
  ) u_time (
    .clk, .rst_n,
    .pps           (gps_pps),
    .gps_sec,
    .gps_sec_valid,
    .now,
    .locked        (timekeeper_locked)
  );

  // The ADC converts only while a capture is running.
  sample_timer #(
    .PERIOD_W   (PERIOD_W),
    .MIN_PERIOD (TICKS_PER_US)
  ) u_timer (
    .clk, .rst_n,
    .enable (state != TRG_IDLE),
    .period (sample_period),
    .tick
  );

  adc_capture u_adc (
    .clk, .rst_n,
    .tick,
    .now,
    .adc_convert,
    .adc_valid,
    .adc_data,
    .out       (smp),
    .out_valid (smp_valid),
    .missed
  );

  trigger_ctrl u_trig (
    .clk, .rst_n,
    .start, .stop,
    .locked    (timekeeper_locked),
    .threshold,
    .num_samples,
    .in        (smp),
    .in_valid  (smp_valid),
    .out       (rec),
    .out_valid (rec_valid),
    .state,
    .triggers
  );

  dma_packer u_dma (
    .clk, .rst_n,
    .in        (rec),
    .in_valid  (rec_valid),
    .clear_overflow,
    .dma_data,
    .dma_valid,
    .dma_ready,
    .overflow,
    .dropped
  );

endmodule
