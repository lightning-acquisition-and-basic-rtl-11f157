// lightning_pkg: types and constants shared by the lightning acquisition
// and basic-triggering datapath.
//
// A sample is one signed 16-bit ADC code (a +/-10 V input range is assumed,
// so 1 V is 3276.8 codes). A time stamp is GPS-disciplined time of day: whole
// seconds plus a microsecond count within the second, which is the resolution
// the sensor node stamps its samples with. A stamped sample travels through
// the pipeline as one packed struct together with its valid strobe.
package lightning_pkg;

  localparam int unsigned SAMPLE_W     = 16;
  localparam int unsigned SEC_W        = 32;
  localparam int unsigned USEC_W       = 20;   // 0 .. 999_999
  localparam int unsigned USEC_PER_SEC = 1_000_000;
  localparam int unsigned COUNT_W      = 16;   // sample counts, event ids
  localparam int unsigned PERIOD_W     = 16;   // sample period in clock ticks
  localparam int unsigned DMA_W        = 64;   // one DMA FIFO element

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [DMA_W-1:0]           dma_word_t;

  typedef struct packed {
    logic [SEC_W-1:0]  sec;
    logic [USEC_W-1:0] usec;
  } timestamp_t;

  // A sample together with the time its conversion was started.
  typedef struct packed {
    sample_t    data;
    timestamp_t ts;
  } stamped_sample_t;

  // A stamped sample that the trigger has accepted, with its place in the
  // capture: which trigger event and which sample of that event.
  typedef struct packed {
    stamped_sample_t     smp;
    logic [COUNT_W-1:0]  event_id;
    logic [COUNT_W-1:0]  index;
  } capture_rec_t;

  typedef enum logic [1:0] {
    TRG_IDLE    = 2'd0,   // capture stopped
    TRG_ARMED   = 2'd1,   // comparing every sample against the threshold
    TRG_ACQUIRE = 2'd2    // passing the post-trigger samples on
  } trig_state_t;

  // Default front-panel settings: 5 V threshold, 70 samples, 1 us period.
  localparam sample_t             DEFAULT_THRESHOLD = 16'sd16384;
  localparam logic [COUNT_W-1:0]  DEFAULT_NUM_SAMPLES = 16'd70;

endpackage
