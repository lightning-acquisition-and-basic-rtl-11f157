// front_panel_regs: host register file holding the acquisition controls.
//
// The real-time controller sets the front-panel controls and reads the
// indicators through a simple 32-bit register port. Writes take effect at
// the clock edge (`wr_en`, `wr_addr`, `wr_data`); reads are combinational
// from `rd_addr`.
//
//   addr 0  CONTROL   W: bit0 Start, bit1 Stop Capture, bit2 clear overflow;
//                        each bit written as 1 gives a one-cycle pulse
//                     R: 0
//   addr 1  THRESHOLD RW, bits 15:0, signed ADC code (reset: 5 V)
//   addr 2  NUM_SAMP  RW, bits 15:0, Number Of Samples to acquire (reset: 70)
//   addr 3  PERIOD    RW, bits 15:0, Sample Period in clock ticks (reset: 1 us)
//   addr 4  STATUS    R:  bit0 Timekeeper Locked, bits 2:1 trigger state,
//                         bit3 DMA overflow
//   addr 5  TRIGGERS  R:  bits 15:0 trigger events since reset
//   addr 6  LOSSES    R:  bits 31:16 missed conversions, 15:0 dropped records
//   addr 7  TIME_SEC  R:  current GPS second
//
// The three controls, the two buttons and the lock indicator are those of
// the document's front panel; the register map, the reset values' encoding
// and the extra status registers are this design's.
module front_panel_regs
  import lightning_pkg::*;
#(
  parameter logic [PERIOD_W-1:0] DEFAULT_PERIOD = 16'd40
) (
  input  logic               clk,
  input  logic               rst_n,
  // host port
  input  logic               wr_en,
  input  logic [2:0]         wr_addr,
  input  logic [31:0]        wr_data,
  input  logic [2:0]         rd_addr,
  output logic [31:0]        rd_data,
  // controls
  output sample_t            threshold,
  output logic [COUNT_W-1:0] num_samples,
  output logic [PERIOD_W-1:0] sample_period,
  output logic               start,
  output logic               stop,
  output logic               clear_overflow,
  // indicators
  input  logic               locked,
  input  trig_state_t        state,
  input  logic               overflow,
  input  logic [COUNT_W-1:0] triggers,
  input  logic [COUNT_W-1:0] missed,
  input  logic [COUNT_W-1:0] dropped,
  input  logic [SEC_W-1:0]   now_sec
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      threshold      <= DEFAULT_THRESHOLD;
      num_samples    <= DEFAULT_NUM_SAMPLES;
      sample_period  <= DEFAULT_PERIOD;
      start          <= 1'b0;
      stop           <= 1'b0;
      clear_overflow <= 1'b0;
    end else begin
      start          <= 1'b0;
      stop           <= 1'b0;
      clear_overflow <= 1'b0;
      if (wr_en) begin
        unique case (wr_addr)
          3'd0: begin
            start          <= wr_data[0];
            stop           <= wr_data[1];
            clear_overflow <= wr_data[2];
          end
          3'd1: threshold     <= sample_t'(wr_data[SAMPLE_W-1:0]);
          3'd2: num_samples   <= wr_data[COUNT_W-1:0];
          3'd3: sample_period <= wr_data[PERIOD_W-1:0];
          default: ;  // read-only registers
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      3'd1:    rd_data = 32'(unsigned'(threshold));
      3'd2:    rd_data = 32'(num_samples);
      3'd3:    rd_data = 32'(sample_period);
      3'd4:    rd_data = {28'd0, overflow, state, locked};
      3'd5:    rd_data = 32'(triggers);
      3'd6:    rd_data = {missed, dropped};
      3'd7:    rd_data = now_sec;
      default: rd_data = '0;
    endcase
  end

endmodule
