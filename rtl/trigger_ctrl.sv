// trigger_ctrl: basic amplitude-threshold trigger.
//
// The capture is started by a `start` pulse, which is honoured only while
// the timekeeper reports lock, and ended at any time by a `stop` pulse.
// Once started the block is ARMED: it compares every incoming stamped
// sample with `threshold` (signed ADC codes) and drops the samples that do
// not exceed it. The first sample above the threshold triggers an event:
// that sample and the following ones, `num_samples` in all, are passed on
// as capture records tagged with an event number and their index in the
// event (ACQUIRE). Then the block re-arms and waits for the next sample
// above the threshold; the threshold is a level test, so a signal still
// above it triggers the next event at once. A `num_samples` of 0 is
// treated as 1.
//
// Records leave one cycle after their sample arrives. `triggers` counts
// events (wrapping); `state` is reported for the front panel.
//
// Start/stop, threshold, number of samples, the re-arm after each capture
// and the inclusion of the crossing sample follow the document; the level
// comparison, the record tags and the treatment of 0 are this design's.
module trigger_ctrl
  import lightning_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               stop,
  input  logic               locked,
  input  sample_t            threshold,
  input  logic [COUNT_W-1:0] num_samples,
  input  stamped_sample_t    in,
  input  logic               in_valid,
  output capture_rec_t       out,
  output logic               out_valid,
  output trig_state_t        state,
  output logic [COUNT_W-1:0] triggers
);

  logic [COUNT_W-1:0] n_eff;
  logic [COUNT_W-1:0] index;     // index of the next sample of this event
  logic               above;

  assign n_eff = (num_samples == '0) ? COUNT_W'(1) : num_samples;
  assign above = in.data > threshold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= TRG_IDLE;
      index     <= '0;
      triggers  <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (stop) begin
        state <= TRG_IDLE;
      end else begin
        unique case (state)
          TRG_IDLE: begin
            if (start && locked) state <= TRG_ARMED;
          end
          TRG_ARMED: begin
            if (in_valid && above) begin
              out.smp      <= in;
              out.event_id <= triggers;
              out.index    <= '0;
              out_valid    <= 1'b1;
              triggers     <= triggers + COUNT_W'(1);
              index        <= COUNT_W'(1);
              if (n_eff != COUNT_W'(1)) state <= TRG_ACQUIRE;
            end
          end
          TRG_ACQUIRE: begin
            if (in_valid) begin
              out.smp      <= in;
              out.event_id <= triggers - COUNT_W'(1);
              out.index    <= index;
              out_valid    <= 1'b1;
              index        <= index + COUNT_W'(1);
              if (index + COUNT_W'(1) >= n_eff) state <= TRG_ARMED;
            end
          end
          default: state <= TRG_IDLE;
        endcase
      end
    end
  end

endmodule
