// adc_capture: conversion control and time stamping for one ADC channel.
//
// Each `tick` from the sample timer starts a conversion (`adc_convert`, one
// cycle) and latches the current time as the sample's time stamp, so the
// stamp marks the instant the conversion began. When the ADC returns the
// code (`adc_valid` with `adc_data`) the block emits it together with the
// latched stamp on `out`/`out_valid` one cycle later. A tick that arrives
// while a conversion is still outstanding cannot be served: it is skipped
// and counted in `missed` (saturating). Acquisition of channel 0 of a
// 16-bit simultaneous-sampling module follows the document; the
// convert/valid handshake to the module is this design's model of it.
module adc_capture
  import lightning_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  timestamp_t         now,
  // ADC module
  output logic               adc_convert,
  input  logic               adc_valid,
  input  sample_t            adc_data,
  // stamped samples
  output stamped_sample_t    out,
  output logic               out_valid,
  output logic [COUNT_W-1:0] missed
);

  logic       busy;
  timestamp_t ts_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      ts_q        <= '0;
      adc_convert <= 1'b0;
      out         <= '0;
      out_valid   <= 1'b0;
      missed      <= '0;
    end else begin
      adc_convert <= 1'b0;
      out_valid   <= 1'b0;
      if (busy && adc_valid) begin
        out.data  <= adc_data;
        out.ts    <= ts_q;
        out_valid <= 1'b1;
        busy      <= 1'b0;
      end
      if (tick) begin
        if (busy && !adc_valid) begin
          if (missed != '1) missed <= missed + COUNT_W'(1);
        end else begin
          busy        <= 1'b1;
          ts_q        <= now;
          adc_convert <= 1'b1;
        end
      end
    end
  end

endmodule
