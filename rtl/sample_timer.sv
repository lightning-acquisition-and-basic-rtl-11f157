// sample_timer: conversion strobe generator for the acquisition loop.
//
// While `enable` is high the timer emits a one-cycle `tick` every `period`
// clock cycles; the first tick comes one cycle after enable rises, and
// later ticks are exactly `period` cycles apart. The period is the
// front-panel Sample Period, in clock ticks. The document acquires at
// 1 MS/s, the top rate of its ADC module, so a period shorter than
// MIN_PERIOD (one microsecond at the default 40 MHz clock) is raised to
// MIN_PERIOD. A new period takes effect at the next tick. Counting in clock
// ticks and the 40 MHz default clock are this design's choices.
module sample_timer #(
  parameter int unsigned PERIOD_W   = 16,
  parameter int unsigned MIN_PERIOD = 40
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic [PERIOD_W-1:0] period,
  output logic                tick
);

  logic [PERIOD_W-1:0] count;      // cycles left until the next tick
  logic [PERIOD_W-1:0] eff_period;

  always_comb begin
    eff_period = (period < PERIOD_W'(MIN_PERIOD)) ? PERIOD_W'(MIN_PERIOD) : period;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (!enable) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == '0) begin
      count <= eff_period - PERIOD_W'(1);
      tick  <= 1'b1;
    end else begin
      count <= count - PERIOD_W'(1);
      tick  <= 1'b0;
    end
  end

endmodule
