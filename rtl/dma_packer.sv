// dma_packer: writes capture records into the FPGA-to-host DMA FIFO.
//
// Each capture record becomes two 64-bit FIFO elements, time stamp first:
//   time element: {1'b1, 11'b0, usec[19:0], sec[31:0]}
//   data element: {1'b0, 15'b0, event_id[15:0], index[15:0], sample[15:0]}
// Bit 63 marks the time element, so the host can re-pair the two halves of
// every sample and rebuild each event from its tags. The FIFO side is a
// valid/ready write port: an element is written in a cycle where both are
// high, and `dma_valid`/`dma_data` hold steady until then.
//
// The packer holds one record. A record that arrives while the previous
// one is still not written (the FIFO has been full for a whole sample
// period) cannot be stored: it is dropped, `dropped` counts it
// (saturating) and `overflow` stays set until `clear_overflow`. A record
// may arrive in the cycle the last element of the previous one is written.
//
// Streaming the stamped samples through a DMA FIFO follows the document;
// the element layout and the drop policy are this design's.
module dma_packer
  import lightning_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  capture_rec_t       in,
  input  logic               in_valid,
  input  logic               clear_overflow,
  output dma_word_t          dma_data,
  output logic               dma_valid,
  input  logic               dma_ready,
  output logic               overflow,
  output logic [COUNT_W-1:0] dropped
);

  capture_rec_t rec;
  logic         full;          // a record is held
  logic         second;        // the data element is next
  logic         done;          // the last element is written this cycle

  assign dma_valid = full;
  assign dma_data  = second
      ? {1'b0, 15'd0, rec.event_id, rec.index, rec.smp.data}
      : {1'b1, 11'd0, rec.smp.ts.usec, rec.smp.ts.sec};
  assign done = full && second && dma_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec      <= '0;
      full     <= 1'b0;
      second   <= 1'b0;
      overflow <= 1'b0;
      dropped  <= '0;
    end else begin
      if (full && dma_ready) begin
        second <= ~second;
        if (second) full <= 1'b0;
      end
      if (in_valid) begin
        if (!full || done) begin
          rec    <= in;
          full   <= 1'b1;
          second <= 1'b0;
        end else begin
          overflow <= 1'b1;
          if (dropped != '1) dropped <= dropped + COUNT_W'(1);
        end
      end
      if (clear_overflow) overflow <= 1'b0;
    end
  end

  // The element on offer must not change until the FIFO takes it.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      dma_valid && !dma_ready |=> dma_valid && $stable(dma_data);
  endproperty
  a_hold: assert property (p_hold) else $error("dma element changed while stalled");

endmodule
