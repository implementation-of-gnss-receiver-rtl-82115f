// sample_source_switch: selects where one band's samples come from.
//
// In real-time operation the samples come from the RF front-end's A/D converter (after
// downsampling); they arrive at a fixed rate and cannot be held back, so a sample offered
// while the downstream buffer is full is lost and raises the sticky `overflow` flag. In
// post-processing operation the samples come from a DMA engine that reads a recorded file;
// that stream has valid/ready flow control, so the receiver's back pressure simply pauses the
// DMA. sel = 0 picks the A/D converter, sel = 1 the DMA stream. The unselected DMA input sees
// ready low. The existence of the switch follows the receiver; the overflow flag and its
// clear input are this design's own.
//
// Timing: purely combinational data path; overflow is a registered flag cleared by
// overflow_clr.
module sample_source_switch import gnss_pkg::*; (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sel,
  input  logic     overflow_clr,
  // A/D converter path (no flow control)
  input  logic     adc_valid,
  input  sample_t  adc_sample,
  // DMA path (valid/ready)
  input  logic     dma_valid,
  output logic     dma_ready,
  input  sample_t  dma_sample,
  // to the main FIFO
  output logic     out_valid,
  input  logic     out_ready,
  output sample_t  out_sample,
  output logic     overflow
);
  assign out_valid  = sel ? dma_valid  : adc_valid;
  assign out_sample = sel ? dma_sample : adc_sample;
  assign dma_ready  = sel && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  overflow <= 1'b0;
    else if (overflow_clr)                       overflow <= 1'b0;
    else if (!sel && adc_valid && !out_ready)    overflow <= 1'b1;
  end

endmodule
