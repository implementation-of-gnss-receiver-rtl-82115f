// sample_fifo: first-word-fall-through FIFO for the sample streams.
//
// The receiver buffers samples in two places: one large main FIFO per frequency band, which
// absorbs occasional software delays, and one input buffer in front of every tracking
// accelerator, which lets a channel keep filling while it waits for software so that its
// back pressure does not stop the other channels. Both are this module with different depths.
//
// Storage is an array of DEPTH words written at wr_ptr and read synchronously at rd_ptr into
// an output register, so the array maps onto block RAM. The output register holds one more
// word: the FIFO holds up to DEPTH + 1 words and `level` counts all of them.
// flush empties the FIFO in one cycle.
//
// Interface: valid/ready on both sides; a word moves when valid and ready are both high.
// Timing: a word written into an empty FIFO appears at the output two cycles later; after
// that one word per cycle can be read while one is written.
module sample_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1024,    // must be a power of two
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [W-1:0]   in_data,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [W-1:0]   out_data,
  output logic [AW+1:0]  level
);
  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;              // words in the array
  logic          push, pop_mem, out_take;

  assign in_ready = (count != (AW+1)'(DEPTH));
  assign push     = in_valid && in_ready;
  assign out_take = out_valid && out_ready;
  assign pop_mem  = (count != '0) && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
    if (pop_mem) out_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0; out_valid <= 1'b0;
    end else if (flush) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0; out_valid <= 1'b0;
    end else begin
      if (push)    wr_ptr <= wr_ptr + 1'b1;
      if (pop_mem) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop_mem);
      if (pop_mem)       out_valid <= 1'b1;
      else if (out_take) out_valid <= 1'b0;
    end
  end

  assign level = (AW+2)'(count) + (AW+2)'(out_valid);

  initial assert (DEPTH == 2 ** AW) else $error("sample_fifo: DEPTH must be a power of two");

endmodule
