// downsampler: integer-ratio decimator for a complex sample stream.
//
// The receiver lowers the sample rate in front of each main FIFO (ADC rate to the 12.5 Msps
// processing rate) and once more in front of the acquisition accelerator for the
// GPS L1 C/A / Galileo E1 band, so that the 4 ms Galileo E1 code fits in the same FFT size as
// the 1 ms codes. The decimation ratio is 2^decim_log2, set at run time.
//
// The filter is a boxcar: D = 2^decim_log2 consecutive input samples are summed and the sum is
// divided by D * 2^shift (arithmetic shift), then saturated to OUT_W bits. shift requantises
// wide ADC words to the narrow processing format. The boxcar and the requantisation are this
// design's own choices; the receiver only names the block.
//
// Timing: one input per cycle at most; an output is produced one cycle after the D-th input of
// each group. Changing decim_log2 restarts the group count.
module downsampler #(
  parameter int unsigned IN_W      = 12,
  parameter int unsigned OUT_W     = 4,
  parameter int unsigned MAX_LOG2  = 4,
  localparam int unsigned LW       = $clog2(MAX_LOG2 + 1),
  localparam int unsigned SW       = $clog2(IN_W + MAX_LOG2 + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [LW-1:0]            decim_log2,
  input  logic [SW-1:0]            shift,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   in_i,
  input  logic signed [IN_W-1:0]   in_q,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_i,
  output logic signed [OUT_W-1:0]  out_q
);
  localparam int unsigned AW = IN_W + MAX_LOG2;

  logic signed [AW-1:0] acc_i, acc_q;
  logic [MAX_LOG2:0]    cnt;
  logic [LW-1:0]        decim_q;

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [AW-1:0] v);
    localparam int signed MAXV = 2 ** (OUT_W - 1) - 1;
    localparam int signed MINV = -(2 ** (OUT_W - 1));
    if (v > AW'(MAXV))      return OUT_W'(MAXV);
    else if (v < AW'(MINV)) return OUT_W'(MINV);
    else                    return OUT_W'(v);
  endfunction

  logic                 last;
  logic signed [AW-1:0] sum_i, sum_q;
  assign last  = (cnt == (MAX_LOG2+1)'((1 << decim_q) - 1));
  assign sum_i = (cnt == '0) ? AW'(in_i) : acc_i + AW'(in_i);
  assign sum_q = (cnt == '0) ? AW'(in_q) : acc_q + AW'(in_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i <= '0; acc_q <= '0; cnt <= '0; decim_q <= '0;
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      decim_q   <= decim_log2;
      out_valid <= 1'b0;
      if (decim_log2 != decim_q) begin
        cnt <= '0;
      end else if (in_valid) begin
        acc_i <= sum_i;
        acc_q <= sum_q;
        if (last) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          out_i     <= sat(sum_i >>> (SW'(decim_q) + shift));
          out_q     <= sat(sum_q >>> (SW'(decim_q) + shift));
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
