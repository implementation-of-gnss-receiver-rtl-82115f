// doppler_wipeoff: carrier (Doppler) wipe-off with a CORDIC local oscillator.
//
// A 32-bit phase accumulator (carrier NCO) advances by phase_step for every accepted sample;
// 2^32 is one cycle of the carrier, so phase_step = f_doppler / f_sample * 2^32 (two's
// complement for negative frequencies). A pipelined CORDIC turns the phase into the
// oscillator pair cos/sin with amplitude 2^(LO_W-2), the in-phase and the 90-degree branch.
// Two mixers then multiply the incoming sample by exp(-j*phase):
//     out_i = ( I*cos + Q*sin ) / 2^(LO_W-4)
//     out_q = ( Q*cos - I*sin ) / 2^(LO_W-4)
// rounded to nearest, i.e. the output keeps 2 fractional bits relative to the input.
//
// phase_load loads phase_init as the phase of the next sample (it takes precedence over the
// step of a sample accepted in the same cycle). The structure (CORDIC oscillator, 90-degree
// branch, two multipliers) follows the receiver's block diagrams; widths, rounding and the
// load port are this design's own choices.
//
// Timing: one sample per cycle, no back pressure, latency LO_ITER + 2 cycles from in_valid to out_valid.
module doppler_wipeoff import gnss_pkg::*; #(
  parameter int unsigned LO_W    = 12,               // oscillator amplitude bits
  parameter int unsigned LO_PH_W = 16,               // phase bits used by the CORDIC
  parameter int unsigned LO_ITER = 12,               // CORDIC micro-rotations
  parameter int unsigned OUT_W   = SAMPLE_W + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  sample_t                  in_sample,
  input  logic [31:0]              phase_step,
  input  logic                     phase_load,
  input  logic [31:0]              phase_init,
  output logic [31:0]              phase,            // phase of the next sample
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_i,
  output logic signed [OUT_W-1:0]  out_q
);
  localparam int unsigned CLAT = LO_ITER + 1;             // CORDIC latency
  localparam int unsigned SH   = LO_W - 4;
  localparam int unsigned PW   = SAMPLE_W + LO_W + 1;     // mixer sum width
  localparam int LO_AMP  = 2 ** (LO_W - 2);
  localparam int LO_X0   = (LO_AMP * CORDIC_INV_GAIN_Q15 + 2 ** 14) / 2 ** 15;

  // carrier NCO
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            phase <= '0;
    else if (phase_load)   phase <= phase_init;
    else if (in_valid)     phase <= phase + phase_step;
  end

  // local oscillator
  logic                   lo_valid;
  logic signed [LO_W-1:0] lo_cos, lo_sin;
  cordic_rotator #(.XY_W(LO_W), .PH_W(LO_PH_W), .ITER(LO_ITER)) u_lo (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_x     (LO_W'(LO_X0)),
    .in_y     ('0),
    .in_phase (phase[31 -: LO_PH_W]),
    .out_valid(lo_valid),
    .out_x    (lo_cos),
    .out_y    (lo_sin)
  );

  // sample delay line matching the CORDIC latency
  sample_t sdly [CLAT];
  always_ff @(posedge clk) begin
    sdly[0] <= in_sample;
    for (int k = 1; k < CLAT; k++) sdly[k] <= sdly[k-1];
  end

  // mixers
  logic signed [PW-1:0] mi, mq;
  always_comb begin
    mi = PW'(sdly[CLAT-1].i) * PW'(lo_cos) + PW'(sdly[CLAT-1].q) * PW'(lo_sin) + PW'(2 ** (SH - 1));
    mq = PW'(sdly[CLAT-1].q) * PW'(lo_cos) - PW'(sdly[CLAT-1].i) * PW'(lo_sin) + PW'(2 ** (SH - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= lo_valid;
      out_i     <= OUT_W'(mi >>> SH);
      out_q     <= OUT_W'(mq >>> SH);
    end
  end

endmodule
