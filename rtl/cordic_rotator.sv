// cordic_rotator: pipelined CORDIC that rotates a vector (x, y) counter-clockwise by an angle.
//
// The angle is an unsigned phase word where 2^PH_W is one full turn, the same format as the
// output of a phase accumulator (NCO). The first pipeline stage rotates by a multiple of 90
// degrees using the two top phase bits, so the ITER micro-rotations that follow only have to
// cover the remaining [0, 90) degrees. Each micro-rotation i adds or subtracts the vector
// shifted by i bits and the angle atan(2^-i).
//
// The output is the rotated vector multiplied by the CORDIC gain K ~ 1.6468; callers that
// want a unit gain pre-scale the input by 1/K (gnss_pkg::CORDIC_INV_GAIN_Q15). The internal
// datapath has two guard bits; the caller keeps |input| * K inside the XY_W-bit range.
//
// Timing: fully pipelined, one rotation accepted per cycle, latency LATENCY = ITER + 1 cycles.
// in_valid travels with the data to out_valid. The receiver uses this block as its CORDIC
// local oscillator (carrier wipe-off) and to generate FFT twiddle factors; the local
// oscillator being a CORDIC follows the receiver design, the pipeline organisation is this
// design's own.
module cordic_rotator import gnss_pkg::*; #(
  parameter int unsigned XY_W = 16,
  parameter int unsigned PH_W = 24,
  parameter int unsigned ITER = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [XY_W-1:0]  in_x,
  input  logic signed [XY_W-1:0]  in_y,
  input  logic        [PH_W-1:0]  in_phase,
  output logic                    out_valid,
  output logic signed [XY_W-1:0]  out_x,
  output logic signed [XY_W-1:0]  out_y
);
  localparam int unsigned LATENCY = ITER + 1;
  localparam int unsigned IW = XY_W + 2;   // internal width with guard bits
  localparam int unsigned ZW = PH_W + 1;   // signed residual angle

  initial begin
    assert (ITER <= CORDIC_MAX_ITER && PH_W <= 32 && PH_W >= 4)
      else $error("cordic_rotator: unsupported ITER/PH_W");
  end

  function automatic logic signed [ZW-1:0] atan_ph(input int unsigned i);
    logic [31:0] a;
    a = ATAN32[i] >> (32 - PH_W);
    return signed'({1'b0, a[PH_W-1:0]});
  endfunction

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];

  // stage 0: coarse rotation by q * 90 degrees
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      logic signed [IW-1:0] x0, y0;
      x0 = IW'(in_x);
      y0 = IW'(in_y);
      vs[0] <= in_valid;
      zs[0] <= signed'({3'b000, in_phase[PH_W-3:0]});
      unique case (in_phase[PH_W-1 -: 2])
        2'd0: begin xs[0] <=  x0; ys[0] <=  y0; end
        2'd1: begin xs[0] <= -y0; ys[0] <=  x0; end
        2'd2: begin xs[0] <= -x0; ys[0] <= -y0; end
        default: begin xs[0] <=  y0; ys[0] <= -x0; end
      endcase
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_iter
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0;
      end else begin
        vs[i+1] <= vs[i];
        if (zs[i] >= 0) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - atan_ph(i);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + atan_ph(i);
        end
      end
    end
  end

  assign out_valid = vs[ITER];
  assign out_x     = XY_W'(xs[ITER]);
  assign out_y     = XY_W'(ys[ITER]);

endmodule
