// fft_engine: reversible (forward / inverse) radix-2 FFT working in place on its own memory.
//
// The acquisition accelerator uses one transform block for both the FFT of the received
// signal and the inverse FFT of the product spectrum, to save resources; this is that block.
// It holds N complex words (DW-bit signed real and imaginary parts) in a two-port memory.
//   forward (inverse = 0): decimation in frequency, natural-order input, bit-reversed output,
//       X(k) = sum x(n) exp(-j 2 pi k n / N), no scaling (the caller leaves log2(N) + 1 bits
//       of headroom).
//   inverse (inverse = 1): decimation in time, bit-reversed input, natural-order output,
//       x(n) = (1/N) sum X(k) exp(+j 2 pi k n / N), scaled by 1/2 in every stage.
// So a forward transform followed by a point-wise product and an inverse transform needs no
// reordering pass. Twiddle factors are not stored: a pipelined CORDIC (cordic_rotator)
// produces W = exp(-+j 2 pi e / N) with amplitude 2^(TW_W-2) for each butterfly.
//
// Schedule: one butterfly is issued every second cycle. Each memory port reads in even cycles
// and writes in odd cycles, so the memory maps onto a true dual-port RAM. A butterfly's
// operands are read CL-1 cycles after issue (CL = CORDIC latency) so that they meet their
// twiddle, two arithmetic register stages follow, and the results are written back
// CL+2 cycles after issue. The pipeline is drained at the end of every stage.
// One transform takes log2(N) * (N + CL + 4) cycles, about 229 000 cycles for N = 16384.
//
// External port (used only while busy is low): ext_raddr is read into ext_rdata one cycle
// later; ext_we writes ext_wdata at ext_waddr. start (while idle) begins a transform; done
// pulses for one cycle at its end. The DIF/DIT pairing, CORDIC twiddles and the schedule are
// this design's own choices; the receiver specifies only a reversible FFT block.
module fft_engine #(
  parameter int unsigned N     = 16384,
  parameter int unsigned DW    = 24,
  parameter int unsigned TW_W  = 16,
  parameter int unsigned ITER  = 14,            // CORDIC micro-rotations, must be even
  localparam int unsigned L    = $clog2(N),
  localparam int unsigned AW   = L
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              inverse,
  output logic              busy,
  output logic              done,
  input  logic [AW-1:0]     ext_raddr,
  output logic [2*DW-1:0]   ext_rdata,          // {re, im}
  input  logic              ext_we,
  input  logic [AW-1:0]     ext_waddr,
  input  logic [2*DW-1:0]   ext_wdata
);
  localparam int unsigned CL   = ITER + 1;      // CORDIC latency, odd
  localparam int unsigned PH_W = (L + 10 < 24) ? 24 : L + 10;   // CORDIC angle resolution
  localparam int unsigned SRL  = CL + 3;
  localparam int TW_X0 = (2 ** (TW_W - 2) * 19898 + 2 ** 14) / 2 ** 15;   // 2^(TW_W-2) / K

  initial assert (N == 2 ** L && ITER % 2 == 0 && N >= 4) else $error("fft_engine: bad N/ITER");

  // ---------------- memory (two ports) ----------------
  logic [2*DW-1:0] mem [N];
  logic [AW-1:0]   p0_addr, p1_addr;
  logic            p0_we, p1_we;
  logic [2*DW-1:0] p0_wdata, p1_wdata, p0_rdata, p1_rdata;

  always_ff @(posedge clk) begin
    if (p0_we) mem[p0_addr] <= p0_wdata;
    else       p0_rdata <= mem[p0_addr];
  end
  always_ff @(posedge clk) begin
    if (p1_we) mem[p1_addr] <= p1_wdata;
    else       p1_rdata <= mem[p1_addr];
  end
  assign ext_rdata = p0_rdata;

  // ---------------- control ----------------
  logic            inv_q, phase;
  logic [$clog2(L+1)-1:0] stage;
  logic [AW-1:0]   bf;            // butterfly index in the stage, N/2 values
  logic            bf_all;        // every butterfly of the stage issued
  logic [$clog2(SRL+1)-1:0] drain;

  logic            issue;
  logic [AW-1:0]   ia, ib, e;
  always_comb begin
    logic [AW-1:0] h, j, g;
    if (!inv_q) begin
      h = AW'(N >> (stage + 1));
      j = bf & (h - 1'b1);
      g = bf >> (L - 1 - int'(stage));
      e = j << stage;
    end else begin
      h = AW'(1) << stage;
      j = bf & (h - 1'b1);
      g = bf >> stage;
      e = j << (L - 1 - int'(stage));
    end
    ia = AW'((g << (stage_shift(inv_q, stage) + 1)) + j);
    ib = ia + h;
  end
  function automatic int unsigned stage_shift(input logic inv, input logic [$clog2(L+1)-1:0] s);
    return inv ? int'(s) : (L - 1 - int'(s));
  endfunction

  assign issue = busy && !bf_all && !phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; inv_q <= 1'b0; phase <= 1'b0;
      stage <= '0; bf <= '0; bf_all <= 1'b0; drain <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; inv_q <= inverse; phase <= 1'b0;
          stage <= '0; bf <= '0; bf_all <= 1'b0;
        end
      end else begin
        phase <= !phase;
        if (issue) begin
          bf <= bf + 1'b1;
          if (bf == AW'(N / 2 - 1)) begin bf_all <= 1'b1; drain <= ($clog2(SRL+1))'(SRL); end
        end else if (bf_all) begin
          if (drain != '0) drain <= drain - 1'b1;
          else if (int'(stage) == L - 1) begin
            busy <= 1'b0; done <= 1'b1;
          end else begin
            stage <= stage + 1'b1; bf <= '0; bf_all <= 1'b0; phase <= 1'b0;
          end
        end
      end
    end
  end

  // ---------------- twiddle generation ----------------
  logic [PH_W-1:0] tw_phase;
  logic signed [TW_W-1:0] tw_re, tw_im;
  logic tw_valid;
  always_comb begin
    tw_phase = PH_W'(e) << (PH_W - L);
    if (!inv_q) tw_phase = -tw_phase;
  end
  cordic_rotator #(.XY_W(TW_W), .PH_W(PH_W), .ITER(ITER)) u_tw (
    .clk, .rst_n,
    .in_valid (issue),
    .in_x     (TW_W'(TW_X0)),
    .in_y     ('0),
    .in_phase (tw_phase),
    .out_valid(tw_valid),
    .out_x    (tw_re),
    .out_y    (tw_im)
  );

  // ---------------- address pipeline ----------------
  logic          sr_v  [SRL+1];
  logic [AW-1:0] sr_ia [SRL+1];
  logic [AW-1:0] sr_ib [SRL+1];
  always_comb begin
    sr_v[0] = issue; sr_ia[0] = ia; sr_ib[0] = ib;
  end
  for (genvar k = 1; k <= SRL; k++) begin : g_sr
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin sr_v[k] <= 1'b0; sr_ia[k] <= '0; sr_ib[k] <= '0; end
      else begin sr_v[k] <= sr_v[k-1]; sr_ia[k] <= sr_ia[k-1]; sr_ib[k] <= sr_ib[k-1]; end
    end
  end

  // ---------------- butterfly arithmetic ----------------
  localparam int unsigned PW = DW + TW_W + 2;
  logic signed [DW-1:0] ar, ai, br, bi;
  assign ar = p0_rdata[2*DW-1:DW]; assign ai = p0_rdata[DW-1:0];
  assign br = p1_rdata[2*DW-1:DW]; assign bi = p1_rdata[DW-1:0];

  logic signed [DW:0]   s1_ar, s1_ai, s1_xr, s1_xi;   // DIF: a+b and a-b; DIT: a and b*W
  logic signed [TW_W-1:0] s1_wr, s1_wi;
  logic signed [DW-1:0] s2_ar, s2_ai, s2_br, s2_bi;

  function automatic logic signed [DW:0] cmul_re(input logic signed [DW:0] xr, xi,
                                                 input logic signed [TW_W-1:0] wr, wi);
    logic signed [PW-1:0] p;
    p = PW'(xr) * PW'(wr) - PW'(xi) * PW'(wi) + PW'(2 ** (TW_W - 3));
    return (DW+1)'(p >>> (TW_W - 2));
  endfunction
  function automatic logic signed [DW:0] cmul_im(input logic signed [DW:0] xr, xi,
                                                 input logic signed [TW_W-1:0] wr, wi);
    logic signed [PW-1:0] p;
    p = PW'(xr) * PW'(wi) + PW'(xi) * PW'(wr) + PW'(2 ** (TW_W - 3));
    return (DW+1)'(p >>> (TW_W - 2));
  endfunction

  always_ff @(posedge clk) begin
    // stage 1: operands and twiddle meet (cycle issue + CL)
    if (!inv_q) begin
      s1_ar <= (DW+1)'(ar) + (DW+1)'(br);
      s1_ai <= (DW+1)'(ai) + (DW+1)'(bi);
      s1_xr <= (DW+1)'(ar) - (DW+1)'(br);
      s1_xi <= (DW+1)'(ai) - (DW+1)'(bi);
    end else begin
      s1_ar <= (DW+1)'(ar);
      s1_ai <= (DW+1)'(ai);
      s1_xr <= cmul_re((DW+1)'(br), (DW+1)'(bi), tw_re, tw_im);
      s1_xi <= cmul_im((DW+1)'(br), (DW+1)'(bi), tw_re, tw_im);
    end
    s1_wr <= tw_re;
    s1_wi <= tw_im;
    // stage 2
    if (!inv_q) begin
      s2_ar <= DW'(s1_ar);
      s2_ai <= DW'(s1_ai);
      s2_br <= DW'(cmul_re(s1_xr, s1_xi, s1_wr, s1_wi));
      s2_bi <= DW'(cmul_im(s1_xr, s1_xi, s1_wr, s1_wi));
    end else begin
      s2_ar <= DW'((s1_ar + s1_xr) >>> 1);
      s2_ai <= DW'((s1_ai + s1_xi) >>> 1);
      s2_br <= DW'((s1_ar - s1_xr) >>> 1);
      s2_bi <= DW'((s1_ai - s1_xi) >>> 1);
    end
  end

  // ---------------- port multiplexing ----------------
  always_comb begin
    if (busy) begin
      p0_we    = sr_v[CL+2];
      p1_we    = sr_v[CL+2];
      p0_addr  = sr_v[CL+2] ? sr_ia[CL+2] : sr_ia[CL-1];
      p1_addr  = sr_v[CL+2] ? sr_ib[CL+2] : sr_ib[CL-1];
    end else begin
      p0_we    = 1'b0;
      p1_we    = ext_we;
      p0_addr  = ext_raddr;
      p1_addr  = ext_waddr;
    end
    p0_wdata = {s2_ar, s2_ai};
    p1_wdata = busy ? {s2_br, s2_bi} : ext_wdata;
  end

  // a read and a write of the same port never fall in the same cycle
  always_ff @(posedge clk) begin
    if (busy) assert (!(sr_v[CL+2] && sr_v[CL-1])) else $error("fft_engine: port conflict");
  end

endmodule
