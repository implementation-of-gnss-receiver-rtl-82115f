// acquisition: acquisition hardware accelerator (parallel code phase search).
//
// The accelerator decides whether one satellite's signal is present and, if so, estimates
// its code phase and Doppler frequency. Software loads the FFT of the satellite's code
// (resampled to the sample rate and zero-padded to N points) into the code-FFT memory and
// starts the search; the whole Doppler sweep then runs without software.
//
//   CAPTURE  NSAMP samples (up to N) of the selected band are stored in the capture buffer as
//            they flow out of the band's FIFO; the acquisition never holds the flow back.
//            The input power sum(I^2 + Q^2) is accumulated on the way.
//   For each Doppler bin d = 0 .. NUM_DOP-1 (carrier step DOP_MIN + d * DOP_STEP):
//     LOAD   the capture buffer is read through the Doppler wipe-off unit (CORDIC local
//            oscillator, phase restarting at 0) into the FFT memory, zero-padded to N.
//     FFT    forward transform Y(k) (bit-reversed order in memory).
//     MULT   Z(k) = Y(k) * conj(C(k)) / 2^PROD_SH, C being the stored code FFT (read at the
//            bit-reversed address so both are in the same order).
//     IFFT   inverse transform: z(n) = (1/N) sum Z(k) exp(+j 2 pi k n / N), the circular
//            cross-correlation of the zero-padded signal and code, natural order.
//     MAG    |z(n)|^2 for code phases n = 0 .. NSAMP-1; the largest value over all bins is
//            kept with its code phase, Doppler bin and carrier step.
//   DONE     irq rises; signal present = peak > THR (64-bit threshold set by software).
//
// One reversible FFT block (fft_engine) does both transforms, the signal path being routed
// back to its input between them. The switches, the CORDIC oscillator, the stored code FFT
// and the |.|^2 output follow the receiver; the register map, the fixed-point formats
// (24-bit FFT words, 16-bit code FFT words) and the threshold test are this design's own.
//
// Registers (index in gnss_pkg): CTRL(W) b0 start; STATUS(R) b0 busy, b1 done, b2 present;
// NSAMP; DOP_MIN; DOP_STEP; NUM_DOP; PROD_SH; THR_LO; THR_HI; BAND (0: band 0, 1: band 1);
// CF_WADR; CF_WDAT ({imag[15:0], real[15:0]}, auto-increment); results PEAK_LO/HI, PEAK_IDX,
// PEAK_DOP, POWER, PEAK_STEP; FFT_N. reg_rdata is combinational on reg_req.idx.
// Timing per Doppler bin: about 2 * log2(N) * (N + ITER + 5) + 2N + NSAMP cycles.
module acquisition import gnss_pkg::*; #(
  parameter int unsigned N       = 16384,
  parameter int unsigned DW      = 24,
  parameter int unsigned CW      = 16,
  parameter int unsigned LO_ITER = 12,
  localparam int unsigned AW     = $clog2(N)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        b0_valid,
  input  sample_t     b0_sample,
  input  logic        b1_valid,
  input  sample_t     b1_sample,
  input  reg_req_t    reg_req,
  output logic [31:0] reg_rdata,
  output logic        irq
);
  typedef enum logic [2:0] {S_IDLE, S_CAPTURE, S_LOAD, S_FFT, S_MULT, S_IFFT, S_MAG} state_t;
  state_t state;

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] a);
    for (int k = 0; k < AW; k++) bitrev[k] = a[AW-1-k];
  endfunction

  // ---------------- registers ----------------
  logic [AW:0]  nsamp;
  logic [31:0]  dop_min, dop_step, num_dop, thr_lo, thr_hi;
  logic [5:0]   prod_sh;
  logic         band;
  logic [AW-1:0] cf_wadr;
  logic         start;
  assign start = reg_req.wr && reg_req.idx == REG_IDX_W'(ACQ_CTRL) && reg_req.wdata[0] &&
                 state == S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nsamp <= (AW+1)'(N); dop_min <= '0; dop_step <= '0; num_dop <= 32'd1;
      prod_sh <= '0; thr_lo <= '1; thr_hi <= '1; band <= 1'b0; cf_wadr <= '0;
    end else if (reg_req.wr) begin
      unique case (int'(reg_req.idx))
        ACQ_NSAMP:    nsamp    <= (reg_req.wdata > N) ? (AW+1)'(N) : (AW+1)'(reg_req.wdata);
        ACQ_DOP_MIN:  dop_min  <= reg_req.wdata;
        ACQ_DOP_STEP: dop_step <= reg_req.wdata;
        ACQ_NUM_DOP:  num_dop  <= (reg_req.wdata == 0) ? 32'd1 : reg_req.wdata;
        ACQ_PROD_SH:  prod_sh  <= reg_req.wdata[5:0];
        ACQ_THR_LO:   thr_lo   <= reg_req.wdata;
        ACQ_THR_HI:   thr_hi   <= reg_req.wdata;
        ACQ_BAND:     band     <= reg_req.wdata[0];
        ACQ_CF_WADR:  cf_wadr  <= AW'(reg_req.wdata);
        ACQ_CF_WDAT:  cf_wadr  <= cf_wadr + 1'b1;
        default: ;
      endcase
    end
  end

  // ---------------- memories ----------------
  sample_t     cap_mem [N];
  logic [2*CW-1:0] cf_mem [N];      // {imag, real}
  sample_t     cap_q;
  logic [2*CW-1:0] cf_q;
  logic [AW-1:0] cap_waddr, cap_raddr, cf_raddr;
  logic          cap_we;
  sample_t       cap_wdata;

  always_ff @(posedge clk) begin
    if (cap_we) cap_mem[cap_waddr] <= cap_wdata;
    cap_q <= cap_mem[cap_raddr];
  end
  always_ff @(posedge clk) begin
    if (reg_req.wr && reg_req.idx == REG_IDX_W'(ACQ_CF_WDAT)) cf_mem[cf_wadr] <= reg_req.wdata;
    cf_q <= cf_mem[cf_raddr];
  end

  // ---------------- FFT ----------------
  logic            fft_start, fft_inv, fft_busy, fft_done, fft_we;
  logic [AW-1:0]   fft_raddr, fft_waddr;
  logic [2*DW-1:0] fft_rdata, fft_wdata;

  fft_engine #(.N(N), .DW(DW), .ITER(14)) u_fft (
    .clk, .rst_n,
    .start    (fft_start),
    .inverse  (fft_inv),
    .busy     (fft_busy),
    .done     (fft_done),
    .ext_raddr(fft_raddr),
    .ext_rdata(fft_rdata),
    .ext_we   (fft_we),
    .ext_waddr(fft_waddr),
    .ext_wdata(fft_wdata)
  );

  // ---------------- Doppler wipe-off ----------------
  localparam int unsigned WO_W = SAMPLE_W + 4;
  logic                   wo_in_valid, wo_load, wo_valid;
  logic signed [WO_W-1:0] wo_i, wo_q;
  logic [31:0]            cur_step, wo_phase;

  doppler_wipeoff #(.LO_ITER(LO_ITER)) u_wipe (
    .clk, .rst_n,
    .in_valid  (wo_in_valid),
    .in_sample (cap_q),
    .phase_step(cur_step),
    .phase_load(wo_load),
    .phase_init(32'd0),
    .phase     (wo_phase),
    .out_valid (wo_valid),
    .out_i     (wo_i),
    .out_q     (wo_q)
  );

  // ---------------- sequencer ----------------
  logic [AW:0]   cnt, wcnt;       // issue and write-back counters
  logic [31:0]   dbin, power;
  logic          v1, v2, ld_v;
  assign wo_in_valid = ld_v;   // capture-buffer data arrives one cycle after its read
  logic [AW-1:0] k1, k2;
  logic [2*DW-1:0] z2;
  logic [2*DW-1:0] mag2;
  logic [2*DW-1:0] peak;
  logic [AW-1:0] peak_idx;
  logic [31:0]   peak_dop, peak_step;
  logic          done_f, present;

  sample_t in_s;
  logic    in_v;
  assign in_s = band ? b1_sample : b0_sample;
  assign in_v = band ? b1_valid  : b0_valid;

  // product Y * conj(C) of the read operands
  logic signed [DW-1:0] yr, yi;
  logic signed [CW-1:0] cr, ci;
  logic signed [DW+CW+1:0] pr, pi;
  assign yr = fft_rdata[2*DW-1:DW]; assign yi = fft_rdata[DW-1:0];
  assign cr = cf_q[CW-1:0];          assign ci = cf_q[2*CW-1:CW];
  assign pr = ((DW+CW+2)'(yr) * (DW+CW+2)'(cr) + (DW+CW+2)'(yi) * (DW+CW+2)'(ci)) >>> prod_sh;
  assign pi = ((DW+CW+2)'(yi) * (DW+CW+2)'(cr) - (DW+CW+2)'(yr) * (DW+CW+2)'(ci)) >>> prod_sh;

  always_comb begin
    cap_we    = (state == S_CAPTURE) && in_v && (cnt < nsamp);
    cap_waddr = AW'(cnt);
    cap_wdata = in_s;
    cap_raddr = AW'(cnt);
    cf_raddr  = bitrev(AW'(cnt));
    fft_raddr = AW'(cnt);
    fft_we    = 1'b0;
    fft_waddr = AW'(wcnt);
    fft_wdata = '0;
    if (state == S_LOAD && wo_valid) begin
      fft_we    = 1'b1;
      fft_wdata = (wcnt < nsamp) ? {DW'(wo_i), DW'(wo_q)} : '0;
    end else if (state == S_MULT && v2) begin
      fft_we    = 1'b1;
      fft_waddr = k2;
      fft_wdata = z2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; wcnt <= '0; dbin <= '0; power <= '0; cur_step <= '0;
      v1 <= 1'b0; v2 <= 1'b0; ld_v <= 1'b0; k1 <= '0; k2 <= '0; z2 <= '0; mag2 <= '0;
      peak <= '0; peak_idx <= '0; peak_dop <= '0; peak_step <= '0;
      done_f <= 1'b0; present <= 1'b0; fft_start <= 1'b0; fft_inv <= 1'b0; wo_load <= 1'b0;
    end else begin
      fft_start <= 1'b0;
      wo_load   <= 1'b0;
      ld_v      <= (state == S_LOAD) && (cnt < (AW+1)'(N));
      v1 <= 1'b0; v2 <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CAPTURE; cnt <= '0; power <= '0; done_f <= 1'b0; present <= 1'b0;
          peak <= '0; peak_idx <= '0; peak_dop <= '0; peak_step <= dop_min;
        end
        S_CAPTURE: begin
          if (cnt == nsamp) begin
            state <= S_LOAD; cnt <= '0; wcnt <= '0; dbin <= '0;
            cur_step <= dop_min; wo_load <= 1'b1;
          end else if (in_v) begin
            cnt   <= cnt + 1'b1;
            power <= power + 32'(int'(in_s.i) * int'(in_s.i) + int'(in_s.q) * int'(in_s.q));
          end
        end
        S_LOAD: begin
          if (cnt < (AW+1)'(N)) cnt <= cnt + 1'b1;
          if (wo_valid) begin
            wcnt <= wcnt + 1'b1;
            if (wcnt == (AW+1)'(N - 1)) begin
              state <= S_FFT; fft_start <= 1'b1; fft_inv <= 1'b0;
            end
          end
        end
        S_FFT: if (fft_done) begin state <= S_MULT; cnt <= '0; end
        S_MULT: begin
          // cycle 0: read Y(k) and C(bitrev k); cycle 1: product; cycle 2: write back
          if (cnt < (AW+1)'(N)) begin cnt <= cnt + 1'b1; v1 <= 1'b1; k1 <= AW'(cnt); end
          v2 <= v1; k2 <= k1;
          z2 <= {DW'(pr), DW'(pi)};
          if (v2 && k2 == AW'(N - 1)) begin
            state <= S_IFFT; fft_start <= 1'b1; fft_inv <= 1'b1;
          end
        end
        S_IFFT: if (fft_done) begin state <= S_MAG; cnt <= '0; end
        S_MAG: begin
          // cycle 0: read z(n); cycle 1: |z|^2; cycle 2: compare
          if (cnt < nsamp) begin cnt <= cnt + 1'b1; v1 <= 1'b1; k1 <= AW'(cnt); end
          v2 <= v1; k2 <= k1;
          mag2 <= (2*DW)'(yr) * (2*DW)'(yr) + (2*DW)'(yi) * (2*DW)'(yi);
          if (v2 && mag2 > peak) begin
            peak <= mag2; peak_idx <= k2; peak_dop <= dbin; peak_step <= cur_step;
          end
          if (!v1 && !v2 && cnt == nsamp) begin
            if (dbin + 1 == num_dop) begin
              state <= S_IDLE; done_f <= 1'b1;
              present <= ({thr_hi, thr_lo} < 64'(peak));
            end else begin
              state <= S_LOAD; dbin <= dbin + 1'b1; cnt <= '0; wcnt <= '0;
              cur_step <= cur_step + dop_step; wo_load <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign irq = done_f;

  always_comb begin
    reg_rdata = '0;
    unique case (int'(reg_req.idx))
      ACQ_STATUS:    reg_rdata = {29'd0, present, done_f, state != S_IDLE};
      ACQ_NSAMP:     reg_rdata = 32'(nsamp);
      ACQ_DOP_MIN:   reg_rdata = dop_min;
      ACQ_DOP_STEP:  reg_rdata = dop_step;
      ACQ_NUM_DOP:   reg_rdata = num_dop;
      ACQ_PROD_SH:   reg_rdata = 32'(prod_sh);
      ACQ_THR_LO:    reg_rdata = thr_lo;
      ACQ_THR_HI:    reg_rdata = thr_hi;
      ACQ_BAND:      reg_rdata = 32'(band);
      ACQ_PEAK_LO:   reg_rdata = peak[31:0];
      ACQ_PEAK_HI:   reg_rdata = 32'(peak >> 32);
      ACQ_PEAK_IDX:  reg_rdata = 32'(peak_idx);
      ACQ_PEAK_DOP:  reg_rdata = peak_dop;
      ACQ_POWER:     reg_rdata = power;
      ACQ_PEAK_STEP: reg_rdata = peak_step;
      ACQ_FFT_N:     reg_rdata = 32'(N);
      default:       reg_rdata = '0;
    endcase
  end

endmodule
