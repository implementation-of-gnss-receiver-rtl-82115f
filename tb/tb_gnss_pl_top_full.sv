// tb_gnss_pl_top_full: the receiver logic at its full default size (48 tracking channels,
// 65536-sample main FIFOs, 16384-sample channel buffers, 16384-point acquisition FFT) taken
// through one complete operation, acquisition followed by tracking, as the processor's
// software would drive it over the AXI4-Lite port.
//
// Stimulus: band 0 is fed from the DMA input with one synthetic GPS L1 C/A-like satellite at
// 12.5 Msps: a random 1023-chip code resampled by an integer code NCO (1.023 Mchip/s, the
// same NCO arithmetic as a correlator), delayed by TAU samples and modulated on a carrier
// of DOP_STEP per sample (about 1 kHz), amplitude 7 in 4-bit I and Q.
//   1. The code spectrum (FFT of the 12500-sample replica, zero-padded to 16384) is computed
//      here with a floating-point radix-2 FFT and loaded into the acquisition.
//   2. The acquisition captures 12500 samples (1 ms) and searches 2 Doppler bins (0 and
//      DOP_STEP); it must report the signal present, the code phase and Doppler bin 1.
//   3. GPS L1 C/A channel 0 is set to that code phase and Doppler with early / prompt / late
//      spaced half a chip, integrates 12500 samples and interrupts; the prompt must hold
//      the signal energy with the carrier wiped off, early and late about half of it.
// Mechanisms counted (a zero count is a failure): DMA samples into band 0, acquisition
// transforms (2 per Doppler bin), detection, tracking integration, interrupts. Cycle counts
// of the acquisition and of the integration are printed; the integration must take no more
// than 1.2 clocks per sample.
module tb_gnss_pl_top_full import gnss_pkg::*;;
  localparam int NS = 12500, CL = 1023, NFFT = 16384, LOGN = 14, NDOP = 2;
  localparam real PI = 3.14159265358979;
  localparam int ADC_W = 12, AW = 16, NIRQ = 49;
  localparam logic [31:0] DOP_STEP = 32'd343597;     // 1 kHz at 12.5 Msps
  localparam logic [31:0] PH0 = 32'h1234_5678;       // carrier phase at sample 0
  localparam int PROD_SH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic adc0_valid = 0, adc1_valid = 0;
  logic signed [ADC_W-1:0] adc0_i = 0, adc0_q = 0, adc1_i = 0, adc1_q = 0;
  logic dma0_valid, dma0_ready, dma1_valid = 0, dma1_ready;
  sample_t dma0_sample, dma1_sample = '0;
  logic [AW-1:0] s_axi_awaddr = 0, s_axi_araddr = 0;
  logic s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready, s_axi_bvalid;
  logic s_axi_bready = 0, s_axi_arvalid = 0, s_axi_arready, s_axi_rvalid, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hF;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [NIRQ-1:0] irq;

  gnss_pl_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #40000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- AXI4-Lite master ----------------
  function automatic logic [AW-1:0] addr(input int slot, input int idx);
    return AW'((slot << (REG_IDX_W + 2)) | (idx << 2));
  endfunction
  task automatic axi_wr(input int slot, input int idx, input logic [31:0] d);
    @(negedge clk);
    s_axi_awaddr = addr(slot, idx); s_axi_awvalid = 1; s_axi_wdata = d; s_axi_wvalid = 1;
    s_axi_bready = 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    @(negedge clk); s_axi_awvalid = 0; s_axi_wvalid = 0;
    while (!s_axi_bvalid) @(negedge clk);
    @(negedge clk); s_axi_bready = 0;
  endtask
  task automatic axi_rd(input int slot, input int idx, output logic [31:0] d);
    @(negedge clk);
    s_axi_araddr = addr(slot, idx); s_axi_arvalid = 1; s_axi_rready = 1;
    do @(posedge clk); while (!s_axi_arready);
    @(negedge clk); s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(negedge clk);
    d = s_axi_rdata;
    @(negedge clk); s_axi_rready = 0;
  endtask

  // ---------------- satellite signal ----------------
  bit code [CL];                     // 1 means chip value -1
  logic [31:0] code_step;            // code chips per sample, unsigned 0.32
  int tau = 0;                       // code delay in samples
  int midx = 0;                      // index of the next DMA sample
  bit dma_on = 0;

  // chip index and fraction of sample m of a code that starts at sample 0
  function automatic longint unsigned code_pos(input longint m);
    longint unsigned p; p = longint'(code_step) * m;
    return ((p >> 32) % CL << 32) | (p & 64'hFFFF_FFFF);
  endfunction
  function automatic sample_t sig(input int m);
    real th; int c, si, sq; longint unsigned p; logic [31:0] ph; sample_t s;
    p  = code_pos(longint'(m - tau) + 1000 * longint'(NS));
    c  = code[int'(p >> 32)] ? -1 : 1;
    ph = PH0 + DOP_STEP * 32'(m);
    th = 2.0 * PI * real'(ph) / 4294967296.0;
    si = int'($floor(7.0 * real'(c) * $cos(th) + 0.5)); if (si > 7) si = 7;
    sq = int'($floor(7.0 * real'(c) * $sin(th) + 0.5)); if (sq > 7) sq = 7;
    s.i = comp_t'(si); s.q = comp_t'(sq);
    return s;
  endfunction
  assign dma0_valid  = dma_on;
  assign dma0_sample = sig(midx);

  // ---------------- mechanism counters ----------------
  int n_dma = 0, n_fft = 0, n_irq = 0;
  logic [NIRQ-1:0] irq_q = '0;
  always @(posedge clk) if (rst_n) begin
    if (dma0_valid && dma0_ready) begin midx <= midx + 1; n_dma++; end
    if (dut.u_acq.fft_done) n_fft++;
    irq_q <= irq;
    n_irq += $countones(irq & ~irq_q);
  end

  localparam int SL_GLB = 0, SL_ACQ = 1, SL_L1 = 2;

  task automatic drain_band0();
    logic [31:0] lv;
    dma_on = 0;
    do axi_rd(SL_GLB, GLB_LEVEL0, lv); while (lv != 0);
  endtask

  // ---------------- code spectrum: in-place radix-2 FFT ----------------
  real fre [NFFT], fim [NFFT];
  task automatic code_fft();
    for (int n = 0; n < NFFT; n++) begin
      fre[n] = (n < NS) ? (code[int'(code_pos(n) >> 32)] ? -1.0 : 1.0) : 0.0;
      fim[n] = 0.0;
    end
    for (int i = 0, j = 0; i < NFFT; i++) begin     // bit-reversal permutation
      if (i < j) begin
        real t;
        t = fre[i]; fre[i] = fre[j]; fre[j] = t;
        t = fim[i]; fim[i] = fim[j]; fim[j] = t;
      end
      begin int b; b = NFFT >> 1; while (j & b) begin j ^= b; b >>= 1; end j |= b; end
    end
    for (int len = 2; len <= NFFT; len <<= 1)
      for (int s = 0; s < NFFT; s += len)
        for (int k = 0; k < len / 2; k++) begin
          real wr, wi, xr, xi;
          wr = $cos(-2.0 * PI * k / len); wi = $sin(-2.0 * PI * k / len);
          xr = fre[s+k+len/2] * wr - fim[s+k+len/2] * wi;
          xi = fre[s+k+len/2] * wi + fim[s+k+len/2] * wr;
          fre[s+k+len/2] = fre[s+k] - xr; fim[s+k+len/2] = fim[s+k] - xi;
          fre[s+k] += xr; fim[s+k] += xi;
        end
  endtask

  initial begin
    logic [31:0] d, pk_idx, pk_dop;
    real cmax, scale;
    int m0, ei, t0, t_acq, t_trk, n_det = 0, n_trk = 0;
    foreach (code[n]) code[n] = $urandom_range(0, 1) != 0;
    code_step = 32'(longint'($floor(real'(CL) / real'(NS) * 4294967296.0 + 0.5)));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    axi_wr(SL_GLB, GLB_SRC_SEL, 2'b01);           // band 0 from the DMA input
    axi_rd(SL_GLB, GLB_SRC_SEL, d); check(d == 1, "global register readback");
    axi_rd(SL_ACQ, ACQ_FFT_N, d); check(d == NFFT, $sformatf("acquisition FFT size %0d", d));

    // ---- 1. code spectrum, scaled to the 16-bit memory ----
    code_fft();
    cmax = 0.0;
    for (int k = 0; k < NFFT; k++) begin
      if (fre[k] > cmax) cmax = fre[k]; if (-fre[k] > cmax) cmax = -fre[k];
      if (fim[k] > cmax) cmax = fim[k]; if (-fim[k] > cmax) cmax = -fim[k];
    end
    scale = $floor(30000.0 / cmax);
    $display("code spectrum peak %0.1f, scale %0.0f", cmax, scale);
    axi_wr(SL_ACQ, ACQ_CF_WADR, 0);
    for (int k = 0; k < NFFT; k++)
      axi_wr(SL_ACQ, ACQ_CF_WDAT, {16'(int'(fim[k] * scale)), 16'(int'(fre[k] * scale))});

    // ---- 2. acquisition ----
    axi_wr(SL_ACQ, ACQ_NSAMP, NS); axi_wr(SL_ACQ, ACQ_DOP_MIN, 0);
    axi_wr(SL_ACQ, ACQ_DOP_STEP, DOP_STEP); axi_wr(SL_ACQ, ACQ_NUM_DOP, NDOP);
    axi_wr(SL_ACQ, ACQ_PROD_SH, PROD_SH); axi_wr(SL_ACQ, ACQ_BAND, 0);
    axi_wr(SL_ACQ, ACQ_THR_HI, 0); axi_wr(SL_ACQ, ACQ_THR_LO, 100_000_000);
    drain_band0();
    m0 = midx;
    tau = m0 + 1500;                              // code starts 1500 samples into the capture
    ei = ((tau - m0) % NS + NS) % NS;
    axi_wr(SL_ACQ, ACQ_CTRL, 1);
    t0 = $time / 10;
    dma_on = 1;
    while (!irq[0]) @(negedge clk);
    t_acq = $time / 10 - t0;
    axi_rd(SL_ACQ, ACQ_STATUS, d); check(d[2], "acquisition: signal present");
    if (d[2]) n_det++;
    axi_rd(SL_ACQ, ACQ_PEAK_IDX, pk_idx); axi_rd(SL_ACQ, ACQ_PEAK_DOP, pk_dop);
    axi_rd(SL_ACQ, ACQ_PEAK_LO, d);
    $display("acquisition: %0d cycles, peak %0d at code phase %0d, Doppler bin %0d",
             t_acq, d, pk_idx, pk_dop);
    check(pk_idx == ei, $sformatf("acquisition code phase %0d, expected %0d", pk_idx, ei));
    check(pk_dop == 1, "acquisition Doppler bin");

    // ---- 3. tracking on GPS L1 C/A channel 0 ----
    axi_wr(SL_L1, TRK_CODE_WADR, 0);
    for (int w = 0; w < 32; w++) begin
      logic [31:0] word;
      for (int b = 0; b < 32; b++) word[b] = (32*w + b < CL) ? code[32*w + b] : 1'b0;
      axi_wr(SL_L1, TRK_CODE_WDAT, word);
    end
    axi_wr(SL_L1, TRK_CODE_LEN, CL);
    axi_wr(SL_L1, TRK_CODE_STEP, code_step);
    axi_wr(SL_L1, TRK_NSAMPLES, NS);
    axi_wr(SL_L1, TRK_CARR_STEP, DOP_STEP * pk_dop);
    drain_band0();
    m0 = midx;
    axi_wr(SL_L1, TRK_CARR_PH, PH0 + DOP_STEP * 32'(m0));
    for (int c = 0; c < 3; c++) begin                 // E, P, L half a chip apart
      longint unsigned p;
      p = code_pos(longint'(m0 - tau) + 1000 * longint'(NS));
      p = p + longint'(CL) * 64'h1_0000_0000 + longint'(c - 1) * 64'h8000_0000;
      p = (((p >> 32) % CL) << 32) | (p & 64'hFFFF_FFFF);
      axi_wr(SL_L1, TRK_PH_BASE + 2*c, 32'(p >> 32));
      axi_wr(SL_L1, TRK_PH_BASE + 2*c + 1, 32'(p));
    end
    axi_wr(SL_L1, TRK_CTRL, 3'b111);
    t0 = $time / 10;
    dma_on = 1;
    while (!irq[1]) @(negedge clk);
    t_trk = $time / 10 - t0;
    n_trk++;
    begin
      logic [31:0] e, pi, pq, l, cnt;
      axi_rd(SL_L1, TRK_RES_BASE + 0, e); axi_rd(SL_L1, TRK_RES_BASE + 2, pi);
      axi_rd(SL_L1, TRK_RES_BASE + 3, pq); axi_rd(SL_L1, TRK_RES_BASE + 4, l);
      axi_rd(SL_L1, TRK_SAMPLE_CNT, cnt);
      $display("L1 C/A channel: %0d cycles for %0d samples, E %0d  P (%0d,%0d)  L %0d",
               t_trk, cnt, int'(e), int'(pi), int'(pq), int'(l));
      check(cnt == NS, "tracking: sample count");
      check(int'(pi) > 20 * NS, "tracking: prompt collects the signal");
      check(int'(pq) < 3 * NS && int'(pq) > -3 * NS, "tracking: carrier wiped off");
      check(int'(e) > int'(pi) / 4 && int'(e) < 3 * int'(pi) / 4, "tracking: early at half a chip");
      check(int'(l) > int'(pi) / 4 && int'(l) < 3 * int'(pi) / 4, "tracking: late at half a chip");
      check(t_trk * 10 <= 12 * NS + 2000, "tracking: at most 1.2 clocks per sample");
    end
    dma_on = 0;
    axi_wr(SL_L1, TRK_CTRL, 0);

    $display("DMA samples %0d, transforms %0d, detections %0d, integrations %0d, interrupts %0d",
             n_dma, n_fft, n_det, n_trk, n_irq);
    check(n_dma > 0, "mechanism: DMA samples into band 0");
    check(n_fft == 2 * NDOP, "mechanism: forward and inverse transform per Doppler bin");
    check(n_det > 0, "mechanism: detection");
    check(n_trk > 0, "mechanism: tracking integration");
    check(n_irq == 2, "mechanism: acquisition and tracking interrupts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
