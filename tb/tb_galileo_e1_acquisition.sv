// tb_galileo_e1_acquisition: the receiver logic at its default size searches for a synthetic
// Galileo E1 signal, whose 4 ms code does not fit the 16384-point transform at the full
// sample rate (50000 samples): the acquisition downsampler averages groups of 4 samples so
// that one code period becomes 12500 samples at 3.125 Msps.
//
// Stimulus: band 0 from the DMA input at 12.5 Msps, pilot and data codes of 4092 random
// chips stored as BOC(1,1) half-chips (8184 entries), 3 * (pilot + data) on a 500 Hz
// carrier, 4-bit I and Q. The code spectrum loaded into the acquisition is the FFT of the
// pilot replica sampled at the centre of each group of 4 input samples (floating-point
// radix-2 FFT here). The search runs 2 Doppler bins (0 and 500 Hz, in steps per decimated
// sample) and must find the signal present in bin 1 at the expected code phase, which is
// known to within one decimated sample because the grouping of the downsampler is free
// running. Counted mechanisms: acquisition downsampling (1 output per 4 inputs), transforms
// (2 per bin), detection, interrupt.
module tb_galileo_e1_acquisition import gnss_pkg::*;;
  localparam int NS = 12500, CHIPS = 4092, CL = 8184, NFFT = 16384, NDOP = 2, DEC = 4;
  localparam real PI = 3.14159265358979;
  localparam int ADC_W = 12, AW = 16, NIRQ = 49;
  localparam logic [31:0] DOP_IN = 32'd171799;       // 500 Hz at 12.5 Msps
  localparam logic [31:0] DOP_STEP = DOP_IN * DEC;   // the same per decimated sample
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
  bit pilot [CL], data [CL];         // half-chips, 1 means -1
  logic [31:0] code_step;            // half-chips per input sample, unsigned 0.32
  int tau = 0;                       // code delay in input samples
  int midx = 0;                      // index of the next DMA sample
  bit dma_on = 0;

  function automatic sample_t sig(input int m);
    real th; int e, v, si, sq; longint unsigned p; logic [31:0] ph; sample_t s;
    p  = longint'(code_step) * (longint'(m - tau) + 1000 * longint'(NS) * DEC);
    e  = int'((p >> 32) % CL);
    v  = (pilot[e] ? -3 : 3) + (data[e] ? -3 : 3);
    ph = PH0 + DOP_IN * 32'(m);
    th = 2.0 * PI * real'(ph) / 4294967296.0;
    si = int'($floor(real'(v) * $cos(th) + 0.5)); if (si > 7) si = 7; if (si < -8) si = -8;
    sq = int'($floor(real'(v) * $sin(th) + 0.5)); if (sq > 7) sq = 7; if (sq < -8) sq = -8;
    s.i = comp_t'(si); s.q = comp_t'(sq);
    return s;
  endfunction
  assign dma0_valid  = dma_on;
  assign dma0_sample = sig(midx);

  // ---------------- mechanism counters ----------------
  int n_in = 0, n_ds = 0, n_fft = 0, n_irq = 0;
  logic irq_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dma0_valid && dma0_ready) midx <= midx + 1;
    if (dut.mf_fire[0]) n_in++;
    if (dut.acq_ds_valid) n_ds++;
    if (dut.u_acq.fft_done) n_fft++;
    irq_q <= irq[0];
    if (irq[0] && !irq_q) n_irq++;
  end

  localparam int SL_GLB = 0, SL_ACQ = 1;

  task automatic drain_band0();
    logic [31:0] lv;
    dma_on = 0;
    do axi_rd(SL_GLB, GLB_LEVEL0, lv); while (lv != 0);
  endtask

  // ---------------- code spectrum: in-place radix-2 FFT ----------------
  real fre [NFFT], fim [NFFT];
  task automatic code_fft();
    for (int n = 0; n < NFFT; n++) begin
      int e;
      e = int'($floor((real'(DEC * n) + 1.5) * real'(code_step) / 4294967296.0)) % CL;
      fre[n] = (n < NS) ? (pilot[e] ? -1.0 : 1.0) : 0.0;
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
    int m0, ei, t0, t_acq, n_det = 0, n_in0, n_ds0;
    for (int k = 0; k < CHIPS; k++) begin
      bit a, b;
      a = $urandom_range(0, 1) != 0; b = $urandom_range(0, 1) != 0;
      pilot[2*k] = a; pilot[2*k+1] = !a;
      data[2*k]  = b; data[2*k+1]  = !b;
    end
    code_step = 32'(longint'($floor(2.0 * 1.023e6 / 12.5e6 * 4294967296.0 + 0.5)));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    axi_wr(SL_GLB, GLB_SRC_SEL, 2'b01);           // band 0 from the DMA input
    axi_wr(SL_GLB, GLB_ACQ_DECIM, 2);             // acquisition path averages 4 samples
    axi_rd(SL_GLB, GLB_ACQ_DECIM, d); check(d == 2, "global register readback");

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

    axi_wr(SL_ACQ, ACQ_NSAMP, NS); axi_wr(SL_ACQ, ACQ_DOP_MIN, 0);
    axi_wr(SL_ACQ, ACQ_DOP_STEP, DOP_STEP); axi_wr(SL_ACQ, ACQ_NUM_DOP, NDOP);
    axi_wr(SL_ACQ, ACQ_PROD_SH, PROD_SH); axi_wr(SL_ACQ, ACQ_BAND, 0);
    axi_wr(SL_ACQ, ACQ_THR_HI, 0); axi_wr(SL_ACQ, ACQ_THR_LO, 20_000_000);
    drain_band0();
    m0 = midx;
    tau = m0 + DEC * 1500 + 2;                    // code starts about 1500 decimated samples in
    ei = 1500;
    n_in0 = n_in; n_ds0 = n_ds;
    axi_wr(SL_ACQ, ACQ_CTRL, 1);
    t0 = $time / 10;
    dma_on = 1;
    while (!irq[0]) @(negedge clk);
    t_acq = $time / 10 - t0;
    dma_on = 0;
    axi_rd(SL_ACQ, ACQ_STATUS, d); check(d[2], "acquisition: signal present");
    if (d[2]) n_det++;
    axi_rd(SL_ACQ, ACQ_PEAK_IDX, pk_idx); axi_rd(SL_ACQ, ACQ_PEAK_DOP, pk_dop);
    axi_rd(SL_ACQ, ACQ_PEAK_LO, d);
    $display("acquisition: %0d cycles, peak %0d at code phase %0d, Doppler bin %0d",
             t_acq, d, pk_idx, pk_dop);
    check(int'(pk_idx) >= ei - 1 && int'(pk_idx) <= ei + 1,
          $sformatf("acquisition code phase %0d, expected %0d +- 1", pk_idx, ei));
    check(pk_dop == 1, "acquisition Doppler bin");

    $display("band samples %0d, decimated %0d, transforms %0d, detections %0d, interrupts %0d",
             n_in - n_in0, n_ds - n_ds0, n_fft, n_det, n_irq);
    check(n_ds - n_ds0 > 0 && (n_ds - n_ds0 - (n_in - n_in0) / DEC) <= 1 &&
          ((n_in - n_in0) / DEC - (n_ds - n_ds0)) <= 1, "mechanism: acquisition downsampling by 4");
    check(n_fft == 2 * NDOP, "mechanism: forward and inverse transform per Doppler bin");
    check(n_det > 0, "mechanism: detection");
    check(n_irq == 1, "mechanism: acquisition interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
