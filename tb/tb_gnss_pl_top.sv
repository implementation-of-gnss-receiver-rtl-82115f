// tb_gnss_pl_top: end-to-end run of the receiver logic with one channel per signal type,
// small buffers (main FIFOs 64, channel buffers 32) and a 256-point acquisition, all driven
// through the AXI4-Lite port the way the processor's software would.
//   band 0: live A/D samples at one per cycle, downsampled by 2, and a GPS L1 C/A channel
//           that completes an integration and then waits: its buffer fills, the band stalls,
//           the main FIFO fills and live samples are lost (overflow flag).
//   band 1: a synthetic satellite (200-sample code, delay TAU, Doppler bin DBIN) streamed
//           from the DMA input. The acquisition sweeps 5 Doppler bins and must report TAU and
//           DBIN; a GPS L5 channel placed at that code phase and Doppler must collect the
//           signal in its prompt correlator. While that channel waits for software, the DMA
//           stream is paused by back pressure.
// Each mechanism is counted and a mechanism that never happened counts as a failure:
// downsampling, acquisition downsampling, Doppler bins swept, detection, tracking
// integrations, interrupts, band back pressure, overflow, DMA pause, channel release.
module tb_gnss_pl_top import gnss_pkg::*;;
  localparam int N_CH = 1, ACQ_N = 256, P = 200, TAU = 57, DBIN = 3, NDOP = 5, NS = 800;
  localparam real PI = 3.14159265358979;
  localparam int ADC_W = 12, AW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic adc0_valid = 0, adc1_valid = 0;
  logic signed [ADC_W-1:0] adc0_i = 0, adc0_q = 0, adc1_i = 0, adc1_q = 0;
  logic dma0_valid = 0, dma0_ready, dma1_valid, dma1_ready;
  sample_t dma0_sample = '0, dma1_sample;
  logic [AW-1:0] s_axi_awaddr = 0, s_axi_araddr = 0;
  logic s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready, s_axi_bvalid;
  logic s_axi_bready = 0, s_axi_arvalid = 0, s_axi_arready, s_axi_rvalid, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hF;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [4*N_CH:0] irq;

  gnss_pl_top #(.N_CH(N_CH), .MAIN_FIFO_DEPTH(64), .INBUF_DEPTH(32), .ACQ_N(ACQ_N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #60000000; failures++;
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

  // ---------------- stimulus ----------------
  int code [P];
  logic [31:0] dstep, dmin, sstep;
  int midx = 0;                      // index of the next DMA sample
  bit dma_on = 0;
  function automatic sample_t sig(input int m);
    real th; int c, si, sq; sample_t s;
    c = code[(m - TAU + 1000 * P) % P];
    th = 0.2 + 2.0 * PI * real'(sstep) / 4294967296.0 * real'(m);
    si = int'($floor(7.0 * real'(c) * $cos(th) + 0.5)); if (si > 7) si = 7;
    sq = int'($floor(7.0 * real'(c) * $sin(th) + 0.5)); if (sq > 7) sq = 7;
    s.i = comp_t'(si); s.q = comp_t'(sq);
    return s;
  endfunction
  assign dma1_valid  = dma_on;
  assign dma1_sample = sig(midx);

  // ---------------- mechanism counters ----------------
  int n_adc = 0, n_ds0 = 0, n_fire0 = 0, n_acq_ds = 0, n_bp0 = 0, n_dma_pause = 0;
  int n_fft = 0, n_irq = 0;
  logic [4*N_CH:0] irq_q = '0;
  always @(posedge clk) if (rst_n) begin
    if (dma1_valid && dma1_ready) midx <= midx + 1;
    if (dma1_valid && !dma1_ready) n_dma_pause++;
    if (adc0_valid) n_adc++;
    if (dut.ds_valid[0]) n_ds0++;
    if (dut.mf_fire[0]) n_fire0++;
    if (dut.acq_ds_valid) n_acq_ds++;
    if (dut.mf_valid[0] && !dut.mf_ready[0]) n_bp0++;
    if (dut.u_acq.fft_done) n_fft++;
    irq_q <= irq;
    n_irq += $countones(irq & ~irq_q);
  end

  // live A/D converter on band 0: one sample per cycle, never stops
  always @(negedge clk) begin
    adc0_valid <= rst_n;
    adc0_i <= ADC_W'(int'($urandom_range(0, 4095)) - 2048);
    adc0_q <= ADC_W'(int'($urandom_range(0, 4095)) - 2048);
  end

  localparam int SL_GLB = 0, SL_ACQ = 1, SL_L1 = 2, SL_E1 = 3, SL_L5 = 4, SL_E5 = 5;

  task automatic drain_band1();
    logic [31:0] lv;
    dma_on = 0;
    do axi_rd(SL_GLB, GLB_LEVEL1, lv); while (lv != 0);
  endtask

  initial begin
    logic [31:0] d, ovf;
    int m0, ei, n_trk = 0, n_det = 0, n_release = 0;
    foreach (code[n]) code[n] = ($urandom_range(0, 1) != 0) ? 1 : -1;
    dstep = 32'd4_000_000; dmin = -32'sd8_000_000; sstep = dmin + DBIN * dstep;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // global set-up: band 1 from DMA, band 0 live and downsampled by 2, acquisition /2
    axi_wr(SL_GLB, GLB_SRC_SEL, 2'b10);
    axi_wr(SL_GLB, GLB_DECIM, 32'h01);
    axi_wr(SL_GLB, GLB_ACQ_DECIM, 1);
    axi_rd(SL_GLB, GLB_SRC_SEL, d); check(d == 2, "global register readback");
    dma_on = 1;
    // ---- acquisition on band 1 ----
    axi_wr(SL_ACQ, ACQ_CF_WADR, 0);
    for (int k = 0; k < ACQ_N; k++) begin
      real re, im;
      re = 0; im = 0;
      for (int n = 0; n < P; n++) begin
        real a; a = -2.0 * PI * real'(k * n % ACQ_N) / real'(ACQ_N);
        re += real'(code[n]) * $cos(a); im += real'(code[n]) * $sin(a);
      end
      axi_wr(SL_ACQ, ACQ_CF_WDAT, {16'(int'(im)), 16'(int'(re))});
    end
    axi_wr(SL_ACQ, ACQ_NSAMP, P); axi_wr(SL_ACQ, ACQ_DOP_MIN, dmin);
    axi_wr(SL_ACQ, ACQ_DOP_STEP, dstep); axi_wr(SL_ACQ, ACQ_NUM_DOP, NDOP);
    axi_wr(SL_ACQ, ACQ_BAND, 1); axi_wr(SL_ACQ, ACQ_THR_HI, 0); axi_wr(SL_ACQ, ACQ_THR_LO, 4_000_000);
    drain_band1();
    m0 = midx;
    axi_wr(SL_ACQ, ACQ_CTRL, 1);
    dma_on = 1;
    while (!irq[0]) @(negedge clk);
    axi_rd(SL_ACQ, ACQ_STATUS, d); check(d[2], "acquisition: signal present");
    if (d[2]) n_det++;
    axi_rd(SL_ACQ, ACQ_PEAK_IDX, d);
    ei = ((TAU - m0) % P + P) % P;
    check(d == ei, $sformatf("acquisition code phase %0d, expected %0d", d, ei));
    axi_rd(SL_ACQ, ACQ_PEAK_DOP, d); check(d == DBIN, $sformatf("acquisition Doppler bin %0d", d));
    // ---- GPS L5 channel tracks the detected signal ----
    axi_wr(SL_L5, TRK_CODE_WADR, 0);
    for (int w = 0; w < (P + 31) / 32; w++) begin
      logic [31:0] word;
      for (int b = 0; b < 32; b++) word[b] = (32*w + b < P) ? (code[32*w + b] < 0) : 1'b0;
      axi_wr(SL_L5, TRK_CODE_WDAT, word);
    end
    axi_wr(SL_L5, TRK_CODE_LEN, P);
    axi_wr(SL_L5, TRK_CODE_STEP, 32'hFFFF_FFFF);        // one code entry per sample
    axi_wr(SL_L5, TRK_NSAMPLES, NS);
    axi_wr(SL_L5, TRK_CARR_STEP, sstep);
    drain_band1();
    m0 = midx;
    axi_wr(SL_L5, TRK_CARR_PH, 32'(longint'((0.2 / (2.0 * PI) + real'(sstep) / 4294967296.0 * real'(m0)) * 4294967296.0)));
    for (int c = 0; c < 4; c++) begin                      // E, P, L, data
      int ph; ph = (((m0 - TAU) % P + P) % P + (c == 0 ? P - 2 : c == 2 ? 2 : 0)) % P;
      axi_wr(SL_L5, TRK_PH_BASE + 2*c, ph); axi_wr(SL_L5, TRK_PH_BASE + 2*c + 1, 32'h8000_0000);
    end
    axi_wr(SL_L5, TRK_CTRL, 3'b111);
    dma_on = 1;
    while (!irq[1 + 2]) @(negedge clk);
    n_trk++;
    begin
      logic [31:0] pe, pp, pl, pq;
      axi_rd(SL_L5, TRK_RES_BASE + 0, pe); axi_rd(SL_L5, TRK_RES_BASE + 2, pp);
      axi_rd(SL_L5, TRK_RES_BASE + 3, pq); axi_rd(SL_L5, TRK_RES_BASE + 4, pl);
      $display("L5 channel: E %0d  P (%0d,%0d)  L %0d", int'(pe), int'(pp), int'(pq), int'(pl));
      check(int'(pp) > 20 * NS, "tracking: prompt collects the signal");
      check(int'(pq) < 4 * NS && int'(pq) > -4 * NS, "tracking: carrier wiped off");
      check(int'(pe) < 10 * NS && int'(pl) < 10 * NS, "tracking: early and late off the peak");
    end
    // the waiting L5 channel now pauses the DMA stream
    repeat (300) @(negedge clk);
    check(!dma1_ready, "DMA paused by a waiting channel");
    axi_wr(SL_L5, TRK_CTRL, 0);
    repeat (3) @(negedge clk);
    if (dma1_ready) n_release++;
    // ---- band 0: GPS L1 C/A channel, back pressure and overflow ----
    axi_rd(SL_GLB, GLB_OVERFLOW, ovf); check(ovf == 0, "no overflow while channels keep up");
    axi_wr(SL_L1, TRK_CODE_WADR, 0);
    for (int w = 0; w < 32; w++) axi_wr(SL_L1, TRK_CODE_WDAT, $urandom);
    axi_wr(SL_L1, TRK_CODE_LEN, 1023); axi_wr(SL_L1, TRK_CODE_STEP, 32'h1500_0000);
    axi_wr(SL_L1, TRK_NSAMPLES, 300);
    axi_wr(SL_L1, TRK_CTRL, 3'b111);
    while (!irq[1 + 0]) @(negedge clk);
    n_trk++;
    repeat (400) @(negedge clk);                     // software is slow: the band stalls
    axi_rd(SL_GLB, GLB_OVERFLOW, ovf); check(ovf[0], "live samples lost while the band stalls");
    axi_rd(SL_GLB, GLB_LEVEL0, d); check(d == 65, $sformatf("main FIFO 0 full (%0d)", d));
    axi_wr(SL_L1, TRK_CTRL, 3'b011);                 // next integration drains the backlog
    while (!irq[1 + 0]) @(negedge clk);
    n_trk++;
    axi_wr(SL_GLB, GLB_OVERFLOW, 1);
    axi_wr(SL_L1, TRK_CTRL, 0);
    axi_rd(SL_GLB, GLB_OVERFLOW, ovf); check(ovf[0] == 0, "overflow cleared, channel released");
    if (ovf[0] == 0) n_release++;
    // ---- mechanism summary ----
    $display("downsampled %0d of %0d A/D samples; acquisition downsampler %0d of %0d",
             n_ds0, n_adc, n_acq_ds, n_fire0);
    $display("FFT runs %0d, detections %0d, integrations %0d, interrupts %0d",
             n_fft, n_det, n_trk, n_irq);
    $display("band-0 stall cycles %0d, DMA pause cycles %0d, releases %0d",
             n_bp0, n_dma_pause, n_release);
    check(n_ds0 > 0 && n_ds0 >= n_adc / 2 - 20 && n_ds0 <= n_adc / 2 + 20, "band downsampling by 2 (first samples precede the set-up)");
    check(n_acq_ds > 0 && n_acq_ds >= n_fire0 / 2 - 20 && n_acq_ds <= n_fire0 / 2 + 20, "acquisition downsampling by 2");
    check(n_fft == 2 * NDOP, "Doppler sweep: two transforms per bin");
    check(n_det > 0, "detection happened");
    check(n_trk == 3, "tracking integrations happened");
    check(n_irq >= 4, "interrupts happened");
    check(n_bp0 > 0, "band back pressure happened");
    check(n_dma_pause > 0, "DMA pause happened");
    check(n_release == 2, "channel release happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
