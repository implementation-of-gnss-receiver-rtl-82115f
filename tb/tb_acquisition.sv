// tb_acquisition: a 256-point acquisition accelerator searches a synthetic satellite signal.
// The code is a random +-1 sequence of NSAMP = 200 samples; the received signal is that code
// delayed by TAU samples, rotated by a carrier whose step equals Doppler bin DBIN of a
// 5-bin sweep, amplitude 7, quantised to 4 bits, and offered on band 1 with gaps.
// The testbench loads the FFT of the zero-padded code (computed here in floating point),
// runs the sweep and checks: the detected code phase is TAU, the Doppler bin and carrier step
// are DBIN's, the signal is flagged present against a threshold, the input power equals the
// sum of I^2 + Q^2 of the captured samples, the interrupt rises, and a second search with a
// code that is not in the signal is flagged absent.
module tb_acquisition import gnss_pkg::*;;
  localparam int N = 256, NSAMP = 200, TAU = 37, DBIN = 2, NDOP = 5;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic b0_valid = 0, b1_valid = 0, irq;
  sample_t b0_sample = '0, b1_sample = '0;
  reg_req_t reg_req = '0;
  logic [31:0] reg_rdata;

  acquisition #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int code [NSAMP];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #40000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input int idx, input logic [31:0] d);
    @(negedge clk); reg_req.wr = 1; reg_req.idx = REG_IDX_W'(idx); reg_req.wdata = d;
    @(negedge clk); reg_req.wr = 0;
  endtask
  task automatic rd(input int idx, output logic [31:0] d);
    @(negedge clk); reg_req.rd = 1; reg_req.idx = REG_IDX_W'(idx);
    #1 d = reg_rdata;
    @(negedge clk); reg_req.rd = 0;
  endtask

  task automatic load_code_fft(input int c [NSAMP]);
    wr(ACQ_CF_WADR, 0);
    for (int k = 0; k < N; k++) begin
      real re, im; int ire, iim;
      re = 0; im = 0;
      for (int n = 0; n < NSAMP; n++) begin
        real a; a = -2.0 * PI * real'(k * n % N) / real'(N);
        re += real'(c[n]) * $cos(a); im += real'(c[n]) * $sin(a);
      end
      ire = int'(re); iim = int'(im);
      wr(ACQ_CF_WDAT, {16'(iim), 16'(ire)});
    end
  endtask

  int exp_power;
  logic [31:0] dstep, dmin, step_sig;
  task automatic feed_signal();
    real ph;
    ph = 0.3;
    exp_power = 0;
    for (int n = 0; n < NSAMP + 50; n++) begin
      int si, sq, c;
      c = code[(n - TAU + NSAMP) % NSAMP];
      si = int'($floor(7.0 * real'(c) * $cos(ph) + 0.5));
      sq = int'($floor(7.0 * real'(c) * $sin(ph) + 0.5));
      if (si > 7) si = 7;
      if (sq > 7) sq = 7;
      if (n < NSAMP) exp_power += si * si + sq * sq;
      ph += 2.0 * PI * real'(step_sig) / 4294967296.0;
      @(negedge clk);
      b1_valid = 1; b1_sample.i = comp_t'(si); b1_sample.q = comp_t'(sq);
      // a band-0 stream runs at the same time and must be ignored
      b0_valid = 1; b0_sample = sample_t'($urandom);
      if (n % 5 == 4) begin @(negedge clk); b1_valid = 0; end
    end
    @(negedge clk); b1_valid = 0; b0_valid = 0;
  endtask

  initial begin
    logic [31:0] d, pk_lo, pk_hi;
    int t0, t1, other [NSAMP];
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (code[n]) code[n] = ($urandom_range(0, 1) != 0) ? 1 : -1;
    foreach (other[n]) other[n] = ($urandom_range(0, 1) != 0) ? 1 : -1;
    dstep = 32'd3_000_000;                  // Doppler bin spacing (carrier step units)
    dmin  = -32'sd6_000_000;                // first bin
    step_sig = dmin + DBIN * dstep;
    load_code_fft(code);
    wr(ACQ_NSAMP, NSAMP); wr(ACQ_DOP_MIN, dmin); wr(ACQ_DOP_STEP, dstep);
    wr(ACQ_NUM_DOP, NDOP); wr(ACQ_PROD_SH, 0); wr(ACQ_BAND, 1);
    wr(ACQ_THR_HI, 0); wr(ACQ_THR_LO, 32'd4_000_000);
    wr(ACQ_CTRL, 1);
    t0 = cyc;
    rd(ACQ_STATUS, d); check(d[0] == 1'b1, "busy after start");
    feed_signal();
    while (!irq) @(negedge clk);
    t1 = cyc;
    rd(ACQ_STATUS, d); check(d[1:0] == 2'b10, "done and idle");
    check(d[2] == 1'b1, "signal present");
    rd(ACQ_PEAK_IDX, d); check(d == TAU, $sformatf("code phase %0d, expected %0d", d, TAU));
    rd(ACQ_PEAK_DOP, d); check(d == DBIN, $sformatf("Doppler bin %0d, expected %0d", d, DBIN));
    rd(ACQ_PEAK_STEP, d); check(d == step_sig, "Doppler step of the peak");
    rd(ACQ_POWER, d); check(d == exp_power, $sformatf("power %0d, expected %0d", d, exp_power));
    rd(ACQ_PEAK_LO, pk_lo); rd(ACQ_PEAK_HI, pk_hi);
    $display("peak %0d after %0d cycles for %0d bins", {pk_hi, pk_lo}, t1 - t0, NDOP);
    // the peak is close to (4 * 7 * (NSAMP - TAU))^2 for a matched bin
    check({pk_hi, pk_lo} > 64'd10_000_000, "peak magnitude");
    check(t1 - t0 < NDOP * (2 * 8 * (N + 20) + 3 * N + NSAMP + 100) + 2 * (NSAMP + 50), "sweep time");
    // second search: code absent
    load_code_fft(other);
    wr(ACQ_CTRL, 1);
    check(!irq, "irq cleared by start");
    feed_signal();
    while (!irq) @(negedge clk);
    rd(ACQ_STATUS, d); check(d[2] == 1'b0, "absent code not detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
