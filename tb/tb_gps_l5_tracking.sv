// tb_gps_l5_tracking: a GPS L5 tracking channel as the receiver builds it (3 pilot
// correlators E / P / L plus 1 data correlator, 10230-entry code memories, 16384-sample
// input buffer) tracks a synthetic L5 signal for one 1 ms code period at 12.5 Msps.
//
// Signal: pilot (Q5-like) and data (I5-like) codes of 10230 random chips at 10.23 Mchip/s,
// so the code NCO advances 10.23 / 12.5 chips per sample. The received sample is
// 3 * (pilot - data) (data bit -1) rotated by a 2 kHz carrier, rounded to 4-bit I and Q.
// Correlator offsets from the true code phase: -1/2, 0, +1/2 chip (E, P, L) and 0 for the
// data correlator. Expected from the BPSK autocorrelation R(t) = 1 - |t|: E and L near
// 0.5 P, the prompt Q near 0, the data correlator near -P. The integration must finish in
// no more than 1.2 clocks per sample and raise the interrupt.
module tb_gps_l5_tracking import gnss_pkg::*;;
  localparam int NP = 3, ND = 1, NC = 4, CHIPS = 10230, CODE_MAX = 10230, NS = 12500;
  localparam real PI = 3.14159265358979;
  localparam logic [31:0] CARR_STEP = 32'd687195;   // 2 kHz at 12.5 Msps
  localparam logic [31:0] PH0 = 32'h4000_1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_valid, in_ready, irq;
  sample_t in_sample;
  reg_req_t reg_req = '0;
  logic [31:0] reg_rdata;

  trk_channel #(.N_PILOT(NP), .N_DATA(ND), .CODE_MAX(CODE_MAX)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #3000000; failures++;
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

  // chip sequences: 1 means -1
  bit pilot [CODE_MAX], data [CODE_MAX];
  logic [31:0] step;
  task automatic load_code(input bit c [CODE_MAX], input bit is_data);
    wr(TRK_CODE_WADR, {is_data, 31'd0});
    for (int w = 0; w < (CODE_MAX + 31) / 32; w++) begin
      logic [31:0] word;
      for (int b = 0; b < 32; b++) word[b] = (32*w + b < CODE_MAX) ? c[32*w + b] : 1'b0;
      wr(TRK_CODE_WDAT, word);
    end
  endtask

  function automatic sample_t sig(input int m);
    longint unsigned p; int e, v, si, sq; real th; logic [31:0] ph; sample_t s;
    p  = longint'(step) * longint'(m);
    e  = int'((p >> 32) % CODE_MAX);
    v  = (pilot[e] ? -3 : 3) - (data[e] ? -3 : 3);      // data bit -1
    ph = PH0 + CARR_STEP * 32'(m);
    th = 2.0 * PI * real'(ph) / 4294967296.0;
    si = int'($floor(real'(v) * $cos(th) + 0.5)); if (si > 7) si = 7; if (si < -8) si = -8;
    sq = int'($floor(real'(v) * $sin(th) + 0.5)); if (sq > 7) sq = 7; if (sq < -8) sq = -8;
    s.i = comp_t'(si); s.q = comp_t'(sq);
    return s;
  endfunction

  int ptr = 0;
  bit src_on = 0;
  assign in_valid  = rst_n && src_on && (ptr < NS);
  assign in_sample = sig(ptr);
  always @(posedge clk) if (in_valid && in_ready) ptr <= ptr + 1;

  initial begin
    logic [31:0] d, ri [NC], rq [NC];
    int t0, t1;
    real p, r;
    for (int k = 0; k < CHIPS; k++) begin
      bit a, b;
      a = $urandom_range(0, 1) != 0; b = $urandom_range(0, 1) != 0;
      pilot[k] = a; data[k] = b;
    end
    step = 32'(longint'($floor(10.23e6 / 12.5e6 * 4294967296.0 + 0.5)));
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(TRK_NCORR, d); check(d == NC, $sformatf("correlator count %0d", d));
    load_code(pilot, 1'b0);
    load_code(data, 1'b1);
    wr(TRK_CODE_LEN, CODE_MAX);
    wr(TRK_CODE_STEP, step);
    wr(TRK_NSAMPLES, NS);
    wr(TRK_CARR_STEP, CARR_STEP);
    wr(TRK_CARR_PH, PH0);
    for (int c = 0; c < NC; c++) begin
      longint off;
      off = (c < NP) ? longint'(c - 1) * 64'h8000_0000 : 0;     // half a chip apart
      off = off + longint'(CODE_MAX) * 64'h1_0000_0000;
      wr(TRK_PH_BASE + 2*c, 32'((off >> 32) % CODE_MAX));
      wr(TRK_PH_BASE + 2*c + 1, 32'(off));
    end
    wr(TRK_CTRL, 3'b111);
    t0 = cyc;
    src_on = 1;
    while (!irq) @(negedge clk);
    t1 = cyc;
    for (int c = 0; c < NC; c++) begin
      rd(TRK_RES_BASE + 2*c, ri[c]); rd(TRK_RES_BASE + 2*c + 1, rq[c]);
    end
    $display("L5 channel: %0d samples in %0d cycles", ptr, t1 - t0);
    $display("  E %0d  P (%0d,%0d)  L %0d  data %0d",
             int'(ri[0]), int'(ri[1]), int'(rq[1]), int'(ri[2]), int'(ri[3]));
    p = real'(int'(ri[1]));
    check(p > 8.0 * NS, "prompt collects the pilot");
    check(int'(rq[1]) < NS && int'(rq[1]) > -NS, "carrier wiped off");
    r = real'(int'(ri[0])) / p; check(r > 0.35 && r < 0.65, $sformatf("early / prompt %f", r));
    r = real'(int'(ri[2])) / p; check(r > 0.35 && r < 0.65, $sformatf("late / prompt %f", r));
    r = real'(int'(ri[3])) / p; check(r < -0.8 && r > -1.2, $sformatf("data / prompt %f", r));
    check(ptr == NS, "all samples taken");
    check((t1 - t0) * 10 <= 12 * NS + 500, "at most 1.2 clocks per sample");
    rd(TRK_SAMPLE_CNT, d); check(d == NS, "sample counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
