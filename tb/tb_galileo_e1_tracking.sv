// tb_galileo_e1_tracking: a Galileo E1 tracking channel as the receiver builds it (5 pilot
// correlators VE / E / P / L / VL plus 1 data correlator, 8184-entry code memories, 16384-sample
// input buffer) tracks a synthetic E1 signal for one 4 ms code period at 12.5 Msps.
//
// Signal: pilot and data codes of 4092 random chips, each chip stored as two BOC(1,1)
// half-chips (chip, inverted chip), so the memories hold 8184 entries and the code NCO
// advances 2 * 1.023e6 / 12.5e6 entries per sample. The received sample is
// 3 * (pilot - data) rotated by a 2 kHz carrier, rounded to 4-bit I and Q.
// Correlator offsets from the true code phase: -1, -1/2, 0, +1/2, +1 half-chips
// (VE, E, P, L, VL) and 0 for the data correlator.
// Expected from the BOC(1,1) autocorrelation R(t) = 1 - 3|t| (t in chips, |t| <= 1/2):
//   E and L near +0.25 P, VE and VL near -0.5 P, the prompt Q near 0, the data correlator
//   near -P (data bit -1). The integration must finish in no more than 1.2 clocks per sample
//   and raise the interrupt.
module tb_galileo_e1_tracking import gnss_pkg::*;;
  localparam int NP = 5, ND = 1, NC = 6, CHIPS = 4092, CODE_MAX = 8184, NS = 50000;
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

  // half-chip sequences: 1 means -1
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
      pilot[2*k] = a; pilot[2*k+1] = !a;
      data[2*k]  = b; data[2*k+1]  = !b;
    end
    step = 32'(longint'($floor(2.0 * 1.023e6 / 12.5e6 * 4294967296.0 + 0.5)));
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
      off = (c < NP) ? longint'(c - 2) * 64'h8000_0000 : 0;     // half-chip units / 2
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
    $display("E1 channel: %0d samples in %0d cycles", ptr, t1 - t0);
    $display("  VE %0d  E %0d  P (%0d,%0d)  L %0d  VL %0d  data %0d",
             int'(ri[0]), int'(ri[1]), int'(ri[2]), int'(rq[2]), int'(ri[3]), int'(ri[4]),
             int'(ri[5]));
    p = real'(int'(ri[2]));
    check(p > 8.0 * NS, "prompt collects the pilot");
    check(int'(rq[2]) < NS && int'(rq[2]) > -NS, "carrier wiped off");
    r = real'(int'(ri[1])) / p; check(r > 0.13 && r < 0.37, $sformatf("early / prompt %f", r));
    r = real'(int'(ri[3])) / p; check(r > 0.13 && r < 0.37, $sformatf("late / prompt %f", r));
    r = real'(int'(ri[0])) / p; check(r > -0.65 && r < -0.35, $sformatf("very early / prompt %f", r));
    r = real'(int'(ri[4])) / p; check(r > -0.65 && r < -0.35, $sformatf("very late / prompt %f", r));
    r = real'(int'(ri[5])) / p; check(r < -0.8 && r > -1.2, $sformatf("data / prompt %f", r));
    check(ptr == NS, "all samples taken");
    check((t1 - t0) * 10 <= 12 * NS + 500, "at most 1.2 clocks per sample");
    rd(TRK_SAMPLE_CNT, d); check(d == NS, "sample counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
