// tb_trk_channel: a Galileo-E5-style channel (3 pilot correlators + 1 data correlator,
// 1023-entry codes, 64-word input buffer) runs five integrations of NS samples from a
// stream offered every cycle:
//   1. zero carrier, phases loaded: every correlator sum must equal the exact integer model
//      sum(4 * sample * chip) (with no carrier the wipe-off is an exact x4);
//   2. no load: the NCOs must continue, checked against the same model;
//   3. after the input buffer has filled while the channel waited in RESULTS: the band sees
//      back pressure (in_ready low), no sample is lost, and the integration runs at no more
//      than 1.2 clock cycles per sample;
//   4. a synthetic satellite signal with a carrier: prompt must collect the signal in I,
//      early/late (one chip apart) and the data correlator must stay small;
//   5. disabling the channel releases the back pressure.
// Also checks the interrupt, the status register and the sample counter.
module tb_trk_channel import gnss_pkg::*;;
  localparam int NP = 3, ND = 1, NC = 4, CODE_MAX = 1023, NS = 1000, INBUF = 64, LO_ITER = 12;
  localparam int TOTAL = 5 * NS;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_valid, in_ready, irq;
  sample_t in_sample;
  reg_req_t reg_req = '0;
  logic [31:0] reg_rdata;

  trk_channel #(.N_PILOT(NP), .N_DATA(ND), .CODE_MAX(CODE_MAX), .INBUF_DEPTH(INBUF),
                .LO_ITER(LO_ITER)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  bit pilot [CODE_MAX], data [CODE_MAX];
  sample_t stream [TOTAL];
  int ptr = 0, bp_cycles = 0;
  bit src_on = 0;

  // sample source: offers the next stream sample every cycle
  assign in_valid  = rst_n && src_on && (ptr < TOTAL);
  assign in_sample = stream[ptr < TOTAL ? ptr : 0];
  always @(posedge clk) begin
    if (in_valid && in_ready) ptr <= ptr + 1;
    if (in_valid && !in_ready) bp_cycles <= bp_cycles + 1;
  end

  initial begin
    #20000000; failures++;
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
  task automatic load_code(input bit c [CODE_MAX], input bit is_data);
    wr(TRK_CODE_WADR, {is_data, 31'd0});
    for (int w = 0; w < (CODE_MAX + 31) / 32; w++) begin
      logic [31:0] word;
      for (int b = 0; b < 32; b++) word[b] = (32*w + b < CODE_MAX) ? c[32*w + b] : 1'b0;
      wr(TRK_CODE_WDAT, word);
    end
  endtask

  // exact model for a zero carrier
  longint mph [NC];        // code phase in units of 2^-32 entries
  longint step;
  task automatic model(input int first, output int ei [NC], output int eq [NC]);
    for (int c = 0; c < NC; c++) begin ei[c] = 0; eq[c] = 0; end
    for (int n = first; n < first + NS; n++) begin
      for (int c = 0; c < NC; c++) begin
        int chip;
        chip = (c < NP ? pilot[mph[c] >> 32] : data[mph[c] >> 32]) ? -1 : 1;
        ei[c] += 4 * chip * int'(stream[n].i);
        eq[c] += 4 * chip * int'(stream[n].q);
        mph[c] += step;
        if (mph[c] >= (longint'(CODE_MAX) << 32)) mph[c] -= longint'(CODE_MAX) << 32;
      end
    end
  endtask

  task automatic run_and_check(input bit load, input string tag, output int t_start, output int t_irq);
    logic [31:0] d;
    wr(TRK_CTRL, {29'd0, load, 2'b11});
    src_on = 1;                                  // the channel is enabled from here on
    t_start = cyc;
    check(!irq, {tag, ": irq cleared by start"});
    while (!irq) @(negedge clk);
    t_irq = cyc;
    rd(TRK_STATUS, d);
    check(d[1:0] == 2'd3 && d[2], {tag, ": RESULTS state with irq"});
  endtask

  task automatic read_results(output int ri [NC], output int rq [NC]);
    logic [31:0] d;
    for (int c = 0; c < NC; c++) begin
      rd(TRK_RES_BASE + 2*c, d);     ri[c] = int'(d);
      rd(TRK_RES_BASE + 2*c + 1, d); rq[c] = int'(d);
    end
  endtask

  initial begin
    int ei [NC], eq [NC], ri [NC], rq [NC], t0, t1, bp_before;
    logic [31:0] d;
    foreach (pilot[k]) pilot[k] = 1'($urandom);
    foreach (data[k])  data[k]  = 1'($urandom);
    // stream: random samples for integrations 1-3, a satellite signal for integration 4
    for (int n = 0; n < TOTAL; n++) begin
      stream[n].i = comp_t'($urandom_range(0, 15));
      stream[n].q = comp_t'($urandom_range(0, 15));
    end
    for (int n = 0; n < NS; n++) begin
      real th; int chip, si, sq;
      chip = pilot[(100 + n / 4) % CODE_MAX] ? -1 : 1;
      th = 0.5 + 2.0 * PI * 0.01 * real'(n);
      si = int'($floor(7.0 * real'(chip) * $cos(th) + 0.5)); if (si > 7) si = 7;
      sq = int'($floor(7.0 * real'(chip) * $sin(th) + 0.5)); if (sq > 7) sq = 7;
      stream[3*NS + n].i = comp_t'(si); stream[3*NS + n].q = comp_t'(sq);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(TRK_NCORR, d); check(d == NC, "correlator count");
    check(in_ready, "disabled channel accepts and drops");
    src_on = 1;
    repeat (20) @(negedge clk);
    check(ptr == 20, "a disabled channel takes and drops every sample");
    src_on = 0;
    ptr = 0;                                     // restart the stream for the integrations
    load_code(pilot, 0);
    load_code(data, 1);
    // configuration for integrations 1-3: zero carrier
    step = 64'h4000_0000 + 64'h123;               // about 0.25 entries per sample
    wr(TRK_NSAMPLES, NS); wr(TRK_CARR_PH, 0); wr(TRK_CARR_STEP, 0);
    wr(TRK_CODE_STEP, 32'(step)); wr(TRK_CODE_LEN, CODE_MAX);
    for (int c = 0; c < NC; c++) begin
      mph[c] = (longint'(10 * c + 5) << 32) + longint'(32'h8000_0000);
      wr(TRK_PH_BASE + 2*c, 10 * c + 5); wr(TRK_PH_BASE + 2*c + 1, 32'h8000_0000);
    end
    // the channel is enabled by the start write; samples offered from then on are kept
    ptr = 0;
    run_and_check(1, "int1", t0, t1);
    model(0, ei, eq);
    read_results(ri, rq);
    for (int c = 0; c < NC; c++) check(ri[c] == ei[c] && rq[c] == eq[c],
      $sformatf("int1 corr %0d got (%0d,%0d) expected (%0d,%0d)", c, ri[c], rq[c], ei[c], eq[c]));
    // integration 2: continue without loading
    run_and_check(0, "int2", t0, t1);
    model(NS, ei, eq);
    read_results(ri, rq);
    for (int c = 0; c < NC; c++) check(ri[c] == ei[c] && rq[c] == eq[c],
      $sformatf("int2 corr %0d got (%0d,%0d) expected (%0d,%0d)", c, ri[c], rq[c], ei[c], eq[c]));
    // back pressure while waiting for software
    bp_before = bp_cycles;
    repeat (300) @(negedge clk);
    check(!in_ready, "full input buffer holds back the band");
    check(bp_cycles - bp_before > 100, "back pressure observed");
    check(ptr == 2 * NS + INBUF + 1, $sformatf("buffer holds exactly its capacity (%0d)", ptr - 2 * NS));
    // integration 3: rate
    run_and_check(0, "int3", t0, t1);
    check(t1 - t0 <= (NS * 12) / 10 + LO_ITER + 10,
          $sformatf("int3 took %0d cycles for %0d samples", t1 - t0, NS));
    model(2 * NS, ei, eq);
    read_results(ri, rq);
    for (int c = 0; c < NC; c++) check(ri[c] == ei[c] && rq[c] == eq[c],
      $sformatf("int3 corr %0d got (%0d,%0d) expected (%0d,%0d)", c, ri[c], rq[c], ei[c], eq[c]));
    rd(TRK_SAMPLE_CNT, d); check(d == 3 * NS, "sample counter");
    // integration 4: satellite signal with carrier 0.01 cycles/sample and phase 0.5 rad
    wr(TRK_CARR_PH, 32'(longint'(0.5 / (2.0 * PI) * 4294967296.0)));
    wr(TRK_CARR_STEP, 32'(longint'(0.01 * 4294967296.0)));
    wr(TRK_CODE_STEP, 32'h4000_0000);
    wr(TRK_PH_BASE + 0, 99);  wr(TRK_PH_BASE + 1, 0);
    wr(TRK_PH_BASE + 2, 100); wr(TRK_PH_BASE + 3, 0);
    wr(TRK_PH_BASE + 4, 101); wr(TRK_PH_BASE + 5, 0);
    wr(TRK_PH_BASE + 6, 100); wr(TRK_PH_BASE + 7, 0);
    run_and_check(1, "int4", t0, t1);
    read_results(ri, rq);
    $display("int4: E (%0d,%0d) P (%0d,%0d) L (%0d,%0d) D (%0d,%0d)", ri[0], rq[0], ri[1], rq[1], ri[2], rq[2], ri[3], rq[3]);
    check(ri[1] > 25 * NS, "prompt in-phase collects the signal");
    check(rq[1] < 3 * NS && rq[1] > -3 * NS, "prompt quadrature small (carrier wiped off)");
    for (int c = 0; c < NC; c++) if (c != 1)
      check(ri[c] < 10 * NS && ri[c] > -10 * NS, $sformatf("correlator %0d off the peak", c));
    // disable: no more back pressure
    repeat (200) @(negedge clk);
    check(!in_ready, "waiting channel holds back again");
    wr(TRK_CTRL, 0);
    check(in_ready, "disabled channel releases the band");
    rd(TRK_STATUS, d); check(d[1:0] == 2'd0 && !d[2], "disabled channel idle");
    $display("back-pressure cycles: %0d", bp_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
