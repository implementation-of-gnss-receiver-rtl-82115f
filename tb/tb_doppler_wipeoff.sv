// tb_doppler_wipeoff: random 4-bit samples with random carrier steps; every output is
// compared with 4 * (I + jQ) * exp(-j * phase) computed in floating point from an independent
// phase accumulator (tolerance 1.5 LSB), latency must be LO_ITER + 2 cycles, and a phase load
// must restart the oscillator at the given phase.
module tb_doppler_wipeoff import gnss_pkg::*;;
  localparam int LO_ITER = 12;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_valid = 0, phase_load = 0, out_valid;
  sample_t in_sample = '0;
  logic [31:0] phase_step = 0, phase_init = 0, phase;
  logic signed [7:0] out_i, out_q;

  doppler_wipeoff #(.LO_ITER(LO_ITER)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  real ei [$], eq [$];
  int ic [$];
  always @(posedge clk) cyc <= cyc + 1;
  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real xi, xq; int c0;
      xi = ei.pop_front(); xq = eq.pop_front(); c0 = ic.pop_front();
      checks += 2;
      if (rabs(real'(out_i) - xi) > 1.5 || rabs(real'(out_q) - xq) > 1.5) begin
        failures++; $display("got (%0d,%0d) expected (%0.2f,%0.2f)", out_i, out_q, xi, xq);
      end
      if (cyc - c0 != LO_ITER + 1) begin   // cyc is read one edge after out_valid was set
        failures++; $display("latency %0d", cyc - c0 + 1);
      end
    end
  end

  initial begin
    logic [31:0] ph;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 6; blk++) begin
      logic [31:0] init;
      init = (blk == 0) ? 32'd0 : $urandom;
      @(negedge clk);
      in_valid = 0; phase_load = 1; phase_init = init; phase_step = $urandom;
      ph = init;
      @(negedge clk);
      phase_load = 0;
      checks++;
      if (phase != init) begin failures++; $display("phase load failed"); end
      for (int n = 0; n < 200; n++) begin
        int si, sq; real th;
        si = int'($urandom_range(0, 15)) - 8; sq = int'($urandom_range(0, 15)) - 8;
        in_valid = ($urandom_range(0, 3) != 0);
        in_sample.i = comp_t'(si); in_sample.q = comp_t'(sq);
        if (in_valid) begin
          th = 2.0 * PI * real'(ph) / 4294967296.0;
          ei.push_back(4.0 * (real'(si) * $cos(th) + real'(sq) * $sin(th)));
          eq.push_back(4.0 * (real'(sq) * $cos(th) - real'(si) * $sin(th)));
          ic.push_back(cyc + 1);
          ph = ph + phase_step;
        end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (LO_ITER + 4) @(negedge clk);
    end
    checks++;
    if (ei.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
