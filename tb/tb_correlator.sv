// tb_correlator: loads a random code, then correlates random samples over several
// integrations with different code rates, lengths and initial phases. The expected sums come
// from a separate model of the code NCO (integer + 32-bit fraction, wrap at code_len) and
// the chip mapping 0 -> +1, 1 -> -1. Also checks clear and the live phase readback.
module tb_correlator;
  localparam int CODE_MAX = 1023, IN_W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic code_we = 0, phase_load = 0, clear = 0, in_valid = 0;
  logic [4:0] code_waddr = 0;
  logic [31:0] code_wdata = 0, code_step = 0, init_frac = 0, code_phase_frac;
  logic [9:0] code_len = 10'(CODE_MAX), init_int = 0, code_phase_int;
  logic signed [IN_W-1:0] in_i = 0, in_q = 0;
  logic signed [31:0] acc_i, acc_q;

  correlator #(.IN_W(IN_W), .ACC_W(32), .CODE_MAX(CODE_MAX)) dut (.*);

  int checks = 0, failures = 0;
  bit code [1024];

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (code[k]) code[k] = 1'($urandom);
    for (int w = 0; w < 32; w++) begin
      code_we = 1; code_waddr = 5'(w);
      for (int b = 0; b < 32; b++) code_wdata[b] = code[32*w + b];
      @(negedge clk);
    end
    code_we = 0;
    for (int t = 0; t < 5; t++) begin
      longint ph_int, ph_frac, step, len;
      int ei, eq, nsamp;
      len  = (t == 2) ? 700 : CODE_MAX;
      step = (t == 0) ? 64'h4000_0000 : longint'($urandom_range(1, 32'hFFFF_FFFF));
      ph_int = $urandom_range(0, int'(len) - 1);
      ph_frac = $urandom;
      nsamp = 1500 + t * 300;
      code_len = 10'(len); code_step = 32'(step);
      phase_load = 1; init_int = 10'(ph_int); init_frac = 32'(ph_frac); clear = 1;
      @(negedge clk);
      phase_load = 0; clear = 0;
      checks++;
      if (code_phase_int != 10'(ph_int) || code_phase_frac != 32'(ph_frac)) begin
        failures++; $display("phase load");
      end
      ei = 0; eq = 0;
      for (int n = 0; n < nsamp; n++) begin
        int si, sq, c;
        si = int'($urandom_range(0, 90)) - 45; sq = int'($urandom_range(0, 90)) - 45;
        in_valid = ($urandom_range(0, 4) != 0);
        in_i = IN_W'(si); in_q = IN_W'(sq);
        if (in_valid) begin
          c = code[ph_int] ? -1 : 1;
          ei += c * si; eq += c * sq;
          ph_frac += step;
          if (ph_frac >= 64'h1_0000_0000) begin ph_frac -= 64'h1_0000_0000; ph_int++; end
          if (ph_int >= len) ph_int -= len;
        end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (3) @(negedge clk);
      checks += 3;
      if (acc_i != ei || acc_q != eq) begin
        failures++; $display("integration %0d: got (%0d,%0d) expected (%0d,%0d)", t, acc_i, acc_q, ei, eq);
      end
      if (code_phase_int != 10'(ph_int) || code_phase_frac != 32'(ph_frac)) begin
        failures++; $display("end phase got %0d.%0h expected %0d.%0h", code_phase_int, code_phase_frac, ph_int, ph_frac);
      end
      if (acc_i == 0 && acc_q == 0) begin failures++; $display("empty sums"); end
    end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (acc_i != 0 || acc_q != 0) begin failures++; $display("clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
