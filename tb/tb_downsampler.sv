// tb_downsampler: random A/D words through the boxcar decimator for ratios 1, 2, 4 and 16,
// compared with a model that sums each group of 2^k samples, shifts and saturates; also
// checks the number of outputs and that gaps in in_valid do not disturb the grouping.
module tb_downsampler;
  localparam int IN_W = 12, OUT_W = 4, MAX_LOG2 = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [2:0] decim_log2 = 0;
  logic [4:0] shift = 8;
  logic in_valid = 0, out_valid;
  logic signed [IN_W-1:0] in_i = 0, in_q = 0;
  logic signed [OUT_W-1:0] out_i, out_q;

  downsampler #(.IN_W(IN_W), .OUT_W(OUT_W), .MAX_LOG2(MAX_LOG2)) dut (.*);

  int checks = 0, failures = 0;
  int exp_i [$], exp_q [$];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v);
    if (v > 7) return 7;
    if (v < -8) return -8;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_i.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        int ei, eq;
        ei = exp_i.pop_front(); eq = exp_q.pop_front();
        if (out_i != ei || out_q != eq) begin
          failures++; $display("got (%0d,%0d) expected (%0d,%0d)", out_i, out_q, ei, eq);
        end
      end
    end
  end

  initial begin
    int ratios [4] = '{0, 1, 2, 4};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (ratios[r]) begin
      int d, si, sq, k;
      @(negedge clk); decim_log2 = 3'(ratios[r]); shift = 5'(r == 3 ? 6 : 8);
      @(negedge clk);
      d = 1 << ratios[r]; si = 0; sq = 0; k = 0;
      for (int n = 0; n < 64 * d; n++) begin
        int vi, vq;
        vi = int'($urandom_range(0, 4095)) - 2048;
        vq = int'($urandom_range(0, 4095)) - 2048;
        if (n % 7 == 3) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1; in_i = IN_W'(vi); in_q = IN_W'(vq);
        si += vi; sq += vq; k++;
        if (k == d) begin
          exp_i.push_back(sat(si >>> (ratios[r] + int'(shift))));
          exp_q.push_back(sat(sq >>> (ratios[r] + int'(shift))));
          si = 0; sq = 0; k = 0;
        end
      end
      @(negedge clk); in_valid = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (exp_i.size() != 0) begin failures++; $display("%0d outputs missing", exp_i.size()); exp_i.delete(); exp_q.delete(); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
