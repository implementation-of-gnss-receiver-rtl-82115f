// tb_sample_fifo: random push/pop traffic against a queue model. Checks data order, the
// fill level, that in_ready drops exactly when DEPTH words sit in the array (capacity
// DEPTH + 1 with the output register), flush, and full-rate streaming (one word per cycle).
module tb_sample_fifo;
  localparam int W = 8, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic flush = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = 0, out_data;
  logic [$clog2(DEPTH)+1:0] level;

  sample_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // model update and comparison on every edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        check(model.size() > 0, "pop from empty model");
        if (model.size() > 0) check(out_data == model.pop_front(), "data order");
      end
      if (in_valid && in_ready) model.push_back(in_data);
      if (flush) model.delete();
    end
  end

  initial begin
    int streamed;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(level == model.size(), "level");
      check(in_ready == (model.size() - (out_valid ? 1 : 0) < DEPTH), "in_ready");
      in_valid = ($urandom_range(0, 99) < (n < 1500 ? 70 : 30));
      in_data  = W'($urandom);
      out_ready = ($urandom_range(0, 99) < (n < 1500 ? 40 : 80));
    end
    // phase 2: fill to full
    @(negedge clk); out_ready = 0; in_valid = 1;
    repeat (40) @(negedge clk);
    check(level == DEPTH + 1, "full level");
    check(!in_ready, "in_ready low when full");
    // phase 3: flush
    in_valid = 0; flush = 1;
    @(negedge clk); flush = 0;
    check(level == 0 && !out_valid, "flush empties");
    // phase 4: streaming at one word per cycle
    in_valid = 1; out_ready = 1; streamed = 0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      in_data = W'(n);
      if (out_valid) streamed++;
      @(negedge clk);
    end
    check(streamed == 100, "one word per cycle when streaming");
    in_valid = 0;
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
