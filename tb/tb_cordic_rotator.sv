// tb_cordic_rotator: checks the pipelined CORDIC against floating-point rotation.
// Random vectors and angles are streamed one per cycle; every output is compared with
// K * R(theta) * (x, y) computed with real arithmetic (tolerance 8 LSB: truncation in 16 stages with two guard bits), and the latency must
// be exactly ITER + 1 cycles.
module tb_cordic_rotator;
  localparam int XY_W = 16, PH_W = 24, ITER = 16, NVEC = 400;
  localparam real K = 1.646760258121;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_valid = 0, out_valid;
  logic signed [XY_W-1:0] in_x = 0, in_y = 0, out_x, out_y;
  logic [PH_W-1:0] in_phase = 0;

  cordic_rotator #(.XY_W(XY_W), .PH_W(PH_W), .ITER(ITER)) dut (.*);

  int checks = 0, failures = 0;
  real exp_x [$], exp_y [$];
  int  issue_cyc [$];
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real ex, ey;
      int ic;
      ex = exp_x.pop_front(); ey = exp_y.pop_front(); ic = issue_cyc.pop_front();
      checks++;
      if ((real'(out_x) - ex) > 8.0 || (ex - real'(out_x)) > 8.0 ||
          (real'(out_y) - ey) > 8.0 || (ey - real'(out_y)) > 8.0) begin
        failures++;
        $display("mismatch: got (%0d,%0d) expected (%0.1f,%0.1f)", out_x, out_y, ex, ey);
      end
      checks++;
      if (cyc - ic != ITER) begin  // cyc is sampled one edge after out_valid was registered
        failures++;
        $display("latency %0d, expected %0d", cyc - ic, ITER + 1);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < NVEC; n++) begin
      int x, y;
      logic [PH_W-1:0] ph;
      real th;
      x = int'($urandom_range(0, 19000)) - 9500;
      y = int'($urandom_range(0, 19000)) - 9500;
      if (n < 4) begin x = 9000; y = 0; end
      ph = PH_W'($urandom);
      if (n < 4) ph = PH_W'(n) << (PH_W - 2);       // 0, 90, 180, 270 degrees
      th = 2.0 * PI * real'(ph) / real'(2.0 ** PH_W);
      @(negedge clk);
      in_valid = 1; in_x = XY_W'(x); in_y = XY_W'(y); in_phase = ph;
      exp_x.push_back(K * (real'(x) * $cos(th) - real'(y) * $sin(th)));
      exp_y.push_back(K * (real'(x) * $sin(th) + real'(y) * $cos(th)));
      issue_cyc.push_back(cyc + 1);
    end
    @(negedge clk) in_valid = 0;
    repeat (ITER + 5) @(posedge clk);
    checks++;
    if (exp_x.size() != 0) begin failures++; $display("%0d outputs missing", exp_x.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
