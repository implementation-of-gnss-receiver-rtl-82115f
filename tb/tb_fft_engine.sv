// tb_fft_engine: loads random complex data into a 64-point engine, runs a forward transform
// and compares every bin (read at its bit-reversed address) with a floating-point DFT, then
// runs the inverse transform on the result and compares with the original data (the inverse
// includes the 1/N scaling). Also checks the transform time against
// log2(N) * (N + ITER + 5) cycles.
module tb_fft_engine;
  localparam int N = 64, DW = 24, L = 6, ITER = 14;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic start = 0, inverse = 0, busy, done, ext_we = 0;
  logic [L-1:0] ext_raddr = 0, ext_waddr = 0;
  logic [2*DW-1:0] ext_rdata, ext_wdata = 0;

  fft_engine #(.N(N), .DW(DW), .ITER(ITER)) dut (.*);

  int checks = 0, failures = 0;
  int xr [N], xi [N];
  real Xr [N], Xi [N];
  int got_r [N], got_i [N];

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [L-1:0] br(input logic [L-1:0] a);
    for (int k = 0; k < L; k++) br[k] = a[L-1-k];
  endfunction
  function automatic real rabs(input real v); return v < 0.0 ? -v : v; endfunction

  task automatic read_all();
    for (int k = 0; k <= N; k++) begin
      @(negedge clk);
      if (k > 0) begin
        got_r[k-1] = int'($signed(ext_rdata[2*DW-1:DW]));
        got_i[k-1] = int'($signed(ext_rdata[DW-1:0]));
      end
      ext_raddr = L'(k);
    end
  endtask

  task automatic run(input bit inv, output int cycles);
    @(negedge clk); start = 1; inverse = inv;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      xr[n] = int'($urandom_range(0, 2000)) - 1000;
      xi[n] = int'($urandom_range(0, 2000)) - 1000;
      @(negedge clk); ext_we = 1; ext_waddr = L'(n); ext_wdata = {DW'(xr[n]), DW'(xi[n])};
    end
    @(negedge clk); ext_we = 0;
    for (int k = 0; k < N; k++) begin
      Xr[k] = 0; Xi[k] = 0;
      for (int n = 0; n < N; n++) begin
        real a; a = -2.0 * PI * real'(k * n % N) / real'(N);
        Xr[k] += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
        Xi[k] += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
      end
    end
    run(0, cyc);
    checks++;
    if (cyc > L * (N + ITER + 5) || cyc < L * N) begin failures++; $display("forward took %0d cycles", cyc); end
    read_all();
    for (int k = 0; k < N; k++) begin
      int m; m = int'(br(L'(k)));
      checks++;
      if (rabs(real'(got_r[k]) - Xr[m]) > 40.0 || rabs(real'(got_i[k]) - Xi[m]) > 40.0) begin
        failures++; $display("X[%0d]: got (%0d,%0d) expected (%0.1f,%0.1f)", m, got_r[k], got_i[k], Xr[m], Xi[m]);
      end
    end
    run(1, cyc);
    checks++;
    if (cyc > L * (N + ITER + 5)) begin failures++; $display("inverse took %0d cycles", cyc); end
    read_all();
    for (int n = 0; n < N; n++) begin
      checks++;
      if (rabs(real'(got_r[n] - xr[n])) > 4.0 || rabs(real'(got_i[n] - xi[n])) > 4.0) begin
        failures++; $display("x[%0d]: got (%0d,%0d) expected (%0d,%0d)", n, got_r[n], got_i[n], xr[n], xi[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
