// tb_global_regs: reset values, write/readback of every control field, the FIFO level and
// overflow inputs, and the one-cycle write-1-to-clear pulses.
module tb_global_regs import gnss_pkg::*;;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  reg_req_t req = '0;
  logic [31:0] rdata;
  logic [1:0] src_sel, overflow = 0, overflow_clr;
  logic [3:0] decim0, decim1, acq_decim;
  logic [4:0] requant;
  logic [17:0] level0 = 0, level1 = 0;

  global_regs #(.ADC_W(12), .LEVEL_W(18)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input int idx, input logic [31:0] d);
    @(negedge clk); req.wr = 1; req.idx = REG_IDX_W'(idx); req.wdata = d;
    @(negedge clk); req.wr = 0;
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pulses;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(src_sel == 0 && decim0 == 0 && decim1 == 0 && requant == 8, "reset values");
    wr(GLB_SRC_SEL, 2);   check(src_sel == 2'b10, "src_sel");
    wr(GLB_DECIM, 8'h31); check(decim0 == 1 && decim1 == 3, "decimation fields");
    wr(GLB_ACQ_DECIM, 2); check(acq_decim == 2, "acquisition decimation");
    wr(GLB_REQUANT, 6);   check(requant == 6, "requantisation shift");
    req.idx = REG_IDX_W'(GLB_DECIM); #1 check(rdata == 32'h31, "decim readback");
    req.idx = REG_IDX_W'(GLB_SRC_SEL); #1 check(rdata == 2, "src readback");
    level0 = 18'd1234; level1 = 18'd99; overflow = 2'b01;
    req.idx = REG_IDX_W'(GLB_LEVEL0); #1 check(rdata == 1234, "level 0");
    req.idx = REG_IDX_W'(GLB_LEVEL1); #1 check(rdata == 99, "level 1");
    req.idx = REG_IDX_W'(GLB_OVERFLOW); #1 check(rdata == 1, "overflow status");
    pulses = 0;
    fork
      wr(GLB_OVERFLOW, 1);
      repeat (4) @(posedge clk) if (overflow_clr == 2'b01) pulses++;
    join
    check(pulses == 1, $sformatf("one clear pulse, saw %0d", pulses));
    check(overflow_clr == 0, "pulse ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
