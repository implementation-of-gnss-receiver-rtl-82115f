// tb_sample_source_switch: checks both source selections, the DMA ready path, and the sticky
// overflow flag (set by a live sample meeting a full FIFO, not by DMA stalls, cleared by
// overflow_clr).
module tb_sample_source_switch import gnss_pkg::*;;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic sel = 0, overflow_clr = 0, adc_valid = 0, dma_valid = 0, dma_ready, out_valid;
  logic out_ready = 1, overflow;
  sample_t adc_sample = '0, dma_sample = '0, out_sample;

  sample_source_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      sel = n[5]; adc_valid = $urandom_range(0, 1); dma_valid = $urandom_range(0, 1);
      adc_sample = sample_t'($urandom); dma_sample = sample_t'($urandom);
      out_ready = (n < 150) ? 1'b1 : (sel ? 1'(($urandom_range(0, 1))) : 1'b1);
      #1;
      check(out_valid == (sel ? dma_valid : adc_valid), "valid mux");
      check(out_sample == (sel ? dma_sample : adc_sample), "data mux");
      check(dma_ready == (sel && out_ready), "dma ready");
    end
    @(negedge clk); check(!overflow, "no overflow while the FIFO accepts");
    // a live sample meets a full FIFO
    sel = 0; adc_valid = 1; out_ready = 0;
    @(negedge clk); adc_valid = 0;
    check(overflow, "overflow set");
    @(negedge clk); check(overflow, "overflow sticky");
    overflow_clr = 1; @(negedge clk); overflow_clr = 0;
    check(!overflow, "overflow cleared");
    // a DMA stall is not an overflow
    sel = 1; dma_valid = 1; out_ready = 0;
    repeat (3) @(negedge clk);
    check(!overflow, "DMA stall is not an overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
