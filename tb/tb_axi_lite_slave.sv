// tb_axi_lite_slave: the slave in front of a register model of 4 windows x 64 words.
// Writes with address first, data first and both together, random ready/valid delays on the
// response channels, reads of written values, slot/index decoding, and a write and a read
// issued in the same cycle. Every req.wr strobe must match an AXI write one for one.
module tb_axi_lite_slave import gnss_pkg::*;;
  localparam int ADDR_W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [ADDR_W-1:0] s_axi_awaddr = 0, s_axi_araddr = 0;
  logic s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready, s_axi_bvalid;
  logic s_axi_bready = 0, s_axi_arvalid = 0, s_axi_arready, s_axi_rvalid, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hF;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  reg_req_t req;
  logic [SLOT_W-1:0] slot;
  logic [31:0] rdata;

  axi_lite_slave #(.ADDR_W(ADDR_W)) dut (.*);

  // register model behind the bus
  logic [31:0] regs [4][64];
  int strobes = 0;
  assign rdata = regs[slot[1:0]][req.idx];
  always @(posedge clk) if (req.wr) begin regs[slot[1:0]][req.idx] <= req.wdata; strobes <= strobes + 1; end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [ADDR_W-1:0] addr(input int s, input int i);
    return ADDR_W'((s << (REG_IDX_W + 2)) | (i << 2));
  endfunction

  task automatic axi_write(input logic [ADDR_W-1:0] a, input logic [31:0] d, input int order);
    fork
      begin
        if (order == 1) repeat ($urandom_range(1, 3)) @(negedge clk);
        s_axi_awaddr = a; s_axi_awvalid = 1;
        do @(posedge clk); while (!s_axi_awready);
        @(negedge clk) s_axi_awvalid = 0;
      end
      begin
        if (order == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
        s_axi_wdata = d; s_axi_wvalid = 1;
        do @(posedge clk); while (!s_axi_wready);
        @(negedge clk) s_axi_wvalid = 0;
      end
    join
    repeat ($urandom_range(0, 2)) @(negedge clk);
    s_axi_bready = 1;
    do @(posedge clk); while (!s_axi_bvalid);
    check(s_axi_bresp == 2'b00, "bresp OKAY");
    @(negedge clk) s_axi_bready = 0;
  endtask

  task automatic axi_read(input logic [ADDR_W-1:0] a, output logic [31:0] d);
    s_axi_araddr = a; s_axi_arvalid = 1;
    do @(posedge clk); while (!s_axi_arready);
    @(negedge clk) s_axi_arvalid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    s_axi_rready = 1;
    do @(posedge clk); while (!s_axi_rvalid);
    d = s_axi_rdata;
    check(s_axi_rresp == 2'b00, "rresp OKAY");
    @(negedge clk) s_axi_rready = 0;
  endtask

  initial begin
    logic [31:0] model [4][64];
    logic [31:0] d;
    int n_wr = 0;
    foreach (regs[s, i]) begin regs[s][i] = 0; model[s][i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 150; n++) begin
      int s, i;
      s = $urandom_range(0, 3); i = $urandom_range(0, 63);
      if ($urandom_range(0, 1)) begin
        d = $urandom;
        axi_write(addr(s, i), d, n % 3);
        model[s][i] = d; n_wr++;
      end else begin
        axi_read(addr(s, i), d);
        check(d == model[s][i], $sformatf("read slot %0d reg %0d: %h vs %h", s, i, d, model[s][i]));
      end
    end
    // write and read requested in the same cycle: both complete, write first
    s_axi_awaddr = addr(2, 7); s_axi_awvalid = 1; s_axi_wdata = 32'hCAFE_0001; s_axi_wvalid = 1;
    s_axi_araddr = addr(2, 7); s_axi_arvalid = 1; s_axi_bready = 1; s_axi_rready = 1;
    @(negedge clk); s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_arvalid = 0;
    repeat (4) @(negedge clk);
    check(s_axi_rdata == 32'hCAFE_0001, "write before read");
    n_wr++;
    s_axi_bready = 0; s_axi_rready = 0;
    check(strobes == n_wr, $sformatf("%0d write strobes for %0d writes", strobes, n_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
