// axi_lite_slave: AXI4-Lite slave that gives the processor access to the accelerator
// registers.
//
// The processing system configures the accelerators and reads their results through
// registers mapped into its AXI4 address space. This module terminates the AXI4-Lite
// protocol and drives the internal register bus: byte address bits [REG_IDX_W+1:2] select a
// register inside a window and bits [REG_IDX_W+SLOT_W+1:REG_IDX_W+2] select the window
// (slot): slot 0 holds the global registers, slot 1 the acquisition accelerator, slots 2...
// the tracking accelerators. Higher address bits are ignored.
//
// A write is carried out once both its address and its data have been accepted (in either
// order): one cycle with req.wr high, then the write response. A read takes one cycle with
// req.rd high, during which the addressed window's combinational rdata is sampled, then the
// read response. A pending write goes before a pending read. One transaction of each kind
// is outstanding at most. All writes are full 32-bit words (wstrb is ignored) and every
// response is OKAY. Using AXI4-Lite for the register path follows the receiver; the address
// layout and these rules are this design's own.
module axi_lite_slave import gnss_pkg::*; #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // register bus
  output reg_req_t          req,
  output logic [SLOT_W-1:0] slot,
  input  logic [31:0]       rdata
);
  initial assert (ADDR_W >= REG_IDX_W + SLOT_W + 2) else $error("axi_lite_slave: ADDR_W too small");

  logic              aw_got, w_got, rd_pend;
  logic [ADDR_W-1:0] awaddr_q, araddr_q;
  logic [31:0]       wdata_q;
  logic              do_wr, do_rd;

  assign s_axi_awready = !aw_got && !s_axi_bvalid;
  assign s_axi_wready  = !w_got  && !s_axi_bvalid;
  assign s_axi_arready = !rd_pend && !s_axi_rvalid;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;

  assign do_wr = aw_got && w_got;
  assign do_rd = rd_pend && !do_wr;

  always_comb begin
    req.wr    = do_wr;
    req.rd    = do_rd;
    req.wdata = wdata_q;
    if (do_wr) begin
      req.idx = awaddr_q[REG_IDX_W+1:2];
      slot    = awaddr_q[REG_IDX_W+SLOT_W+1:REG_IDX_W+2];
    end else begin
      req.idx = araddr_q[REG_IDX_W+1:2];
      slot    = araddr_q[REG_IDX_W+SLOT_W+1:REG_IDX_W+2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_got <= 1'b0; w_got <= 1'b0; rd_pend <= 1'b0;
      awaddr_q <= '0; araddr_q <= '0; wdata_q <= '0;
      s_axi_bvalid <= 1'b0; s_axi_rvalid <= 1'b0; s_axi_rdata <= '0;
    end else begin
      if (s_axi_awvalid && s_axi_awready) begin aw_got <= 1'b1; awaddr_q <= s_axi_awaddr; end
      if (s_axi_wvalid && s_axi_wready)   begin w_got  <= 1'b1; wdata_q  <= s_axi_wdata;  end
      if (s_axi_arvalid && s_axi_arready) begin rd_pend <= 1'b1; araddr_q <= s_axi_araddr; end
      if (do_wr) begin
        aw_got <= 1'b0; w_got <= 1'b0; s_axi_bvalid <= 1'b1;
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
      if (do_rd) begin
        rd_pend <= 1'b0; s_axi_rvalid <= 1'b1; s_axi_rdata <= rdata;
      end else if (s_axi_rvalid && s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  // AXI rule: a valid response stays valid until it is taken
  logic b_wait, r_wait;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_wait <= 1'b0; r_wait <= 1'b0;
    end else begin
      b_wait <= s_axi_bvalid && !s_axi_bready;
      r_wait <= s_axi_rvalid && !s_axi_rready;
    end
  end
  always_comb begin
    if (b_wait) assert (s_axi_bvalid) else $error("axi_lite_slave: bvalid dropped");
    if (r_wait) assert (s_axi_rvalid) else $error("axi_lite_slave: rvalid dropped");
  end

  logic unused_wstrb;
  assign unused_wstrb = ^s_axi_wstrb;

endmodule
