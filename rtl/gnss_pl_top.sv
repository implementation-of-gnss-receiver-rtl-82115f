// gnss_pl_top: programmable-logic part of a dual-band software-defined GNSS receiver.
//
// The receiver keeps navigation-message decoding, observables and the position solution in
// software on the processor, and moves the sample-rate work into logic: one acquisition
// accelerator that searches for satellites one after another, and one tracking
// accelerator (multicorrelator) per satellite being tracked. This top wires them together:
//
//   band 0 (GPS L1 C/A / Galileo E1):  A/D -> downsampler -> source switch (A/D or DMA)
//        -> main FIFO -> 2*N_CH tracking channels (GPS L1 C/A: 3 correlators,
//           Galileo E1: 5 + 1) and, through a second downsampler, the acquisition.
//   band 1 (GPS L5 / Galileo E5):     same path -> 2*N_CH tracking channels (GPS L5 and
//           Galileo E5: 3 + 1 correlators) and the acquisition.
//
// Each main FIFO hands a sample to all enabled tracking channels of its band at once, and
// only when every one of them can take it: a channel whose input buffer is full holds back
// the band (back pressure), because tracking may not lose samples. The per-channel input
// buffers make that rare. The acquisition only watches the flow and never holds it back.
// A live A/D sample that finds the main FIFO full is lost and flagged as overflow; a DMA
// stream is paused instead.
//
// Processor access is one AXI4-Lite slave port (see axi_lite_slave for the address layout:
// slot 0 global registers, slot 1 acquisition, slots 2.. tracking channels in the order
// GPS L1 C/A, Galileo E1, GPS L5, Galileo E5, N_CH each). irq[0] is the acquisition's
// interrupt and irq[1+k] that of tracking slot 2+k.
//
// The block structure, the counts (48 multicorrelators, correlators per signal, one
// acquisition, two main FIFOs, three downsamplers) and the flow-control rules follow the
// receiver; buffer depths, the register layout and the A/D word width are this design's own.
module gnss_pl_top import gnss_pkg::*; #(
  parameter int unsigned N_CH            = 12,       // tracking channels per signal type
  parameter int unsigned ADC_W           = 12,
  parameter int unsigned MAIN_FIFO_DEPTH = 65536,
  parameter int unsigned INBUF_DEPTH     = 16384,
  parameter int unsigned ACQ_N           = 16384,
  parameter int unsigned CODE_L1CA       = 1023,
  parameter int unsigned CODE_E1B        = 8184,
  parameter int unsigned CODE_L5         = 10230,
  parameter int unsigned CODE_E5A        = 10230,
  parameter int unsigned AXI_ADDR_W      = 16,
  localparam int unsigned NTRK           = 4 * N_CH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // A/D converters (one per band), one complex sample per valid cycle
  input  logic                    adc0_valid,
  input  logic signed [ADC_W-1:0] adc0_i,
  input  logic signed [ADC_W-1:0] adc0_q,
  input  logic                    adc1_valid,
  input  logic signed [ADC_W-1:0] adc1_i,
  input  logic signed [ADC_W-1:0] adc1_q,
  // DMA sample streams (recorded files), 8-bit complex samples {I[3:0], Q[3:0]}
  input  logic                    dma0_valid,
  output logic                    dma0_ready,
  input  sample_t                 dma0_sample,
  input  logic                    dma1_valid,
  output logic                    dma1_ready,
  input  sample_t                 dma1_sample,
  // AXI4-Lite slave
  input  logic [AXI_ADDR_W-1:0]   s_axi_awaddr,
  input  logic                    s_axi_awvalid,
  output logic                    s_axi_awready,
  input  logic [31:0]             s_axi_wdata,
  input  logic [3:0]              s_axi_wstrb,
  input  logic                    s_axi_wvalid,
  output logic                    s_axi_wready,
  output logic [1:0]              s_axi_bresp,
  output logic                    s_axi_bvalid,
  input  logic                    s_axi_bready,
  input  logic [AXI_ADDR_W-1:0]   s_axi_araddr,
  input  logic                    s_axi_arvalid,
  output logic                    s_axi_arready,
  output logic [31:0]             s_axi_rdata,
  output logic [1:0]              s_axi_rresp,
  output logic                    s_axi_rvalid,
  input  logic                    s_axi_rready,
  // interrupts
  output logic [NTRK:0]           irq
);
  localparam int unsigned LEVEL_W = $clog2(MAIN_FIFO_DEPTH) + 2;

  initial assert (NTRK + 2 <= 2 ** SLOT_W) else $error("gnss_pl_top: too many channels for the slot field");

  // ---------------- register bus ----------------
  reg_req_t          req;
  logic [SLOT_W-1:0] slot;
  logic [31:0]       rdata;
  logic [31:0]       glb_rdata, acq_rdata;
  logic [31:0]       trk_rdata [NTRK];

  axi_lite_slave #(.ADDR_W(AXI_ADDR_W)) u_axi (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid,
    .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready, .s_axi_araddr, .s_axi_arvalid,
    .s_axi_arready, .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .req, .slot, .rdata
  );

  function automatic reg_req_t sel_req(input reg_req_t r, input logic hit);
    sel_req    = r;
    sel_req.wr = r.wr && hit;
    sel_req.rd = r.rd && hit;
  endfunction

  always_comb begin
    rdata = '0;
    if (slot == SLOT_W'(0))      rdata = glb_rdata;
    else if (slot == SLOT_W'(1)) rdata = acq_rdata;
    else if (int'(slot) < NTRK + 2) rdata = trk_rdata[int'(slot) - 2];
  end

  // ---------------- global registers ----------------
  logic [1:0] src_sel, overflow, overflow_clr;
  logic [3:0] decim0, decim1, acq_decim;
  logic [4:0] requant;
  logic [LEVEL_W-1:0] level0, level1;

  global_regs #(.ADC_W(ADC_W), .LEVEL_W(LEVEL_W)) u_glb (
    .clk, .rst_n,
    .req(sel_req(req, slot == SLOT_W'(0))), .rdata(glb_rdata),
    .src_sel, .decim0, .decim1, .acq_decim, .requant,
    .overflow, .overflow_clr, .level0, .level1
  );

  // ---------------- two sample paths ----------------
  logic    ds_valid [2];
  sample_t ds_sample [2];
  logic    sw_valid [2], sw_ready [2];
  sample_t sw_sample [2];
  logic    mf_valid [2], mf_ready [2], mf_fire [2];
  sample_t mf_sample [2];
  logic    trk_ready [NTRK];

  downsampler #(.IN_W(ADC_W), .OUT_W(SAMPLE_W), .MAX_LOG2(4)) u_ds0 (
    .clk, .rst_n, .decim_log2(3'(decim0)), .shift(5'(requant)),
    .in_valid(adc0_valid), .in_i(adc0_i), .in_q(adc0_q),
    .out_valid(ds_valid[0]), .out_i(ds_sample[0].i), .out_q(ds_sample[0].q)
  );
  downsampler #(.IN_W(ADC_W), .OUT_W(SAMPLE_W), .MAX_LOG2(4)) u_ds1 (
    .clk, .rst_n, .decim_log2(3'(decim1)), .shift(5'(requant)),
    .in_valid(adc1_valid), .in_i(adc1_i), .in_q(adc1_q),
    .out_valid(ds_valid[1]), .out_i(ds_sample[1].i), .out_q(ds_sample[1].q)
  );

  sample_source_switch u_sw0 (
    .clk, .rst_n, .sel(src_sel[0]), .overflow_clr(overflow_clr[0]),
    .adc_valid(ds_valid[0]), .adc_sample(ds_sample[0]),
    .dma_valid(dma0_valid), .dma_ready(dma0_ready), .dma_sample(dma0_sample),
    .out_valid(sw_valid[0]), .out_ready(sw_ready[0]), .out_sample(sw_sample[0]),
    .overflow(overflow[0])
  );
  sample_source_switch u_sw1 (
    .clk, .rst_n, .sel(src_sel[1]), .overflow_clr(overflow_clr[1]),
    .adc_valid(ds_valid[1]), .adc_sample(ds_sample[1]),
    .dma_valid(dma1_valid), .dma_ready(dma1_ready), .dma_sample(dma1_sample),
    .out_valid(sw_valid[1]), .out_ready(sw_ready[1]), .out_sample(sw_sample[1]),
    .overflow(overflow[1])
  );

  sample_fifo #(.W($bits(sample_t)), .DEPTH(MAIN_FIFO_DEPTH)) u_main0 (
    .clk, .rst_n, .flush(1'b0),
    .in_valid(sw_valid[0]), .in_ready(sw_ready[0]), .in_data(sw_sample[0]),
    .out_valid(mf_valid[0]), .out_ready(mf_ready[0]), .out_data(mf_sample[0]), .level(level0)
  );
  sample_fifo #(.W($bits(sample_t)), .DEPTH(MAIN_FIFO_DEPTH)) u_main1 (
    .clk, .rst_n, .flush(1'b0),
    .in_valid(sw_valid[1]), .in_ready(sw_ready[1]), .in_data(sw_sample[1]),
    .out_valid(mf_valid[1]), .out_ready(mf_ready[1]), .out_data(mf_sample[1]), .level(level1)
  );

  // a band's sample leaves its main FIFO only when all of its channels can take it
  always_comb begin
    mf_ready[0] = 1'b1;
    mf_ready[1] = 1'b1;
    for (int k = 0; k < NTRK; k++) begin
      if (k < 2 * N_CH) mf_ready[0] &= trk_ready[k];
      else              mf_ready[1] &= trk_ready[k];
    end
    mf_fire[0] = mf_valid[0] && mf_ready[0];
    mf_fire[1] = mf_valid[1] && mf_ready[1];
  end

  // ---------------- acquisition ----------------
  logic    acq_ds_valid;
  sample_t acq_ds_sample;
  downsampler #(.IN_W(SAMPLE_W), .OUT_W(SAMPLE_W), .MAX_LOG2(4)) u_acq_ds (
    .clk, .rst_n, .decim_log2(3'(acq_decim)), .shift('0),
    .in_valid(mf_fire[0]), .in_i(mf_sample[0].i), .in_q(mf_sample[0].q),
    .out_valid(acq_ds_valid), .out_i(acq_ds_sample.i), .out_q(acq_ds_sample.q)
  );

  acquisition #(.N(ACQ_N)) u_acq (
    .clk, .rst_n,
    .b0_valid(acq_ds_valid), .b0_sample(acq_ds_sample),
    .b1_valid(mf_fire[1]),   .b1_sample(mf_sample[1]),
    .reg_req(sel_req(req, slot == SLOT_W'(1))), .reg_rdata(acq_rdata),
    .irq(irq[0])
  );

  // ---------------- tracking channels ----------------
  for (genvar k = 0; k < NTRK; k++) begin : g_trk
    localparam int unsigned TYPE  = k / N_CH;          // 0 L1 C/A, 1 E1, 2 L5, 3 E5
    localparam int unsigned BAND  = (TYPE < 2) ? 0 : 1;
    localparam int unsigned NP    = (TYPE == 1) ? 5 : 3;
    localparam int unsigned ND    = (TYPE == 0) ? 0 : 1;
    localparam int unsigned CMAX  = (TYPE == 0) ? CODE_L1CA : (TYPE == 1) ? CODE_E1B :
                                    (TYPE == 2) ? CODE_L5 : CODE_E5A;
    trk_channel #(.N_PILOT(NP), .N_DATA(ND), .CODE_MAX(CMAX), .INBUF_DEPTH(INBUF_DEPTH)) u_trk (
      .clk, .rst_n,
      .in_valid (mf_valid[BAND] && mf_ready[BAND]),
      .in_ready (trk_ready[k]),
      .in_sample(mf_sample[BAND]),
      .reg_req  (sel_req(req, int'(slot) == k + 2)),
      .reg_rdata(trk_rdata[k]),
      .irq      (irq[k + 1])
    );
  end

endmodule
