// global_regs: control and status registers of the receiver's two sample paths.
//
// Window 0 of the register space. It selects, per frequency band, whether samples come from
// the A/D converter or from the DMA engine (post-processing of recorded files), sets the
// decimation of the band downsamplers and of the acquisition downsampler, and the
// requantisation shift from A/D converter words to 4-bit components. It reports the fill
// level of each main FIFO and a sticky overflow flag per band (a live sample lost because the
// main FIFO was full); writing 1 to an overflow bit clears it (overflow_clr pulses one cycle).
// The existence of the source switch follows the receiver; the register set is this design's
// own. Reset values: A/D source, no decimation, shift ADC_W - 4.
// Timing: writes take effect the cycle after req.wr; rdata is combinational on req.idx.
module global_regs import gnss_pkg::*; #(
  parameter int unsigned ADC_W    = 12,
  parameter int unsigned LEVEL_W  = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  input  reg_req_t           req,
  output logic [31:0]        rdata,
  output logic [1:0]         src_sel,
  output logic [3:0]         decim0,
  output logic [3:0]         decim1,
  output logic [3:0]         acq_decim,
  output logic [4:0]         requant,
  input  logic [1:0]         overflow,
  output logic [1:0]         overflow_clr,
  input  logic [LEVEL_W-1:0] level0,
  input  logic [LEVEL_W-1:0] level1
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_sel <= '0; decim0 <= '0; decim1 <= '0; acq_decim <= '0;
      requant <= 5'(ADC_W - SAMPLE_W); overflow_clr <= '0;
    end else begin
      overflow_clr <= '0;
      if (req.wr) begin
        unique case (int'(req.idx))
          GLB_SRC_SEL:   src_sel   <= req.wdata[1:0];
          GLB_DECIM:     begin decim0 <= req.wdata[3:0]; decim1 <= req.wdata[7:4]; end
          GLB_ACQ_DECIM: acq_decim <= req.wdata[3:0];
          GLB_REQUANT:   requant   <= req.wdata[4:0];
          GLB_OVERFLOW:  overflow_clr <= req.wdata[1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (int'(req.idx))
      GLB_SRC_SEL:   rdata = 32'(src_sel);
      GLB_DECIM:     rdata = {24'd0, decim1, decim0};
      GLB_ACQ_DECIM: rdata = 32'(acq_decim);
      GLB_REQUANT:   rdata = 32'(requant);
      GLB_OVERFLOW:  rdata = 32'(overflow);
      GLB_LEVEL0:    rdata = 32'(level0);
      GLB_LEVEL1:    rdata = 32'(level1);
      default:       rdata = '0;
    endcase
  end

endmodule
