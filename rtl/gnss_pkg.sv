// gnss_pkg: types and constants shared by the GNSS receiver programmable-logic blocks.
//
// Samples travel as complex values of 8 bits in total (4-bit signed I and 4-bit signed Q),
// the sample format of the receiver prototype. Registers are 32 bits wide and are reached
// through a simple internal register bus (reg_req_t) that the AXI4-Lite slave produces.
// The register bus, the register indices of each accelerator and the CORDIC arctangent
// table are this design's own choices.
package gnss_pkg;

  // ---------------- samples ----------------
  localparam int unsigned SAMPLE_W = 4;            // bits per I or Q component
  typedef logic signed [SAMPLE_W-1:0] comp_t;
  typedef struct packed {
    comp_t i;
    comp_t q;
  } sample_t;                                      // 8 bits per complex sample

  // ---------------- register bus ----------------
  localparam int unsigned REG_IDX_W  = 6;          // 64 registers per accelerator window
  localparam int unsigned SLOT_W     = 6;          // up to 64 windows
  localparam int unsigned REG_ADDR_W = REG_IDX_W + SLOT_W + 2;  // byte address bits used

  typedef struct packed {
    logic                  wr;      // one-cycle write strobe
    logic                  rd;      // one-cycle read strobe (data is sampled in the same cycle)
    logic [REG_IDX_W-1:0]  idx;     // register index inside the window
    logic [31:0]           wdata;
  } reg_req_t;

  // ---------------- CORDIC ----------------
  // atan(2^-i) expressed as a fraction of a full turn scaled by 2^32:
  // ATAN32[i] = round(atan(2^-i) / (2*pi) * 2^32).
  localparam int unsigned CORDIC_MAX_ITER = 24;
  localparam logic [31:0] ATAN32 [CORDIC_MAX_ITER] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756, 32'd42667331, 32'd21354465,
    32'd10679838,  32'd5340245,   32'd2670163,   32'd1335087,  32'd667544,   32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,    32'd10430,    32'd5215,
    32'd2608,      32'd1304,      32'd652,       32'd326,      32'd163,      32'd81
  };
  // 1/K for the CORDIC gain, K = prod sqrt(1 + 2^-2i), as a Q1.15 number: round(0.607253 * 2^15).
  localparam int unsigned CORDIC_INV_GAIN_Q15 = 19898;

  // ---------------- tracking register map ----------------
  localparam int unsigned TRK_CTRL      = 0;   // W: b0 start, b1 enable, b2 load phases
  localparam int unsigned TRK_STATUS    = 1;   // R: b1:0 state, b2 irq, b3 enable
  localparam int unsigned TRK_NSAMPLES  = 2;
  localparam int unsigned TRK_CARR_PH   = 3;
  localparam int unsigned TRK_CARR_STEP = 4;
  localparam int unsigned TRK_CODE_STEP = 5;
  localparam int unsigned TRK_CODE_LEN  = 6;
  localparam int unsigned TRK_CODE_WADR = 7;   // b30:0 word address, b31 data-code memory
  localparam int unsigned TRK_CODE_WDAT = 8;   // 32 chips, LSB first, auto-increment
  localparam int unsigned TRK_SAMPLE_CNT= 9;   // R: samples processed since reset
  localparam int unsigned TRK_NCORR     = 10;  // R: number of correlators
  localparam int unsigned TRK_PH_BASE   = 16;  // 16+2c: code phase integer, 17+2c: fraction
  localparam int unsigned TRK_RES_BASE  = 32;  // 32+2c: I result, 33+2c: Q result

  // ---------------- acquisition register map ----------------
  localparam int unsigned ACQ_CTRL      = 0;   // W: b0 start
  localparam int unsigned ACQ_STATUS    = 1;   // R: b0 busy, b1 done(irq), b2 signal present
  localparam int unsigned ACQ_NSAMP     = 2;
  localparam int unsigned ACQ_DOP_MIN   = 3;
  localparam int unsigned ACQ_DOP_STEP  = 4;
  localparam int unsigned ACQ_NUM_DOP   = 5;
  localparam int unsigned ACQ_PROD_SH   = 6;
  localparam int unsigned ACQ_THR_LO    = 7;
  localparam int unsigned ACQ_THR_HI    = 8;
  localparam int unsigned ACQ_BAND      = 9;
  localparam int unsigned ACQ_CF_WADR   = 10;
  localparam int unsigned ACQ_CF_WDAT   = 11;  // b15:0 real, b31:16 imaginary, auto-increment
  localparam int unsigned ACQ_PEAK_LO   = 16;
  localparam int unsigned ACQ_PEAK_HI   = 17;
  localparam int unsigned ACQ_PEAK_IDX  = 18;
  localparam int unsigned ACQ_PEAK_DOP  = 19;
  localparam int unsigned ACQ_POWER     = 20;
  localparam int unsigned ACQ_PEAK_STEP = 21;
  localparam int unsigned ACQ_FFT_N     = 22;

  // ---------------- global register map ----------------
  localparam int unsigned GLB_SRC_SEL   = 0;   // b0 band 0, b1 band 1: 0 ADC, 1 DMA
  localparam int unsigned GLB_DECIM     = 1;   // b3:0 band 0 log2, b7:4 band 1 log2
  localparam int unsigned GLB_ACQ_DECIM = 2;   // log2 of the acquisition downsampling
  localparam int unsigned GLB_REQUANT   = 3;   // right shift after averaging
  localparam int unsigned GLB_OVERFLOW  = 4;   // R: sticky overflow per band, W1C
  localparam int unsigned GLB_LEVEL0    = 5;   // R: main FIFO 0 fill level
  localparam int unsigned GLB_LEVEL1    = 6;   // R: main FIFO 1 fill level

endpackage
