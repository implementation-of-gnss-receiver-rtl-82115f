// correlator: one code correlator of a tracking multicorrelator (code memory, resampler and
// integrate-and-dump).
//
// The local replica of the GNSS code is held in a code memory of CODE_MAX entries, one bit
// per entry (bit b stands for the chip value 1 - 2b, so 0 -> +1 and 1 -> -1). Software writes
// it 32 entries per word, entry 32*a+k in bit k of word a. For GPS L1 C/A, L5 and Galileo E5
// an entry is one chip; for Galileo E1 software stores the BOC-modulated half-chips.
//
// The resampler is a code NCO: a code phase with an integer part (entry index) and a 32-bit
// fraction advances by code_step (entries per sample, below one) for every sample and wraps at
// code_len entries. It re-samples the code from the chip rate to the sample rate on the fly,
// so any Doppler-shifted code rate is matched. phase_load sets the phase of the next sample
// (used to place early, prompt and late replicas apart).
//
// For each sample, the wiped-off I and Q are multiplied by the code value and accumulated;
// clear zeroes the accumulators at the start of an integration. The blocks (code memory,
// resampler, multiplier) follow the receiver's tracking diagram; the fixed-point formats and
// the bit mapping are this design's own.
//
// Timing: one sample per cycle; the accumulators include a sample two cycles after its
// in_valid. code_phase_int/frac give the phase of the next sample.
module correlator #(
  parameter int unsigned IN_W     = 8,
  parameter int unsigned ACC_W    = 32,
  parameter int unsigned CODE_MAX = 1024,
  localparam int unsigned WORDS   = (CODE_MAX + 31) / 32,
  localparam int unsigned WAW     = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned IXW     = $clog2(CODE_MAX + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // code memory write port
  input  logic                    code_we,
  input  logic [WAW-1:0]          code_waddr,
  input  logic [31:0]             code_wdata,
  // resampler configuration
  input  logic [IXW-1:0]          code_len,
  input  logic [31:0]             code_step,
  input  logic                    phase_load,
  input  logic [IXW-1:0]          init_int,
  input  logic [31:0]             init_frac,
  output logic [IXW-1:0]          code_phase_int,
  output logic [31:0]             code_phase_frac,
  // samples
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  output logic signed [ACC_W-1:0] acc_i,
  output logic signed [ACC_W-1:0] acc_q
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (code_we) mem[code_waddr] <= code_wdata;
  end

  // resampler (code NCO)
  logic [32:0]    frac_sum;
  logic [IXW-1:0] int_next;
  assign frac_sum = {1'b0, code_phase_frac} + {1'b0, code_step};
  always_comb begin
    int_next = code_phase_int + IXW'(frac_sum[32]);
    if (int_next >= code_len) int_next = int_next - code_len;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_phase_int <= '0; code_phase_frac <= '0;
    end else if (phase_load) begin
      code_phase_int <= init_int; code_phase_frac <= init_frac;
    end else if (in_valid) begin
      code_phase_int <= int_next; code_phase_frac <= frac_sum[31:0];
    end
  end

  // code read (synchronous) with the sample delayed alongside
  logic [31:0]            word_q;
  logic [4:0]             bit_q;
  logic                   v_q;
  logic signed [IN_W-1:0] i_q, q_q;
  always_ff @(posedge clk) begin
    word_q <= mem[WAW'(code_phase_int >> 5)];
    bit_q  <= code_phase_int[4:0];
    i_q    <= in_i;
    q_q    <= in_q;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  // multiply by +-1 and integrate
  logic chip;
  assign chip = word_q[bit_q];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i <= '0; acc_q <= '0;
    end else if (clear) begin
      acc_i <= '0; acc_q <= '0;
    end else if (v_q) begin
      acc_i <= chip ? acc_i - ACC_W'(i_q) : acc_i + ACC_W'(i_q);
      acc_q <= chip ? acc_q - ACC_W'(q_q) : acc_q + ACC_W'(q_q);
    end
  end

endmodule
