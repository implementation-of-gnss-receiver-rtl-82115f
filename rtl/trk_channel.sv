// trk_channel: tracking hardware accelerator (multicorrelator) of one receiver channel.
//
// One channel follows one satellite signal. Samples of its frequency band enter an input
// buffer (sample_fifo, INBUF_DEPTH words). The carrier is removed by a Doppler wipe-off unit
// (CORDIC local oscillator and mixers) shared by all correlators, and the wiped-off samples
// are correlated in parallel against N_PILOT replicas of the pilot (or data) code, typically
// very early / early / prompt / late / very late, plus N_DATA (0 or 1) replica of the data
// code for signals whose pilot and data components are tracked together. Each correlator has
// its own code memory and resampler (see correlator.sv). The receiver instantiates:
//   GPS L1 C/A   N_PILOT=3 N_DATA=0   (E, P, L)
//   Galileo E1   N_PILOT=5 N_DATA=1   (VE, E, P, L, VL + data)
//   GPS L5       N_PILOT=3 N_DATA=1
//   Galileo E5   N_PILOT=3 N_DATA=1
//
// Operation loop, driven by software through the register window:
//   CONF    software writes the configuration (sample count, carrier and code NCO steps,
//           phases) and then CTRL with start=1, enable=1 (and load=1 to load the phases).
//   GET     the channel takes NSAMPLES samples from its input buffer, one per clock.
//   PROC    the datapath pipeline drains (LO_ITER + 5 cycles).
//   RESULTS the correlation sums are final, irq is high, and the channel takes no samples
//           until software starts the next integration. Meanwhile the input buffer keeps
//           filling; only when it is full does the channel hold back its band (back pressure).
// When enable is low the input buffer is emptied and every offered sample is accepted and
// dropped, so an idle channel never holds back the band.
// Without load, the carrier and code NCOs continue from where the last integration ended.
//
// Registers (32-bit, index in gnss_pkg): CTRL(W) b0 start, b1 enable, b2 load phases;
// STATUS(R); NSAMPLES; CARR_PH (W: initial phase, R: live phase); CARR_STEP; CODE_STEP
// (code entries per sample, unsigned 0.32); CODE_LEN; CODE_WADR (b31 selects the data-code
// memory); CODE_WDAT (auto-increment); SAMPLE_CNT; NCORR; per correlator c: 16+2c / 17+2c
// code phase integer / fraction (W: initial, R: live) and 32+2c / 33+2c results I / Q.
// reg_rdata is combinational on reg_req.idx.
//
// The structure (input buffer, wipe-off, parallel correlators with resamplers, the
// configure / get samples / process / results loop with an interrupt, and the back pressure)
// follows the receiver; the register map and field formats are this design's own.
module trk_channel import gnss_pkg::*; #(
  parameter int unsigned N_PILOT     = 3,
  parameter int unsigned N_DATA      = 0,
  parameter int unsigned CODE_MAX    = 1024,
  parameter int unsigned INBUF_DEPTH = 16384,
  parameter int unsigned LO_ITER     = 12,
  localparam int unsigned NC         = N_PILOT + N_DATA
) (
  input  logic        clk,
  input  logic        rst_n,
  // sample stream from the band's main FIFO
  input  logic        in_valid,
  output logic        in_ready,
  input  sample_t     in_sample,
  // register access
  input  reg_req_t    reg_req,
  output logic [31:0] reg_rdata,
  output logic        irq
);
  localparam int unsigned WORDS = (CODE_MAX + 31) / 32;
  localparam int unsigned WAW   = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned IXW   = $clog2(CODE_MAX + 1);
  localparam int unsigned WO_W  = SAMPLE_W + 4;
  localparam int unsigned DRAIN = LO_ITER + 5;

  initial assert (N_DATA <= 1 && NC >= 1 && NC <= 8) else $error("trk_channel: bad correlator count");

  typedef enum logic [1:0] {S_IDLE, S_GET, S_PROC, S_RESULTS} state_t;
  state_t state;

  // ---------------- registers ----------------
  logic        enable;
  logic [31:0] nsamples, carr_init, carr_step, code_step, sample_cnt, cnt;
  logic [IXW-1:0] code_len;
  logic [WAW-1:0] code_wadr;
  logic        code_wsel;
  logic [IXW-1:0] ph_int  [NC];
  logic [31:0]    ph_frac [NC];
  logic [7:0]  drain;

  logic wr_ctrl, start, load;
  assign wr_ctrl = reg_req.wr && (reg_req.idx == REG_IDX_W'(TRK_CTRL));
  assign start   = wr_ctrl && reg_req.wdata[0] && reg_req.wdata[1] &&
                   (state == S_IDLE || state == S_RESULTS);
  assign load    = start && reg_req.wdata[2];

  logic code_we;
  assign code_we = reg_req.wr && (reg_req.idx == REG_IDX_W'(TRK_CODE_WDAT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= 1'b0; nsamples <= '0; carr_init <= '0; carr_step <= '0; code_step <= '0;
      code_len <= IXW'(CODE_MAX); code_wadr <= '0; code_wsel <= 1'b0;
      for (int c = 0; c < NC; c++) begin ph_int[c] <= '0; ph_frac[c] <= '0; end
    end else if (reg_req.wr) begin
      unique case (int'(reg_req.idx))
        TRK_CTRL:      enable    <= reg_req.wdata[1];
        TRK_NSAMPLES:  nsamples  <= reg_req.wdata;
        TRK_CARR_PH:   carr_init <= reg_req.wdata;
        TRK_CARR_STEP: carr_step <= reg_req.wdata;
        TRK_CODE_STEP: code_step <= reg_req.wdata;
        TRK_CODE_LEN:  code_len  <= IXW'(reg_req.wdata);
        TRK_CODE_WADR: begin code_wadr <= WAW'(reg_req.wdata); code_wsel <= reg_req.wdata[31]; end
        TRK_CODE_WDAT: code_wadr <= code_wadr + 1'b1;
        default: begin
          for (int c = 0; c < NC; c++) begin
            if (int'(reg_req.idx) == TRK_PH_BASE + 2*c)     ph_int[c]  <= IXW'(reg_req.wdata);
            if (int'(reg_req.idx) == TRK_PH_BASE + 2*c + 1) ph_frac[c] <= reg_req.wdata;
          end
        end
      endcase
    end
  end

  // ---------------- input buffer ----------------
  logic    fifo_in_ready, fifo_out_valid, fifo_out_ready;
  sample_t fifo_out;
  logic [$clog2(INBUF_DEPTH)+1:0] fifo_level;

  sample_fifo #(.W($bits(sample_t)), .DEPTH(INBUF_DEPTH)) u_inbuf (
    .clk, .rst_n,
    .flush    (!enable),
    .in_valid (in_valid && enable),
    .in_ready (fifo_in_ready),
    .in_data  (in_sample),
    .out_valid(fifo_out_valid),
    .out_ready(fifo_out_ready),
    .out_data (fifo_out),
    .level    (fifo_level)
  );
  assign in_ready = !enable || fifo_in_ready;

  // ---------------- control ----------------
  assign fifo_out_ready = (state == S_GET) && (cnt != nsamples);
  logic take;
  assign take = fifo_out_valid && fifo_out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; drain <= '0; irq <= 1'b0; sample_cnt <= '0;
    end else begin
      if (take) sample_cnt <= sample_cnt + 1'b1;
      if (!enable && !start) begin
        state <= S_IDLE; irq <= 1'b0;
      end else unique case (state)
        S_IDLE, S_RESULTS: if (start) begin
          state <= S_GET; cnt <= '0; irq <= 1'b0;
        end
        S_GET: begin
          if (cnt == nsamples) begin
            state <= S_PROC; drain <= 8'(DRAIN);
          end else if (take) begin
            cnt <= cnt + 1'b1;
          end
        end
        S_PROC: begin
          if (drain == '0) begin state <= S_RESULTS; irq <= 1'b1; end
          else drain <= drain - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- datapath ----------------
  logic [31:0]             carr_phase;
  logic                    w_valid;
  logic signed [WO_W-1:0]  w_i, w_q;

  doppler_wipeoff #(.LO_ITER(LO_ITER)) u_wipe (
    .clk, .rst_n,
    .in_valid  (take),
    .in_sample (fifo_out),
    .phase_step(carr_step),
    .phase_load(load),
    .phase_init(carr_init),
    .phase     (carr_phase),
    .out_valid (w_valid),
    .out_i     (w_i),
    .out_q     (w_q)
  );

  logic signed [31:0] acc_i [NC];
  logic signed [31:0] acc_q [NC];
  logic [IXW-1:0]     live_int  [NC];
  logic [31:0]        live_frac [NC];

  for (genvar c = 0; c < NC; c++) begin : g_corr
    localparam bit IS_DATA = (c >= N_PILOT);
    correlator #(.IN_W(WO_W), .ACC_W(32), .CODE_MAX(CODE_MAX)) u_corr (
      .clk, .rst_n,
      .code_we        (code_we && (code_wsel == IS_DATA)),
      .code_waddr     (code_wadr),
      .code_wdata     (reg_req.wdata),
      .code_len       (code_len),
      .code_step      (code_step),
      .phase_load     (load),
      .init_int       (ph_int[c]),
      .init_frac      (ph_frac[c]),
      .code_phase_int (live_int[c]),
      .code_phase_frac(live_frac[c]),
      .clear          (start),
      .in_valid       (w_valid),
      .in_i           (w_i),
      .in_q           (w_q),
      .acc_i          (acc_i[c]),
      .acc_q          (acc_q[c])
    );
  end

  // ---------------- register read ----------------
  always_comb begin
    reg_rdata = '0;
    unique case (int'(reg_req.idx))
      TRK_STATUS:     reg_rdata = {28'd0, enable, irq, state};
      TRK_NSAMPLES:   reg_rdata = nsamples;
      TRK_CARR_PH:    reg_rdata = carr_phase;
      TRK_CARR_STEP:  reg_rdata = carr_step;
      TRK_CODE_STEP:  reg_rdata = code_step;
      TRK_CODE_LEN:   reg_rdata = 32'(code_len);
      TRK_SAMPLE_CNT: reg_rdata = sample_cnt;
      TRK_NCORR:      reg_rdata = 32'(NC);
      default: begin
        for (int c = 0; c < NC; c++) begin
          if (int'(reg_req.idx) == TRK_PH_BASE + 2*c)      reg_rdata = 32'(live_int[c]);
          if (int'(reg_req.idx) == TRK_PH_BASE + 2*c + 1)  reg_rdata = live_frac[c];
          if (int'(reg_req.idx) == TRK_RES_BASE + 2*c)     reg_rdata = acc_i[c];
          if (int'(reg_req.idx) == TRK_RES_BASE + 2*c + 1) reg_rdata = acc_q[c];
        end
      end
    endcase
  end

endmodule
