// phase_channel: the complete estimator for one ADC.
//
// Data path: four 1:8 deserializers (one per ADC bus) -> scrambler ->
// 256-bit x FIFO_DEPTH input FIFO -> 32:1 sample mux -> write state machine
// (offset-binary to two's complement) -> M x 8 sample RAM -> read state
// machine -> compute arrays and estimator.
// Control: a trigger arms the channel; from the next complete deserialized
// word on, every word is stored until the FIFO is full (32,768 samples by
// default). Processing then runs block by block: the write state machine
// copies M samples into the RAM, the compute arrays make one pass over them,
// and the estimator makes its closed-form step and N_ITER refinement passes.
// Each block ends with a one-cycle res.valid carrying amplitude, frequency,
// phii, phic and the block number. After NUM_BLOCKS blocks the unused rest of
// the FIFO is discarded and the channel waits for the next trigger.
// Sequencing one block at a time through a single RAM, and NUM_BLOCKS =
// floor(32768 / M), are this design's own choices.
// Interface: lanes[l] carries one beat of ADC bus l (Qd, Id, Q, I) per clock;
// trigger is sampled while idle. Everything runs on one clock.
module phase_channel
  import phase_pkg::*;
#(
  parameter int unsigned     M          = M_DEFAULT,
  parameter int unsigned     NUM_BLOCKS = (FIFO_DEPTH * WORD_SAMPLES) / M_DEFAULT,
  parameter int unsigned     FDEPTH     = FIFO_DEPTH,
  parameter int unsigned     N_ITER     = N_ITER_DEFAULT,
  parameter longint unsigned F_SAMP_HZ  = F_SAMP_HZ_DEFAULT
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [LANES-1:0][SAMPLE_W-1:0] lanes,
  input  logic                          trigger,
  output est_result_t                   res,
  output logic                          busy,
  output logic                          fifo_full,
  output logic                          zc_valid,
  output zc_result_t                    zc_res
);
  localparam int unsigned SEL_W = $clog2(WORD_SAMPLES);

  // ---------------- deserializers and scrambler ----------------
  logic [LANES-1:0][DESER*SAMPLE_W-1:0] lane_words;
  logic [LANES-1:0]                     lane_valid;
  logic [WORD_W-1:0]                    word;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    iserdes #(.SAMPLE_W(SAMPLE_W), .RATIO(DESER)) u_iserdes (
      .clk, .rst_n, .din(lanes[l]), .dout(lane_words[l]), .dout_valid(lane_valid[l]));
  end

  scrambler #(.SAMPLE_W(SAMPLE_W), .LANES(LANES), .RATIO(DESER)) u_scrambler (
    .lanes(lane_words), .word(word));

  // ---------------- FIFO, mux, write side ----------------
  logic              fifo_wr, fifo_rd, fifo_flush, fifo_empty;
  logic [WORD_W-1:0] fifo_q;
  logic [$clog2(FDEPTH):0] fifo_count;
  logic [SEL_W-1:0]  sel;
  logic [SAMPLE_W-1:0] mux_sample;
  logic              ws_start, ws_busy, ws_done, ram_we;
  logic [IDX_W-1:0]  ram_waddr;
  sample_t           ram_wdata;

  sample_fifo #(.WIDTH(WORD_W), .DEPTH(FDEPTH)) u_fifo (
    .clk, .rst_n, .flush(fifo_flush), .wr_en(fifo_wr), .wr_data(word),
    .rd_en(fifo_rd), .rd_data(fifo_q), .full(fifo_full), .empty(fifo_empty),
    .count(fifo_count));

  sample_mux #(.N(WORD_SAMPLES), .SAMPLE_W(SAMPLE_W)) u_mux (
    .word(fifo_q), .sel(sel), .sample(mux_sample));

  write_sm #(.M(M), .SPW(WORD_SAMPLES)) u_write_sm (
    .clk, .rst_n, .start(ws_start), .busy(ws_busy), .done(ws_done),
    .fifo_rd_en(fifo_rd), .sel(sel), .sample(mux_sample),
    .ram_we(ram_we), .ram_addr(ram_waddr), .ram_wdata(ram_wdata));

  // ---------------- RAM and read side ----------------
  logic              ram_re;
  logic [IDX_W-1:0]  ram_raddr;
  sample_t           ram_rdata;
  logic              rs_start, rs_req, rs_valid, rs_last;
  sample_t           rs_data;
  logic [IDX_W-1:0]  rs_idx;

  sample_ram #(.DEPTH(M), .WIDTH(SAMPLE_W), .AW(IDX_W)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata));

  read_sm #(.M(M)) u_read_sm (
    .clk, .rst_n, .start(rs_start), .req(rs_req), .ram_re(ram_re),
    .ram_addr(ram_raddr), .ram_rdata(ram_rdata), .valid(rs_valid),
    .data(rs_data), .idx(rs_idx), .last(rs_last));

  // ---------------- compute arrays and estimator ----------------
  logic       ca_start, ca_req, ca_done, vb_valid;
  sample_t    vb;
  logic       est_start, est_rd_start, est_req, est_busy, est_phii_done, est_done;
  logic [31:0] amp, freq;
  phase_t     phii, phic, inc;

  compute_arrays #(.M(M)) u_arrays (
    .clk, .rst_n, .start(ca_start), .req(ca_req), .v_valid(rs_valid),
    .v(rs_data), .v_idx(rs_idx), .v_last(rs_last), .vb_valid(vb_valid),
    .vb(vb), .done(ca_done), .res(zc_res));

  estimator #(.M(M), .N_ITER(N_ITER), .F_SAMP_HZ(F_SAMP_HZ)) u_est (
    .clk, .rst_n, .start(est_start), .zc(zc_res), .rd_start(est_rd_start),
    .req(est_req), .v_valid(rs_valid), .v(rs_data), .busy(est_busy),
    .phii_done(est_phii_done), .done(est_done), .amplitude(amp),
    .frequency(freq), .phii(phii), .phic(phic), .phase_inc(inc));

  assign rs_start = ca_start | est_rd_start;
  assign rs_req   = ca_req | est_req;
  assign zc_valid = ca_done;

  // ---------------- channel sequencer ----------------
  typedef enum logic [2:0] {C_IDLE, C_CAPTURE, C_WRITE, C_ARRAYS, C_EST, C_FLUSH} cstate_t;
  cstate_t          cst;
  logic [BLK_W-1:0] blk;

  always_comb begin
    fifo_wr    = (cst == C_CAPTURE) && lane_valid[0] && !fifo_full;
    fifo_flush = (cst == C_FLUSH);
    ws_start   = 1'b0;
    ca_start   = 1'b0;
    est_start  = 1'b0;
    case (cst)
      C_CAPTURE: ws_start = fifo_full;
      C_WRITE:   ca_start = ws_done;
      C_ARRAYS:  est_start = ca_done;
      C_EST:     ws_start = est_done && (blk != BLK_W'(NUM_BLOCKS - 1));
      default: ;
    endcase
  end

  assign busy = (cst != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_IDLE;
      blk <= '0;
      res <= '0;
    end else begin
      res.valid <= 1'b0;
      case (cst)
        C_IDLE:    if (trigger) cst <= C_CAPTURE;
        C_CAPTURE: if (fifo_full) begin cst <= C_WRITE; blk <= '0; end
        C_WRITE:   if (ws_done) cst <= C_ARRAYS;
        C_ARRAYS:  if (ca_done) cst <= C_EST;
        C_EST: if (est_done) begin
          res.valid     <= 1'b1;
          res.blk       <= blk;
          res.amplitude <= amp;
          res.frequency <= freq;
          res.phii      <= phii;
          res.phic      <= phic;
          if (blk == BLK_W'(NUM_BLOCKS - 1)) begin
            cst <= C_FLUSH;
          end else begin
            blk <= blk + 1'b1;
            cst <= C_WRITE;
          end
        end
        C_FLUSH: cst <= C_IDLE;
        default: cst <= C_IDLE;
      endcase
    end
  end

  initial assert (NUM_BLOCKS * M <= FDEPTH * WORD_SAMPLES)
    else $error("NUM_BLOCKS blocks of M samples do not fit in the FIFO");
endmodule
