// estimator: amplitude, frequency and starting phase of a single tone from
// one block of M samples.
//
// Inputs are the compute-arrays results of the block (number of zero
// transitions N, first and last transition index jf and jl, direction of the
// last transition, C2 = sum of v^2 up to jl) and, on request, the samples v[]
// themselves. The estimator then works in two phases.
//
// Closed form (a few hundred clocks):
//   amplitude  A      = sqrt(2 * C2 / (jl + 1))                    (Eq. 1)
//   frequency  f/Fs   = (N - 1) / (2 * (jl - jf))                  (Eq. 2)
//   phase      phii   = 1/4 turn (+1/2 turn if the last transition
//                       is negative-to-positive) - (f/Fs) * jl     (Eq. 3)
// Refinement (N_ITER passes over the block, Eq. 4-7): with
// theta_m = phi + 2*pi*(f/Fs)*m, each pass accumulates
//   num = sum sin(theta_m) * (v[m] - A cos(theta_m)),  den = sum sin^2(theta_m)
// and sets phi <- phi - num / (A * den). The first pass starts from phii.
// This is a Newton step on the phase: for v = A cos(theta + d) the step is
// close to d, so a few passes converge on the phase of sample 0.
//
// Number formats (this design's own; the method used 32-bit floating point
// and vendor cores): phases and the per-sample phase increment are 32-bit
// binary angles (2^32 = one turn), A is unsigned 16.16 in ADC LSBs, sin/cos
// come from a 32-bit CORDIC and are used as Q1.15, the sums are 48-bit
// integers, and all divisions and the square root run on one sequential
// divider and one sequential square-root unit. The frequency output is in Hz
// for the sampling rate F_SAMP_HZ. If fewer than two transitions were seen the
// frequency is zero and the phase estimate is meaningless.
//
// Interface: start (pulse) with zc stable; rd_start restarts the read state
// machine for each pass and req/v_valid/v fetch one sample at a time. done
// pulses when amplitude, frequency, phii and phic are valid; phii_done pulses
// when the closed-form results are valid.
// Timing: about 3 * NW + RW/2 clocks for the closed form, then per pass
// M * (W + 4) clocks plus one division - about 259,000 clocks for M = 2400.
module estimator
  import phase_pkg::*;
#(
  parameter int unsigned     M         = M_DEFAULT,
  parameter int unsigned     N_ITER    = N_ITER_DEFAULT,
  parameter longint unsigned F_SAMP_HZ = F_SAMP_HZ_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  zc_result_t        zc,
  output logic              rd_start,
  output logic              req,
  input  logic              v_valid,
  input  sample_t           v,
  output logic              busy,
  output logic              phii_done,
  output logic              done,
  output logic [31:0]       amplitude,
  output logic [31:0]       frequency,
  output phase_t            phii,
  output phase_t            phic,
  output phase_t            phase_inc
);
  localparam int unsigned NW = 88;                 // divider dividend width
  localparam int unsigned DW = 64;                 // divider divisor width
  localparam int unsigned RW = 64;                 // square-root radicand width
  localparam int unsigned CW = 32;                 // CORDIC width
  localparam int unsigned AW = 48;                 // accumulator width
  localparam logic [36:0] K_TURN = 37'd87496355274;  // 2^39 / (2*pi)

  typedef enum logic [3:0] {
    S_IDLE, S_AMP_DIV, S_AMP_SQRT, S_FREQ_DIV, S_PHII,
    S_PASS_START, S_SAMPLE, S_WAIT, S_CORR_DIV, S_CORR
  } state_t;
  state_t state;

  phase_t theta;                     // phase of the current sample

  // ---------------- shared arithmetic units ----------------
  logic          div_start, div_done, div_busy;
  logic [NW-1:0] div_a, div_q;
  logic [DW-1:0] div_b, div_r;
  logic          sq_start, sq_done, sq_busy;
  logic [RW-1:0] sq_in;
  logic [RW/2-1:0] sq_root;
  logic          co_start, co_done, co_busy;
  logic signed [CW-1:0] co_sin, co_cos;

  seq_divider #(.NW(NW), .DW(DW)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q), .remainder(div_r));

  seq_sqrt #(.RW(RW)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .radicand(sq_in),
    .busy(sq_busy), .done(sq_done), .root(sq_root));

  cordic #(.W(CW)) u_cordic (
    .clk, .rst_n, .start(co_start), .angle(theta), .busy(co_busy),
    .done(co_done), .sin_o(co_sin), .cos_o(co_cos));

  // ---------------- state ----------------
  phase_t                phi;        // current initial-phase estimate
  logic [IDX_W-1:0]      k;          // sample index in the pass
  logic [3:0]            iter;
  logic                  sub_started;
  sample_t               v_lat;
  logic signed [AW-1:0]  num;
  logic        [AW-1:0]  den;
  logic                  num_neg;

  // ---------------- per-sample arithmetic ----------------
  logic signed [17:0] s16, c16;
  logic signed [50:0] a_cos;      // A (Q16.16) * cos (Q1.15): scale 2^31
  logic signed [27:0] acos8;      // A cos, scale 2^8
  logic signed [27:0] e8;         // v - A cos, scale 2^8
  logic signed [45:0] s_e;
  logic signed [35:0] s_s;

  always_comb begin
    s16   = 18'(co_sin >>> 15);
    c16   = 18'(co_cos >>> 15);
    a_cos = $signed({19'b0, amplitude}) * 51'(c16);
    acos8 = 28'(a_cos >>> 23);
    e8    = ($signed(28'(v_lat)) <<< 8) - acos8;
    s_e   = 46'(s16) * 46'(e8);
    s_s   = 36'(s16) * 36'(s16);
  end

  // magnitude of num for the unsigned correction division
  logic [AW-1:0] num_mag;
  assign num_mag = num[AW-1] ? AW'(-num) : AW'(num);

  logic [IDX_W-1:0] span;
  assign span = zc.jvz_last - zc.jvz_first;

  // frequency in Hz = inc * Fs / 2^32
  logic [95:0] f_prod;
  assign f_prod = 96'(phase_inc) * 96'(F_SAMP_HZ);

  // quarter turn, plus half a turn for a rising last transition, minus inc*jl
  phase_t phi0;
  always_comb begin
    phi0 = 32'h4000_0000 + (zc.last_rising ? 32'h8000_0000 : 32'h0)
           - 32'(phase_inc * 32'(zc.jvz_last));
  end

  // phase correction: quotient is the magnitude in binary-angle units
  phase_t corr;
  always_comb begin
    if (div_q >= NW'(64'h8000_0000)) corr = 32'h7fff_ffff;
    else                             corr = div_q[31:0];
    if (num_neg) corr = -corr;
  end

  always_comb begin
    div_start = 1'b0;
    div_a     = '0;
    div_b     = '0;
    sq_start  = 1'b0;
    sq_in     = RW'(div_q);
    co_start  = 1'b0;
    req       = 1'b0;
    rd_start  = 1'b0;
    case (state)
      S_AMP_DIV: begin
        div_start = !sub_started;
        div_a     = NW'({zc.c2_last, 1'b0}) << 32;
        div_b     = DW'(zc.jvz_last) + 1'b1;
      end
      S_AMP_SQRT: sq_start = !sub_started;
      S_FREQ_DIV: begin
        div_start = !sub_started;
        div_a     = (zc.nzero >= 2) ? NW'(zc.nzero - 1'b1) << 31 : '0;
        div_b     = (span == '0) ? DW'(1) : DW'(span);
      end
      S_PASS_START: rd_start = 1'b1;
      S_SAMPLE: begin
        co_start = 1'b1;
        req      = 1'b1;
      end
      S_CORR_DIV: begin
        div_start = !sub_started;
        div_a     = NW'(num_mag) * NW'(K_TURN);
        div_b     = DW'(amplitude) * DW'(den >> 16);
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      sub_started <= 1'b0;
      amplitude   <= '0;
      frequency   <= '0;
      phii        <= '0;
      phic        <= '0;
      phase_inc   <= '0;
      theta       <= '0;
      phi         <= '0;
      k           <= '0;
      iter        <= '0;
      v_lat       <= '0;
      num         <= '0;
      den         <= '0;
      num_neg     <= 1'b0;
      phii_done   <= 1'b0;
      done        <= 1'b0;
    end else begin
      phii_done <= 1'b0;
      done      <= 1'b0;
      if (v_valid) v_lat <= v;
      case (state)
        S_IDLE: if (start) begin
          state       <= S_AMP_DIV;
          sub_started <= 1'b0;
        end
        S_AMP_DIV: begin
          sub_started <= 1'b1;
          if (div_done) begin state <= S_AMP_SQRT; sub_started <= 1'b0; end
        end
        S_AMP_SQRT: begin
          sub_started <= 1'b1;
          if (sq_done) begin
            amplitude   <= sq_root;
            state       <= S_FREQ_DIV;
            sub_started <= 1'b0;
          end
        end
        S_FREQ_DIV: begin
          sub_started <= 1'b1;
          if (div_done) begin
            phase_inc   <= div_q[31:0];
            state       <= S_PHII;
            sub_started <= 1'b0;
          end
        end
        S_PHII: begin
          frequency <= f_prod[63:32];
          phii      <= phi0;
          phi       <= phi0;
          phii_done <= 1'b1;
          iter      <= '0;
          state     <= S_PASS_START;
        end
        S_PASS_START: begin
          theta <= phi;
          k     <= '0;
          num   <= '0;
          den   <= '0;
          state <= S_SAMPLE;
        end
        S_SAMPLE: state <= S_WAIT;
        S_WAIT: if (co_done) begin
          num   <= num + AW'(s_e);
          den   <= den + AW'(s_s);
          theta <= theta + phase_inc;
          k     <= k + 1'b1;
          if (k == IDX_W'(M - 1)) begin
            state       <= S_CORR_DIV;
            sub_started <= 1'b0;
          end else begin
            state <= S_SAMPLE;
          end
        end
        S_CORR_DIV: begin
          sub_started <= 1'b1;
          num_neg     <= num[AW-1];
          if (div_done) begin
            state       <= S_CORR;
            sub_started <= 1'b0;
          end
        end
        S_CORR: begin
          phi  <= phi - corr;
          iter <= iter + 1'b1;
          if (iter == 4'(N_ITER - 1)) begin
            phic  <= phi - corr;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_PASS_START;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
