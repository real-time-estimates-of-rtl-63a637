// write_sm: moves one block of M samples from the input FIFO into the RAM.
//
// On start it pops M/SPW consecutive FIFO words. For every word it
// steps the 32:1 sample mux (sel) through all SPW (32) samples, converts
// each 8-bit offset-binary ADC code to two's complement by subtracting 127
// (code 255 saturates to +127 so that v[] stays 8 bits), and writes it to
// successive RAM addresses starting at 0. The next word is popped during the
// last sample of the current one, so after a one-cycle start-up the block is
// written at one sample per clock: M + 1 cycles from start to done.
// Interface: start (pulse, ignored while busy); fifo_rd_en pops a word whose
// data reaches the mux the next cycle; done pulses once after the last write.
// M must be a multiple of SPW, so each block starts on a word.
// Splitting words into 32 samples and subtracting 127 follow the method; the
// saturation of code 255 and the schedule are this design's own choices.
module write_sm
  import phase_pkg::*;
#(
  parameter int unsigned M            = M_DEFAULT,
  parameter int unsigned SPW = phase_pkg::WORD_SAMPLES
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  output logic                             busy,
  output logic                             done,
  output logic                             fifo_rd_en,
  output logic [$clog2(SPW)-1:0]  sel,
  input  logic [SAMPLE_W-1:0]              sample,
  output logic                             ram_we,
  output logic [IDX_W-1:0]                 ram_addr,
  output sample_t                          ram_wdata
);
  localparam int unsigned WORDS = M / SPW;
  localparam int unsigned SW    = $clog2(SPW);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_SPLIT} state_t;
  state_t state;
  logic [IDX_W-1:0] words_left;

  wire last_in_word = (sel == SW'(SPW-1));

  always_comb begin
    fifo_rd_en = (state == S_FETCH) ||
                 (state == S_SPLIT && last_in_word && words_left != '0);
    ram_we     = (state == S_SPLIT);
    ram_wdata  = adc_to_twos(sample);
    busy       = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sel        <= '0;
      ram_addr   <= '0;
      words_left <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state      <= S_FETCH;
          ram_addr   <= '0;
          sel        <= '0;
          words_left <= IDX_W'(WORDS - 1);   // words still to pop after this one
        end
        S_FETCH: state <= S_SPLIT;
        S_SPLIT: begin
          sel      <= sel + 1'b1;
          ram_addr <= ram_addr + 1'b1;
          if (last_in_word) begin
            if (words_left == '0) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              words_left <= words_left - 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (M % SPW == 0) else $error("M must be a multiple of SPW");
endmodule
