// reverse_stage: endianness conversion and ADC extraction for one group of
// seven 64-bit waveform words.
//
// The waveform is a little-endian bit stream of 14-bit ADC samples packed
// back to back in 64-bit words: sample k of a group occupies bits
// 14k .. 14k+13 of the 448-bit value {word6, ..., word0}, so samples 4, 9,
// 13, 18, 22, 27 straddle two words (e.g. sample 9 = word2[11:0] : word1[63:62]).
// Each input word is the 8 bytes as they arrived, first byte most
// significant; the stage reverses the byte order of each word to recover its
// numeric value, then slices the 32 samples out of the group and widens each
// to a 16-bit field (upper two bits zero). Seven words hold exactly 32
// samples, so groups are independent and three instances cover a 21-word
// segment. A sample is marked valid only if every word it touches is valid.
//
// Timing: one register stage; out_* follow in_valid by one cycle.
// The grouping (3 stages x 7 words x 32 samples) and the 16-bit fields follow
// the design description; the single-cycle register stage is this design's.
module reverse_stage
  import dune_pkg::*;
#(
  parameter int WORDS = STAGE_WORDS,
  parameter int ADCS  = WORDS * 64 / ADC_BITS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [WORDS-1:0][63:0]      in_word,
  input  logic [WORDS-1:0]            in_word_v,
  output logic                        out_valid,
  output logic [WORDS-1:0][63:0]      out_word,
  output logic [WORDS-1:0]            out_word_v,
  output logic [ADCS-1:0][15:0]       out_adc,
  output logic [ADCS-1:0]             out_adc_v
);
  logic [WORDS-1:0][63:0] rev;
  logic [WORDS*64-1:0]    stream;
  logic [ADCS-1:0][15:0]  adc;
  logic [ADCS-1:0]        adc_v;

  always_comb begin
    for (int w = 0; w < WORDS; w++)
      for (int b = 0; b < 8; b++)
        rev[w][8*b +: 8] = in_word[w][8*(7-b) +: 8];
    stream = rev;
    for (int k = 0; k < ADCS; k++) begin
      adc[k]   = {2'b00, stream[ADC_BITS*k +: ADC_BITS]};
      adc_v[k] = in_word_v[(ADC_BITS*k) / 64] && in_word_v[(ADC_BITS*k + ADC_BITS - 1) / 64];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_word   <= '0;
      out_word_v <= '0;
      out_adc    <= '0;
      out_adc_v  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_word   <= rev;
        out_word_v <= in_word_v;
        out_adc    <= adc;
        out_adc_v  <= adc_v;
      end
    end
  end
endmodule
