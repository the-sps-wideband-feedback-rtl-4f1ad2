// dac_formatter: turns per-bunch correction vectors back into an 8-sample
// word stream for the DAC, and adds the amplifier tail compensation.
//
// The word stream runs at a fixed delay behind the ADC stream. A vector that
// arrives with sideband lane `lend` is written into a look-ahead buffer of 56
// samples at positions 17+lend .. 32+lend; the buffer moves out one word per
// clock, so the correction leaves the DAC at the same position within the turn
// as its window entered the ADC, a constant number of clocks later. Samples no
// vector covers are zero.
//
// Tail compensation (document: a pre-amble, a post-amble or a split pre/post
// amble added to the DAC waveform to move low-frequency content onto a higher
// frequency carrier). How the amble is formed is not given; here it is the
// vector's mean (sum >>> 4) times a programmable 16-entry carrier pattern,
// (mean * pattern[i]) >>> 7, saturated. PRE puts 16 amble samples before the
// window, POST 16 after it, SPLIT pattern[0..7] before and pattern[8..15]
// after. In doublet mode the pre-amble goes only before the first half and the
// post-amble only after the second half (sideband first/last).
// Timing: buffer index j reaches `out_word` lane j%8 j/8+1 clocks after the
// vector is taken.
module dac_formatter
  import wbfb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        adv,          // stream word slot (valid of the aligned ADC word)
  input  amble_mode_t amble_mode,
  input  sample_t     pattern [NSLICE],
  input  logic        in_valid,
  input  slice_vec_t  in_vec,
  input  sideband_t   in_sb,
  output word_t       out_word,
  output logic        out_valid,
  output logic        amble_used    // pulse: an amble was added
);
  localparam int BUF = 7*LANES;
  sample_t buff [BUF];
  sample_t nxt  [BUF];
  sample_t amble [NSLICE];
  logic signed [11:0] total;
  sample_t mean;

  always_comb begin
    total = '0;
    for (int i = 0; i < NSLICE; i++) total = total + 12'(in_vec[i]);
    mean = sample_t'(total >>> 4);
    for (int i = 0; i < NSLICE; i++) begin
      logic signed [15:0] p;
      p = mean * pattern[i];
      amble[i] = sat8(32'(p >>> 7));
    end
  end

  always_comb begin
    int b;
    b = int'(in_sb.lend);
    for (int j = 0; j < BUF; j++) nxt[j] = (j + LANES < BUF) ? buff[j+LANES] : '0;
    if (in_valid) begin
      for (int i = 0; i < NSLICE; i++) nxt[17 + b + i] = in_vec[i];
      if (in_sb.first && amble_mode == AM_PRE)
        for (int i = 0; i < NSLICE; i++) nxt[1 + b + i] = amble[i];
      if (in_sb.first && amble_mode == AM_SPLIT)
        for (int i = 0; i < NSLICE/2; i++) nxt[9 + b + i] = amble[i];
      if (in_sb.last && amble_mode == AM_POST)
        for (int i = 0; i < NSLICE; i++) nxt[33 + b + i] = amble[i];
      if (in_sb.last && amble_mode == AM_SPLIT)
        for (int i = 0; i < NSLICE/2; i++) nxt[33 + b + i] = amble[NSLICE/2 + i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < BUF; j++) buff[j] <= '0;
      out_word <= '0; out_valid <= 1'b0; amble_used <= 1'b0;
    end else begin
      for (int j = 0; j < BUF; j++) buff[j] <= nxt[j];
      for (int l = 0; l < LANES; l++) out_word[l] <= buff[l];
      out_valid  <= adv;
      amble_used <= in_valid && (amble_mode != AM_NONE) && (in_sb.first || in_sb.last);
    end
  end
endmodule
