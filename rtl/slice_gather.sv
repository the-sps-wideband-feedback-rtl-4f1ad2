// slice_gather: cuts the 16-sample window of one bunch out of the 8-sample
// word stream. The ADC/DSP controller raises `fire` in the clock whose word
// holds the window's last sample and gives that sample's lane in `sb.lend`.
// The module keeps the two previous words, so any 16 consecutive samples
// ending in the current word are at hand; slice i of the window is sample
// (lend + 1 + i) of the 24-sample span {current, previous, previous-2}.
// The document gives the 16 slices per bunch; the word-based selection is
// this design's. Latency: one clock from `fire` to `vec_valid`.
module slice_gather
  import wbfb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  word_t      word,
  input  logic       word_valid,
  input  logic       fire,
  input  sideband_t  sb_in,
  output slice_vec_t vec,
  output logic       vec_valid,
  output sideband_t  sb_out
);
  word_t prev1, prev2;
  sample_t span [3*LANES];

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      span[i]           = prev2[i];
      span[LANES+i]     = prev1[i];
      span[2*LANES+i]   = word[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev1 <= '0; prev2 <= '0; vec_valid <= 1'b0; vec <= '0; sb_out <= '0;
    end else begin
      vec_valid <= fire && word_valid;
      if (word_valid) begin
        prev1 <= word;
        prev2 <= prev1;
      end
      if (fire && word_valid) begin
        for (int i = 0; i < NSLICE; i++) vec[i] <= span[int'(sb_in.lend) + 1 + i];
        sb_out <= sb_in;
      end
    end
  end
endmodule
