// fir_bank: the feedback filter. Each of the 16 slices of a bunch is treated
// as its own signal sampled once per turn, and filtered with a 16-tap FIR
//     y(n) = sum_{k=0..15} h(k) x(n-k)
// where n counts turns. There are 16 filter lanes (one per slice), each
// time-shared over 64 channels (bunches), all with the same coefficients,
// as the document describes. Samples and coefficients are 8-bit two's
// complement and the result is 20 bits. Two coefficient sets are held; the
// set is chosen per vector by `coef_sel` so the sequencer can swap them.
//
// Implementation (this design's): one history memory with an entry per
// channel holding the last 15 samples of all 16 lanes. A vector reads its
// channel's entry (clock 1), then the 256 products are summed and the
// shifted history is written back (clock 2). A per-channel valid bit,
// cleared by reset, makes unused history read as zero. A channel may not be
// presented in two consecutive clocks (in use it recurs once per turn).
// Latency: two clocks from `in_valid` to `out_valid`.
module fir_bank
  import wbfb_pkg::*;
#(
  parameter int CHANNELS = NCHAN
) (
  input  logic        clk,
  input  logic        rst,
  // coefficient write port
  input  logic        coef_we,
  input  logic        coef_set,
  input  logic [3:0]  coef_tap,
  input  logic signed [COEF_W-1:0] coef_wdata,
  // data
  input  logic        in_valid,
  input  slice_vec_t  in_vec,
  input  sideband_t   in_sb,
  input  logic        coef_sel,
  output logic        out_valid,
  output acc_vec_t    out_vec,
  output sideband_t   out_sb
);
  localparam int HW = (NTAPS-1)*SAMPLE_W;   // history bits per lane
  localparam int AW = $clog2(CHANNELS);
  typedef logic [HW-1:0] hist_lane_t;
  typedef hist_lane_t [NSLICE-1:0] hist_word_t;

  logic signed [COEF_W-1:0] coef [2][NTAPS];
  hist_word_t hist [CHANNELS];
  logic [CHANNELS-1:0] hist_vld;

  // stage 1 registers
  logic        s1_valid, s1_sel, s1_hvld;
  slice_vec_t  s1_vec;
  sideband_t   s1_sb;
  hist_word_t  s1_hist;
  logic [AW-1:0] s1_addr;

  always_ff @(posedge clk) begin
    if (coef_we) coef[coef_set][coef_tap] <= coef_wdata;
  end

  always_ff @(posedge clk) begin
    s1_hist <= hist[in_sb.chan[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0; s1_sel <= 1'b0; s1_hvld <= 1'b0;
      s1_vec <= '0; s1_sb <= '0; s1_addr <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_sel   <= coef_sel;
      s1_vec   <= in_vec;
      s1_sb    <= in_sb;
      s1_addr  <= in_sb.chan[AW-1:0];
      s1_hvld  <= hist_vld[in_sb.chan[AW-1:0]];
    end
  end

  // stage 2: multiply-accumulate and history update
  function automatic acc_t mul(input sample_t x, input logic signed [COEF_W-1:0] h);
    logic signed [SAMPLE_W+COEF_W-1:0] p;
    p = x * h;
    return acc_t'(p);
  endfunction

  hist_word_t hist_eff, hist_new;
  acc_vec_t   sums;
  always_comb begin
    hist_eff = s1_hvld ? s1_hist : '0;
    for (int l = 0; l < NSLICE; l++) begin
      hist_new[l] = {hist_eff[l][HW-SAMPLE_W-1:0], s1_vec[l]};
      sums[l] = mul(s1_vec[l], coef[s1_sel][0]);
      for (int k = 1; k < NTAPS; k++)
        sums[l] = sums[l] + mul(sample_t'(hist_eff[l][(k-1)*SAMPLE_W +: SAMPLE_W]), coef[s1_sel][k]);
    end
  end

  always_ff @(posedge clk) begin
    if (s1_valid) hist[s1_addr] <= hist_new;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist_vld <= '0; out_valid <= 1'b0; out_vec <= '0; out_sb <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        hist_vld[s1_addr] <= 1'b1;
        out_vec <= sums;
        out_sb  <= s1_sb;
      end
    end
  end
endmodule
