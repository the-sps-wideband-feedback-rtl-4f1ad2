// adc_logic: joins the two time-interleaved 2 GSa/s ADCs into one 4 GSa/s
// sample stream. Each ADC delivers four parallel 8-bit streams per FPGA clock
// (the four lines per ADC of the block diagram). ADC2 samples half a sample
// clock after ADC1, so the merged word is ADC1 s0, ADC2 s0, ADC1 s1, ADC2 s1,
// ... in time order (lane 0 earliest). Raw codes are offset binary and are
// turned into two's complement by inverting the MSB; the document states only
// that all data is processed in two's complement, the raw code format is this
// design's assumption. The bunch-1 marker pulse is registered alongside the
// word it arrived with, so it travels with the data through the input FIFO.
// Latency: one clock.
module adc_logic
  import wbfb_pkg::*;
#(
  parameter int STREAMS = 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [SAMPLE_W-1:0]     adc1_data [STREAMS],
  input  logic [SAMPLE_W-1:0]     adc2_data [STREAMS],
  input  logic                    in_valid,
  input  logic                    fid_in,
  output word_t                   word,
  output logic                    word_valid,
  output logic                    word_fid
);
  word_t merged;
  always_comb begin
    for (int i = 0; i < STREAMS; i++) begin
      merged[2*i]   = sample_t'({~adc1_data[i][SAMPLE_W-1], adc1_data[i][SAMPLE_W-2:0]});
      merged[2*i+1] = sample_t'({~adc2_data[i][SAMPLE_W-1], adc2_data[i][SAMPLE_W-2:0]});
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      word       <= '0;
      word_valid <= 1'b0;
      word_fid   <= 1'b0;
    end else begin
      word       <= merged;
      word_valid <= in_valid;
      word_fid   <= fid_in & in_valid;
    end
  end
endmodule
