// dac_logic: DAC-clock side of the output path. It drains the output FIFO and
// drives the DAC's four parallel data streams. At start-up, or after the FIFO
// ran dry, it waits until PRIME words are buffered (PRIME state) and then
// takes one word per clock (STREAM state); an empty FIFO while streaming sets
// the sticky `underflow` flag, sends zeros and re-primes. Each 8-sample word is
// split over the four streams as two samples per stream per clock, stream s
// carrying samples s and s+4 (rising then falling edge). The document gives
// the four LVDS streams; the priming and the lane order are this design's.
// Latency: one clock from FIFO word to `dac_data`.
module dac_logic
  import wbfb_pkg::*;
#(
  parameter int FIFO_DEPTH = 16,
  parameter int PRIME      = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  word_t       fifo_data,
  input  logic        fifo_empty,
  input  logic [$clog2(FIFO_DEPTH):0] fifo_level,
  output logic        fifo_pop,
  output sample_t     dac_data [4][2],
  output logic        streaming,
  output logic        underflow
);
  typedef enum logic {S_PRIME, S_STREAM} state_t;
  state_t state;

  assign fifo_pop = (state == S_STREAM) && !fifo_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_PRIME; underflow <= 1'b0;
      for (int s = 0; s < 4; s++) begin dac_data[s][0] <= '0; dac_data[s][1] <= '0; end
    end else begin
      case (state)
        S_PRIME:  if (int'(fifo_level) >= PRIME) state <= S_STREAM;
        S_STREAM: if (fifo_empty) begin state <= S_PRIME; underflow <= 1'b1; end
        default:  state <= S_PRIME;
      endcase
      for (int s = 0; s < 4; s++) begin
        dac_data[s][0] <= fifo_pop ? fifo_data[s]   : '0;
        dac_data[s][1] <= fifo_pop ? fifo_data[s+4] : '0;
      end
    end
  end
  assign streaming = (state == S_STREAM);
endmodule
