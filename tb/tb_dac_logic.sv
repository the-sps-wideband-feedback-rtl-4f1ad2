// Testbench for dac_logic with a FIFO model: checks that streaming starts
// only after PRIME words are buffered, that the words come out in order split
// over the four streams (stream s: samples s and s+4), and that a dry FIFO
// raises `underflow` and re-primes.
`include "tb_check.svh"
module tb_dac_logic;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  word_t q [$]; word_t fifo_data; logic fifo_empty, fifo_pop, streaming, underflow; logic [4:0] fifo_level;
  sample_t dac_data [4][2];
  dac_logic #(.FIFO_DEPTH(16), .PRIME(8)) dut (.clk, .rst, .fifo_data, .fifo_empty, .fifo_level, .fifo_pop,
                                             .dac_data, .streaming, .underflow);
  always_comb begin
    fifo_empty = (q.size() == 0);
    fifo_level = 5'(q.size());
    fifo_data  = (q.size() > 0) ? q[0] : '0;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int nin = 0, nout = 0; logic popped; word_t w;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // fill slowly: no pop before 8 words
    for (int n = 0; n < 7; n++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) w[l] = sample_t'(8*nin + l);
      q.push_back(w); nin++;
      #1 `CHECK(fifo_pop, 1'b0, "no pop while priming")
    end
    repeat (3) begin @(negedge clk); #1 `CHECK(streaming, 1'b0, "still priming with 7 words") end
    // now one word in, one word out per clock; the word taken at a clock
    // edge is on the DAC outputs at the following falling edge
    popped = 0;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      if (popped) begin
        void'(q.pop_front());
        for (int s = 0; s < 4; s++) begin
          `CHECK(dac_data[s][0], sample_t'(8*nout + s), "stream rising")
          `CHECK(dac_data[s][1], sample_t'(8*nout + s + 4), "stream falling")
        end
        nout++;
      end
      for (int l = 0; l < LANES; l++) w[l] = sample_t'(8*nin + l);
      q.push_back(w); nin++;
      #1 popped = fifo_pop;
    end
    `CHECK(nout > 80, 1'b1, "streamed")
    `CHECK(underflow, 1'b0, "no underflow yet")
    // stop feeding: the FIFO runs dry
    repeat (20) begin @(negedge clk); if (popped) void'(q.pop_front()); #1 popped = fifo_pop; end
    `CHECK(underflow, 1'b1, "underflow flagged")
    `CHECK(streaming, 1'b0, "back to priming")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
