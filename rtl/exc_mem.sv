// exc_mem: excitation (arbitrary waveform) memory. Each entry is one turn's
// 16-sample waveform for the excited bunch; the DAC controller steps the read
// address once per turn while playback runs. The memory is loaded from the
// control registers (the document loads it from a file through the host link).
// The depth is not given in the document; 65536 turns, the same as the
// snapshot memory, is chosen here. Write: one entry per `we`. Read: registered,
// one clock after `raddr`.
module exc_mem
  import wbfb_pkg::*;
#(
  parameter int DEPTH = 65536
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  slice_vec_t               wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output slice_vec_t               rdata
);
  slice_vec_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
