// snapshot_mem: diagnostic recorder. It stores all 16 raw ADC samples of one
// selected channel once per turn, for up to DEPTH turns (65536 in the
// document), starting at a programmed turn after injection. Recording is armed
// by `arm`; the first vector of the selected channel seen at or after turn
// `start_turn` goes to address 0, and recording stops after `length` entries
// (`done` then rises). The host reads entries through `raddr`/`rdata`
// (registered read, one clock). Arming and start-turn control are this
// design's choices.
module snapshot_mem
  import wbfb_pkg::*;
#(
  parameter int DEPTH = 65536
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     arm,
  input  logic [CHAN_W-1:0]        sel_chan,
  input  logic [31:0]              turn,
  input  logic [31:0]              start_turn,
  input  logic [$clog2(DEPTH):0]   length,
  input  logic                     in_valid,
  input  slice_vec_t               in_vec,
  input  sideband_t                in_sb,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output slice_vec_t               rdata,
  output logic                     recording,
  output logic                     done,
  output logic [$clog2(DEPTH):0]   count
);
  slice_vec_t mem [DEPTH];
  logic take;
  assign take = recording && in_valid && (in_sb.chan == sel_chan) && (turn >= start_turn);

  always_ff @(posedge clk) begin
    if (take) mem[count[$clog2(DEPTH)-1:0]] <= in_vec;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      recording <= 1'b0; done <= 1'b0; count <= '0;
    end else if (arm) begin
      recording <= (length != 0); done <= (length == 0); count <= '0;
    end else if (take) begin
      count <= count + 1'b1;
      if (count + 1'b1 == length) begin
        recording <= 1'b0; done <= 1'b1;
      end
    end
  end
endmodule
