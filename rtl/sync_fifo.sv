// sync_fifo: single-clock FIFO used as the input buffer of the DSP pipeline.
// The document places a FIFO at the pipeline input; its depth and width are
// not given, so both are parameters. Storage is an array with a registered
// write and a combinational (first-word fall-through) read; pointers carry one
// extra bit to tell full from empty. Pushing when full or popping when empty
// is ignored and raises a sticky error flag.
module sync_fifo #(
  parameter int WIDTH = 65,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] level,
  output logic             error
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;

  assign level = wptr - rptr;
  assign empty = (wptr == rptr);
  assign full  = (level == (AW+1)'(DEPTH));
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      error <= 1'b0;
    end else begin
      if (push && !full) wptr <= wptr + 1'b1;
      if (pop && !empty) rptr <= rptr + 1'b1;
      if ((push && full) || (pop && empty)) error <= 1'b1;
    end
  end
endmodule
