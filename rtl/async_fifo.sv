// async_fifo: dual-clock FIFO that carries the corrected sample words from the
// processing clock to the DAC clock; the document assigns the clock-domain
// crossing between ADC and DAC to this output FIFO. The construction is the
// usual one (this design's choice): binary pointers in each domain, Gray-coded
// copies passed through two-flop synchronisers, full and empty computed from
// the synchronised Gray pointers. Reads are first-word fall-through. The read
// side also reports a conservative fill level for the DAC start-up priming.
module async_fifo #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic             overflow,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic [$clog2(DEPTH):0] rlevel
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW-1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  logic [AW:0] wbin_nx;
  assign wbin_nx = wbin + 1'b1;
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  always_ff @(posedge wclk) begin
    if (push && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (push && !full) begin
        wbin  <= wbin_nx;
        wgray <= wbin_nx ^ (wbin_nx >> 1);
      end
      if (push && full) overflow <= 1'b1;
    end
  end

  // read domain
  logic [AW:0] rbin_nx;
  assign rbin_nx = rbin + 1'b1;
  assign empty  = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];
  assign rlevel = gray2bin(wgray_r2) - rbin;
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (pop && !empty) begin
        rbin  <= rbin_nx;
        rgray <= rbin_nx ^ (rbin_nx >> 1);
      end
    end
  end
endmodule
