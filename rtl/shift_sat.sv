// shift_sat: scales the 20-bit filter results into the 8-bit DAC window. Each
// slice is shifted right arithmetically by a programmable amount and then
// saturated to full scale in the direction of the overflow, as the document
// describes. The shift range 0..15 is this design's choice. Latency: one clock.
module shift_sat
  import wbfb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] shift,
  input  logic       in_valid,
  input  acc_vec_t   in_vec,
  input  sideband_t  in_sb,
  output logic       out_valid,
  output slice_vec_t out_vec,
  output sideband_t  out_sb
);
  slice_vec_t res;
  always_comb begin
    for (int i = 0; i < NSLICE; i++) begin
      acc_t s;
      s = in_vec[i] >>> shift;
      res[i] = sat8(32'(s));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_vec <= '0; out_sb <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_vec <= res;
        out_sb  <= in_sb;
      end
    end
  end
endmodule
