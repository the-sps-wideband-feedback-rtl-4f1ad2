// slice_gain: optional per-slice gain applied to the filter results, so each
// slice of the bunch can get its own feedback gain and sign in the range
// +1 .. -1 (document). Gains are 9-bit signed with 128 meaning +1.0 and -128
// meaning -1.0 (format chosen here); out = (in * gain) >>> 7, rounding toward
// minus infinity. With `enable` low the vector passes unchanged. Latency: one
// clock; the sideband travels along.
module slice_gain
  import wbfb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic signed [GAIN_W-1:0] gain [NSLICE],
  input  logic       in_valid,
  input  acc_vec_t   in_vec,
  input  sideband_t  in_sb,
  output logic       out_valid,
  output acc_vec_t   out_vec,
  output sideband_t  out_sb
);
  acc_vec_t scaled;
  always_comb begin
    for (int i = 0; i < NSLICE; i++) begin
      logic signed [ACC_W+GAIN_W-1:0] p;
      p = in_vec[i] * gain[i];
      scaled[i] = enable ? acc_t'(p >>> 7) : in_vec[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_vec <= '0; out_sb <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_vec <= scaled;
        out_sb  <= in_sb;
      end
    end
  end
endmodule
