// out_mixer: the adder and multiplexer in front of the DAC logic. For each
// bunch vector it forms the feedback part (zero unless the bunch is enabled
// for feedback), the excitation part (zero unless excitation is playing and
// the vector belongs to the excited channel), and selects feedback only,
// excitation only, or their saturated sum (the document's FEC mode), or
// nothing. Outside a run (`run` low) the output is zero. Latency: one clock.
module out_mixer
  import wbfb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  out_mode_t   mode,
  input  logic        run,
  input  logic [NCHAN-1:0] bunch_en,
  input  logic        exc_active,
  input  logic [CHAN_W-1:0] exc_chan,
  input  slice_vec_t  exc_vec,
  input  logic        in_valid,
  input  slice_vec_t  in_vec,
  input  sideband_t   in_sb,
  output logic        out_valid,
  output slice_vec_t  out_vec,
  output sideband_t   out_sb,
  output logic        fb_used,    // pulse: a feedback vector went out
  output logic        exc_used    // pulse: an excitation vector went out
);
  slice_vec_t fb, ex, mix;
  logic fb_on, ex_on;
  always_comb begin
    fb_on = bunch_en[in_sb.bunch] && run && (mode == OM_FEEDBACK || mode == OM_FEC);
    ex_on = exc_active && (in_sb.chan == exc_chan) && run && (mode == OM_EXCITATION || mode == OM_FEC);
    for (int i = 0; i < NSLICE; i++) begin
      fb[i]  = fb_on ? in_vec[i] : '0;
      ex[i]  = ex_on ? exc_vec[i] : '0;
      mix[i] = sat8(32'(fb[i]) + 32'(ex[i]));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_vec <= '0; out_sb <= '0; fb_used <= 1'b0; exc_used <= 1'b0;
    end else begin
      out_valid <= in_valid;
      fb_used   <= in_valid && fb_on;
      exc_used  <= in_valid && ex_on;
      if (in_valid) begin
        out_vec <= mix;
        out_sb  <= in_sb;
      end
    end
  end
endmodule
