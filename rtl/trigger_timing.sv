// trigger_timing: conditions the two timing inputs, the SPS injection trigger
// and the bunch-1 marker (the once-per-turn ring fiducial). Each input passes
// a two-flop synchroniser and a rising-edge detector and leaves as a one-clock
// pulse. The document names the block and its inputs; its contents are this
// design's. Latency: the pulse follows the clock edge that first samples the rise
// by two clocks.
module trigger_timing (
  input  logic clk,
  input  logic rst,
  input  logic inj_trig,
  input  logic bunch1_marker,
  output logic inj_pulse,
  output logic fid_pulse
);
  logic [2:0] inj_sr, fid_sr;
  always_ff @(posedge clk) begin
    if (rst) begin
      inj_sr <= '0; fid_sr <= '0;
    end else begin
      inj_sr <= {inj_sr[1:0], inj_trig};
      fid_sr <= {fid_sr[1:0], bunch1_marker};
    end
  end
  assign inj_pulse = inj_sr[1] & ~inj_sr[2];
  assign fid_pulse = fid_sr[1] & ~fid_sr[2];
endmodule
