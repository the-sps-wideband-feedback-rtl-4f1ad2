// timing_diag: timing diagnostics. It measures the number of clocks between
// ring fiducials (the last full turn length), counts fiducials and flags a
// missing fiducial: once a first fiducial has been seen, a gap longer than
// `timeout` clocks sets the sticky `missing` flag and counts one miss, then
// the gap timer restarts. `clear` resets the flag and counters. The document
// names missing-fiducial detection as an example of these diagnostics; the
// rest is this design's.
module timing_diag (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        fid_pulse,
  input  logic [31:0] timeout,
  output logic        missing,
  output logic [15:0] miss_count,
  output logic [31:0] turn_len,
  output logic [31:0] fid_count
);
  logic [31:0] gap;
  logic        seen;
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      gap <= '0; seen <= 1'b0; missing <= 1'b0; miss_count <= '0;
      turn_len <= '0; fid_count <= '0;
    end else if (fid_pulse) begin
      if (seen) turn_len <= gap + 1'b1;
      gap <= '0; seen <= 1'b1; fid_count <= fid_count + 1'b1;
    end else if (seen) begin
      if (gap + 1'b1 > timeout) begin
        missing <= 1'b1; miss_count <= miss_count + 1'b1; gap <= '0;
      end else gap <= gap + 1'b1;
    end
  end
endmodule
