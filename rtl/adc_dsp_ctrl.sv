// adc_dsp_ctrl: second-level state machine for the ADC/DSP side. It follows
// the sample stream word by word and, in each turn, tells the slice gatherer
// when a bunch window is complete. The fiducial flag travels with the word it
// arrived in; that word's lane 0 is sample 0 of the turn. Bunch b's window is
// the 16 samples starting at first_offset + b*spacing. In doublet mode a
// window is 32 samples and is handed on as two 16-slice vectors on channels
// 2b and 2b+1 (the document: up to 32 doublets, parameters doubled), so the 64
// filter channels serve 64 bunches or 32 doublets.
//   IDLE -> WAIT_FID when `acquire` rises; WAIT_FID -> SCAN on a fiducial word;
//   SCAN -> WAIT_FID after the last bunch; any -> IDLE when `acquire` falls.
// `fire` is asserted in the clock whose word holds a window's last sample,
// with that sample's lane in sb.lend. spacing must be at least 32 samples and
// windows must not pass the next fiducial (this design's limits).
module adc_dsp_ctrl
  import wbfb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        acquire,
  input  logic        doublet,
  input  logic [6:0]  n_bunch,       // 1..64 bunches, 1..32 doublets
  input  logic [19:0] first_offset,  // samples from fiducial to bunch 0 window
  input  logic [19:0] spacing,       // samples between bunch windows
  input  logic        word_valid,
  input  logic        word_fid,
  output logic        fire,
  output sideband_t   sb,
  output logic        turn_start     // pulse: a fiducial word was seen while acquiring
);
  typedef enum logic [1:0] {IDLE, WAIT_FID, SCAN} state_t;
  state_t state;
  logic [19:0] pos;        // index of the current word in the turn
  logic [19:0] base;       // first sample of the current bunch window
  logic [19:0] wend;       // last sample of the current vector
  logic [CHAN_W-1:0] bunch;
  logic half;

  // values seen by the current word: a fiducial word restarts the turn
  logic              restart;
  logic [19:0]       cur_pos, cur_end, cur_base;
  logic [CHAN_W-1:0] cur_bunch;
  logic              cur_half, hit;
  always_comb begin
    restart   = word_fid && state != IDLE;
    cur_pos   = restart ? 20'd0 : pos;
    cur_base  = restart ? first_offset : base;
    cur_end   = restart ? first_offset + 20'd15 : wend;
    cur_bunch = restart ? '0 : bunch;
    cur_half  = restart ? 1'b0 : half;
    hit       = word_valid && (state == SCAN || restart) && (cur_end[19:3] == cur_pos[16:0]);
    fire       = hit;
    sb.lend    = cur_end[2:0];
    sb.bunch   = cur_bunch;
    sb.chan    = doublet ? {cur_bunch[CHAN_W-2:0], cur_half} : cur_bunch;
    sb.first   = !doublet || !cur_half;
    sb.last    = !doublet || cur_half;
    turn_start = word_valid && restart;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; pos <= '0; base <= '0; wend <= '0; bunch <= '0; half <= 1'b0;
    end else if (!acquire) begin
      state <= IDLE;
    end else if (word_valid) begin
      pos   <= cur_pos + 1'b1;
      base  <= cur_base;
      wend  <= cur_end;
      bunch <= cur_bunch;
      half  <= cur_half;
      if (state == IDLE) state <= WAIT_FID;
      else if (restart) state <= SCAN;
      if (hit) begin
        if (doublet && !cur_half) begin
          // first half of a doublet: the second half ends 16 samples later
          half <= 1'b1;
          wend <= cur_end + 20'd16;
        end else begin
          half  <= 1'b0;
          bunch <= cur_bunch + 1'b1;
          base  <= cur_base + spacing;
          wend  <= cur_base + spacing + 20'd15;
          if (7'(cur_bunch) + 7'd1 >= n_bunch) state <= WAIT_FID;
        end
      end
    end
  end
endmodule
