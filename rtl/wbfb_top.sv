// wbfb_top: FPGA gateware of the wideband intra-bunch feedback processor.
//
// Data path (processing clock `clk`, one 8-sample word per clock):
//   adc_logic -> input FIFO -> slice_gather -> fir_bank -> slice_gain ->
//   shift_sat -> out_mixer (+ excitation memory) -> dac_formatter ->
//   output FIFO (to `dac_clk`) -> dac_logic -> four DAC streams.
// The ADC/DSP controller cuts each bunch's 16-slice window out of the stream;
// the raw window of one chosen channel also goes to the snapshot memory.
// Control: trigger_timing conditions the injection trigger and bunch-1 marker,
// master_fsm sequences the run and the coefficient swap, adc_dsp_ctrl and
// dac_ctrl run the two sides, timing_diag watches the fiducials, ctrl_regs
// holds the host-visible registers (bus brought out as ports; the USB device
// interface is outside). All processing latencies are fixed: the correction
// for a window leaves at the window's own position in the output word stream,
// whose word m lines up with input stream word m-5 (both counted from the
// first word after reset); the pre-amble room of 16 samples is part of that lag.
// Block structure follows the document's block diagram; the clocking (one
// processing clock plus a DAC clock), word width and latencies are this
// design's.
module wbfb_top
  import wbfb_pkg::*;
#(
  parameter int EXC_DEPTH  = 65536,
  parameter int SNAP_DEPTH = 65536,
  parameter int IN_FIFO_DEPTH  = 16,
  parameter int OUT_FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        dac_clk,
  input  logic        dac_rst,
  // ADCs: two time-interleaved converters, four streams each
  input  logic [SAMPLE_W-1:0] adc1_data [4],
  input  logic [SAMPLE_W-1:0] adc2_data [4],
  input  logic        adc_valid,
  // timing inputs
  input  logic        inj_trig,
  input  logic        bunch1_marker,
  // host register bus
  input  logic        reg_we,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // DAC: four streams, two samples per stream per clock
  output sample_t     dac_data [4][2],
  output logic        dac_streaming,
  // event pulses for monitoring
  output logic        ev_fire,
  output logic        ev_fb,
  output logic        ev_exc,
  output logic        ev_amble,
  output logic        ev_swap
);
  localparam int EXC_AW  = $clog2(EXC_DEPTH);
  localparam int SNAP_AW = $clog2(SNAP_DEPTH);

  cfg_t    cfg;
  status_t status;
  logic signed [GAIN_W-1:0] gain [NSLICE];
  sample_t pattern [NSLICE];
  logic arm, abort, diag_clear;
  logic coef_we, coef_set; logic [3:0] coef_tap; logic signed [COEF_W-1:0] coef_wdata;
  logic exc_we; logic [EXC_AW-1:0] exc_waddr; slice_vec_t exc_wdata;
  logic [SNAP_AW-1:0] snap_raddr; slice_vec_t snap_rdata;

  // ---------------- timing and control ----------------
  logic inj_pulse, fid_pulse;
  trigger_timing u_trig (.clk, .rst, .inj_trig, .bunch1_marker, .inj_pulse, .fid_pulse);

  logic [2:0] mstate; logic [31:0] turn; logic acquire, run, coef_sel;
  master_fsm u_master (
    .clk, .rst, .arm, .abort, .inj_pulse, .fid_pulse,
    .start_turn(cfg.start_turn), .run_turns(cfg.run_turns), .swap_en(cfg.swap_en),
    .swap_start(cfg.swap_start), .swap_len(cfg.swap_len),
    .state_o(mstate), .turn, .acquire, .run, .coef_sel);

  logic missing; logic [15:0] miss_count; logic [31:0] turn_len, fid_count;
  timing_diag u_diag (.clk, .rst, .clear(diag_clear), .fid_pulse, .timeout(cfg.fid_timeout),
                      .missing, .miss_count, .turn_len, .fid_count);

  // ---------------- ADC side ----------------
  word_t a_word; logic a_valid, a_fid;
  adc_logic u_adc (.clk, .rst, .adc1_data, .adc2_data, .in_valid(adc_valid), .fid_in(fid_pulse),
                   .word(a_word), .word_valid(a_valid), .word_fid(a_fid));

  logic [LANES*SAMPLE_W:0] fifo_out;
  logic in_empty, in_err;
  sync_fifo #(.WIDTH(LANES*SAMPLE_W+1), .DEPTH(IN_FIFO_DEPTH)) u_in_fifo (
    .clk, .rst, .push(a_valid), .wdata({a_fid, a_word}), .pop(!in_empty),
    .rdata(fifo_out), .empty(in_empty), .full(), .level(), .error(in_err));

  word_t s_word; logic s_valid, s_fid;
  assign s_valid = !in_empty;
  assign s_word  = word_t'(fifo_out[LANES*SAMPLE_W-1:0]);
  assign s_fid   = fifo_out[LANES*SAMPLE_W];

  logic fire, turn_start; sideband_t fire_sb;
  adc_dsp_ctrl u_adc_ctrl (
    .clk, .rst, .acquire, .doublet(cfg.doublet), .n_bunch(cfg.n_bunch),
    .first_offset(cfg.first_offset), .spacing(cfg.spacing),
    .word_valid(s_valid), .word_fid(s_fid), .fire, .sb(fire_sb), .turn_start);

  slice_vec_t raw_vec; logic raw_valid; sideband_t raw_sb;
  slice_gather u_gather (.clk, .rst, .word(s_word), .word_valid(s_valid), .fire, .sb_in(fire_sb),
                         .vec(raw_vec), .vec_valid(raw_valid), .sb_out(raw_sb));

  logic snap_rec, snap_done; logic [SNAP_AW:0] snap_count;
  snapshot_mem #(.DEPTH(SNAP_DEPTH)) u_snap (
    .clk, .rst, .arm, .sel_chan(cfg.snap_chan), .turn, .start_turn(cfg.snap_start),
    .length((SNAP_AW+1)'(cfg.snap_len)), .in_valid(raw_valid), .in_vec(raw_vec), .in_sb(raw_sb),
    .raddr(snap_raddr), .rdata(snap_rdata), .recording(snap_rec), .done(snap_done), .count(snap_count));

  // ---------------- feedback filter ----------------
  logic f_valid; acc_vec_t f_vec; sideband_t f_sb;
  fir_bank u_fir (
    .clk, .rst, .coef_we, .coef_set, .coef_tap, .coef_wdata,
    .in_valid(raw_valid), .in_vec(raw_vec), .in_sb(raw_sb), .coef_sel,
    .out_valid(f_valid), .out_vec(f_vec), .out_sb(f_sb));

  logic g_valid; acc_vec_t g_vec; sideband_t g_sb;
  slice_gain u_gain (.clk, .rst, .enable(cfg.gain_en), .gain, .in_valid(f_valid), .in_vec(f_vec),
                     .in_sb(f_sb), .out_valid(g_valid), .out_vec(g_vec), .out_sb(g_sb));

  logic q_valid; slice_vec_t q_vec; sideband_t q_sb;
  shift_sat u_shift (.clk, .rst, .shift(cfg.shift), .in_valid(g_valid), .in_vec(g_vec), .in_sb(g_sb),
                     .out_valid(q_valid), .out_vec(q_vec), .out_sb(q_sb));

  // ---------------- excitation and output ----------------
  logic [EXC_AW-1:0] exc_raddr; logic exc_active; slice_vec_t exc_vec;
  dac_ctrl #(.AW(EXC_AW)) u_dac_ctrl (
    .clk, .rst, .run, .turn, .turn_start, .exc_start(cfg.exc_start),
    .exc_len((EXC_AW+1)'(cfg.exc_len)), .exc_addr(exc_raddr), .exc_active, .state_o());

  exc_mem #(.DEPTH(EXC_DEPTH)) u_exc (.clk, .we(exc_we), .waddr(exc_waddr), .wdata(exc_wdata),
                                     .raddr(exc_raddr), .rdata(exc_vec));

  logic m_valid; slice_vec_t m_vec; sideband_t m_sb;
  out_mixer u_mix (
    .clk, .rst, .mode(cfg.out_mode), .run, .bunch_en(cfg.bunch_en), .exc_active,
    .exc_chan(cfg.exc_chan), .exc_vec, .in_valid(q_valid), .in_vec(q_vec), .in_sb(q_sb),
    .out_valid(m_valid), .out_vec(m_vec), .out_sb(m_sb), .fb_used(ev_fb), .exc_used(ev_exc));

  // stream slot of the word that is leaving the pipeline (gather, fir x2, gain, shift, mixer)
  logic [5:0] adv_dly;
  always_ff @(posedge clk) begin
    if (rst) adv_dly <= '0;
    else     adv_dly <= {adv_dly[4:0], s_valid};
  end

  word_t o_word; logic o_valid;
  dac_formatter u_fmt (
    .clk, .rst, .adv(adv_dly[5]), .amble_mode(cfg.amble_mode), .pattern,
    .in_valid(m_valid), .in_vec(m_vec), .in_sb(m_sb),
    .out_word(o_word), .out_valid(o_valid), .amble_used(ev_amble));

  logic out_overflow, out_empty, out_pop; word_t out_rdata;
  logic [$clog2(OUT_FIFO_DEPTH):0] out_level;
  async_fifo #(.WIDTH(LANES*SAMPLE_W), .DEPTH(OUT_FIFO_DEPTH)) u_out_fifo (
    .wclk(clk), .wrst(rst), .push(o_valid), .wdata(o_word), .full(), .overflow(out_overflow),
    .rclk(dac_clk), .rrst(dac_rst), .pop(out_pop), .rdata(out_rdata), .empty(out_empty),
    .rlevel(out_level));

  logic underflow_d;
  dac_logic #(.FIFO_DEPTH(OUT_FIFO_DEPTH), .PRIME(OUT_FIFO_DEPTH/2)) u_dac (
    .clk(dac_clk), .rst(dac_rst), .fifo_data(out_rdata), .fifo_empty(out_empty),
    .fifo_level(out_level), .fifo_pop(out_pop), .dac_data, .streaming(dac_streaming),
    .underflow(underflow_d));

  logic [1:0] underflow_sync;
  always_ff @(posedge clk) begin
    if (rst) underflow_sync <= '0;
    else     underflow_sync <= {underflow_sync[0], underflow_d};
  end

  // ---------------- registers ----------------
  always_comb begin
    status = '0;
    status.master_state      = mstate;
    status.run               = run;
    status.snap_recording    = snap_rec;
    status.snap_done         = snap_done;
    status.missing_fid       = missing;
    status.in_fifo_err       = in_err;
    status.out_fifo_overflow = out_overflow;
    status.dac_underflow     = underflow_sync[1];
    status.turn              = turn;
    status.snap_count        = 17'(snap_count);
    status.miss_count        = miss_count;
    status.turn_len          = turn_len;
    status.fid_count         = fid_count;
  end

  ctrl_regs #(.EXC_AW(EXC_AW), .SNAP_AW(SNAP_AW)) u_regs (
    .clk, .rst, .we(reg_we), .addr(reg_addr), .wdata(reg_wdata), .rdata(reg_rdata),
    .cfg, .gain, .pattern, .arm, .abort, .diag_clear,
    .coef_we, .coef_set, .coef_tap, .coef_wdata,
    .exc_we, .exc_waddr, .exc_wdata, .snap_raddr, .snap_rdata, .status);

  assign ev_fire = fire;
  assign ev_swap = run && coef_sel;
endmodule
