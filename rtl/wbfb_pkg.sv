// wbfb_pkg: types and constants shared by the wideband feedback processor.
// The sample format (8-bit two's complement), the 16 slices per bunch, the
// 64 filter channels, the 16 taps, the 8-bit coefficients and the 20-bit
// filter result follow the document. The 8-sample word per FPGA clock, the
// register-map encodings and the sideband record are this design's choices.
package wbfb_pkg;
  localparam int SAMPLE_W = 8;    // ADC/DAC sample width
  localparam int NSLICE   = 16;   // slices per bunch window
  localparam int NTAPS    = 16;   // FIR taps
  localparam int NCHAN    = 64;   // filter channels (bunches, or 32 doublets x 2)
  localparam int COEF_W   = 8;    // coefficient width
  localparam int ACC_W    = 20;   // filter result width
  localparam int GAIN_W   = 9;    // per-slice gain, signed, 128 = +1.0
  localparam int LANES    = 8;    // samples per FPGA clock word (2 ADCs x 4 streams)
  localparam int CHAN_W   = $clog2(NCHAN);

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef sample_t [NSLICE-1:0]       slice_vec_t;
  typedef sample_t [LANES-1:0]        word_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  typedef acc_t [NSLICE-1:0]          acc_vec_t;

  // Output multiplexer setting (Figure 2 mux after the adder).
  typedef enum logic [1:0] {
    OM_OFF = 2'd0, OM_FEEDBACK = 2'd1, OM_EXCITATION = 2'd2, OM_FEC = 2'd3
  } out_mode_t;

  // Amplifier tail compensation.
  typedef enum logic [1:0] {
    AM_NONE = 2'd0, AM_PRE = 2'd1, AM_POST = 2'd2, AM_SPLIT = 2'd3
  } amble_mode_t;

  // Sideband that travels with every slice vector through the pipeline.
  typedef struct packed {
    logic [CHAN_W-1:0] chan;   // filter channel (bunch, or 2*doublet+half)
    logic [CHAN_W-1:0] bunch;  // bunch (or doublet) number in the turn
    logic [2:0]        lend;   // lane of the window's last sample in its word
    logic              first;  // first vector of the bunch (always 1 outside doublet mode)
    logic              last;   // last vector of the bunch
  } sideband_t;

  // Run-time configuration held in the control registers.
  typedef struct packed {
    logic              doublet;      // 32 doublets x 32 slices instead of 64 bunches x 16
    out_mode_t         out_mode;
    amble_mode_t       amble_mode;
    logic              gain_en;      // per-slice gain mode
    logic              swap_en;      // coefficient set swap by turn count
    logic [6:0]        n_bunch;      // bunches (or doublets) per turn, 1..64
    logic [19:0]       first_offset; // samples from fiducial to the first window
    logic [19:0]       spacing;      // samples between windows
    logic [3:0]        shift;        // shift gain
    logic [31:0]       start_turn;   // turns after injection before the run
    logic [31:0]       run_turns;    // run length in turns, 0 = until abort
    logic [31:0]       swap_start;   // turns into the run when set B starts
    logic [31:0]       swap_len;     // turns set B stays
    logic [CHAN_W-1:0] exc_chan;     // excited channel
    logic [31:0]       exc_start;    // turn after injection when playback starts
    logic [16:0]       exc_len;      // playback length in turns
    logic [CHAN_W-1:0] snap_chan;    // recorded channel
    logic [31:0]       snap_start;   // turn after injection when recording starts
    logic [16:0]       snap_len;     // recording length in turns
    logic [31:0]       fid_timeout;  // clocks without fiducial counted as missing
    logic [NCHAN-1:0]  bunch_en;     // bunches that receive feedback
  } cfg_t;

  // Status read back through the control registers.
  typedef struct packed {
    logic [2:0]  master_state;
    logic        run;
    logic        snap_recording;
    logic        snap_done;
    logic        missing_fid;
    logic        in_fifo_err;
    logic        out_fifo_overflow;
    logic        dac_underflow;
    logic [31:0] turn;
    logic [16:0] snap_count;
    logic [15:0] miss_count;
    logic [31:0] turn_len;
    logic [31:0] fid_count;
  } status_t;

  // Saturate a wide signed value to one sample.
  function automatic sample_t sat8(input logic signed [31:0] v);
    if (v > 32'sd127)       return sample_t'(8'sd127);
    else if (v < -32'sd128) return sample_t'(-8'sd128);
    else                    return sample_t'(v[7:0]);
  endfunction
endpackage
