// End-to-end testbench for wbfb_top at its default parameters.
//
// It drives two ADCs with a synthetic beam (short turns of 128 words, a
// bunch-1 marker per turn, random background samples and random bunch
// slices), programs the processor through the register bus and runs two
// measurement sequences:
//   1. 4 bunches, feedback + excitation combined (FEC), per-slice gains,
//      coefficient swap for two turns, pre-amble, one bunch masked, snapshot
//      of bunch 1 over 4 turns;
//   2. 3 doublets (32-sample windows on two filter channels), feedback only,
//      split amble, then a dropped fiducial.
// A behavioural model in the testbench (FIR over turns per channel and slice,
// gain, shift/saturate, mixer, ambles, window placement) predicts every DAC
// sample; the DAC stream is compared word by word (DAC word m carries stream
// word m-5). Snapshot contents and status flags are read back over the bus.
// Each mechanism (feedback, excitation, swap, amble, saturation, doublets,
// snapshot, missing fiducial) must occur at least once.
`include "tb_check.svh"
module tb_wbfb_top;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, dac_clk = 0, rst = 1, dac_rst = 1;
  always #5 clk = ~clk;
  initial begin #3; forever #5 dac_clk = ~dac_clk; end

  logic [7:0] adc1 [4], adc2 [4]; logic adc_valid, inj_trig, bunch1_marker;
  logic reg_we; logic [7:0] reg_addr; logic [31:0] reg_wdata, reg_rdata;
  sample_t dac_data [4][2]; logic dac_streaming, ev_fire, ev_fb, ev_exc, ev_amble, ev_swap;
  wbfb_top dut (.clk, .rst, .dac_clk, .dac_rst, .adc1_data(adc1), .adc2_data(adc2), .adc_valid,
    .inj_trig, .bunch1_marker, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .dac_data, .dac_streaming,
    .ev_fire, .ev_fb, .ev_exc, .ev_amble, .ev_swap);

  localparam int TURNW = 128;           // words per turn
  localparam int OUT_LAG = 5;           // DAC word m carries stream word m-OUT_LAG
  localparam int NWORDS = 30 * TURNW;
  int adc_s [NWORDS*8];                 // every sample sent
  int marker_word [$];                  // ADC word indices driven with a marker rise
  int inj_word [$];
  int expo [int];                       // expected output sample by stream sample index

  // register write queue, one write per clock
  typedef struct { logic [7:0] a; logic [31:0] d; } wr_t;
  wr_t wq [$];

  // event counters
  int n_fire = 0, n_fb = 0, n_exc = 0, n_amble = 0, n_swap = 0;
  always @(posedge clk) if (!rst) begin
    n_fire += ev_fire; n_fb += ev_fb; n_exc += ev_exc; n_amble += ev_amble; n_swap += ev_swap;
  end

  // DAC capture: the word popped at one edge is on dac_data after it
  sample_t dac_words [$][8];
  logic was_streaming = 0;
  always @(posedge dac_clk) begin
    if (was_streaming) begin
      sample_t w [8];
      for (int s = 0; s < 4; s++) begin w[s] = dac_data[s][0]; w[s+4] = dac_data[s][1]; end
      dac_words.push_back(w);
    end
    was_streaming = dac_streaming && !dac_rst;
  end

  initial begin
    #4000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // -------- stimulus ----------
  // window contents: x values at bunch slices of each turn, set before the word loop
  int win_x [int];                      // sample index -> slice value
  int wcount = 0;

  task automatic push_wr(input logic [7:0] a, input logic [31:0] d);
    wr_t w; w.a = a; w.d = d; wq.push_back(w);
  endtask

  task automatic drive_words(input int n, input bit drop_marker = 0);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      adc_valid = 1;
      for (int l = 0; l < 8; l++) begin
        int idx, v;
        idx = 8*wcount + l;
        v = win_x.exists(idx) ? win_x[idx] : int'($urandom % 256) - 128;
        adc_s[idx] = v;
        if (l % 2 == 0) adc1[l/2] = 8'(v + 128); else adc2[l/2] = 8'(v + 128);
      end
      bunch1_marker = (wcount % TURNW >= 10 && wcount % TURNW < 14) && !drop_marker;
      if (wcount % TURNW == 10 && !drop_marker) marker_word.push_back(wcount);
      if (wq.size() > 0) begin wr_t w; w = wq.pop_front(); reg_we = 1; reg_addr = w.a; reg_wdata = w.d; end
      else reg_we = 0;
      wcount++;
    end
  endtask

  // planned windows: fill win_x for turn j with the current layout
  task automatic plan_turn(input int j, input int nb, input int off, input int sp, input bit dbl);
    int f; f = TURNW*j + 12;            // fiducial word of turn j
    for (int b = 0; b < nb; b++) for (int s = 0; s < (dbl ? 32 : 16); s++)
      win_x[8*f + off + b*sp + s] = int'($urandom % 101) - 50;
  endtask

  // -------- reference model ----------
  int h [2][16];
  int gains [16];
  int pat [16];
  int exc_data [3][16];
  int hist [64][16][$];
  int n_sat = 0, n_dbl = 0, n_model_fb = 0;
  function automatic int sat(int v); return v > 127 ? 127 : (v < -128 ? -128 : v); endfunction

  // process one vector through the model and place the output
  task automatic model_vec(input int ws, input int chan, input int bunch, input bit first, input bit last,
      input bit run, input bit csel, input bit gain_en, input int sh, input int mode, input logic [63:0] ben,
      input bit exc_act, input int exc_chan, input int exc_addr, input int amode);
    int y [16]; int m [16]; int tot, mean; int amb [16];
    for (int s = 0; s < 16; s++) begin
      int acc;
      hist[chan][s].push_front(adc_s[ws + s]);
      acc = 0;
      for (int k = 0; k < 16 && k < hist[chan][s].size(); k++) acc += h[csel][k] * hist[chan][s][k];
      if (gain_en) acc = (acc * gains[s]) >>> 7;
      acc = acc >>> sh;
      if (acc > 127 || acc < -128) n_sat++;
      y[s] = sat(acc);
    end
    tot = 0;
    for (int s = 0; s < 16; s++) begin
      int fb, ex;
      fb = (run && ben[bunch] && (mode == 1 || mode == 3)) ? y[s] : 0;
      ex = (run && exc_act && chan == exc_chan && (mode == 2 || mode == 3)) ? exc_data[exc_addr][s] : 0;
      m[s] = sat(fb + ex);
      tot += m[s];
      expo[ws + s] = m[s];
    end
    if (run && ben[bunch] && (mode == 1 || mode == 3)) n_model_fb++;
    mean = tot >>> 4;
    for (int s = 0; s < 16; s++) amb[s] = sat((mean * pat[s]) >>> 7);
    if (first && amode == 1) for (int s = 0; s < 16; s++) expo[ws - 16 + s] = amb[s];
    if (first && amode == 3) for (int s = 0; s < 8; s++)  expo[ws - 8 + s] = amb[s];
    if (last && amode == 2)  for (int s = 0; s < 16; s++) expo[ws + 16 + s] = amb[s];
    if (last && amode == 3)  for (int s = 0; s < 8; s++)  expo[ws + 16 + s] = amb[8 + s];
  endtask

  initial begin
    logic [31:0] d;
    adc_valid = 0; inj_trig = 0; bunch1_marker = 0; reg_we = 0; reg_addr = 0; reg_wdata = 0;
    for (int i = 0; i < 4; i++) begin adc1[i] = 8'h80; adc2[i] = 8'h80; end
    for (int k = 0; k < 16; k++) begin
      h[0][k] = (k < 6) ? int'($urandom % 17) - 8 : 0;
      h[1][k] = -h[0][k];
      gains[k] = int'($urandom % 257) - 128;
      pat[k] = (k % 2) ? -100 : 100;
    end
    for (int a = 0; a < 3; a++) for (int s = 0; s < 16; s++) exc_data[a][s] = int'($urandom % 161) - 80;
    repeat (3) @(posedge clk); @(negedge clk); rst = 0; dac_rst = 0;

    // ---- sequence 1 ----
    for (int s = 0; s < 2; s++) for (int k = 0; k < 16; k++) push_wr(8'h20 + 8'(16*s + k), 32'(h[s][k]));
    for (int k = 0; k < 16; k++) begin push_wr(8'h40 + 8'(k), 32'(gains[k])); push_wr(8'h50 + 8'(k), 32'(pat[k])); end
    push_wr(8'h60, 0);
    for (int a = 0; a < 3; a++) begin
      for (int q = 0; q < 4; q++)
        push_wr(8'h61 + 8'(q), {8'(exc_data[a][4*q+3]), 8'(exc_data[a][4*q+2]), 8'(exc_data[a][4*q+1]), 8'(exc_data[a][4*q])});
      push_wr(8'h65, 0);
    end
    push_wr(8'h01, {25'd0, 1'b1, 1'b1, 2'(AM_PRE), 2'(OM_FEC), 1'b0});
    push_wr(8'h02, 4); push_wr(8'h03, 20); push_wr(8'h04, 100); push_wr(8'h05, 5);
    push_wr(8'h06, 2); push_wr(8'h07, 8); push_wr(8'h08, 3); push_wr(8'h09, 2);
    push_wr(8'h0A, 2); push_wr(8'h0B, 4); push_wr(8'h0C, 3);
    push_wr(8'h0D, 1); push_wr(8'h0E, 3); push_wr(8'h0F, 4); push_wr(8'h10, 200);
    push_wr(8'h11, 32'h7); push_wr(8'h12, 0);
    push_wr(8'h00, 1);                                   // arm
    for (int j = 0; j < 13; j++) plan_turn(j, 4, 20, 100, 0);
    drive_words(TURNW + 60);                             // turn 0 and into turn 1
    inj_trig = 1; drive_words(4); inj_trig = 0;
    drive_words(11*TURNW - 64 + 100);                    // up to word 100 of turn 12
    // ---- sequence 2: doublets ----
    push_wr(8'h00, 2);                                   // abort
    push_wr(8'h01, {25'd0, 1'b0, 1'b0, 2'(AM_SPLIT), 2'(OM_FEEDBACK), 1'b1});
    push_wr(8'h02, 3); push_wr(8'h05, 2); push_wr(8'h06, 1); push_wr(8'h07, 4); push_wr(8'h0F, 0);
    push_wr(8'h00, 1);                                   // arm
    for (int j = 13; j < 20; j++) plan_turn(j, 3, 20, 100, 1);
    drive_words(TURNW - 100 + 60);                       // into turn 13
    inj_trig = 1; drive_words(4); inj_trig = 0;
    drive_words(6*TURNW - 64);                            // to the end of turn 18
    drive_words(TURNW, 1);                                // turn 19: marker dropped
    drive_words(3*TURNW);

    // ---- model ----
    // sequence 1: the arm command lands in turn 0 after its fiducial, so turns 1..10
    // are acquired; injection in turn 1 after its fiducial -> master turn t = j-1;
    // run for t = 2..9, DONE (no acquisition) from turn 11
    for (int j = 1; j <= 10; j++) begin
      int t, f; bit run, csel, ea; int ea_addr;
      f = marker_word[j] + 2;
      t = j - 1; run = (j >= 1) && t >= 2 && t < 10;
      csel = run && (t - 2 >= 3) && (t - 2 < 5);
      ea = run && t >= 4 && t < 7; ea_addr = t - 4;
      for (int b = 0; b < 4; b++)
        model_vec(8*f + 20 + 100*b, b, b, 1, 1, run, csel, 1, 5, 3, 64'h7, ea, 2, ea_addr, 1);
    end
    // sequence 2: armed in turn 12 after its windows, injection in turn 13 after its
    // fiducial -> t = j-13; run for t = 1..4, DONE from turn 18
    for (int j = 13; j <= 17; j++) begin
      int t, f; bit run;
      f = marker_word[j] + 2;
      t = j - 13; run = t >= 1 && t < 5;
      for (int b = 0; b < 3; b++) begin
        model_vec(8*f + 20 + 100*b, 2*b, b, 1, 0, run, 0, 0, 2, 1, 64'h7, 0, 0, 0, 3);
        model_vec(8*f + 20 + 100*b + 16, 2*b + 1, b, 0, 1, run, 0, 0, 2, 1, 64'h7, 0, 0, 0, 3);
        n_dbl += 2;
      end
    end

    // ---- compare the DAC stream ----
    begin
      int nonzero = 0;
      `CHECK(dac_words.size() > 20*TURNW, 1'b1, "DAC words streamed")
      for (int m = OUT_LAG; m < dac_words.size(); m++) for (int l = 0; l < 8; l++) begin
        int idx; idx = 8*(m - OUT_LAG) + l;
        `CHECK(dac_words[m][l], sample_t'(expo.exists(idx) ? expo[idx] : 0), "DAC sample")
        if (dac_words[m][l] != 0) nonzero++;
      end
      `CHECK(nonzero > 100, 1'b1, "non-zero corrections")
    end

    @(negedge clk); reg_addr = 8'h74; @(negedge clk); `CHECK(reg_rdata, 32'(TURNW), "turn length")
    @(negedge clk); reg_addr = 8'h72; @(negedge clk); `CHECK(reg_rdata, 32'd0, "snapshot count after re-arm with length 0")
    @(negedge clk); reg_addr = 8'h70; @(negedge clk); d = reg_rdata;
    `CHECK(d[6], 1'b1, "missing fiducial flagged")
    `CHECK(d[9:7], 3'b000, "no FIFO error, overflow or underflow")
    // ---- snapshot readback: bunch 1, master turns 3..6 = stream turns 4..7 ----
    for (int e = 0; e < 4; e++) begin
      push_wr(8'h68, 32'(e)); drive_words(3);
      for (int q = 0; q < 4; q++) begin
        @(negedge clk); reg_we = 0; reg_addr = 8'h69 + 8'(q); @(negedge clk);
        for (int i = 0; i < 4; i++)
          `CHECK(reg_rdata[8*i +: 8], 8'(adc_s[8*(marker_word[4+e] + 2) + 20 + 100 + 4*q + i]), "snapshot sample")
      end
    end

    // ---- mechanisms ----
    $display("mechanisms: fire=%0d fb=%0d exc=%0d swap_clocks=%0d amble=%0d sat=%0d doublet_vectors=%0d",
             n_fire, n_fb, n_exc, n_swap, n_amble, n_sat, n_dbl);
    `CHECK(n_fire, 4*10 + 6*5, "windows fired")
    `CHECK(n_fb, n_model_fb, "feedback vectors")
    `CHECK(n_exc, 3, "excitation vectors")
    `CHECK(n_swap > 0, 1'b1, "coefficient swap happened")
    `CHECK(n_amble > 0, 1'b1, "ambles added")
    `CHECK(n_sat > 0, 1'b1, "saturation happened")
    `CHECK(n_dbl > 0, 1'b1, "doublet mode ran")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
