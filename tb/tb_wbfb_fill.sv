// Full-capacity workload testbench for wbfb_top at its default parameters.
//
// Three phases run back to back on one continuous ADC stream:
//   A. 64 bunches per turn (every filter channel), 100-sample spacing,
//      feedback only, all 16 taps non-zero, 20 acquired turns: the filter
//      history of every channel fills completely;
//   B. 32 doublets per turn (32-sample windows on all 64 channels),
//      200-sample spacing, feedback with post-ambles, 12 acquired turns;
//   C. one bunch in short 16-word turns, output off, snapshot of channel 0
//      over 65536 turns (the full snapshot depth).
// A behavioural model (FIR over turns per channel and slice, shift and
// saturate, amble, window placement) predicts every DAC sample of phases A
// and B; during phase C the DAC must stay silent. The snapshot is read back
// over the register bus (every 64th entry and the last ones) and compared
// with the window samples sent. Window samples come from a hash of turn and
// position, so phase C needs no stored stream.
`include "tb_check.svh"
module tb_wbfb_fill;
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

  localparam int LONGW   = 840;          // words per turn in phases A and B
  localparam int SHORTW  = 16;           // words per turn in phase C
  localparam int OUT_LAG = 5;            // DAC word m carries stream word m-OUT_LAG
  localparam int NSTORE  = 35 * LONGW;   // stream words kept for the model
  localparam int SNAPN   = 65536;

  int adc_s [8*NSTORE];
  int marker_word [$];                   // stream word of each turn's marker rise
  int expo [int];

  typedef struct { logic [7:0] a; logic [31:0] d; } wr_t;
  wr_t wq [$];

  int n_fire = 0, n_fb = 0, n_amble = 0;
  always @(posedge clk) if (!rst) begin n_fire += ev_fire; n_fb += ev_fb; n_amble += ev_amble; end

  // DAC capture: phases A and B are kept for comparison, later words must be zero
  sample_t dac_words [$][8];
  int late_nonzero = 0, late_words = 0;
  logic was_streaming = 0;
  always @(posedge dac_clk) begin
    if (was_streaming) begin
      sample_t w [8];
      for (int s = 0; s < 4; s++) begin w[s] = dac_data[s][0]; w[s+4] = dac_data[s][1]; end
      if (dac_words.size() < NSTORE) dac_words.push_back(w);
      else begin
        late_words++;
        for (int l = 0; l < 8; l++) if (w[l] != 0) late_nonzero++;
      end
    end
    was_streaming = dac_streaming && !dac_rst;
  end

  initial begin
    #20000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // -------- stimulus ----------
  int wcount = 0, tnum = 0, tpos = 0, turnw = LONGW;
  int g_nb = 64, g_off = 20, g_sp = 100, g_wlen = 16;   // window layout of the generated beam

  function automatic int wval(int t, int r);
    int unsigned x;
    x = 32'(t) * 32'd2654435761 + 32'(r) * 32'd40503 + 32'd12345;
    x ^= x >> 13; x *= 32'h5bd1e995; x ^= x >> 15;
    return int'(x % 101) - 50;
  endfunction

  function automatic bit in_window(int r);
    if (r < g_off) return 0;
    if (r - g_off >= (g_nb - 1) * g_sp + g_wlen) return 0;
    return ((r - g_off) % g_sp) < g_wlen;
  endfunction

  task automatic push_wr(input logic [7:0] a, input logic [31:0] d);
    wr_t w; w.a = a; w.d = d; wq.push_back(w);
  endtask

  // one stream word per call; the fiducial word of a turn is its word 12
  task automatic drive_words(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      adc_valid = 1;
      for (int l = 0; l < 8; l++) begin
        int r, v;
        r = 8*tpos + l - 96;
        v = in_window(r) ? wval(tnum, r) : int'($urandom % 256) - 128;
        if (wcount < NSTORE) adc_s[8*wcount + l] = v;
        if (l % 2 == 0) adc1[l/2] = 8'(v + 128); else adc2[l/2] = 8'(v + 128);
      end
      bunch1_marker = tpos >= 10 && tpos < 14;
      if (tpos == 10) marker_word.push_back(wcount);
      if (wq.size() > 0) begin wr_t w; w = wq.pop_front(); reg_we = 1; reg_addr = w.a; reg_wdata = w.d; end
      else reg_we = 0;
      wcount++; tpos++;
      if (tpos == turnw) begin tpos = 0; tnum++; end
    end
  endtask

  task automatic drive_to(input int t, input int p);
    while (!(tnum == t && tpos == p)) drive_words(1);
  endtask

  task automatic pulse_inj();
    inj_trig = 1; drive_words(4); inj_trig = 0;
  endtask

  // -------- reference model ----------
  int h [16];
  int hist [64][16][$];
  int n_sat = 0;
  bit chan_active [64];
  function automatic int sat(int v); return v > 127 ? 127 : (v < -128 ? -128 : v); endfunction

  task automatic model_vec(input int ws, input int chan, input bit last, input bit run,
                           input int sh, input int amode);
    int m [16]; int tot, mean;
    tot = 0;
    for (int s = 0; s < 16; s++) begin
      int acc;
      hist[chan][s].push_front(adc_s[ws + s]);
      acc = 0;
      for (int k = 0; k < 16 && k < hist[chan][s].size(); k++) acc += h[k] * hist[chan][s][k];
      acc = acc >>> sh;
      if (acc > 127 || acc < -128) n_sat++;
      m[s] = run ? sat(acc) : 0;
      if (m[s] != 0) chan_active[chan] = 1;
      tot += m[s];
      expo[ws + s] = m[s];
    end
    mean = tot >>> 4;
    if (last && amode == 2) for (int s = 0; s < 16; s++) expo[ws + 16 + s] = sat((mean * ((s % 2) ? -100 : 100)) >>> 7);
  endtask

  initial begin
    logic [31:0] d; int k0, fires_ab, nact; int elist [$];
    adc_valid = 0; inj_trig = 0; bunch1_marker = 0; reg_we = 0; reg_addr = 0; reg_wdata = 0;
    for (int i = 0; i < 4; i++) begin adc1[i] = 8'h80; adc2[i] = 8'h80; end
    for (int k = 0; k < 16; k++) h[k] = int'($urandom % 15) - 7;
    h[15] = 5;                                           // the oldest tap is always used
    repeat (3) @(posedge clk); @(negedge clk); rst = 0; dac_rst = 0;

    // ---- phase A: 64 bunches ----
    for (int k = 0; k < 16; k++) begin push_wr(8'h20 + 8'(k), 32'(h[k])); push_wr(8'h50 + 8'(k), (k % 2) ? -100 : 100); end
    push_wr(8'h01, {25'd0, 1'b0, 1'b0, 2'(AM_NONE), 2'(OM_FEEDBACK), 1'b0});
    push_wr(8'h02, 64); push_wr(8'h03, 20); push_wr(8'h04, 100); push_wr(8'h05, 3);
    push_wr(8'h06, 0); push_wr(8'h07, 0); push_wr(8'h0F, 0);
    push_wr(8'h11, 32'hFFFF_FFFF); push_wr(8'h12, 32'hFFFF_FFFF);
    drive_to(0, 830);
    push_wr(8'h00, 1);                                   // arm: turns 1.. are acquired
    drive_to(1, 830); pulse_inj();                       // run from turn 2
    drive_to(20, 830);
    // ---- phase B: 32 doublets ----
    push_wr(8'h00, 2);                                   // abort after turn 20's windows
    push_wr(8'h01, {25'd0, 1'b0, 1'b0, 2'(AM_POST), 2'(OM_FEEDBACK), 1'b1});
    push_wr(8'h02, 32); push_wr(8'h04, 200);
    drive_to(21, 0); g_nb = 32; g_sp = 200; g_wlen = 32;
    drive_to(21, 830);
    push_wr(8'h00, 1);                                   // arm: turns 22.. are acquired
    drive_to(22, 830); pulse_inj();                      // run from turn 23
    drive_to(33, 830);
    // ---- phase C: snapshot over 65536 short turns ----
    push_wr(8'h00, 2);
    push_wr(8'h01, {25'd0, 1'b0, 1'b0, 2'(AM_NONE), 2'(OM_OFF), 1'b0});
    push_wr(8'h02, 1); push_wr(8'h03, 4);
    push_wr(8'h0D, 0); push_wr(8'h0E, 0); push_wr(8'h0F, SNAPN);
    drive_to(34, 0); turnw = SHORTW; g_nb = 1; g_off = 4; g_wlen = 16;
    drive_to(36, 2);
    k0 = tnum;
    push_wr(8'h00, 1);                                   // arm: turns k0.. are recorded
    fires_ab = n_fire;
    drive_to(k0 + SNAPN + 2, 0);
    drive_words(64);

    // ---- model of phases A and B ----
    for (int j = 1; j <= 20; j++) begin
      int f; f = marker_word[j] + 2;
      for (int b = 0; b < 64; b++) model_vec(8*f + 20 + 100*b, b, 1, j >= 2, 3, 0);
    end
    for (int j = 22; j <= 33; j++) begin
      int f; f = marker_word[j] + 2;
      for (int b = 0; b < 32; b++) begin
        model_vec(8*f + 20 + 200*b, 2*b, 0, j >= 23, 3, 2);
        model_vec(8*f + 20 + 200*b + 16, 2*b + 1, 1, j >= 23, 3, 2);
      end
    end

    // ---- compare the DAC stream ----
    begin
      int nonzero = 0;
      `CHECK(dac_words.size(), NSTORE, "DAC words kept")
      for (int m = OUT_LAG; m < dac_words.size(); m++) for (int l = 0; l < 8; l++) begin
        int idx; idx = 8*(m - OUT_LAG) + l;
        `CHECK(dac_words[m][l], sample_t'(expo.exists(idx) ? expo[idx] : 0), "DAC sample")
        if (dac_words[m][l] != 0) nonzero++;
      end
      `CHECK(nonzero > 10000, 1'b1, "non-zero corrections")
      `CHECK(late_words > (SNAPN - 64) * SHORTW, 1'b1, "DAC kept streaming through the snapshot phase")
      `CHECK(late_nonzero, 0, "DAC silent with output off")
    end

    // ---- status ----
    @(negedge clk); reg_addr = 8'h72; @(negedge clk); `CHECK(reg_rdata, 32'(SNAPN), "snapshot count")
    @(negedge clk); reg_addr = 8'h74; @(negedge clk); `CHECK(reg_rdata, 32'(SHORTW), "turn length")
    @(negedge clk); reg_addr = 8'h70; @(negedge clk); d = reg_rdata;
    `CHECK(d[5], 1'b1, "snapshot done")
    `CHECK(d[9:7], 3'b000, "no FIFO error, overflow or underflow")

    // ---- snapshot readback ----
    for (int e = 0; e < SNAPN - 4; e += 64) elist.push_back(e);
    for (int e = SNAPN - 4; e < SNAPN; e++) elist.push_back(e);
    foreach (elist[n]) begin
      int e; e = elist[n];
      push_wr(8'h68, 32'(e)); drive_words(3);
      for (int q = 0; q < 4; q++) begin
        @(negedge clk); reg_we = 0; reg_addr = 8'h69 + 8'(q); @(negedge clk);
        for (int i = 0; i < 4; i++)
          `CHECK(reg_rdata[8*i +: 8], 8'(wval(k0 + e, 4 + 4*q + i)), "snapshot sample")
      end
    end

    // ---- mechanisms ----
    nact = 0;
    for (int c = 0; c < 64; c++) nact += chan_active[c];
    $display("workload: fires A+B=%0d fb=%0d ambles=%0d sat=%0d active channels=%0d snapshot turns=%0d",
             fires_ab, n_fb, n_amble, n_sat, nact, SNAPN);
    `CHECK(fires_ab, 64*20 + 64*12, "windows fired in phases A and B")
    `CHECK(n_fb, 64*19 + 64*11, "feedback vectors")
    `CHECK(n_amble > 0, 1'b1, "post-ambles added to doublets")
    `CHECK(nact, 64, "all 64 filter channels produced corrections")
    `CHECK(n_fire - fires_ab >= SNAPN, 1'b1, "one window per turn in phase C")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
