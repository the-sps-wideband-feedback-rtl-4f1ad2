// Testbench for dac_ctrl. A fixed first run checks playback by value: with
// the run active and turns counted, playback starts at the first turn start
// at or after exc_start, steps the address once per turn start for exc_len
// turns, then stops, and ending the run returns to idle. Then many random runs
// follow (random start turn, length including zero, turn lengths, runs cut
// short) and a reference model kept in the testbench is compared with the
// outputs on every clock.
`include "tb_check.svh"
module tb_dac_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic run, turn_start, exc_active; logic [31:0] turn, exc_start; logic [8:0] exc_len; logic [7:0] exc_addr; logic [1:0] state_o;
  dac_ctrl #(.AW(8)) dut (.clk, .rst, .run, .turn, .turn_start, .exc_start, .exc_len, .exc_addr, .exc_active, .state_o);

  // reference model: 0 idle, 1 wait, 2 play, 3 done
  int m_state = 0, m_addr = 0, m_played = 0;
  bit compare = 0;
  int n_play_clocks = 0, n_done = 0, n_cut = 0;
  always @(posedge clk) begin
    if (compare) begin
      `CHECK(state_o, 2'(m_state), "state")
      `CHECK(exc_active, m_state == 2, "active")
      if (m_state == 2) `CHECK(int'(exc_addr), m_addr, "address")
    end
    if (m_state == 2) n_play_clocks++;
    if (rst) begin m_state = 0; m_addr = 0; m_played = 0; end
    else if (!run) begin
      if (m_state == 2) n_cut++;
      m_state = 0;
    end else case (m_state)
      0: m_state = 1;
      1: if (turn_start && turn >= exc_start) begin
           if (exc_len == 0) m_state = 3;
           else begin m_state = 2; m_addr = 0; m_played = 1; end
         end
      2: if (turn_start) begin
           if (m_played == int'(exc_len)) begin m_state = 3; n_done++; end
           else begin m_addr++; m_played++; end
         end
      default: ;
    endcase
    compare = !rst;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int played = 0;
    run = 0; turn_start = 0; turn = 0; exc_start = 4; exc_len = 9'd6;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // fixed run
    run = 1;
    for (int t = 0; t < 15; t++) begin
      @(negedge clk); turn = t; turn_start = 1;
      @(negedge clk); turn_start = 0;
      repeat (3) @(negedge clk);
      `CHECK(exc_active, (t >= 4 && t < 10), "active window by value")
      if (exc_active) begin `CHECK(int'(exc_addr), t - 4, "address by value") played++; end
    end
    `CHECK(played, 6, "turns played")
    run = 0; @(negedge clk); @(negedge clk);
    `CHECK(state_o, 2'd0, "idle after run")
    // random runs
    for (int r = 0; r < 60; r++) begin
      int nturns;
      exc_start = $urandom % 6;
      exc_len = (r % 7 == 0) ? 9'd0 : 9'($urandom % 12 + 1);
      nturns = (r % 5 == 0) ? int'(exc_start) + 3 : int'(exc_start) + int'(exc_len) + 3;
      repeat ($urandom % 4 + 1) @(negedge clk);
      run = 1;
      for (int t = 0; t < nturns; t++) begin
        @(negedge clk); turn = t; turn_start = 1;
        @(negedge clk); turn_start = 0;
        repeat ($urandom % 6) @(negedge clk);
      end
      run = 0; repeat (2) @(negedge clk);
    end
    $display("dac_ctrl: play clocks=%0d completed=%0d cut short=%0d", n_play_clocks, n_done, n_cut);
    `CHECK(n_done > 20, 1'b1, "complete playbacks exercised")
    `CHECK(n_cut > 3, 1'b1, "runs ended during playback exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
