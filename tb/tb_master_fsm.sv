// Testbench for master_fsm: arm, injection and a train of fiducials. Checks
// the turn count, the ARMED/DELAY/RUN/DONE sequence at the programmed turns,
// the coefficient-set swap window within the run, abort, and the start_turn
// of zero case. A second part drives random commands, triggers and fiducials
// with random settings, and a reference model kept in the testbench is
// compared with every output on every clock (the model runs from reset, so it
// also covers the directed part).
`include "tb_check.svh"
module tb_master_fsm;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic arm, abort, inj_pulse, fid_pulse, swap_en, acquire, run, coef_sel;
  logic [31:0] start_turn, run_turns, swap_start, swap_len, turn; logic [2:0] state_o;
  master_fsm dut (.clk, .rst, .arm, .abort, .inj_pulse, .fid_pulse, .start_turn, .run_turns, .swap_en,
                  .swap_start, .swap_len, .state_o, .turn, .acquire, .run, .coef_sel);
  // reference model: 0 idle, 1 armed, 2 delay, 3 run, 4 done
  int m_state = 0; int unsigned m_turn = 0;
  bit compare = 0;
  int n_visits [5];
  always @(posedge clk) begin
    int unsigned rt;
    if (compare) begin
      rt = m_turn - start_turn;
      `CHECK(state_o, 3'(m_state), "model state")
      `CHECK(turn, m_turn, "model turn")
      `CHECK(acquire, m_state >= 1 && m_state <= 3, "model acquire")
      `CHECK(run, m_state == 3, "model run")
      `CHECK(coef_sel, m_state == 3 && swap_en && rt >= swap_start && rt - swap_start < swap_len, "model swap")
      n_visits[m_state]++;
    end
    if (rst) begin m_state = 0; m_turn = 0; end
    else if (abort) m_state = 0;
    else begin
      int unsigned nt; nt = m_turn + 1;
      case (m_state)
        0: if (arm) m_state = 1;
        1: if (inj_pulse) begin m_turn = 0; m_state = (start_turn == 0) ? 3 : 2; end
        2: begin if (fid_pulse) begin m_turn = nt; if (nt == start_turn) m_state = 3; end end
        3: begin if (fid_pulse) begin m_turn = nt; if (run_turns != 0 && nt == start_turn + run_turns) m_state = 4; end end
        4: begin if (fid_pulse) m_turn = nt; if (arm) m_state = 1; end
        default: ;
      endcase
    end
    compare = !rst;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask
  initial begin
    int nswap = 0;
    arm = 0; abort = 0; inj_pulse = 0; fid_pulse = 0; swap_en = 1;
    start_turn = 3; run_turns = 10; swap_start = 2; swap_len = 4;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    `CHECK(state_o, 3'd0, "idle")
    pulse(fid_pulse);
    `CHECK(acquire, 1'b0, "not acquiring when idle")
    pulse(arm);
    `CHECK(state_o, 3'd1, "armed")
    pulse(fid_pulse);
    `CHECK(state_o, 3'd1, "fiducial does not start")
    pulse(inj_pulse);
    `CHECK(state_o, 3'd2, "delay after injection")
    `CHECK(turn, 32'd0, "turn cleared")
    for (int t = 1; t <= 16; t++) begin
      pulse(fid_pulse);
      repeat (3) @(negedge clk);
      `CHECK(turn, 32'(t), "turn count")
      `CHECK(run, (t >= 3 && t < 13), "run window")
      `CHECK(coef_sel, (t >= 5 && t < 9), "swap window")
      if (coef_sel) nswap++;
      `CHECK(state_o, (t < 3) ? 3'd2 : (t < 13) ? 3'd3 : 3'd4, "state")
    end
    `CHECK(nswap, 4, "swap turns")
    // re-arm with start_turn 0 and endless run, then abort
    start_turn = 0; run_turns = 0; swap_en = 0;
    pulse(arm); pulse(inj_pulse);
    `CHECK(state_o, 3'd3, "run at once")
    repeat (20) pulse(fid_pulse);
    `CHECK(run, 1'b1, "endless run")
    `CHECK(coef_sel, 1'b0, "swap disabled")
    pulse(abort);
    `CHECK(state_o, 3'd0, "aborted")
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      int r;
      if (i % 400 == 0) begin
        start_turn = $urandom % 5; run_turns = $urandom % 8; swap_en = $urandom % 2;
        swap_start = $urandom % 4; swap_len = $urandom % 5;
      end
      @(negedge clk);
      r = $urandom % 100;
      arm = r < 4; inj_pulse = r >= 4 && r < 8; abort = r == 8; fid_pulse = r >= 20 && r < 50;
    end
    @(negedge clk); arm = 0; inj_pulse = 0; abort = 0; fid_pulse = 0;
    repeat (3) @(negedge clk);
    foreach (n_visits[k]) `CHECK(n_visits[k] > 100, 1'b1, "every state visited under random traffic")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
