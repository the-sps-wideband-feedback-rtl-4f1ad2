// master_fsm: top of the three-level control hierarchy. It receives the
// injection trigger and the ring fiducials (bunch-1 markers), counts turns and
// sequences the ADC/DSP and DAC controllers through `acquire` and `run`.
// `turn` counts fiducials from the injection trigger on (DELAY, RUN, DONE).
//   IDLE   -> ARMED on `arm` (host command)
//   ARMED  -> DELAY on the injection trigger (turn counter cleared), or
//             straight to RUN when start_turn is 0
//   DELAY  -> RUN on the fiducial that makes turn == start_turn
//   RUN    -> DONE on the fiducial that makes turn == start_turn + run_turns
//             (run_turns == 0 runs until `abort`)
//   any    -> IDLE on `abort`; DONE -> ARMED on `arm`
// During RUN it also picks the filter coefficient set from the fiducial count:
// set B (`coef_sel` = 1) for swap_len turns starting swap_start turns into the
// run, set A otherwise; this is the document's grow/damp coefficient swap. The
// states and the register meanings are this design's.
module master_fsm (
  input  logic        clk,
  input  logic        rst,
  input  logic        arm,
  input  logic        abort,
  input  logic        inj_pulse,
  input  logic        fid_pulse,
  input  logic [31:0] start_turn,
  input  logic [31:0] run_turns,
  input  logic        swap_en,
  input  logic [31:0] swap_start,
  input  logic [31:0] swap_len,
  output logic [2:0]  state_o,
  output logic [31:0] turn,
  output logic        acquire,
  output logic        run,
  output logic        coef_sel
);
  typedef enum logic [2:0] {IDLE = 3'd0, ARMED = 3'd1, DELAY = 3'd2, RUN = 3'd3, DONE = 3'd4} state_t;
  state_t state;
  logic [31:0] run_turn;

  assign state_o  = state;
  assign acquire  = (state == ARMED) || (state == DELAY) || (state == RUN);
  assign run      = (state == RUN);
  assign run_turn = turn - start_turn;
  assign coef_sel = run && swap_en && (run_turn >= swap_start) && (run_turn - swap_start < swap_len);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; turn <= '0;
    end else if (abort) begin
      state <= IDLE;
    end else begin
      if (fid_pulse && (state == DELAY || state == RUN || state == DONE)) turn <= turn + 1'b1;
      unique case (state)
        IDLE:  if (arm) state <= ARMED;
        ARMED: if (inj_pulse) begin
                 turn  <= '0;
                 state <= (start_turn == 0) ? RUN : DELAY;
               end
        DELAY: if (fid_pulse && turn + 1'b1 == start_turn) state <= RUN;
        RUN:   if (fid_pulse && run_turns != 0 && turn + 1'b1 == start_turn + run_turns) state <= DONE;
        DONE:  if (arm) state <= ARMED;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
