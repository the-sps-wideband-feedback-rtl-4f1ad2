// dac_ctrl: second-level state machine for the DAC side. It plays the
// excitation memory out: once the master is in RUN and the turn count has
// reached exc_start, it starts at the next turn start of the sample stream
// with address 0 and steps the address by one every turn, for exc_len turns.
// `exc_active` tells the output mixer to add the waveform to the selected
// bunch. States: IDLE -> WAIT (run) -> PLAY (turn >= exc_start, at a turn
// start) -> DONE (exc_len turns played); back to IDLE when run ends. The
// document says the waveform is played "based on programmed timing
// parameters"; these particular parameters are this design's.
module dac_ctrl #(
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  logic [31:0]   turn,
  input  logic          turn_start,
  input  logic [31:0]   exc_start,
  input  logic [AW:0]   exc_len,
  output logic [AW-1:0] exc_addr,
  output logic          exc_active,
  output logic [1:0]    state_o
);
  typedef enum logic [1:0] {IDLE, WAIT, PLAY, DONE} state_t;
  state_t state;
  logic [AW:0] played;

  assign exc_active = (state == PLAY);
  assign state_o    = state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; exc_addr <= '0; played <= '0;
    end else if (!run) begin
      state <= IDLE;
    end else begin
      unique case (state)
        IDLE: state <= WAIT;
        WAIT: if (turn_start && turn >= exc_start) begin
                if (exc_len == 0) state <= DONE;
                else begin
                  state <= PLAY; exc_addr <= '0; played <= (AW+1)'(1);
                end
              end
        PLAY: if (turn_start) begin
                if (played == exc_len) state <= DONE;
                else begin
                  exc_addr <= exc_addr + 1'b1; played <= played + 1'b1;
                end
              end
        DONE: ;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
