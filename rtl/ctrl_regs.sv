// ctrl_regs: memory-mapped control and status registers. The document exposes
// such a register set to the host through the USB 2.0 link and loads filter
// coefficients, excitation data and settings through it, and reads snapshot
// data back. The USB device interface itself is outside this block: it sees a
// simple synchronous bus (write strobe, word address, 32-bit data, read data
// registered one clock after the address). The map is this design's:
//   0x00 W   command pulses: [0] arm, [1] abort, [2] clear diagnostics
//   0x01 RW  mode: [0] doublet, [2:1] out_mode, [4:3] amble_mode, [5] gain_en, [6] swap_en
//   0x02 n_bunch   0x03 first_offset   0x04 spacing    0x05 shift
//   0x06 start_turn 0x07 run_turns     0x08 swap_start 0x09 swap_len
//   0x0A exc_chan  0x0B exc_start      0x0C exc_len
//   0x0D snap_chan 0x0E snap_start     0x0F snap_len   0x10 fid_timeout
//   0x11/0x12 bunch_en[31:0] / [63:32]
//   0x20-0x3F W  filter coefficient, set = addr[4], tap = addr[3:0]
//   0x40-0x4F RW per-slice gain (9-bit, 128 = +1)
//   0x50-0x5F RW amble carrier pattern (8-bit)
//   0x60 RW excitation write address (increments after each commit)
//   0x61-0x64 RW excitation data, slices 4i..4i+3 (slice 4i in bits 7:0)
//   0x65 W  commit the excitation data to the excitation memory
//   0x68 RW snapshot read address; 0x69-0x6C R snapshot data, same packing
//   0x70 R  flags: [2:0] master state, [3] run, [4] recording, [5] snapshot done,
//           [6] missing fiducial, [7] input FIFO error, [8] output FIFO overflow,
//           [9] DAC underflow
//   0x71 turn  0x72 snapshot count  0x73 missed fiducials  0x74 turn length
//   0x75 fiducial count
module ctrl_regs
  import wbfb_pkg::*;
#(
  parameter int EXC_AW  = 16,
  parameter int SNAP_AW = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               we,
  input  logic [7:0]         addr,
  input  logic [31:0]        wdata,
  output logic [31:0]        rdata,
  output cfg_t               cfg,
  output logic signed [GAIN_W-1:0] gain [NSLICE],
  output sample_t            pattern [NSLICE],
  output logic               arm,
  output logic               abort,
  output logic               diag_clear,
  output logic               coef_we,
  output logic               coef_set,
  output logic [3:0]         coef_tap,
  output logic signed [COEF_W-1:0] coef_wdata,
  output logic               exc_we,
  output logic [EXC_AW-1:0]  exc_waddr,
  output slice_vec_t         exc_wdata,
  output logic [SNAP_AW-1:0] snap_raddr,
  input  slice_vec_t         snap_rdata,
  input  status_t            status
);
  always_ff @(posedge clk) begin
    if (rst) begin
      cfg <= '0;
      cfg.out_mode    <= OM_FEEDBACK;
      cfg.n_bunch     <= 7'd1;
      cfg.spacing     <= 20'd100;
      cfg.fid_timeout <= 32'd12000;
      cfg.bunch_en    <= '1;
      for (int i = 0; i < NSLICE; i++) begin
        gain[i] <= GAIN_W'(128);
        pattern[i] <= '0;
      end
      arm <= 1'b0; abort <= 1'b0; diag_clear <= 1'b0;
      coef_we <= 1'b0; coef_set <= 1'b0; coef_tap <= '0; coef_wdata <= '0;
      exc_we <= 1'b0; exc_waddr <= '0; exc_wdata <= '0; snap_raddr <= '0;
    end else begin
      arm <= 1'b0; abort <= 1'b0; diag_clear <= 1'b0; coef_we <= 1'b0; exc_we <= 1'b0;
      if (exc_we) exc_waddr <= exc_waddr + 1'b1;
      if (we) begin
        unique casez (addr)
          8'h00: begin arm <= wdata[0]; abort <= wdata[1]; diag_clear <= wdata[2]; end
          8'h01: begin
                   cfg.doublet    <= wdata[0];
                   cfg.out_mode   <= out_mode_t'(wdata[2:1]);
                   cfg.amble_mode <= amble_mode_t'(wdata[4:3]);
                   cfg.gain_en    <= wdata[5];
                   cfg.swap_en    <= wdata[6];
                 end
          8'h02: cfg.n_bunch      <= wdata[6:0];
          8'h03: cfg.first_offset <= wdata[19:0];
          8'h04: cfg.spacing      <= wdata[19:0];
          8'h05: cfg.shift        <= wdata[3:0];
          8'h06: cfg.start_turn   <= wdata;
          8'h07: cfg.run_turns    <= wdata;
          8'h08: cfg.swap_start   <= wdata;
          8'h09: cfg.swap_len     <= wdata;
          8'h0A: cfg.exc_chan     <= wdata[CHAN_W-1:0];
          8'h0B: cfg.exc_start    <= wdata;
          8'h0C: cfg.exc_len      <= wdata[16:0];
          8'h0D: cfg.snap_chan    <= wdata[CHAN_W-1:0];
          8'h0E: cfg.snap_start   <= wdata;
          8'h0F: cfg.snap_len     <= wdata[16:0];
          8'h10: cfg.fid_timeout  <= wdata;
          8'h11: cfg.bunch_en[31:0]  <= wdata;
          8'h12: cfg.bunch_en[63:32] <= wdata;
          8'b001?_????: begin
                   coef_we <= 1'b1; coef_set <= addr[4]; coef_tap <= addr[3:0];
                   coef_wdata <= wdata[COEF_W-1:0];
                 end
          8'h4?: gain[addr[3:0]]    <= wdata[GAIN_W-1:0];
          8'h5?: pattern[addr[3:0]] <= sample_t'(wdata[7:0]);
          8'h60: exc_waddr <= wdata[EXC_AW-1:0];
          8'h61, 8'h62, 8'h63, 8'h64:
                 for (int i = 0; i < 4; i++) exc_wdata[4*(int'(addr[2:0])-1)+i] <= sample_t'(wdata[8*i +: 8]);
          8'h65: exc_we <= 1'b1;
          8'h68: snap_raddr <= wdata[SNAP_AW-1:0];
          default: ;
        endcase
      end
    end
  end

  // read mux, registered
  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else begin
      rdata <= '0;
      unique casez (addr)
        8'h01: rdata <= {25'd0, cfg.swap_en, cfg.gain_en, cfg.amble_mode, cfg.out_mode, cfg.doublet};
        8'h02: rdata <= 32'(cfg.n_bunch);
        8'h03: rdata <= 32'(cfg.first_offset);
        8'h04: rdata <= 32'(cfg.spacing);
        8'h05: rdata <= 32'(cfg.shift);
        8'h06: rdata <= cfg.start_turn;
        8'h07: rdata <= cfg.run_turns;
        8'h08: rdata <= cfg.swap_start;
        8'h09: rdata <= cfg.swap_len;
        8'h0A: rdata <= 32'(cfg.exc_chan);
        8'h0B: rdata <= cfg.exc_start;
        8'h0C: rdata <= 32'(cfg.exc_len);
        8'h0D: rdata <= 32'(cfg.snap_chan);
        8'h0E: rdata <= cfg.snap_start;
        8'h0F: rdata <= 32'(cfg.snap_len);
        8'h10: rdata <= cfg.fid_timeout;
        8'h11: rdata <= cfg.bunch_en[31:0];
        8'h12: rdata <= cfg.bunch_en[63:32];
        8'h4?: rdata <= 32'(signed'(gain[addr[3:0]]));
        8'h5?: rdata <= 32'(signed'(pattern[addr[3:0]]));
        8'h60: rdata <= 32'(exc_waddr);
        8'h61, 8'h62, 8'h63, 8'h64:
               for (int i = 0; i < 4; i++) rdata[8*i +: 8] <= exc_wdata[4*(int'(addr[2:0])-1)+i];
        8'h68: rdata <= 32'(snap_raddr);
        8'h69, 8'h6A, 8'h6B, 8'h6C:
               for (int i = 0; i < 4; i++) rdata[8*i +: 8] <= snap_rdata[4*(int'(addr[3:0])-9)+i];
        8'h70: rdata <= {22'd0, status.dac_underflow, status.out_fifo_overflow, status.in_fifo_err,
                         status.missing_fid, status.snap_done, status.snap_recording, status.run,
                         status.master_state};
        8'h71: rdata <= status.turn;
        8'h72: rdata <= 32'(status.snap_count);
        8'h73: rdata <= 32'(status.miss_count);
        8'h74: rdata <= status.turn_len;
        8'h75: rdata <= status.fid_count;
        default: ;
      endcase
    end
  end
endmodule
