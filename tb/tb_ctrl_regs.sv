// Testbench for ctrl_regs: writes and reads back the settings, checks the
// command pulses, the coefficient write port, the excitation data packing
// and address auto-increment, the snapshot data packing and the status words.
// A final random sweep writes random values to random read/write registers
// and reads random registers back against a shadow copy that applies each
// register's field width (and sign extension for gains and pattern), while
// checking that the settings reach the cfg outputs.
`include "tb_check.svh"
module tb_ctrl_regs;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic we; logic [7:0] addr; logic [31:0] wdata, rdata; cfg_t cfg;
  logic signed [8:0] gain [NSLICE]; sample_t pattern [NSLICE];
  logic arm, abort, diag_clear, coef_we, coef_set, exc_we; logic [3:0] coef_tap; logic signed [7:0] coef_wdata;
  logic [15:0] exc_waddr, snap_raddr; slice_vec_t exc_wdata, snap_rdata; status_t status;
  ctrl_regs dut (.clk, .rst, .we, .addr, .wdata, .rdata, .cfg, .gain, .pattern, .arm, .abort, .diag_clear,
    .coef_we, .coef_set, .coef_tap, .coef_wdata, .exc_we, .exc_waddr, .exc_wdata, .snap_raddr, .snap_rdata, .status);
  always_comb for (int i = 0; i < NSLICE; i++) snap_rdata[i] = sample_t'(snap_raddr[7:0] + 8'(i));
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d; @(negedge clk); we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); we = 0; addr = a; @(negedge clk); d = rdata;
  endtask
  initial begin
    logic [31:0] d;
    we = 0; addr = 0; wdata = 0; status = '0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    `CHECK(cfg.spacing, 20'd100, "default spacing")
    `CHECK(gain[3], 9'sd128, "default gain")
    wr(8'h01, 32'h7F);
    `CHECK(cfg.doublet, 1'b1, "doublet")
    `CHECK(cfg.out_mode, OM_FEC, "mode")
    `CHECK(cfg.amble_mode, AM_SPLIT, "amble")
    `CHECK(cfg.gain_en & cfg.swap_en, 1'b1, "gain/swap enable")
    rd(8'h01, d); `CHECK(d, 32'h7F, "mode readback")
    for (int a = 2; a <= 8'h12; a++) begin
      logic [31:0] v; v = $urandom % 32;
      wr(8'(a), v); rd(8'(a), d); `CHECK(d, v, "setting readback")
    end
    wr(8'h06, 32'd1234); `CHECK(cfg.start_turn, 32'd1234, "start_turn field")
    wr(8'h12, 32'h8000_0001); `CHECK(cfg.bunch_en[63], 1'b1, "bunch_en high")
    // command pulse
    @(negedge clk); we = 1; addr = 8'h00; wdata = 32'd5; @(posedge clk); #1;
    `CHECK({arm, abort, diag_clear}, 3'b101, "command pulses") @(negedge clk); we = 0; @(posedge clk); #1;
    `CHECK({arm, abort, diag_clear}, 3'b000, "pulses clear")
    // coefficient
    @(negedge clk); we = 1; addr = 8'h3A; wdata = 32'hF3; @(posedge clk); #1;
    `CHECK({coef_we, coef_set, coef_tap, coef_wdata}, {1'b1, 1'b1, 4'hA, 8'hF3}, "coef write")
    @(negedge clk); we = 0;
    // gains and pattern
    wr(8'h45, 32'h1_80); rd(8'h45, d); `CHECK(gain[5], -9'sd128, "gain") `CHECK(d, 32'hFFFF_FF80, "gain readback")
    wr(8'h5F, 32'h81); `CHECK(pattern[15], sample_t'(8'h81), "pattern")
    // excitation words
    wr(8'h60, 32'd300);
    wr(8'h61, 32'h03020100); wr(8'h62, 32'h07060504); wr(8'h63, 32'h0B0A0908); wr(8'h64, 32'h0F0E0D0C);
    for (int i = 0; i < NSLICE; i++) `CHECK(exc_wdata[i], sample_t'(i), "exc packing")
    @(negedge clk); we = 1; addr = 8'h65; @(posedge clk); #1;
    `CHECK(exc_we, 1'b1, "exc commit") `CHECK(exc_waddr, 16'd300, "exc address")
    @(negedge clk); we = 0; @(negedge clk);
    `CHECK(exc_waddr, 16'd301, "exc address increments")
    // snapshot readout
    wr(8'h68, 32'd16);
    rd(8'h6B, d); `CHECK(d, {8'd27, 8'd26, 8'd25, 8'd24}, "snapshot packing")
    // status
    status.master_state = 3'd3; status.run = 1; status.dac_underflow = 1; status.turn = 32'd777; status.fid_count = 32'd99;
    rd(8'h70, d); `CHECK(d, 32'h20B, "status flags")
    rd(8'h71, d); `CHECK(d, 32'd777, "turn")
    rd(8'h75, d); `CHECK(d, 32'd99, "fid count")
    // random sweep of the read/write registers
    begin
      logic [7:0] rw [$]; logic [31:0] shadow [256];
      for (int a = 8'h01; a <= 8'h12; a++) rw.push_back(8'(a));
      for (int a = 8'h40; a <= 8'h5F; a++) rw.push_back(8'(a));
      for (int a = 8'h61; a <= 8'h64; a++) rw.push_back(8'(a));
      rw.push_back(8'h68);
      foreach (rw[i]) rd(rw[i], shadow[rw[i]]);
      for (int n = 0; n < 1500; n++) begin
        logic [7:0] a; logic [31:0] v, m;
        a = rw[$urandom % rw.size()];
        if ($urandom % 2) begin
          v = $urandom;
          case (a) inside
            8'h01, 8'h02:       m = v & 32'h7F;
            8'h03, 8'h04:       m = v & 32'hF_FFFF;
            8'h05:              m = v & 32'hF;
            8'h0A, 8'h0D:       m = v & 32'h3F;
            8'h0C, 8'h0F:       m = v & 32'h1_FFFF;
            8'h68:              m = v & 32'hFFFF;
            [8'h40:8'h4F]:      m = {{23{v[8]}}, v[8:0]};
            [8'h50:8'h5F]:      m = {{24{v[7]}}, v[7:0]};
            default:            m = v;
          endcase
          wr(a, v); shadow[a] = m;
          case (a)
            8'h03: `CHECK(32'(cfg.first_offset), m, "first_offset reaches cfg")
            8'h04: `CHECK(32'(cfg.spacing), m, "spacing reaches cfg")
            8'h06: `CHECK(cfg.start_turn, m, "start_turn reaches cfg")
            8'h10: `CHECK(cfg.fid_timeout, m, "fid_timeout reaches cfg")
            8'h11: `CHECK(cfg.bunch_en[31:0], m, "bunch_en low reaches cfg")
            8'h12: `CHECK(cfg.bunch_en[63:32], m, "bunch_en high reaches cfg")
            default: ;
          endcase
          if (a >= 8'h40 && a <= 8'h4F) `CHECK(32'(signed'(gain[a[3:0]])), m, "gain reaches output")
          if (a >= 8'h50 && a <= 8'h5F) `CHECK(32'(signed'(pattern[a[3:0]])), m, "pattern reaches output")
        end else begin
          rd(a, d); `CHECK(d, shadow[a], "register read-back")
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
