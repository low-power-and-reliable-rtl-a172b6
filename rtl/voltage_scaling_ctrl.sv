`timescale 1ps/1ps
// voltage_scaling_ctrl: voltage scaling control unit of the self-calibrated
// link.
//
// The unit picks the signal swing of the link wires (LV 0.7 V, MV 0.85 V,
// HV 1.0 V) from two kinds of error evidence.
//
// Test phase (crosstalk-aware test error detection). On cal_start the swing
// is set to LV and a full MAF test pass is sent (tpg_start = T_start). When
// the generator is done and the last vector has been checked, a pass with
// any error after error correction is repeated one level higher; an
// error-free pass (or a pass at HV) ends the test: t_finish (T_finish) goes
// high and the level reached becomes the lowest safe level.
//
// Run-time phase. Every WINDOW cycles v_scale (V_scale) pulses and the
// window's bit error rate, flagged wire-bits over checked wire-bits, is
// compared with LO_PCT and HI_PCT: below LO_PCT the swing drops one level
// (never below the lowest safe level), above HI_PCT it rises one level
// (never above HV), otherwise it stays. A window without data keeps the
// level. A new cal_start restarts the test phase.
//
// Before the first calibration the link runs at HV.
//
// Interface: s is one-hot, s[0] = HV, s[1] = MV, s[2] = LV, and selects the
// low-swing supply; 'level' selects the delay line tap. test_mode is high
// for the whole test phase (the transmitter then sends test vectors only).
// All outputs are registered or decoded from registers.
//
// The test-then-run policy, the three levels and the 5 % / 15 % thresholds
// are the published scheme; the window length, the encoding of S0..S2, the
// treatment of empty windows and of a failing HV test are this design's
// choices.
module voltage_scaling_ctrl
  import scgc_pkg::*;
#(
  parameter int unsigned W      = scgc_pkg::WIRE_W,
  parameter int unsigned WINDOW = 256,
  parameter int unsigned LO_PCT = 5,
  parameter int unsigned HI_PCT = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cal_start,
  // test phase
  output logic         tpg_start,
  input  logic         tpg_done,
  input  logic         ted_busy,
  input  logic         ted_error,
  output logic         ted_clear,
  output logic         test_mode,
  output logic         t_finish,
  // run-time phase
  input  logic         rt_valid,
  input  logic [W-1:0] rt_err,
  output logic         v_scale,
  // swing selection
  output level_e       level,
  output logic [2:0]   s
);

  typedef enum logic [2:0] {ST_IDLE, ST_START, ST_SEND, ST_DRAIN, ST_RUN} state_e;

  localparam int unsigned WCW = $clog2(WINDOW);

  state_e         state;
  level_e         floor_lvl;
  logic [WCW-1:0] wcnt;
  logic [31:0]    err_acc, bits_acc, err_nx, bits_nx;
  logic [31:0]    err_now;

  always_comb begin
    err_now = '0;
    for (int i = 0; i < W; i++) err_now += 32'(rt_err[i]);
  end

  assign err_nx  = err_acc  + (rt_valid ? err_now : 32'd0);
  assign bits_nx = bits_acc + (rt_valid ? 32'(W)  : 32'd0);

  assign tpg_start = (state == ST_START);
  assign ted_clear = (state == ST_START);
  assign test_mode = (state == ST_START) || (state == ST_SEND) || (state == ST_DRAIN);
  assign t_finish  = (state == ST_RUN);
  assign v_scale   = (state == ST_RUN) && (wcnt == WCW'(WINDOW - 1));

  always_comb begin
    unique case (level)
      LV:      s = 3'b100;
      MV:      s = 3'b010;
      default: s = 3'b001;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      level     <= HV;
      floor_lvl <= LV;
      wcnt      <= '0;
      err_acc   <= '0;
      bits_acc  <= '0;
    end else if (cal_start && state != ST_START && state != ST_SEND && state != ST_DRAIN) begin
      state <= ST_START;
      level <= LV;
    end else begin
      unique case (state)
        ST_IDLE: ;
        ST_START: state <= ST_SEND;
        ST_SEND:  if (tpg_done) state <= ST_DRAIN;
        ST_DRAIN: if (!ted_busy) begin
          if (ted_error && level != HV) begin
            level <= level_e'(level + 2'd1);
            state <= ST_START;
          end else begin
            floor_lvl <= level;
            state     <= ST_RUN;
            wcnt      <= '0;
            err_acc   <= '0;
            bits_acc  <= '0;
          end
        end
        ST_RUN: begin
          if (wcnt == WCW'(WINDOW - 1)) begin
            wcnt     <= '0;
            err_acc  <= '0;
            bits_acc <= '0;
            if (bits_nx != 0) begin
              if (err_nx * 100 < bits_nx * LO_PCT) begin
                if (level > floor_lvl) level <= level_e'(level - 2'd1);
              end else if (err_nx * 100 > bits_nx * HI_PCT) begin
                if (level != HV) level <= level_e'(level + 2'd1);
              end
            end
          end else begin
            wcnt     <= wcnt + WCW'(1);
            err_acc  <= err_nx;
            bits_acc <= bits_nx;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  initial assert (WINDOW >= 2) else $error("WINDOW must be at least 2");

endmodule
