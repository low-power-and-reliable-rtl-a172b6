`timescale 1ps/1ps
// link_model: behavioural stand-in for the analog part of the link (low
// swing drivers, 30 wires, level converters), used only by testbenches.
//
// Each wire delivers the value launched at a clock edge after a delay that
// depends on the swing level at launch and on per-wire fault knobs:
//   nominal  LV 700 ps, MV 550 ps, HV 300 ps (longer than the sampling
//            interval delta t of that level, so nothing is flagged)
//   slow     LV 1600 ps, MV 1450 ps, HV 1150 ps (past the next clock edge
//            but before edge + delta t: a delay error the double sampling
//            stage catches and corrects)
//   broken   1800 ps (past edge + delta t: missed, a real error), at LV
//            only for wires in 'broken_lv', at every level for 'broken_all'
// 'invert' flips a wire at the receiver (a static single-wire error for the
// majority gates). Three launch processes per wire take turns, so delays
// up to three clock periods keep every transition in order of arrival.
// The valid sideband arrives 100 ps after launch.
module link_model
  import scgc_pkg::*;
(
  input  logic        clk,
  input  logic [29:0] tx,
  input  logic        tx_valid,
  input  level_e      level,
  input  logic [29:0] slow,
  input  logic [29:0] broken_lv,
  input  logic [29:0] broken_all,
  input  logic [29:0] invert,
  output logic [29:0] rx,
  output logic        rx_valid
);

  logic [29:0] rx_raw = '0;
  int unsigned cyc = 0;

  initial rx_valid = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;

  assign rx = rx_raw ^ invert;

  always @(posedge clk) begin
    #100 rx_valid = tx_valid;
  end

  for (genvar i = 0; i < 30; i++) begin : g_wire
    for (genvar ph = 0; ph < 3; ph++) begin : g_phase
      initial forever begin
        logic        v;
        int unsigned d;
        @(posedge clk);
        if (cyc % 3 == ph) begin
          #1;
          v = tx[i];
          if (broken_all[i] || (broken_lv[i] && level == LV)) d = 1800;
          else if (slow[i]) d = (level == LV) ? 1600 : (level == MV) ? 1450 : 1150;
          else              d = (level == LV) ? 700  : (level == MV) ? 550  : 300;
          #(d - 1) rx_raw[i] = v;
        end
      end
    end
  end

endmodule
