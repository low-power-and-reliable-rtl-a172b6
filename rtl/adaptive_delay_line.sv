`timescale 1ps/1ps
// adaptive_delay_line: behavioural model of the digitally controlled delay
// line that clocks the double-sampling flops of runtime_error_detector.
//
// This is a behavioural model (transport delays, not synthesizable): in
// silicon the block is a delay line whose tap is chosen by the swing level.
// The wire delay grows as the swing is lowered, so the sampling interval
// delta t must grow with it: 650 ps at LV (0.7 V), 500 ps at MV (0.85 V) and
// 200 ps at HV (1.0 V), each inside the bounds the timing analysis of the
// link gives for a 1 GHz clock. Every edge of clk_in reappears on clk_out
// delta t later; a change of 'level' applies to edges that follow it. The
// delay must stay below one clock period, as the timing of the scheme
// requires anyway.
//
// Interface: clk_in, level (scgc_pkg::level_e code) -> clk_out.
// Time unit 1 ps.
module adaptive_delay_line #(
  parameter int unsigned DT_LV_PS = 650,
  parameter int unsigned DT_MV_PS = 500,
  parameter int unsigned DT_HV_PS = 200
) (
  input  logic       clk_in,
  input  logic [1:0] level,
  output logic       clk_out
);

  int unsigned dt_ps;

  always_comb begin
    unique case (level)
      2'd0:    dt_ps = DT_LV_PS;
      2'd1:    dt_ps = DT_MV_PS;
      default: dt_ps = DT_HV_PS;
    endcase
  end

  initial clk_out = 1'b0;

  // Rising and falling edges are delayed by separate processes, so a delay
  // longer than half the clock period (but shorter than the period) still
  // reproduces every edge.
  always @(posedge clk_in) #(dt_ps) clk_out <= 1'b1;
  always @(negedge clk_in) #(dt_ps) clk_out <= 1'b0;

endmodule
