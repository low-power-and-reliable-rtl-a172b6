`timescale 1ps/1ps
// runtime_error_detector: run-time error detection stage, a modified
// double sampling data checking circuit per link wire.
//
// DFF2 samples each wire on the link clock. DFF3, clocked by the same
// clock delayed by delta t (from adaptive_delay_line), samples the XOR of
// the wire and DFF2's output: it is 1 when the wire was still moving at the
// clock edge, i.e. a late transition (delay error) or a glitch. A second
// flop on the delayed clock takes a late sample of the wire, and a
// multiplexer steered by DFF3 passes the late sample in place of the early
// one, so a timing error shorter than delta t is corrected in place without
// a retransmission. The flags feed the voltage scaling control unit as the
// run-time error rate.
//
// Interface: din are the level-converted wires; dout (corrected data) and
// err (per-wire flag) are valid from delta t after a clock edge up to the
// next edge, where the decoder register (DFF4) takes them.
//
// Timing, as required by the scheme (t_d = driver, wire and converter
// delay):
//   t_DFF1 + t_d + t_XOR + t_setup3 < t_clk + delta t
//   t_DFF2 + t_XOR + t_setup3 < delta t < t_DFF2 + t_d + t_XOR + t_setup3
//   delta t + t_DFF3 + t_MUX + t_decoder + t_setup4 < t_clk
//
// The DFF2/DFF3/XOR check follows the published stage; the late-sample
// flop feeding the multiplexer is this design's reading of its correction
// multiplexer.
module runtime_error_detector #(
  parameter int unsigned W = scgc_pkg::WIRE_W
) (
  input  logic         clk,
  input  logic         clk_dly,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic [W-1:0] err
);

  logic [W-1:0] q_main;   // DFF2
  logic [W-1:0] q_late;   // late sample on the delayed clock

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_main <= '0;
    else        q_main <= din;
  end

  // DFF3 and the late sample
  always_ff @(posedge clk_dly or negedge rst_n) begin
    if (!rst_n) begin
      err    <= '0;
      q_late <= '0;
    end else begin
      err    <= din ^ q_main;
      q_late <= din;
    end
  end

  // Correction multiplexer
  always_comb begin
    for (int i = 0; i < W; i++)
      dout[i] = err[i] ? q_late[i] : q_main[i];
  end

endmodule
