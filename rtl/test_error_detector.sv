`timescale 1ps/1ps
// test_error_detector: checks the crosstalk-aware test vectors after error
// correction.
//
// The vector the test pattern generator drives is kept in a LATENCY-deep
// delay line, which matches the link pipeline from the generator to the
// decoded receive register. When a delayed vector comes due it is compared
// with the received, majority-corrected vector; every mismatch adds one to
// err_count. Since the triplication code corrects single wire errors, a
// mismatch means the link is not reliable at the current swing.
//
// Interface: 'clear' empties the count and the delay line at the start of
// a pass; sent_valid/sent come from the generator; rcvd is sampled
// LATENCY cycles after the matching sent_valid. 'busy' is high while any
// vector is in flight; 'error' = (err_count != 0). err_count saturates.
//
// The detector's function is the published one; the delay-line alignment,
// the count width and saturation are this design's choices.
module test_error_detector #(
  parameter int unsigned W       = scgc_pkg::CODE_W,
  parameter int unsigned LATENCY = 3,
  parameter int unsigned CNT_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             sent_valid,
  input  logic [W-1:0]     sent,
  input  logic [W-1:0]     rcvd,
  output logic [CNT_W-1:0] err_count,
  output logic             error,
  output logic             busy
);

  logic [W-1:0]       exp_q [LATENCY];
  logic [LATENCY-1:0] vld_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      for (int i = 0; i < LATENCY; i++) exp_q[i] <= '0;
    end else if (clear) begin
      vld_q <= '0;
    end else begin
      vld_q    <= {vld_q[LATENCY-2:0], sent_valid};
      exp_q[0] <= sent;
      for (int i = 1; i < LATENCY; i++) exp_q[i] <= exp_q[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      err_count <= '0;
    else if (clear)
      err_count <= '0;
    else if (vld_q[LATENCY-1] && (rcvd != exp_q[LATENCY-1]) && (err_count != '1))
      err_count <= err_count + CNT_W'(1);
  end

  assign error = (err_count != '0);
  assign busy  = (vld_q != '0) || sent_valid;

  initial assert (LATENCY >= 2) else $error("LATENCY must be at least 2");

endmodule
