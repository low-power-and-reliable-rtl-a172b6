`timescale 1ps/1ps
// maf_tpg: maximal-aggressor-fault (MAF) test pattern generator of the
// crosstalk-aware test error detection stage.
//
// In the MAF model one line is the victim and all other lines are
// aggressors that switch together. Eight vectors per victim cover the six
// crosstalk faults: rising and falling speed-up, positive glitch, rising
// and falling delay, and negative glitch. A state machine S0..S8 produces
// the (aggressor, victim) values of the eight vectors:
//
//   state      S1 S2 S3 S4 S5 S6 S7 S8
//   aggressor   0  1  0  1  0  1  1  0
//   victim      0  1  0  0  1  0  1  1
//
// A victim counter (reset in S0, advanced in S8) selects the victim line
// through a select decoder, and a 2-to-1 multiplexer per line passes the
// victim or the aggressor value. S8 returns to S1 for the next victim, or
// to S0 once the counter has reached N-1, so a full test takes 8N cycles.
//
// Interface: t_start (T_start) starts a pass from S0; d is the vector,
// registered in the state machine and valid while 'active'; 'done' pulses
// in the cycle the machine leaves S8 of the last victim. In S0 all lines
// are 0 (this design's choice).
//
// The state sequence, counter and multiplexer structure follow the
// published generator; the S0 output and the exact counter enable cycle
// are this design's choices.
module maf_tpg #(
  parameter int unsigned N  = scgc_pkg::CODE_W,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          t_start,
  output logic [N-1:0]  d,
  output logic          active,
  output logic          done,
  output logic [CW-1:0] victim
);

  typedef enum logic [3:0] {S0, S1, S2, S3, S4, S5, S6, S7, S8} state_e;

  state_e        state, state_nx;
  logic          c_reset, c_enable;
  logic          agg_v, vic_v;
  logic [N-1:0]  sel;

  // Next state
  always_comb begin
    state_nx = state;
    unique case (state)
      S0: if (t_start) state_nx = S1;
      S1: state_nx = S2;
      S2: state_nx = S3;
      S3: state_nx = S4;
      S4: state_nx = S5;
      S5: state_nx = S6;
      S6: state_nx = S7;
      S7: state_nx = S8;
      S8: state_nx = (victim == CW'(N - 1)) ? S0 : S1;
      default: state_nx = S0;
    endcase
  end

  // Aggressor and victim values of each state
  always_comb begin
    unique case (state)
      S1:      {agg_v, vic_v} = 2'b00;
      S2:      {agg_v, vic_v} = 2'b11;
      S3:      {agg_v, vic_v} = 2'b00;
      S4:      {agg_v, vic_v} = 2'b10;
      S5:      {agg_v, vic_v} = 2'b01;
      S6:      {agg_v, vic_v} = 2'b10;
      S7:      {agg_v, vic_v} = 2'b11;
      S8:      {agg_v, vic_v} = 2'b01;
      default: {agg_v, vic_v} = 2'b00;
    endcase
  end

  assign c_reset  = (state == S0);
  assign c_enable = (state == S8);
  assign active   = (state != S0);
  assign done     = (state == S8) && (victim == CW'(N - 1));

  // Victim counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        victim <= '0;
    else if (c_reset)  victim <= '0;
    else if (c_enable) victim <= victim + CW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S0;
    else        state <= state_nx;
  end

  // Select decoder and per-line 2-to-1 multiplexers
  always_comb begin
    for (int i = 0; i < N; i++) begin
      sel[i] = (victim == CW'(i));
      d[i]   = sel[i] ? vic_v : agg_v;
    end
  end

endmodule
