`timescale 1ps/1ps
// deserializer: 1-to-4 shift-register deserializer of the link receiver.
//
// Valid phits are shifted in from the top of a shift register, so after
// RATIO of them the first (least significant) slice sits at the bottom and
// the register holds the packet word. A slice counter frames the words:
// after reset every RATIO-th valid phit completes a word.
//
// Interface: phit_valid/phit in; pkt_valid is a one-cycle pulse with the
// completed word on pkt_data, which holds until the next word completes.
//
// Timing: pkt_valid rises the cycle after the last phit of the word is
// presented.
module deserializer #(
  parameter int unsigned PKT_W = scgc_pkg::PKT_W,
  parameter int unsigned RATIO = scgc_pkg::RATIO,
  localparam int unsigned PW   = PKT_W / RATIO,
  localparam int unsigned CW   = $clog2(RATIO)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             phit_valid,
  input  logic [PW-1:0]    phit,
  output logic             pkt_valid,
  output logic [PKT_W-1:0] pkt_data
);

  logic [PKT_W-PW-1:0] sreg;     // slices received so far of this word
  logic [CW-1:0]       cnt;
  logic [PKT_W-1:0]    shifted;

  assign shifted = {phit, sreg};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg      <= '0;
      cnt       <= '0;
      pkt_valid <= 1'b0;
      pkt_data  <= '0;
    end else begin
      pkt_valid <= 1'b0;
      if (phit_valid) begin
        sreg <= shifted[PKT_W-1:PW];
        if (cnt == CW'(RATIO - 1)) begin
          cnt       <= '0;
          pkt_valid <= 1'b1;
          pkt_data  <= shifted;
        end else begin
          cnt <= cnt + CW'(1);
        end
      end
    end
  end

endmodule
