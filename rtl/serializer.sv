`timescale 1ps/1ps
// serializer: 4-to-1 shift-register serializer of the link transmitter.
//
// A PKT_W-bit packet word is loaded into a shift register and leaves as
// RATIO phits of PKT_W/RATIO bits on consecutive cycles, least significant
// slice first. Narrowing the link from 32 to 8 bits before coding is what
// keeps the coded phit in the switch at 10 bits instead of 40.
//
// Interface: valid/ready on the word side (a word is taken in a cycle with
// pkt_valid & pkt_ready), phit_valid/phit on the link side. A new word is
// accepted while the last slice of the previous one is on the output, so a
// continuous stream gives one phit per cycle. 'stall' freezes the shift
// register and forces phit_valid low (used while the link runs its test);
// pkt_ready is low during a stall.
//
// Timing: phit comes straight from the shift register and phit_valid is
// decoded from the slice counter and 'stall'; the first slice of a word
// appears the cycle after the word is accepted.
module serializer #(
  parameter int unsigned PKT_W = scgc_pkg::PKT_W,
  parameter int unsigned RATIO = scgc_pkg::RATIO,
  localparam int unsigned PW   = PKT_W / RATIO,
  localparam int unsigned CW   = $clog2(RATIO + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          stall,
  input  logic          pkt_valid,
  input  logic [PKT_W-1:0] pkt_data,
  output logic          pkt_ready,
  output logic          phit_valid,
  output logic [PW-1:0] phit
);

  logic [PKT_W-1:0] sreg;   // slice on the output is sreg[PW-1:0]
  logic [CW-1:0]    left;   // slices still to send, including the current one

  // Ready when nothing is pending after the current slice.
  assign pkt_ready  = !stall && (left <= CW'(1));
  assign phit       = sreg[PW-1:0];
  assign phit_valid = !stall && (left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      left <= '0;
    end else if (!stall) begin
      if (pkt_valid && pkt_ready) begin
        sreg <= pkt_data;
        left <= CW'(RATIO);
      end else if (left != '0) begin
        sreg <= sreg >> PW;
        left <= left - CW'(1);
      end
    end
  end

endmodule
