`timescale 1ps/1ps
// triplication_encoder: triplication error correction coding stage,
// transmit side.
//
// Every input bit is driven onto three adjacent wires: y[3i+2:3i] = {3{x[i]}}.
// The copies have Hamming distance 3, so one wrong wire per bit can be
// outvoted at the receiver (majority_decoder). Because neighbouring wires
// of a group always carry the same value, the 010/101 patterns and their
// overlapping transitions cannot occur inside a group.
//
// Interface: x[K-1:0] -> y[3K-1:0]. Purely combinational.
module triplication_encoder #(
  parameter int unsigned K = scgc_pkg::CODE_W
) (
  input  logic [K-1:0]   x,
  output logic [3*K-1:0] y
);

  always_comb begin
    for (int i = 0; i < K; i++)
      y[3*i +: 3] = {3{x[i]}};
  end

endmodule
