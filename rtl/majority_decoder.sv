`timescale 1ps/1ps
// majority_decoder: triplication error correction coding stage, receive
// side.
//
// Each group of three wires y[3i+2:3i] = {a, b, c} is resolved by a
// majority gate x[i] = ab + bc + ca, which corrects any single wrong wire
// of the group in one gate delay. corrected[i] reports that the three
// copies disagreed, i.e. that one wire was outvoted; it is an observation
// output for error statistics and is not needed for decoding.
//
// Interface: y[3K-1:0] -> x[K-1:0], corrected[K-1:0]. Combinational.
module majority_decoder #(
  parameter int unsigned K = scgc_pkg::CODE_W
) (
  input  logic [3*K-1:0] y,
  output logic [K-1:0]   x,
  output logic [K-1:0]   corrected
);

  always_comb begin
    for (int i = 0; i < K; i++) begin
      logic a, b, c;
      a = y[3*i];
      b = y[3*i + 1];
      c = y[3*i + 2];
      x[i]         = (a & b) | (b & c) | (c & a);
      corrected[i] = (a ^ b) | (b ^ c);
    end
  end

endmodule
