`timescale 1ps/1ps
// green_encoder: green bus coding stage, transmit side.
//
// Each 4-bit group of the phit is mapped to a 5-bit codeword picked, among
// the 32 five-bit patterns, for the least coupling and self-switching
// energy on a bus whose every line is triplicated (loading weight 3 per
// line, coupling weight lambda between neighbours). Eleven data words pass
// unchanged with c4 = 0 (the original set); the five others (the converted
// set) get c4 = 1 and their bits 0 and 2 inverted, which maps them one to
// one onto the original set. Bits 1 and 3 are never changed.
//
// Interface: data[4g+3:4g] -> code[5g+4:5g] for group g; converted[g] is
// the c4 bit of group g. Purely combinational, no clock.
//
// The code table and its equations are the published scheme; the order of
// groups inside the phit is this design's choice.
module green_encoder
#(
  parameter int unsigned GROUPS = scgc_pkg::GROUPS
) (
  input  logic [4*GROUPS-1:0] data,
  output logic [5*GROUPS-1:0] code,
  output logic [GROUPS-1:0]   converted
);

  always_comb begin
    for (int g = 0; g < GROUPS; g++) begin
      code[5*g +: 5]  = scgc_pkg::green_enc4(data[4*g +: 4]);
      converted[g]    = code[5*g + 4];
    end
  end

endmodule
