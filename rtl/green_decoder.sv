`timescale 1ps/1ps
// green_decoder: green bus coding stage, receive side.
//
// Per 5-bit group: y0 = c0 ^ c4, y2 = c2 ^ c4, y1 = c1, y3 = c3. The
// converted bit c4 says whether bits 0 and 2 were inverted by the encoder,
// so decoding costs two XOR gates per group and no other logic.
//
// Interface: code[5g+4:5g] -> data[4g+3:4g]. Purely combinational.
// Equations follow the published decoder; group order matches
// green_encoder.
module green_decoder
#(
  parameter int unsigned GROUPS = scgc_pkg::GROUPS
) (
  input  logic [5*GROUPS-1:0] code,
  output logic [4*GROUPS-1:0] data
);

  always_comb begin
    for (int g = 0; g < GROUPS; g++)
      data[4*g +: 4] = scgc_pkg::green_dec5(code[5*g +: 5]);
  end

endmodule
