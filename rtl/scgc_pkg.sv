`timescale 1ps/1ps
// scgc_pkg: types, sizes and the 4-to-5 green bus code shared by the
// self-corrected green coded NoC link.
//
// Sizes follow the link the design is built for: a 32-bit packet word is
// serialized 4:1 into 8-bit phits, each phit is green coded into 10 bits
// (two 4-to-5 groups) and every coded bit is triplicated onto 30 wires.
// The swing levels are the three supply levels of the low-swing drivers.
package scgc_pkg;

  localparam int unsigned PKT_W   = 32;  // packet word
  localparam int unsigned RATIO   = 4;   // serialization ratio
  localparam int unsigned PHIT_W  = PKT_W / RATIO;        // 8
  localparam int unsigned GROUPS  = PHIT_W / 4;           // 2 green groups
  localparam int unsigned CODE_W  = GROUPS * 5;           // 10, phit in the router
  localparam int unsigned WIRE_W  = 3 * CODE_W;           // 30, phit on the wires

  // Signal swing of the link wires. LV = Vdd-2Vt (0.7 V), MV = Vdd-Vt
  // (0.85 V), HV = Vdd (1.0 V). The numeric order is the order of swing.
  typedef enum logic [1:0] {
    LV = 2'd0,
    MV = 2'd1,
    HV = 2'd2
  } level_e;

  // Green encoder for one group. The converted bit c4 is set for the five
  // data words of the converted set (0101, 1001, 1010, 1011, 1101); then
  // c0 and c2 are the inverted data bits, otherwise the data bits. c1 and
  // c3 are always x1 and x3.
  function automatic logic [4:0] green_enc4(input logic [3:0] x);
    logic c4;
    c4 = (x[2] & ~x[1] & x[0]) | (x[3] & ~x[2] & x[0]) | (x[3] & ~x[2] & x[1]);
    return {c4, x[3], x[2] ^ c4, x[1], x[0] ^ c4};
  endfunction

  // Green decoder for one group: undo the conditional inversion of bits 0
  // and 2 with the converted bit c4.
  function automatic logic [3:0] green_dec5(input logic [4:0] c);
    return {c[3], c[2] ^ c[4], c[1], c[0] ^ c[4]};
  endfunction

endpackage
