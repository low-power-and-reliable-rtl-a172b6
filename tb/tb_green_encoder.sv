`timescale 1ps/1ps
// tb_green_encoder: exhaustive check of the 8-to-10 green encoder against
// the published 16-entry codeword table (entered here as constants, not
// computed from the encoder equations), for both groups and all 256 phits.
// Also checks the converted flag and that every codeword decodes back.
module tb_green_encoder;
  int checks = 0, failures = 0;

  logic [7:0] data;
  logic [9:0] code;
  logic [1:0] conv;

  green_encoder dut (.data, .code, .converted(conv));

  // codeword C4..C0 of data word X3..X0 = index
  localparam logic [4:0] TABLE [16] = '{
    5'b00000, 5'b00001, 5'b00010, 5'b00011,
    5'b00100, 5'b10000, 5'b00110, 5'b00111,
    5'b01000, 5'b11100, 5'b11111, 5'b11110,
    5'b01100, 5'b11000, 5'b01110, 5'b01111
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      data = 8'(v);
      #10;
      check(code[4:0] == TABLE[v % 16], $sformatf("group0 data=%02h code=%03h", v, code));
      check(code[9:5] == TABLE[v / 16], $sformatf("group1 data=%02h code=%03h", v, code));
      check(conv[0] == TABLE[v % 16][4] && conv[1] == TABLE[v / 16][4],
            $sformatf("converted data=%02h", v));
    end
    // the table is one to one: 16 distinct codewords
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++)
        check(TABLE[a] != TABLE[b], "table distinct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
