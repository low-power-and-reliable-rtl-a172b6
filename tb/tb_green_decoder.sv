`timescale 1ps/1ps
// tb_green_decoder: the 10-to-8 green decoder must invert the published
// codeword table for every pair of codewords (256 phits), and leave bits 1
// and 3 of every group untouched for arbitrary 10-bit inputs.
module tb_green_decoder;
  int checks = 0, failures = 0;

  logic [9:0] code;
  logic [7:0] data;

  green_decoder dut (.code, .data);

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
      code = {TABLE[v / 16], TABLE[v % 16]};
      #10;
      check(data == 8'(v), $sformatf("code=%03h data=%02h want %02h", code, data, v));
    end
    for (int v = 0; v < 1024; v++) begin
      code = 10'(v);
      #10;
      check(data[1] == code[1] && data[3] == code[3] && data[5] == code[6] && data[7] == code[8],
            $sformatf("pass-through bits code=%03h", code));
      // bits 0 and 2 are inverted exactly when c4 is set
      check((data[0] != code[0]) == code[4] && (data[2] != code[2]) == code[4],
            $sformatf("conditional inversion code=%03h", code));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
