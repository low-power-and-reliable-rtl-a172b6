`timescale 1ps/1ps
// tb_majority_decoder: every 3-wire group must resolve to the value held by
// at least two of its wires. Checks all 8 patterns of each group, then
// random words with at most one flipped wire per group (which must decode
// to the sent word and flag exactly the flipped groups), then two flipped
// wires in a group (which must decode wrongly: the code corrects one).
module tb_majority_decoder;
  int checks = 0, failures = 0;

  logic [29:0] y;
  logic [9:0]  x, fix;

  majority_decoder dut (.y, .x, .corrected(fix));

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
    for (int g = 0; g < 10; g++)
      for (int p = 0; p < 8; p++) begin
        int ones;
        y = '0;
        y[3*g +: 3] = 3'(p);
        ones = p[0] + p[1] + p[2];
        #10;
        check(x[g] == (ones >= 2), $sformatf("group %0d pattern %0d", g, p));
        check(fix[g] == (ones == 1 || ones == 2), $sformatf("flag group %0d pattern %0d", g, p));
      end
    for (int n = 0; n < 300; n++) begin
      logic [9:0] word, flipped;
      word    = 10'($urandom);
      flipped = 10'($urandom);
      for (int i = 0; i < 10; i++) begin
        y[3*i +: 3] = {3{word[i]}};
        if (flipped[i]) y[3*i + ($urandom % 3)] ^= 1'b1;
      end
      #10;
      check(x == word, $sformatf("single errors word=%03h got %03h", word, x));
      check(fix == flipped, $sformatf("flags %03h want %03h", fix, flipped));
    end
    for (int n = 0; n < 50; n++) begin
      logic [9:0] word;
      int g, keep;
      word = 10'($urandom);
      g    = $urandom % 10;
      keep = $urandom % 3;
      for (int i = 0; i < 10; i++) y[3*i +: 3] = {3{word[i]}};
      for (int k = 0; k < 3; k++) if (k != keep) y[3*g + k] ^= 1'b1;
      #10;
      check(x == (word ^ (10'(1) << g)), $sformatf("double error group %0d", g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
