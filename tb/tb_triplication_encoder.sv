`timescale 1ps/1ps
// tb_triplication_encoder: every input bit must appear on its three
// adjacent wires, for walking-one, walking-zero and random inputs.
module tb_triplication_encoder;
  int checks = 0, failures = 0;

  logic [9:0]  x;
  logic [29:0] y;

  triplication_encoder dut (.x, .y);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic apply(input logic [9:0] v);
    logic [29:0] want;
    x = v;
    #10;
    want = '0;
    for (int i = 0; i < 30; i++) want[i] = v[i / 3];
    check(y == want, $sformatf("x=%03h y=%08h want %08h", v, y, want));
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) apply(10'(1) << i);
    for (int i = 0; i < 10; i++) apply(~(10'(1) << i));
    for (int n = 0; n < 200; n++) apply(10'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
