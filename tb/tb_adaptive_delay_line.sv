`timescale 1ps/1ps
// tb_adaptive_delay_line: measures the delay from each rising and falling
// clock edge to the delayed clock for the three swing levels: 650 ps (LV),
// 500 ps (MV) and 200 ps (HV).
module tb_adaptive_delay_line;
  int checks = 0, failures = 0;

  logic       clk = 0, clk_out;
  logic [1:0] level = 2'd0;

  adaptive_delay_line dut (.clk_in(clk), .level, .clk_out);

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned want [3] = '{650, 500, 200};
    for (int l = 0; l < 3; l++) begin
      level = 2'(l);
      repeat (3) @(posedge clk);
      for (int n = 0; n < 4; n++) begin
        time t0, t1;
        @(posedge clk);
        t0 = $time;
        @(posedge clk_out);
        t1 = $time;
        check(t1 - t0 == want[l], $sformatf("level %0d rise delay %0t want %0d", l, t1 - t0, want[l]));
        @(negedge clk);
        t0 = $time;
        @(negedge clk_out);
        t1 = $time;
        check(t1 - t0 == want[l], $sformatf("level %0d fall delay %0t want %0d", l, t1 - t0, want[l]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
