`timescale 1ps/1ps
// tb_maf_tpg: one full MAF pass on 10 lines. Expected vectors are built
// from the aggressor/victim table of the MAF pattern set: for victim v and
// step k, line v carries the victim value and all other lines the aggressor
// value. The pass must last exactly 8*10 cycles, 'done' must pulse once on
// the last vector, and the generator must stay idle (all zero) without
// T_start. A second pass checks that it restarts from victim 0.
module tb_maf_tpg;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, t_start = 0;
  logic [9:0] d;
  logic       active, done;
  logic [3:0] victim;

  maf_tpg #(.N(10)) dut (.clk, .rst_n, .t_start, .d, .active, .done, .victim);

  always #500 clk = ~clk;

  localparam logic AGG [8] = '{0, 1, 0, 1, 0, 1, 1, 0};
  localparam logic VIC [8] = '{0, 1, 0, 0, 1, 0, 1, 1};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  task automatic run_pass();
    int dones;
    dones = 0;
    @(negedge clk); t_start = 1;
    @(negedge clk); t_start = 0;
    for (int v = 0; v < 10; v++)
      for (int k = 0; k < 8; k++) begin
        logic [9:0] want;
        want = {10{AGG[k]}};
        want[v] = VIC[k];
        check(active, "active during pass");
        check(d == want, $sformatf("victim %0d step %0d d=%03h want %03h", v, k, d, want));
        check(done == (v == 9 && k == 7), "done only on last vector");
        if (done) dones++;
        @(negedge clk);
      end
    check(!active && d == '0, "back in S0 after 80 cycles");
    check(dones == 1, "one done pulse");
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) begin
      @(negedge clk);
      check(!active && d == '0 && !done, "idle without T_start");
    end
    run_pass();
    repeat (3) @(negedge clk);
    check(!active, "stays idle");
    run_pass();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
