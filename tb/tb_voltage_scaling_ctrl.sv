`timescale 1ps/1ps
// tb_voltage_scaling_ctrl: the testbench stands in for the test pattern
// generator (done 20 cycles after T_start), the test error detector (busy
// for 3 cycles after done, error when the current level is marked bad) and
// the run-time error flags (a chosen number of flagged wires per data
// phit). Checked: calibration from LV upward with a resend at each failing
// level, T_finish, V_scale every WINDOW cycles, and the raise / hold / drop
// decisions at 5 % and 15 % against a reference computed here in real
// arithmetic, including the floor set by the test and the ceiling at HV.
module tb_voltage_scaling_ctrl;
  import scgc_pkg::*;
  localparam int WIN = 16;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, cal_start = 0;
  logic        tpg_start, tpg_done = 0, ted_busy = 0, ted_error = 0, ted_clear;
  logic        test_mode, t_finish, rt_valid = 0, v_scale;
  logic [29:0] rt_err = '0;
  level_e      level;
  logic [2:0]  s;

  voltage_scaling_ctrl #(.W(30), .WINDOW(WIN)) dut (
    .clk, .rst_n, .cal_start, .tpg_start, .tpg_done, .ted_busy, .ted_error,
    .ted_clear, .test_mode, .t_finish, .rt_valid, .rt_err, .v_scale, .level, .s);

  always #500 clk = ~clk;

  logic [2:0] bad_levels = '0;   // bit l: a test pass at level l fails
  int n_starts = 0;

  // test generator / detector stand-in
  initial forever begin
    @(posedge clk);
    if (tpg_start) begin
      n_starts++;
      check(ted_clear && test_mode, "clear with T_start");
      repeat (19) @(posedge clk);
      #1 tpg_done = 1; ted_busy = 1;
      @(posedge clk);
      #1 tpg_done = 0; ted_error = bad_levels[level];
      repeat (3) @(posedge clk);
      #1 ted_busy = 0;
      @(posedge clk);
      #1 ted_error = 0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  function automatic logic [2:0] s_of(level_e l);
    return (l == LV) ? 3'b100 : (l == MV) ? 3'b010 : 3'b001;
  endfunction

  task automatic calibrate(input logic [2:0] bad, input level_e want, input int want_starts);
    int n0, guard;
    bad_levels = bad;
    n0 = n_starts;
    @(negedge clk); cal_start = 1;
    @(negedge clk); cal_start = 0;
    check(test_mode && !t_finish && level == LV, "test starts at LV");
    guard = 0;
    while (!t_finish && guard < 500) begin @(negedge clk); guard++; end
    check(t_finish && !test_mode, "T_finish");
    check(level == want && s == s_of(want), $sformatf("calibrated level %s want %s", level.name(), want.name()));
    check(n_starts - n0 == want_starts, $sformatf("test passes %0d want %0d", n_starts - n0, want_starts));
  endtask

  // one run-time window: n_err flagged bits on each of the first 'cycles'
  // data phits, n_err2 on the rest
  task automatic window(input int n_err, input int n_err2, input int cycles, input bit valid,
                        input level_e floor_l);
    level_e lvl0, want;
    real rate;
    int errs, bits;
    lvl0 = level;
    errs = 0; bits = 0;
    // align to window start: v_scale was just seen
    for (int c = 0; c < WIN; c++) begin
      int e;
      e = (c < cycles) ? n_err : n_err2;
      rt_valid = valid;
      rt_err = '0;
      for (int b = 0; b < e; b++) rt_err[(b * 7 + c) % 30] = 1'b1;  // e distinct wires
      if (valid) begin errs += $countones(rt_err); bits += 30; end
      check(v_scale == (c == WIN - 1), "V_scale period");
      @(negedge clk);
    end
    rt_valid = 0; rt_err = '0;
    rate = (bits == 0) ? -1.0 : real'(errs) / real'(bits);
    if (rate < 0) want = lvl0;
    else if (rate < 0.05) want = (lvl0 > floor_l) ? level_e'(lvl0 - 1) : lvl0;
    else if (rate > 0.15) want = (lvl0 < HV) ? level_e'(lvl0 + 1) : lvl0;
    else want = lvl0;
    check(level == want && s == s_of(want),
          $sformatf("window rate %0.3f: level %s want %s", rate, level.name(), want.name()));
  endtask

  task automatic sync_window();
    int guard;
    guard = 0;
    while (!v_scale && guard < 100) begin @(negedge clk); guard++; end
    @(negedge clk);
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(level == HV && s == 3'b001 && !t_finish && !test_mode, "reset state");
    // LV fails, MV passes: two passes, floor MV
    calibrate(3'b001, MV, 2);
    sync_window();
    window(6, 6, WIN, 1, MV);     // 20 %   -> HV
    window(6, 6, WIN, 1, MV);     // 20 %   -> stays HV
    window(3, 3, WIN, 1, MV);     // 10 %   -> hold
    window(1, 1, WIN, 1, MV);     // 3.3 %  -> MV
    window(4, 6, 12, 1, MV);      // exactly 15 % -> hold at MV
    window(1, 1, WIN, 1, MV);     // floor  -> stays MV
    window(0, 0, WIN, 0, MV);     // no data -> hold
    window(2, 1, 8, 1, MV);       // 5 %: not below 5 % -> hold
    // all pass: floor LV
    calibrate(3'b000, LV, 1);
    sync_window();
    window(0, 0, WIN, 1, LV);
    window(9, 9, WIN, 1, LV);     // 30 % -> MV
    window(0, 0, WIN, 1, LV);     // -> LV
    // every level fails: ends at HV after three passes
    calibrate(3'b111, HV, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
