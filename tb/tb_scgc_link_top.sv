`timescale 1ps/1ps
// tb_scgc_link_top: end-to-end test of the whole link at its default size
// (32-bit packets, 8-bit phits, 10-bit green code, 30 wires, WINDOW 256).
//
// The transmit side of scgc_link_top is looped back to its receive side
// through link_model, which gives each wire a level-dependent delay and can
// make single wires slow (delay error), broken at the lowest swing, or
// inverted. Random packets go in; every packet that comes out is compared,
// in order, with what went in. The run walks through:
//   0. traffic at the reset level (HV) with some slow wires: double
//      sampling corrections, green code conversions
//   1. calibration with two copies of code bit 0 broken at LV: the test at
//      LV fails, the link retries at MV and passes (T_finish); packets
//      offered during the test are stalled, not lost
//   2. four run-time windows:
//      A every wire slow          -> rate > 15 %, level rises MV -> HV
//      B a quarter of wires slow  -> rate between 5 and 15 %, level holds
//      C clean, wire 4 inverted   -> rate < 5 %, level drops HV -> MV
//      D clean, wire 4 inverted   -> rate < 5 %, level stays at the MV floor
//      Wire 4 inverted makes the majority gates outvote an error every
//      time that bit is valid.
//   3. recalibration from run time with two copies of code bit 0 broken at
//      every level: LV, MV and HV all fail and the test ends at HV, which
//      becomes the floor; a clean window E then stays at HV
// Packets are only offered away from window boundaries, so the swing level
// never changes while data is on the wires (a rule of this test bench; the
// document does not say how traffic is handled across a level change).
// Every mechanism is counted, and one that never happened is a failure.
module tb_scgc_link_top;
  import scgc_pkg::*;

  localparam int unsigned WINDOW = 256;
  localparam time         T      = 1000;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              cal_start = 1'b0;
  logic              pkt_in_valid = 1'b0;
  logic [PKT_W-1:0]  pkt_in_data = '0;
  logic              pkt_in_ready;
  logic [WIRE_W-1:0] wire_tx, wire_rx;
  logic              wire_tx_valid, wire_rx_valid;
  logic [CODE_W-1:0] router_phit, maj_corrected;
  logic              router_phit_valid;
  logic              pkt_out_valid;
  logic [PKT_W-1:0]  pkt_out_data;
  logic [2:0]        swing_s;
  level_e            swing_level;
  logic              test_mode, t_finish, v_scale;
  logic [7:0]        test_err_count;

  logic [29:0] slow = '0, broken_lv = '0, broken_all = '0, invert = '0;

  always #(T/2) clk = ~clk;

  scgc_link_top dut (.*);

  link_model u_link (
    .clk, .tx(wire_tx), .tx_valid(wire_tx_valid), .level(swing_level),
    .slow, .broken_lv, .broken_all, .invert, .rx(wire_rx), .rx_valid(wire_rx_valid)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- traffic and scoreboard ----------------
  logic [PKT_W-1:0] expq[$];
  bit  traffic_on = 1'b0;
  int  slow_pm    = 0;      // per-mille chance a wire is slow in a cycle
  int  n_sent = 0, n_rcvd = 0, n_stall = 0;

  // Offer packets only when the level cannot change underneath them.
  function automatic bit quiet_ok();
    if (t_finish)
      return int'(dut.u_vsc.wcnt) >= 4 && int'(dut.u_vsc.wcnt) <= WINDOW - 16;
    return 1'b1;
  endfunction

  always @(negedge clk) begin
    if (!pkt_in_valid || pkt_in_ready_q) begin
      pkt_in_valid <= traffic_on && quiet_ok() && ($urandom % 4 != 0);
      pkt_in_data  <= $urandom;
    end
    for (int i = 0; i < 30; i++) slow[i] <= ($urandom % 1000) < slow_pm;
  end

  // a handshake seen at the last rising edge frees the offer
  logic pkt_in_ready_q = 1'b0;
  always @(posedge clk) begin
    pkt_in_ready_q <= pkt_in_valid && pkt_in_ready;
    if (rst_n && pkt_in_valid && pkt_in_ready) begin
      expq.push_back(pkt_in_data);
      n_sent++;
    end
    if (rst_n && pkt_in_valid && !pkt_in_ready && test_mode) n_stall++;
    if (rst_n && pkt_out_valid) begin
      n_rcvd++;
      if (expq.size() == 0) check(0, "packet out with none outstanding");
      else begin
        logic [PKT_W-1:0] e;
        e = expq.pop_front();
        check(pkt_out_data == e,
              $sformatf("packet %0d: got %08h expected %08h", n_rcvd, pkt_out_data, e));
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_green = 0, n_dsdc = 0, n_maj = 0, n_test_fail = 0, n_tfinish = 0;
  int n_raise = 0, n_hold = 0, n_drop = 0, n_floor = 0, max_test_err = 0;
  int n_recal = 0, n_hv_end = 0;
  level_e lvl_at_vs;
  bit     vs_q = 1'b0, tf_q = 1'b0;
  level_e lvl_q;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ser.phit_valid && !test_mode && dut.u_genc.converted != 0) n_green++;
    if (router_phit_valid && dut.rt_err_q != 0) n_dsdc++;
    if (dut.rx_valid_q && maj_corrected != 0) n_maj++;
    if (test_mode && int'(test_err_count) > max_test_err) max_test_err = int'(test_err_count);
    if (test_mode && swing_level > lvl_q && lvl_q != HV && dut.tpg_start)
      n_test_fail++;
    if (t_finish && !tf_q) n_tfinish++;
    tf_q  <= t_finish;
    lvl_q <= swing_level;
    vs_q  <= v_scale;
    if (v_scale) begin
      lvl_at_vs = swing_level;
      $display("[%0t] window end: %0d flagged of %0d bits (%0.2f %%), level %s",
               $time, dut.u_vsc.err_nx, dut.u_vsc.bits_nx,
               dut.u_vsc.bits_nx == 0 ? 0.0 :
               100.0 * real'(dut.u_vsc.err_nx) / real'(dut.u_vsc.bits_nx),
               swing_level.name());
    end
    if (vs_q) begin
      if (swing_level > lvl_at_vs) n_raise++;
      else if (swing_level < lvl_at_vs) n_drop++;
      else n_hold++;
    end
  end

  // one-hot select must always match the level
  always @(posedge clk) if (rst_n)
    check(swing_s == (swing_level == HV ? 3'b001 : swing_level == MV ? 3'b010 : 3'b100),
          "swing_s not one-hot for level");

  task automatic wait_window_end(output level_e before_lvl, output level_e after_lvl);
    @(posedge clk iff v_scale);
    before_lvl = swing_level;
    @(posedge clk);
    #1 after_lvl = swing_level;
  endtask

  task automatic drain();
    traffic_on = 1'b0;
    repeat (30) @(posedge clk);
  endtask

  initial begin
    level_e a, b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 0. traffic at the reset level with some slow wires
    check(swing_level == HV && !t_finish, "reset level is HV, not calibrated");
    slow_pm    = 100;
    traffic_on = 1'b1;
    repeat (200) @(posedge clk);
    drain();
    slow_pm = 0;

    // 1. calibration: LV broken on both copies 0 and 1 of code bit 0
    broken_lv  = 30'b11;
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    traffic_on = 1'b1;                  // offered while testing: must stall
    check(test_mode && swing_level == LV, "test starts at LV");
    @(posedge clk iff t_finish);
    #1;
    check(swing_level == MV, $sformatf("calibrated to MV, got %s", swing_level.name()));
    check(dut.u_vsc.floor_lvl == MV, "floor set to MV");
    check(test_err_count == 0, "passing test reports no errors");
    check(max_test_err > 0, "failing test at LV reported errors");

    // 2A. every wire slow: rise to HV
    slow_pm = 1000;
    wait_window_end(a, b);
    check(a == MV && b == HV, $sformatf("window A: %s -> %s, expected MV -> HV", a.name(), b.name()));
    // 2B. a quarter of the wires slow: hold
    slow_pm = 250;
    wait_window_end(a, b);
    check(a == HV && b == HV, $sformatf("window B: %s -> %s, expected hold at HV", a.name(), b.name()));
    // 2C. clean, wire 4 inverted (set while the link is quiet)
    slow_pm = 0;
    wait (dut.u_vsc.wcnt == 2);
    invert = 30'b1 << 4;
    wait_window_end(a, b);
    check(a == HV && b == MV, $sformatf("window C: %s -> %s, expected HV -> MV", a.name(), b.name()));
    // 2D. still clean: the floor stops a further drop
    wait_window_end(a, b);
    check(a == MV && b == MV, $sformatf("window D: %s -> %s, expected stay at MV", a.name(), b.name()));
    if (a == MV && b == MV) n_floor++;
    drain();

    // 3. recalibrate from run time; code bit 0 broken at every level
    broken_lv  = '0;
    invert     = '0;
    broken_all = 30'b11;
    max_test_err = 0;
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    check(test_mode && !t_finish && swing_level == LV, "recalibration restarts the test at LV");
    if (test_mode && !t_finish) n_recal++;
    @(posedge clk iff t_finish);
    #1;
    check(swing_level == HV && dut.u_vsc.floor_lvl == HV, "test failing at every level ends at HV");
    check(test_err_count != 0, "the final HV pass still reports its errors");
    if (swing_level == HV && test_err_count != 0) n_hv_end++;
    @(negedge clk) broken_all = '0;
    traffic_on = 1'b1;
    // 3E. clean window at the HV floor: no drop
    wait_window_end(a, b);
    check(a == HV && b == HV, $sformatf("window E: %s -> %s, expected stay at HV", a.name(), b.name()));
    drain();

    check(expq.size() == 0, $sformatf("%0d packets never arrived", expq.size()));
    check(n_sent == n_rcvd, "sent and received packet counts match");

    $display("mechanisms: packets=%0d green_conversions=%0d dsdc_corrections=%0d majority_corrections=%0d",
             n_rcvd, n_green, n_dsdc, n_maj);
    $display("            stalls=%0d test_failures=%0d (max errs %0d) t_finish=%0d raise=%0d hold=%0d drop=%0d floor=%0d recal=%0d hv_end=%0d",
             n_stall, n_test_fail, max_test_err, n_tfinish, n_raise, n_hold, n_drop, n_floor, n_recal, n_hv_end);
    check(n_rcvd  > 0, "packets delivered");
    check(n_green > 0, "green code conversions happened");
    check(n_dsdc  > 0, "double sampling corrections happened");
    check(n_maj   > 0, "majority corrections happened");
    check(n_stall > 0, "serializer stalled during test");
    check(n_test_fail > 0, "test failure with retry at a higher level happened");
    check(n_tfinish == 2, "T_finish raised once per calibration");
    check(n_recal > 0, "recalibration from run time happened");
    check(n_hv_end > 0, "test ending at HV after failing at every level happened");
    check(n_raise > 0, "run-time raise happened");
    check(n_hold  > 0, "run-time hold happened");
    check(n_drop  > 0, "run-time drop happened");
    check(n_floor > 0, "drop stopped at the calibrated floor");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 20000);
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
