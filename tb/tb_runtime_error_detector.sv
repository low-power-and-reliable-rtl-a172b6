`timescale 1ps/1ps
// tb_runtime_error_detector: 1 GHz clock, delayed clock 650 ps later (the
// LV setting). Every cycle the four wires take new random values with one
// of these timings relative to the clock edge that should sample them:
//   NORMAL    settle 300 ps before the edge      -> no flag, data passed
//   LATE      change 300 ps after the edge       -> flag where the value
//             (delay error, inside delta t)         changed, data corrected
//   GLITCH    correct value, inverted from 100 ps before to 100 ps after
//             the edge                           -> flag, data corrected
//   TOO_LATE  change 800 ps after the edge       -> missed: no flag, old
//             (beyond delta t)                      data (limit of the scheme)
// Outputs are checked 900 ps after the edge, before the next one.
module tb_runtime_error_detector;
  int checks = 0, failures = 0;

  logic       clk = 0, clk_dly = 0, rst_n = 0;
  logic [3:0] din = '0, dout, err;

  runtime_error_detector #(.W(4)) dut (.clk, .clk_dly, .rst_n, .din, .dout, .err);

  always #500 clk = ~clk;
  initial begin
    #650;
    forever #500 clk_dly = ~clk_dly;
  end

  typedef enum {NORMAL, LATE, GLITCH, TOO_LATE, HOLD} mode_e;
  int n_mode [5] = '{0, 0, 0, 0, 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // one slot, started at the edge before the sampling edge
  task automatic slot(input mode_e m, input logic [3:0] v, input logic [3:0] vprev);
    logic [3:0] want_d, want_e;
    unique case (m)
      NORMAL:   begin want_d = v;     want_e = '0;        end
      LATE:     begin want_d = v;     want_e = v ^ vprev; end
      GLITCH:   begin want_d = v;     want_e = '1;        end
      TOO_LATE: begin want_d = vprev; want_e = '0;        end
      default:  begin want_d = vprev; want_e = '0;        end
    endcase
    fork
      begin
        unique case (m)
          NORMAL:   begin #700  din = v; end
          LATE:     begin #1300 din = v; end
          GLITCH:   begin #700  din = v; #200 din = ~v; #200 din = v; end
          TOO_LATE: begin #1800 din = v; end
          default:  ;
        endcase
      end
      begin
        #1900;
        check(dout == want_d, $sformatf("mode %s dout=%h want %h", m.name(), dout, want_d));
        check(err == want_e,  $sformatf("mode %s err=%h want %h", m.name(), err, want_e));
      end
    join_none
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] cur, v;
    mode_e m, last;
    cur  = '0;
    last = NORMAL;
    repeat (2) @(posedge clk);
    #10 rst_n = 1;
    check(err == '0 && dout == '0, "reset values");
    for (int k = 0; k < 400; k++) begin
      @(posedge clk);
      m = (last == TOO_LATE) ? HOLD : mode_e'($urandom % 4);
      v = (m == HOLD) ? cur : 4'($urandom);
      slot(m, v, cur);
      n_mode[m]++;
      cur  = v;
      last = m;
    end
    repeat (3) @(posedge clk);
    check(n_mode[LATE] > 20 && n_mode[GLITCH] > 20 && n_mode[TOO_LATE] > 20, "all timings exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
