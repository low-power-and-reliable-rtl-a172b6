`timescale 1ps/1ps
// tb_test_error_detector: the testbench delays the sent vectors by three
// cycles, like the link pipeline, and corrupts chosen ones. The error count
// must equal the number of corrupted vectors, 'busy' must cover the
// vectors in flight, and 'clear' must reset the count. Vectors received
// without a matching sent vector must not be counted.
module tb_test_error_detector;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, clear = 0, sent_valid = 0;
  logic [9:0] sent = '0, rcvd = '0;
  logic [7:0] err_count;
  logic       error, busy;

  test_error_detector #(.W(10), .LATENCY(3)) dut (
    .clk, .rst_n, .clear, .sent_valid, .sent, .rcvd, .err_count, .error, .busy);

  always #500 clk = ~clk;

  logic [9:0] pipe [2];
  logic       corrupt = 0;

  // link model: launch, receive and decode registers, so a vector sent in
  // cycle t is on rcvd during cycle t+3
  always @(posedge clk) begin
    pipe[0] <= sent ^ (corrupt ? 10'h001 : 10'h000);
    pipe[1] <= pipe[0];
    rcvd    <= pipe[1];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  task automatic pass(input int n, input int n_bad);
    int bad;
    bad = 0;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    check(err_count == 0 && !error, "cleared");
    for (int i = 0; i < n; i++) begin
      sent_valid = 1;
      sent = 10'($urandom);
      corrupt = (bad < n_bad) && (($urandom % 3) == 0 || (n - i) <= (n_bad - bad));
      if (corrupt) bad++;
      @(negedge clk);
    end
    sent_valid = 0;
    corrupt = 0;
    sent = 10'($urandom);
    check(busy, "busy while in flight");
    repeat (4) @(negedge clk);
    check(!busy, "not busy after drain");
    check(err_count == 8'(n_bad), $sformatf("err_count %0d want %0d", err_count, n_bad));
    check(error == (n_bad != 0), "error flag");
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
    pass(80, 0);
    pass(80, 5);
    pass(40, 1);
    pass(80, 0);
    // unmatched received garbage is ignored
    repeat (6) begin
      @(negedge clk);
      sent = 10'($urandom);
      corrupt = 1;
    end
    corrupt = 0;
    check(err_count == 0, "no count without sent_valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
