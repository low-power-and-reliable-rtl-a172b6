`timescale 1ps/1ps
// tb_serializer: random words with random valid gaps and stalls; every
// phit must be the next byte of the word stream, least significant byte
// first, and no phit may be valid during a stall. A back-to-back burst of
// 16 words must take exactly 64 phit cycles (one phit per cycle).
module tb_serializer;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, stall = 0, pkt_valid = 0;
  logic [31:0] pkt_data = '0;
  logic        pkt_ready, phit_valid;
  logic [7:0]  phit;

  serializer dut (.clk, .rst_n, .stall, .pkt_valid, .pkt_data, .pkt_ready, .phit_valid, .phit);

  always #500 clk = ~clk;

  logic [7:0] exp_q[$];
  int n_phits = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (stall) check(!phit_valid && !pkt_ready, "idle during stall");
    if (phit_valid) begin
      n_phits++;
      if (exp_q.size() == 0) check(0, "unexpected phit");
      else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        check(phit == e, $sformatf("phit %02h want %02h", phit, e));
      end
    end
    if (pkt_valid && pkt_ready)
      for (int i = 0; i < 4; i++) exp_q.push_back(pkt_data[8*i +: 8]);
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start_phits, cycles;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // random traffic with stalls
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if (!pkt_valid || pkt_ready) begin
        pkt_valid = ($urandom % 3) != 0;
        pkt_data  = $urandom;
      end
      stall = ($urandom % 8) == 0;
    end
    @(negedge clk); pkt_valid = 0; stall = 0;
    repeat (8) @(negedge clk);
    check(exp_q.size() == 0, "all phits sent");
    // throughput: 16 words back to back
    start_phits = n_phits;
    cycles = 0;
    pkt_valid = 1;
    for (int w = 0; w < 16; ) begin
      pkt_data = $urandom;
      @(posedge clk);
      if (pkt_ready) w++;
      @(negedge clk);
    end
    pkt_valid = 0;
    while (exp_q.size() != 0) begin
      @(negedge clk);
      cycles++;
      check(cycles < 100, "burst drains");
      if (cycles >= 100) break;
    end
    check(n_phits - start_phits == 64, $sformatf("burst phits %0d", n_phits - start_phits));
    // 16 words accepted in 16 ready cycles spaced by 4: 61 cycles after the
    // first accept the last phit is out
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
