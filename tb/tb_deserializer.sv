`timescale 1ps/1ps
// tb_deserializer: random 32-bit words are cut into four bytes (least
// significant first) and offered with random gaps; each word must come out
// once, whole, and exactly one cycle after its fourth byte.
module tb_deserializer;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, phit_valid = 0;
  logic [7:0]  phit = '0;
  logic        pkt_valid;
  logic [31:0] pkt_data;

  deserializer dut (.clk, .rst_n, .phit_valid, .phit, .pkt_valid, .pkt_data);

  always #500 clk = ~clk;

  logic [31:0] words[$];
  int last_phit_cycle = -10, cycle = 0, got = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    cycle++;
    if (rst_n && pkt_valid) begin
      got++;
      if (words.size() == 0) check(0, "unexpected word");
      else begin
        logic [31:0] e;
        e = words.pop_front();
        check(pkt_data == e, $sformatf("word %08h want %08h", pkt_data, e));
        check(cycle == last_phit_cycle + 1, "latency one cycle after last phit");
      end
    end
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      logic [31:0] v;
      v = $urandom;
      words.push_back(v);
      for (int b = 0; b < 4; b++) begin
        while (($urandom % 4) == 0) begin
          @(negedge clk);
          phit_valid = 0;
          phit = 8'($urandom);
        end
        @(negedge clk);
        phit_valid = 1;
        phit = v[8*b +: 8];
        if (b == 3) last_phit_cycle = cycle + 1;
      end
    end
    @(negedge clk);
    phit_valid = 0;
    repeat (4) @(negedge clk);
    check(got == 200 && words.size() == 0, $sformatf("words received %0d", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
