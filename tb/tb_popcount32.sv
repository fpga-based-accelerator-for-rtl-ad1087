// tb_popcount32: checks the two-level popcount against $countones on corner
// words (all zeros, all ones, single bits) and random words. Combinational
// block; the testbench applies a word, waits 1 ns and compares.
module tb_popcount32;
  logic [31:0] word;
  logic [5:0]  count;
  int unsigned checks = 0, failures = 0;

  popcount32 dut (.word, .count);

  task automatic try(input logic [31:0] w);
    word = w;
    #1;
    checks++;
    if (count != 6'($countones(w))) begin
      failures++;
      $display("FAIL: popcount(%h) = %0d", w, count);
    end
  endtask

  initial begin
    fork
      begin
        try(32'h0); try(32'hFFFF_FFFF);
        for (int i = 0; i < 32; i++) try(32'h1 << i);
        for (int i = 0; i < 2000; i++) try($urandom);
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
