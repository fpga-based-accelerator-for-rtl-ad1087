// tb_fp_add: streams random single-precision operand pairs (both signs, wide
// exponent range, cancellation cases, zeros) into the pipelined adder, one
// per cycle with random gaps, and compares every result with the correctly
// rounded sum computed in double precision, and its arrival exactly LATENCY
// cycles after the edge that samples it.
module tb_fp_add
  import epi_pkg::*;
;
  localparam int unsigned LAT = 11;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, sub, out_valid;
  logic [31:0] a, b, y;
  int unsigned checks = 0, failures = 0;
  logic [31:0] expq [$];
  int unsigned timeq [$];
  int unsigned cyc = 0;

  fp_add #(.LATENCY(LAT)) dut (.clk, .rst_n, .in_valid, .a, .b, .sub, .out_valid, .y);

  function automatic real rnd_val();
    real m;
    int  e;
    m = real'($urandom_range(1, 1 << 20)) / real'(1 << 20);
    e = int'($urandom_range(0, 40)) - 20;
    m = m * (2.0 ** e);
    return ($urandom_range(0, 1) != 0) ? -m : m;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0 || y != expq[0] || cyc - timeq[0] != LAT + 1) begin
        failures++;
        $display("FAIL: got %h expected %h (latency %0d)", y,
                 expq.size() ? expq[0] : 32'h0, expq.size() ? cyc - timeq[0] : 0);
      end
      if (expq.size() != 0) begin void'(expq.pop_front()); void'(timeq.pop_front()); end
    end
  end

  initial begin
    fork
      begin
        rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; sub = 1'b0;
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        for (int i = 0; i < 3000; i++) begin
          real ra, rb;
          @(negedge clk);
          in_valid = ($urandom_range(0, 3) != 0);
          ra = rnd_val();
          rb = (i % 7 == 0) ? ra * (1.0 + real'($urandom_range(0, 8)) / 1048576.0) : rnd_val();
          if (i % 13 == 0) rb = 0.0;
          a = to_fp32(ra); b = to_fp32(rb); sub = ($urandom_range(0, 1) != 0);
          if (in_valid) begin
            real s;
            s = sub ? from_fp32(a) - from_fp32(b) : from_fp32(a) + from_fp32(b);
            expq.push_back(s == 0.0 ? 32'h0 : to_fp32(s));
            timeq.push_back(cyc);
          end
        end
        @(negedge clk);
        in_valid = 1'b0;
        repeat (LAT + 3) @(negedge clk);
        checks++;
        if (expq.size() != 0) begin failures++; $display("FAIL: %0d results missing", expq.size()); end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
