// tb_miu: feeds random (cases, controls) counts of one table entry into the
// mutual-information unit, one per cycle with gaps, including zeros and the
// maximum counts, and compares each output with
// f(cases) + f(controls) - f(cases + controls), f(n) = n*log2(n), computed in
// double precision (tolerance of a few units in the last place of the
// largest term, as the subtraction cancels most of the magnitude).
// Results must come out in order, 1 + 2*FP_LATENCY cycles after the input.
module tb_miu
  import epi_pkg::*;
;
  localparam int unsigned NCA = 2000, NCO = 2000, LAT = 11;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  logic [10:0] n_case, n_ctrl;
  logic [31:0] y;
  int unsigned checks = 0, failures = 0;
  real expq [$], tolq [$];
  int unsigned tq [$];
  int unsigned cyc = 0;

  miu #(.EW(11), .N_CASES(NCA), .N_CONTROLS(NCO), .FP_LATENCY(LAT)) dut (
    .clk, .rst_n, .in_valid, .n_case, .n_ctrl, .out_valid, .y);

  function automatic real f(input int unsigned n);
    return (n < 2) ? 0.0 : real'(n) * $ln(real'(n)) / $ln(2.0);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      real h, r;
      checks++;
      h = from_fp32(y);
      r = (expq.size() != 0) ? expq[0] : 1.0e9;
      if (tolq.size() == 0) tolq.push_back(0.0);
      if (h - r > tolq[0] || r - h > tolq[0] ||
          cyc - tq[0] != 1 + 2 * LAT + 1) begin
        failures++;
        $display("FAIL: got %f expected %f latency %0d", h, r, cyc - tq[0]);
      end
      if (expq.size() != 0) begin void'(expq.pop_front()); void'(tq.pop_front()); void'(tolq.pop_front()); end
    end
  end

  initial begin
    fork
      begin
        rst_n = 1'b0; in_valid = 1'b0; n_case = '0; n_ctrl = '0;
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        for (int i = 0; i < 2000; i++) begin
          int unsigned a, b;
          @(negedge clk);
          a = (i % 11 == 0) ? 0 : (i % 17 == 0) ? NCA : $urandom_range(0, NCA);
          b = (i % 5 == 0) ? $urandom_range(0, 3) : (i % 19 == 0) ? NCO : $urandom_range(0, NCO);
          in_valid = ($urandom_range(0, 4) != 0);
          n_case = 11'(a); n_ctrl = 11'(b);
          if (in_valid) begin expq.push_back(f(a) + f(b) - f(a + b)); tq.push_back(cyc);
                            tolq.push_back(1e-3 + 4e-7 * f(a + b));  end
        end
        @(negedge clk);
        in_valid = 1'b0;
        repeat (2 * LAT + 5) @(negedge clk);
        checks++;
        if (expq.size() != 0) begin failures++; $display("FAIL: results missing"); end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
