// tb_nlog2n_lut: reads every address of a 4001-entry table through both
// ports (synchronous read) and compares with n*log2(n) computed in double
// precision, allowing half a unit in the last place of single precision.
module tb_nlog2n_lut
  import epi_pkg::*;
;
  localparam int unsigned DEPTH = 4001;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [11:0] addr_a, addr_b;
  logic [31:0] data_a, data_b;
  int unsigned checks = 0, failures = 0;

  nlog2n_lut #(.DEPTH(DEPTH)) dut (.clk, .addr_a, .addr_b, .data_a, .data_b);

  task automatic cmp(input int unsigned n, input logic [31:0] got);
    real r, h;
    r = (n < 2) ? 0.0 : real'(n) * $ln(real'(n)) / $ln(2.0);
    h = from_fp32(got);
    checks++;
    if (h - r > r * 6.0e-8 || r - h > r * 6.0e-8) begin
      failures++;
      $display("FAIL: n=%0d got %f expected %f", n, h, r);
    end
  endtask

  initial begin
    fork
      begin
        for (int n = 0; n < int'(DEPTH); n++) begin
          int unsigned m;
          m = $urandom_range(0, DEPTH - 1);
          @(negedge clk);
          addr_a = 12'(n); addr_b = 12'(m);
          @(posedge clk);
          #1;
          cmp(n, data_a);
          cmp(m, data_b);
        end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
