// tb_mi_adder_tree: sums of random single-precision vectors through adder
// trees of 3 and 5 inputs (odd sizes exercise the zero-padded leaves), with
// gaps between vectors. Each sum is compared with the double-precision sum
// (relative tolerance) and must carry its tag.
module tb_mi_adder_tree
  import epi_pkg::*;
;
  localparam int unsigned LAT = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid;
  logic [31:0] x3 [3], x5 [5];
  logic [7:0]  tag;
  logic        ov3, ov5;
  logic [31:0] y3, y5;
  logic [7:0]  t3, t5;
  int unsigned checks = 0, failures = 0;
  real e3 [$], e5 [$];
  logic [7:0] tq3 [$], tq5 [$];

  mi_adder_tree #(.M(3), .FP_LATENCY(LAT), .TAGW(8)) dut3 (
    .clk, .rst_n, .in_valid, .x(x3), .in_tag(tag), .out_valid(ov3), .y(y3), .out_tag(t3));
  mi_adder_tree #(.M(5), .FP_LATENCY(LAT), .TAGW(8)) dut5 (
    .clk, .rst_n, .in_valid, .x(x5), .in_tag(tag), .out_valid(ov5), .y(y5), .out_tag(t5));

  task automatic cmp(input real r, input logic [31:0] y, input logic [7:0] te,
                     input logic [7:0] tg);
    real h;
    h = from_fp32(y);
    checks++;
    if (h - r > 1e-3 + 1e-6 * (r < 0 ? -r : r) || r - h > 1e-3 + 1e-6 * (r < 0 ? -r : r) ||
        te != tg) begin
      failures++;
      $display("FAIL: sum %f expected %f tag %0d/%0d", h, r, tg, te);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && ov3) begin
      cmp(e3.size() ? e3[0] : 1e9, y3, tq3.size() ? tq3[0] : 8'd0, t3);
      if (e3.size()) begin void'(e3.pop_front()); void'(tq3.pop_front()); end
    end
    if (rst_n && ov5) begin
      cmp(e5.size() ? e5[0] : 1e9, y5, tq5.size() ? tq5[0] : 8'd0, t5);
      if (e5.size()) begin void'(e5.pop_front()); void'(tq5.pop_front()); end
    end
  end

  initial begin
    fork
      begin
        rst_n = 1'b0; in_valid = 1'b0; tag = '0;
        foreach (x3[i]) x3[i] = '0;
        foreach (x5[i]) x5[i] = '0;
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        for (int i = 0; i < 1000; i++) begin
          real s3, s5;
          @(negedge clk);
          in_valid = ($urandom_range(0, 2) != 0);
          tag = 8'($urandom);
          s3 = 0.0; s5 = 0.0;
          foreach (x3[j]) begin
            x3[j] = to_fp32(real'($urandom_range(0, 100000)) / 64.0 - 200.0);
            s3 += from_fp32(x3[j]);
          end
          foreach (x5[j]) begin
            x5[j] = to_fp32(real'($urandom_range(0, 100000)) / 64.0);
            s5 += from_fp32(x5[j]);
          end
          if (in_valid) begin
            e3.push_back(s3); tq3.push_back(tag);
            e5.push_back(s5); tq5.push_back(tag);
          end
        end
        @(negedge clk);
        in_valid = 1'b0;
        repeat (4 * LAT + 4) @(negedge clk);
        checks++;
        if (e3.size() || e5.size()) begin failures++; $display("FAIL: sums missing"); end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
