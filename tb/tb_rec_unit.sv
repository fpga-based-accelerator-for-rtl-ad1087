// tb_rec_unit: random partial-table values (n0, n1 and the lower-order total
// nk1 >= n0 + n1, for cases and controls) into the reconstruction unit; checks
// that one cycle later it outputs n0, n1 and n2 = nk1 - (n0 + n1) with the
// valid flag.
module tb_rec_unit;
  localparam int unsigned EW = 11;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, out_valid;
  logic [EW-1:0] n0 [2], n1 [2], nk1 [2];
  logic [EW-1:0] o_n [3][2];
  int unsigned checks = 0, failures = 0;

  rec_unit #(.EW(EW)) dut (.clk, .rst_n, .in_valid, .n0, .n1, .nk1, .out_valid, .o_n);

  initial begin
    fork
      begin
        rst_n = 1'b0; in_valid = 1'b0;
        for (int h = 0; h < 2; h++) begin n0[h] = '0; n1[h] = '0; nk1[h] = '0; end
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        for (int i = 0; i < 1000; i++) begin
          logic [EW-1:0] e [3][2];
          logic v;
          @(negedge clk);
          v = ($urandom_range(0, 3) != 0);
          in_valid = v;
          for (int h = 0; h < 2; h++) begin
            e[0][h] = EW'($urandom_range(0, 600));
            e[1][h] = EW'($urandom_range(0, 600));
            e[2][h] = EW'($urandom_range(0, 600));
            n0[h] = e[0][h]; n1[h] = e[1][h]; nk1[h] = e[0][h] + e[1][h] + e[2][h];
          end
          @(posedge clk);
          #1;
          checks++;
          if (out_valid != v) begin failures++; $display("FAIL: valid %b", out_valid); end
          if (v) begin
            checks++;
            if (o_n != e) begin failures++; $display("FAIL: entries wrong at %0d", i); end
          end
        end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
