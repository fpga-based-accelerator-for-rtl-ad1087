// tb_count_last: several rounds with random base SNP numbers and modes, data
// words arriving with random gaps. Checks, one cycle after each input, that
// the word is forwarded with its index within the SNP, the last-word flag,
// the SNP ordinal and identifier (base + ordinal), that the round start is
// forwarded with its mode and without a data word, and that s_ready stays 1.
module tb_count_last;
  localparam int unsigned R = 64, WORDS = 6, MODEW = 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, round_start, s_valid, s_ready;
  logic [MODEW-1:0] round_mode, o_mode;
  logic [31:0] round_base_snp, o_ord, o_id;
  logic [R-1:0] s_data, o_data;
  logic o_valid, o_last, o_start;
  logic [2:0] o_widx;
  int unsigned checks = 0, failures = 0;

  count_last #(.R(R), .WORDS(WORDS), .MODEW(MODEW)) dut (
    .clk, .rst_n, .round_start, .round_mode, .round_base_snp, .s_valid, .s_ready,
    .s_data, .o_valid, .o_data, .o_widx, .o_last, .o_ord, .o_id, .o_start, .o_mode);

  initial begin
    fork
      begin
        rst_n = 1'b0; round_start = 1'b0; round_mode = '0; round_base_snp = '0;
        s_valid = 1'b0; s_data = '0;
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        for (int r = 0; r < 6; r++) begin
          int unsigned base, nsnp;
          logic [MODEW-1:0] mode;
          base = $urandom_range(0, 100000); nsnp = $urandom_range(1, 8);
          mode = MODEW'($urandom_range(1, 3));
          @(negedge clk);
          round_start = 1'b1; round_mode = mode; round_base_snp = base; s_valid = 1'b0;
          @(posedge clk); #1;
          checks++;
          if (!o_start || o_valid || o_mode != mode) begin
            failures++; $display("FAIL: round start not forwarded");
          end
          @(negedge clk);
          round_start = 1'b0;
          for (int w = 0; w < int'(nsnp * WORDS); w++) begin
            logic [R-1:0] d;
            while ($urandom_range(0, 3) == 0) begin
              @(negedge clk); s_valid = 1'b0;
              @(posedge clk); #1;
              checks++;
              if (o_valid || o_start) begin failures++; $display("FAIL: word without input"); end
              @(negedge clk);
            end
            d = {$urandom, $urandom};
            s_valid = 1'b1; s_data = d;
            @(posedge clk); #1;
            checks++;
            if (!o_valid || o_data != d || o_widx != 3'(w % WORDS) ||
                o_last != (w % WORDS == WORDS - 1) || o_ord != w / WORDS ||
                o_id != base + w / WORDS || !s_ready) begin
              failures++;
              $display("FAIL: round %0d word %0d: widx %0d last %b ord %0d id %0d",
                       r, w, o_widx, o_last, o_ord, o_id);
            end
            @(negedge clk);
            s_valid = 1'b0;
          end
        end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
