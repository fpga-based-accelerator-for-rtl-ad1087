// tb_result_streamer: fills the saved lists of 3 save units (some entries
// empty) with random scores and identifiers, starts a transfer and collects
// the words under random back-pressure. Checks the word count, the last
// flag, and that every entry is packed as score then K identifiers, with
// -infinity for empty entries; then a second transfer with a 32-bit word
// width (two words per entry field pair).
module tb_result_streamer;
  localparam int unsigned NSU = 3, X = 4, K = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start;
  logic        bv [NSU][X];
  logic [31:0] bval [NSU][X], bid [NSU][X][K];
  logic        mv64, ml64, busy64, mv32, ml32, busy32, m_ready;
  logic [63:0] md64;
  logic [31:0] md32;
  int unsigned checks = 0, failures = 0;

  result_streamer #(.NSU(NSU), .X(X), .K(K), .R(64)) dut64 (
    .clk, .rst_n, .start, .best_valid(bv), .best_val(bval), .best_ids(bid),
    .m_valid(mv64), .m_ready, .m_data(md64), .m_last(ml64), .busy(busy64));
  result_streamer #(.NSU(NSU), .X(X), .K(K), .R(32)) dut32 (
    .clk, .rst_n, .start, .best_valid(bv), .best_val(bval), .best_ids(bid),
    .m_valid(mv32), .m_ready, .m_data(md32), .m_last(ml32), .busy(busy32));

  logic [31:0] f64 [$], f32 [$];
  int unsigned last64, last32;

  always @(posedge clk) begin
    if (rst_n && mv64 && m_ready) begin
      f64.push_back(md64[31:0]); f64.push_back(md64[63:32]);
      if (ml64) last64++;
    end
    if (rst_n && mv32 && m_ready) begin
      f32.push_back(md32);
      if (ml32) last32++;
    end
  end

  initial begin
    fork
      begin
        rst_n = 1'b0; start = 1'b0; m_ready = 1'b0; last64 = 0; last32 = 0;
        for (int u = 0; u < int'(NSU); u++)
          for (int x = 0; x < int'(X); x++) begin
            bv[u][x] = (x < 2 + u);
            bval[u][x] = $urandom & 32'h7FFF_FFFF;
            for (int k = 0; k < int'(K); k++) bid[u][x][k] = $urandom;
          end
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        @(negedge clk); start = 1'b1;
        @(negedge clk); start = 1'b0;
        while (busy64 || busy32 || mv64 || mv32) begin
          m_ready = ($urandom_range(0, 2) != 0);
          @(negedge clk);
        end
        m_ready = 1'b0;
        checks++;
        if (f64.size() != NSU * X * 4 || f32.size() != NSU * X * 4 ||
            last64 != 1 || last32 != 1) begin
          failures++;
          $display("FAIL: words %0d/%0d last %0d/%0d", f64.size(), f32.size(), last64, last32);
        end else begin
          for (int u = 0; u < int'(NSU); u++)
            for (int x = 0; x < int'(X); x++) begin
              int b;
              logic [31:0] ev;
              b = (u * X + x) * 4;
              ev = bv[u][x] ? bval[u][x] : 32'hFF80_0000;
              checks++;
              if (f64[b] != ev || f32[b] != ev) begin
                failures++; $display("FAIL: score of unit %0d entry %0d", u, x);
              end
              for (int k = 0; k < int'(K); k++) begin
                checks++;
                if (bv[u][x] && (f64[b+1+k] != bid[u][x][k] || f32[b+1+k] != bid[u][x][k])) begin
                  failures++; $display("FAIL: id %0d of unit %0d entry %0d", k, u, x);
                end
              end
            end
        end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
