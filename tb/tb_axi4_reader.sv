// tb_axi4_reader: the AXI4 read master against a memory model that inserts
// random wait states on both channels. Several reads of random length
// (1 to 900 words) from random word addresses, some starting just below a
// 4 KB boundary: the stream must deliver exactly the memory contents in
// order, `done` must pulse once per read, the bursts must respect the AXI4
// rules (INCR, full-width beats, at most 256 beats, no 4 KB crossing) and a
// read crossing 4 KB or longer than 256 words must use several bursts.
module tb_axi4_reader;
  localparam int unsigned DEPTH = 4096;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done;
  logic [31:0] base_addr, n_words;
  logic        arvalid, arready, rvalid, rready, rlast, s_valid, s_ready;
  logic [31:0] araddr;
  logic [7:0]  arlen;
  logic [2:0]  arsize;
  logic [1:0]  arburst, rresp;
  logic [63:0] rdata, s_data;
  logic        we;
  logic [31:0] waddr;
  logic [63:0] wdata;
  int unsigned bursts, perr;
  int unsigned checks = 0, failures = 0;
  logic [63:0] got [$];
  int unsigned ndone;

  axi4_reader #(.R(64), .ADDR_W(32)) dut (
    .clk, .rst_n, .start, .base_addr, .n_words, .busy, .done,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_rdata(rdata),
    .m_axi_rresp(rresp), .m_axi_rlast(rlast), .s_valid, .s_ready, .s_data);

  axi_mem_model #(.R(64), .DEPTH(DEPTH), .GAPS(1'b1)) mem (
    .clk, .rst_n, .we, .waddr, .wdata, .arvalid, .arready, .araddr, .arlen,
    .arsize, .arburst, .rvalid, .rready, .rdata, .rresp, .rlast,
    .bursts, .protocol_errors(perr));

  always @(posedge clk) begin
    if (rst_n && s_valid && s_ready) got.push_back(s_data);
    if (rst_n && done) ndone++;
  end

  function automatic logic [63:0] pattern(input int unsigned a);
    return {a ^ 32'hA5A5_0000, ~a};
  endfunction

  initial begin
    fork
      begin
        rst_n = 1'b0; start = 1'b0; base_addr = '0; n_words = '0; s_ready = 1'b1;
        we = 1'b0; waddr = '0; wdata = '0; ndone = 0;
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        for (int a = 0; a < int'(DEPTH); a++) begin
          @(negedge clk); we = 1'b1; waddr = a; wdata = pattern(a);
        end
        @(negedge clk); we = 1'b0;
        for (int r = 0; r < 12; r++) begin
          int unsigned w0, n, b0, d0;
          n  = (r < 3) ? 40 : $urandom_range(1, 900);
          w0 = (r < 3) ? 512 * (r + 1) - 7 : $urandom_range(0, DEPTH - n);
          got.delete();
          b0 = bursts; d0 = ndone;
          @(negedge clk);
          start = 1'b1; base_addr = w0 * 8; n_words = n;
          @(negedge clk);
          start = 1'b0;
          while (busy) @(negedge clk);
          repeat (3) @(negedge clk);
          checks++;
          if (got.size() != n || ndone != d0 + 1) begin
            failures++;
            $display("FAIL: read %0d: %0d words of %0d, done %0d", r, got.size(), n, ndone - d0);
          end else begin
            for (int i = 0; i < int'(n); i++)
              if (got[i] != pattern(w0 + i)) begin
                failures++; $display("FAIL: read %0d word %0d", r, i); break;
              end
          end
          checks++;
          if (((w0 % 512) + n > 512 || n > 256) && bursts - b0 < 2) begin
            failures++; $display("FAIL: read %0d not split", r);
          end
        end
        checks++;
        if (perr != 0) begin failures++; $display("FAIL: %0d protocol errors", perr); end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
