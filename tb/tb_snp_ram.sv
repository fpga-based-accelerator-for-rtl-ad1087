// tb_snp_ram: writes random words to every address of a small RAM, reads them
// back (synchronous read, one cycle) while overwriting others, and compares
// with a model array.
module tb_snp_ram;
  localparam int unsigned DEPTH = 37;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        we;
  logic [5:0]  waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] model [DEPTH];
  int unsigned checks = 0, failures = 0;

  snp_ram #(.WIDTH(64), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    fork
      begin
        we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
        for (int a = 0; a < int'(DEPTH); a++) begin
          @(negedge clk);
          we = 1'b1; waddr = 6'(a); wdata = {$urandom, $urandom}; model[a] = wdata;
        end
        for (int i = 0; i < 500; i++) begin
          logic [5:0] ra;
          @(negedge clk);
          ra = 6'($urandom_range(0, DEPTH - 1));
          raddr = ra;
          we = 1'b0;
          @(posedge clk);
          #1;
          checks++;
          if (rdata != model[ra]) begin
            failures++;
            $display("FAIL: addr %0d read %h expected %h", ra, rdata, model[ra]);
          end
          @(negedge clk);
          we = 1'b1; waddr = 6'($urandom_range(0, DEPTH - 1)); wdata = {$urandom, $urandom};
          model[waddr] = wdata;
        end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
