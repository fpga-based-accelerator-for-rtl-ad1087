// axi_mem_model: behavioural AXI4 read-only memory for testbenches.
//
// Holds DEPTH words of R bits, written by the testbench through a simple
// write port. Accepts read bursts (INCR) on the address channel, queues up
// to 16 of them and returns their beats in order on the read data channel.
// With GAPS = 1 the address ready and the data valid are randomly withheld,
// so the reader sees both back-pressure and bubbles in the stream.
// Checks that no burst crosses a 4 KB boundary and that ARBURST is INCR.
module axi_mem_model #(
  parameter int unsigned R      = 64,
  parameter int unsigned DEPTH  = 4096,
  parameter int unsigned ADDR_W = 32,
  parameter bit          GAPS   = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // testbench write port
  input  logic              we,
  input  logic [31:0]       waddr,     // word address
  input  logic [R-1:0]      wdata,
  // AXI4 read slave
  input  logic              arvalid,
  output logic              arready,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic [2:0]        arsize,
  input  logic [1:0]        arburst,
  output logic              rvalid,
  input  logic              rready,
  output logic [R-1:0]      rdata,
  output logic [1:0]        rresp,
  output logic              rlast,
  output int unsigned       bursts,
  output int unsigned       protocol_errors
);

  logic [R-1:0] mem [DEPTH];
  logic [31:0]  q_addr [16];
  logic [8:0]   q_len  [16];
  int unsigned  q_wr, q_rd, q_cnt;
  logic [8:0]   beat;
  logic         gap_ar, gap_r;

  assign arready = (q_cnt < 16) && !gap_ar;
  assign rvalid  = (q_cnt > 0) && !gap_r;
  assign rdata   = mem[(q_addr[q_rd] / (R / 8) + beat) % DEPTH];
  assign rlast   = (q_cnt > 0) && (beat == q_len[q_rd] - 9'd1);
  assign rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (we) mem[waddr % DEPTH] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_wr <= 0; q_rd <= 0; q_cnt <= 0; beat <= '0;
      gap_ar <= 1'b0; gap_r <= 1'b0;
      bursts <= 0; protocol_errors <= 0;
    end else begin
      gap_ar <= GAPS && ($urandom_range(0, 3) == 0);
      gap_r  <= GAPS && ($urandom_range(0, 4) == 0);
      if (arvalid && arready) begin
        q_addr[q_wr] <= 32'(araddr);
        q_len[q_wr]  <= 9'(arlen) + 9'd1;
        q_wr <= (q_wr + 1) % 16;
        bursts <= bursts + 1;
        if (arburst != 2'b01) protocol_errors <= protocol_errors + 1;
        if (32'(arsize) != 32'($clog2(R / 8))) protocol_errors <= protocol_errors + 1;
        if ((32'(araddr) % 4096) + (32'(arlen) + 1) * (R / 8) > 4096)
          protocol_errors <= protocol_errors + 1;
      end
      if (rvalid && rready) begin
        if (rlast) begin
          beat <= '0;
          q_rd <= (q_rd + 1) % 16;
        end else begin
          beat <= beat + 9'd1;
        end
      end
      q_cnt <= q_cnt + ((arvalid && arready) ? 1 : 0) - ((rvalid && rready && rlast) ? 1 : 0);
    end
  end

endmodule
