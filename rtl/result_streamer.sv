// result_streamer: sends the saved combinations of all save units to the
// host over the R-bit interface once processing is finished.
//
// Each saved entry is packed as 32-bit fields, score first, then the K SNP
// identifiers, and sent in ceil(32*(1+K)/R) words (lowest field in the lowest
// bits). The save units are visited one after the other and each sends its X
// entries from best to worst, so NSU*X*ceil(32*(1+K)/R) words leave in all.
// An empty entry carries the score -infinity (0xFF800000). The field order
// and the empty marker are this design's choice.
//
// Interface: `start` pulse begins a transfer; valid/ready handshake on the
// output, `m_last` on the final word; `busy` while sending.
module result_streamer
  import epi_pkg::*;
#(
  parameter int unsigned NSU = 10,
  parameter int unsigned X   = 4,
  parameter int unsigned K   = 3,
  parameter int unsigned R   = 64,
  localparam int unsigned WPE = ceil_div(32 * (1 + K), R)  // words per entry
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          best_valid [NSU][X],
  input  logic [31:0]   best_val   [NSU][X],
  input  logic [31:0]   best_ids   [NSU][X][K],
  output logic          m_valid,
  input  logic          m_ready,
  output logic [R-1:0]  m_data,
  output logic          m_last,
  output logic          busy
);

  localparam int unsigned UW = (NSU > 1) ? $clog2(NSU) : 1;
  localparam int unsigned XW = (X > 1) ? $clog2(X) : 1;
  localparam int unsigned WW = (WPE > 1) ? $clog2(WPE) : 1;
  localparam int unsigned FB = WPE * R;                      // packed entry bits

  logic [UW-1:0] u;
  logic [XW-1:0] x;
  logic [WW-1:0] w;

  logic [FB-1:0] packed_entry;
  always_comb begin
    packed_entry = '0;
    packed_entry[31:0] = best_valid[u][x] ? best_val[u][x] : 32'hFF80_0000;
    for (int k = 0; k < int'(K); k++)
      packed_entry[32*(k+1) +: 32] = best_ids[u][x][k];
  end

  assign m_valid = busy;
  assign m_data  = packed_entry[int'(w) * int'(R) +: R];
  assign m_last  = busy && (u == UW'(NSU - 1)) && (x == XW'(X - 1)) && (w == WW'(WPE - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      u    <= '0;
      x    <= '0;
      w    <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        u    <= '0;
        x    <= '0;
        w    <= '0;
      end
    end else if (m_ready) begin
      if (w != WW'(WPE - 1)) begin
        w <= w + WW'(1);
      end else begin
        w <= '0;
        if (x != XW'(X - 1)) begin
          x <= x + XW'(1);
        end else begin
          x <= '0;
          if (u != UW'(NSU - 1)) u <= u + UW'(1);
          else                   busy <= 1'b0;
        end
      end
    end
  end

endmodule
