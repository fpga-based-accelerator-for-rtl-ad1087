// axi4_reader: AXI4 read master that streams one round of the dataset from
// memory into the accelerator.
//
// The host chooses the first word of the round (byte address) and its length
// in R-bit words; the reader splits the transfer into INCR bursts of at most
// 256 beats that never cross a 4 KB boundary, keeps up to MAX_OUTSTANDING
// bursts in flight, and forwards every returned beat on a valid/ready stream
// (RREADY follows the stream's ready). Burst splitting and the number of
// outstanding bursts are this design's choices; the architecture only fixes a
// single memory-mapped AXI4 port of R = 64 bits using INCR bursts.
//
// Interface: `start` pulse with `base_addr` and `n_words`; `busy` until the
// last beat has been delivered, `done` pulses then.
module axi4_reader #(
  parameter int unsigned R               = 64,
  parameter int unsigned ADDR_W          = 32,
  parameter int unsigned MAX_OUTSTANDING = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  logic [ADDR_W-1:0] base_addr,
  input  logic [31:0]       n_words,
  output logic              busy,
  output logic              done,
  // AXI4 read address channel
  output logic              m_axi_arvalid,
  input  logic              m_axi_arready,
  output logic [ADDR_W-1:0] m_axi_araddr,
  output logic [7:0]        m_axi_arlen,
  output logic [2:0]        m_axi_arsize,
  output logic [1:0]        m_axi_arburst,
  // AXI4 read data channel
  input  logic              m_axi_rvalid,
  output logic              m_axi_rready,
  input  logic [R-1:0]      m_axi_rdata,
  input  logic [1:0]        m_axi_rresp,
  input  logic              m_axi_rlast,
  // dataset stream
  output logic              s_valid,
  input  logic              s_ready,
  output logic [R-1:0]      s_data
);

  localparam int unsigned BPB = R / 8;          // bytes per beat
  localparam int unsigned OW  = $clog2(MAX_OUTSTANDING + 1);

  logic [ADDR_W-1:0] addr;
  logic [31:0]       to_request;   // words not yet requested
  logic [31:0]       to_receive;   // words not yet delivered
  logic [OW-1:0]     outstanding;

  // length of the next burst: remaining words, 256 beats, 4 KB boundary
  logic [31:0] next_beats;
  always_comb begin
    logic [31:0] to_boundary;
    to_boundary = (32'd4096 - 32'(addr[11:0])) / BPB;
    next_beats  = to_request;
    if (next_beats > 32'd256)      next_beats = 32'd256;
    if (next_beats > to_boundary)  next_beats = to_boundary;
  end

  assign m_axi_araddr  = addr;
  assign m_axi_arlen   = 8'(next_beats - 32'd1);
  assign m_axi_arsize  = 3'($clog2(BPB));
  assign m_axi_arburst = 2'b01;  // INCR
  assign m_axi_arvalid = busy && (to_request != 0) && (outstanding < OW'(MAX_OUTSTANDING));

  assign s_valid      = m_axi_rvalid && busy;
  assign s_data       = m_axi_rdata;
  assign m_axi_rready = s_ready && busy;

  logic ar_fire, r_fire, r_burst_end;
  assign ar_fire     = m_axi_arvalid && m_axi_arready;
  assign r_fire      = m_axi_rvalid && m_axi_rready;
  assign r_burst_end = r_fire && m_axi_rlast;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      addr        <= '0;
      to_request  <= '0;
      to_receive  <= '0;
      outstanding <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && n_words != 0) begin
          busy       <= 1'b1;
          addr       <= base_addr;
          to_request <= n_words;
          to_receive <= n_words;
        end else if (start) begin
          done <= 1'b1;
        end
      end else begin
        if (ar_fire) begin
          addr       <= addr + ADDR_W'(next_beats * BPB);
          to_request <= to_request - next_beats;
        end
        outstanding <= outstanding + OW'(ar_fire) - OW'(r_burst_end);
        if (r_fire) begin
          to_receive <= to_receive - 32'd1;
          if (to_receive == 32'd1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  a_no_error_resp: assert property (@(posedge clk) disable iff (!rst_n)
                                    r_fire |-> (m_axi_rresp == 2'b00))
    else $error("axi4_reader: error response");
  a_arvalid_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                     (m_axi_arvalid && !m_axi_arready) |=>
                                     (m_axi_arvalid && $stable(m_axi_araddr) && $stable(m_axi_arlen)))
    else $error("axi4_reader: address channel changed before handshake");

endmodule
