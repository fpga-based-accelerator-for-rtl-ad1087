// count_last: head of the systolic array of contingency table units (CTUs).
//
// Every word streamed from memory passes through this unit before it enters
// the first CTU. The unit counts the words of the current SNP, flags the last
// one (word count equal to the words per SNP) and numbers the SNPs of the
// round, so that a single counter coordinates the whole array: the word
// index, the last flag, the SNP ordinal and the SNP identifier travel down
// the array with the word itself. The identifier is the round's base SNP
// number (given by the host with the round start) plus the ordinal; carrying
// it with the data is this design's way of keeping track of which
// combination each table belongs to.
//
// A round starts with a one-cycle `round_start` pulse carrying the
// re-initialisation mode chosen by the host; the pulse is forwarded down the
// array like a data word so every CTU re-initialises in stream order.
//
// Timing: one register stage (one cycle of latency); one word per cycle, no
// back-pressure (`s_ready` is always 1).
module count_last #(
  parameter int unsigned R     = 64,   // interface width
  parameter int unsigned WORDS = 126,  // words per SNP (even)
  parameter int unsigned MODEW = 2,    // width of the re-initialisation mode
  localparam int unsigned WIDXW = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // round control from the host
  input  logic             round_start,
  input  logic [MODEW-1:0] round_mode,
  input  logic [31:0]      round_base_snp,
  // dataset stream
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [R-1:0]     s_data,
  // to the first CTU
  output logic             o_valid,
  output logic [R-1:0]     o_data,
  output logic [WIDXW-1:0] o_widx,
  output logic             o_last,
  output logic [31:0]      o_ord,
  output logic [31:0]      o_id,
  output logic             o_start,
  output logic [MODEW-1:0] o_mode
);

  logic [WIDXW-1:0] widx;
  logic [31:0]      ord, base;

  assign s_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      widx    <= '0;
      ord     <= '0;
      base    <= '0;
      o_valid <= 1'b0;
      o_data  <= '0;
      o_widx  <= '0;
      o_last  <= 1'b0;
      o_ord   <= '0;
      o_id    <= '0;
      o_start <= 1'b0;
      o_mode  <= '0;
    end else begin
      o_start <= round_start;
      o_valid <= s_valid && !round_start;
      if (round_start) begin
        o_mode <= round_mode;
        base   <= round_base_snp;
        widx   <= '0;
        ord    <= '0;
      end else if (s_valid) begin
        o_data <= s_data;
        o_widx <= widx;
        o_last <= (widx == WIDXW'(WORDS - 1));
        o_ord  <= ord;
        o_id   <= base + ord;
        if (widx == WIDXW'(WORDS - 1)) begin
          widx <= '0;
          ord  <= ord + 32'd1;
        end else begin
          widx <= widx + WIDXW'(1);
        end
      end
    end
  end

  // a round start must not coincide with a data word
  a_start_alone: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(round_start && s_valid))
    else $error("count_last: round_start together with a data word");

endmodule
