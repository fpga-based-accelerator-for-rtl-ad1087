// save_unit: accumulates the score of each contingency table and keeps the
// X best combinations seen by the CTUs that share it.
//
// Partial scores of one table arrive on consecutive cycles, one per slice
// (first/last flags mark the table); a single-precision accumulator adds
// them into N[H(X) - H(X,Y)]. When the table is complete its score is
// compared with the X stored scores, kept sorted from best (highest) to
// worst; if it beats one of them it is inserted there, with the K SNP
// identifiers of its combination, and the worst entry drops out. The stored
// scores are local maxima of this group of CTUs, so the host merges the
// lists of all save units.
//
// The accumulator closes its loop in one cycle (the architecture uses a
// vendor accumulator core with a latency of 10 cycles); the comparison and
// insertion take one more cycle. `clear` empties the list. `tables` counts
// the complete tables scored.
module save_unit
  import epi_pkg::*;
#(
  parameter int unsigned K = 3,
  parameter int unsigned X = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  logic [31:0] in_val,
  input  logic        in_first,
  input  logic        in_last,
  input  logic [31:0] in_ids [K],
  output logic        best_valid [X],
  output logic [31:0] best_val   [X],
  output logic [31:0] best_ids   [X][K],
  output logic [31:0] tables
);

  // accumulator: acc <= (first ? 0 : acc) + value; idle cycles add zero
  logic [31:0] acc;
  logic        acc_v_unused;

  fp_add #(.LATENCY(1)) u_acc (
    .clk, .rst_n,
    .in_valid (in_valid),
    .a        (in_valid ? in_val : 32'd0),
    .b        ((in_valid && in_first) ? 32'd0 : acc),
    .sub      (1'b0),
    .out_valid(acc_v_unused),
    .y        (acc));

  logic        done;
  logic [31:0] done_ids [K];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int k = 0; k < int'(K); k++) done_ids[k] <= '0;
    end else begin
      done <= in_valid && in_last;
      if (in_valid && in_last) done_ids <= in_ids;
    end
  end

  // position of the new score in the sorted list (X = not kept)
  int unsigned pos;
  always_comb begin
    pos = X;
    for (int i = int'(X) - 1; i >= 0; i--)
      if (!best_valid[i] || fp32_gt(acc, best_val[i])) pos = i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      tables <= '0;
      for (int i = 0; i < int'(X); i++) begin
        best_valid[i] <= 1'b0;
        best_val[i]   <= '0;
        for (int k = 0; k < int'(K); k++) best_ids[i][k] <= '0;
      end
    end else if (done) begin
      tables <= tables + 32'd1;
      for (int i = int'(X) - 1; i >= 0; i--) begin
        if (i > int'(pos)) begin
          best_valid[i] <= best_valid[i-1];
          best_val[i]   <= best_val[i-1];
          best_ids[i]   <= best_ids[i-1];
        end else if (i == int'(pos)) begin
          best_valid[i] <= 1'b1;
          best_val[i]   <= acc;
          best_ids[i]   <= done_ids;
        end
      end
    end
  end

endmodule
