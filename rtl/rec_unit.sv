// rec_unit: reconstruction unit of the general architecture.
//
// The CTUs never see G2 of the streamed SNP, so the third of each
// contingency table that depends on it is missing. Because every patient has
// exactly one genotype, an entry of the (K-1)-order table equals the sum of
// the three K-order entries that extend it:
//   n(K-1) = n(..,0) + n(..,1) + n(..,2)   ->   n(..,2) = n(K-1) - (n(..,0) + n(..,1)).
// Each cycle the unit takes one value of n(..,0), n(..,1) and n(K-1) for the
// cases and the same three for the controls, and returns the three complete
// entries for both halves (six values per cycle), which feed three MIUs.
//
// Timing: fully pipelined, one register stage (one cycle of latency).
module rec_unit #(
  parameter int unsigned EW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [EW-1:0] n0  [2],   // [1 = cases, 0 = controls]
  input  logic [EW-1:0] n1  [2],
  input  logic [EW-1:0] nk1 [2],
  output logic          out_valid,
  output logic [EW-1:0] o_n [3][2] // [genotype of the streamed SNP][half]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int g = 0; g < 3; g++)
        for (int h = 0; h < 2; h++) o_n[g][h] <= '0;
    end else begin
      out_valid <= in_valid;
      for (int h = 0; h < 2; h++) begin
        o_n[0][h] <= n0[h];
        o_n[1][h] <= n1[h];
        o_n[2][h] <= nk1[h] - (n0[h] + n1[h]);
      end
    end
  end

endmodule
