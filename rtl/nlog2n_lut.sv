// nlog2n_lut: dual-port read-only table of n*log2(n) in single precision.
//
// Address n holds the IEEE-754 single-precision value of n*log2(n), with 0 at
// addresses 0 and 1 (the limit of n*log2(n) at 0). The table replaces a
// logarithm unit in the MIUs; its depth covers the largest value the address
// can take (half the patients for a single table entry, all patients for the
// sum of a case and a control entry). Its contents are computed at
// elaboration from the formula (in chunks, see below), which plays the role of the memory
// initialisation file of a block RAM. Two read ports let two lookups of one
// MIU share one block RAM.
//
// Timing: synchronous read, data one cycle after the address.
module nlog2n_lut
  import epi_pkg::*;
#(
  parameter int unsigned DEPTH = 2001,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  output logic [31:0]   data_a,
  output logic [31:0]   data_b
);

  logic [31:0] rom [DEPTH];

  // filled in chunks of 256 entries, one initial block each, so that
  // elaboration-time evaluation stays small per block
  localparam int unsigned CHUNK   = 256;
  localparam int unsigned NCHUNKS = (DEPTH + CHUNK - 1) / CHUNK;

  for (genvar c = 0; c < NCHUNKS; c++) begin : g_fill
    initial begin
      for (int unsigned n = c * CHUNK; n < (c + 1) * CHUNK && n < DEPTH; n++)
        rom[n] = nlog2n_fp32(n);
    end
  end

  always_ff @(posedge clk) begin
    data_a <= rom[addr_a];
    data_b <= rom[addr_b];
  end

endmodule
