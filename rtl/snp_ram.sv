// snp_ram: simple dual-port block RAM holding one genotype vector (G0 or G1)
// of one stored SNP.
//
// Each entry is one streamed word: the upper R/2 bits belong to cases and the
// lower R/2 bits to controls of the same group of patients, so one entry per
// word pair of the SNP (depth = words per SNP / 2). A CTU uses two of these
// per stored SNP, one for G0 and one for G1; the architecture keeps cases and
// controls in separate BRAMs (four per SNP), this design keeps both halves of
// a word in one entry, which holds the same bits.
//
// Timing: write on the clock edge; synchronous read, data one cycle after
// the address. Nothing is reset (the contents are always written before they
// are read).
module snp_ram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 63,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
