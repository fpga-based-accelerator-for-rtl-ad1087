// mi_adder_tree: floating-point adder tree for the partial scores of one
// cycle.
//
// The MIUs attached to one reconstruction block produce M partial scores per
// cycle; this tree adds them. Inputs are padded with zeros to a power of two
// and added pairwise level by level with pipelined single-precision adders,
// so one set of M values is accepted per cycle and the sum appears
// ceil(log2 M) * FP_LATENCY cycles later (M = 1 is a wire). A TAGW-bit tag
// travels with the values and comes out with the sum.
module mi_adder_tree #(
  parameter int unsigned M          = 3,
  parameter int unsigned FP_LATENCY = 11,
  parameter int unsigned TAGW       = 1,
  localparam int unsigned LEVELS    = (M > 1) ? $clog2(M) : 0,
  localparam int unsigned LATENCY   = LEVELS * FP_LATENCY
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [31:0]     x [M],
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output logic [31:0]     y,
  output logic [TAGW-1:0] out_tag
);

  localparam int unsigned P = 1 << LEVELS;   // leaves

  // heap layout: node 1 is the root, nodes P..2P-1 the leaves
  logic [31:0] node   [2*P];
  logic        node_v [2*P];

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < M) begin : g_in
      assign node[P + i] = x[i];
    end else begin : g_pad
      assign node[P + i] = 32'd0;
    end
    assign node_v[P + i] = in_valid;
  end

  for (genvar n = 1; n < P; n++) begin : g_node
    fp_add #(.LATENCY(FP_LATENCY)) u_add (
      .clk, .rst_n, .in_valid(node_v[2*n]), .a(node[2*n]), .b(node[2*n+1]),
      .sub(1'b0), .out_valid(node_v[n]), .y(node[n]));
  end

  assign node[0]   = 32'd0;    // unused heap slot
  assign node_v[0] = 1'b0;

  assign y         = node[1];
  assign out_valid = node_v[1];

  delay_line #(.WIDTH(TAGW), .DEPTH(LATENCY)) u_tag (
    .clk, .rst_n, .d(in_tag), .q(out_tag));

endmodule
