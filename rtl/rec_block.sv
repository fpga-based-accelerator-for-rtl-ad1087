// rec_block: partial-table transfer and reconstruction for a group of CTUs.
//
// A CTU finishes one partial table every WORDS cycles (the words of one SNP),
// and a table needs only SEND_CYCLES cycles to cross its three ports, so
// NC = floor(WORDS / SEND_CYCLES) CTUs can share one block. The block serves
// the CTUs of its group in turn: when idle it grants the lowest-numbered CTU
// with a waiting table and pulls that table in SEND_CYCLES consecutive cycles,
// one slice of VPC = 3^(K-1)/SEND_CYCLES values per port per cycle. The slice
// goes to VPC reconstruction units in parallel, which complete the table.
// Fixed-priority service is this design's choice; the sizing rule guarantees
// every CTU of the group is served before it finishes its next table
// (neighbouring CTUs finish one cycle apart, and NC*SEND_CYCLES <= WORDS).
//
// Outputs, one cycle after the slice is granted: VPC x 3 complete entries for
// cases and controls, the first/last-slice flags of the table and its K SNP
// identifiers. `grants` counts tables served (for observation).
module rec_block #(
  parameter int unsigned K           = 3,
  parameter int unsigned EW          = 11,
  parameter int unsigned NC          = 14,  // CTUs sharing this block
  parameter int unsigned VPC         = 1    // reconstruction units in the block
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the CTUs of the group
  input  logic          ctu_pending [NC],
  output logic          ctu_send    [NC],
  input  logic [EW-1:0] ctu_n0      [NC][VPC][2],
  input  logic [EW-1:0] ctu_n1      [NC][VPC][2],
  input  logic [EW-1:0] ctu_nk1     [NC][VPC][2],
  input  logic          ctu_first   [NC],
  input  logic          ctu_last    [NC],
  input  logic [31:0]   ctu_ids     [NC][K],
  // complete table entries
  output logic          out_valid,
  output logic [EW-1:0] out_n [VPC][3][2],
  output logic          out_first,
  output logic          out_last,
  output logic [31:0]   out_ids [K],
  output logic [31:0]   grants
);

  localparam int unsigned IW = (NC > 1) ? $clog2(NC) : 1;

  logic          active;
  logic [IW-1:0] cur;
  logic          sel_valid;
  logic [IW-1:0] sel;

  always_comb begin
    sel_valid = 1'b0;
    sel       = cur;
    if (active) begin
      sel_valid = 1'b1;
    end else begin
      for (int i = int'(NC) - 1; i >= 0; i--)
        if (ctu_pending[i]) begin
          sel_valid = 1'b1;
          sel       = IW'(i);
        end
    end
    for (int i = 0; i < int'(NC); i++) ctu_send[i] = sel_valid && (sel == IW'(i));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      cur    <= '0;
      grants <= '0;
    end else if (sel_valid) begin
      if (!active) grants <= grants + 32'd1;
      cur    <= sel;
      active <= !ctu_last[sel];
    end
  end

  // reconstruction units
  logic rv [VPC];
  for (genvar v = 0; v < VPC; v++) begin : g_ru
    logic [EW-1:0] a0 [2], a1 [2], ak [2];
    always_comb begin
      for (int h = 0; h < 2; h++) begin
        a0[h] = ctu_n0[sel][v][h];
        a1[h] = ctu_n1[sel][v][h];
        ak[h] = ctu_nk1[sel][v][h];
      end
    end
    rec_unit #(.EW(EW)) u_ru (
      .clk, .rst_n, .in_valid(sel_valid), .n0(a0), .n1(a1), .nk1(ak),
      .out_valid(rv[v]), .o_n(out_n[v]));
  end

  assign out_valid = rv[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_first <= 1'b0;
      out_last  <= 1'b0;
      for (int k = 0; k < int'(K); k++) out_ids[k] <= '0;
    end else begin
      out_first <= sel_valid && ctu_first[sel];
      out_last  <= sel_valid && ctu_last[sel];
      out_ids   <= ctu_ids[sel];
    end
  end

  a_pending_served: assert property (@(posedge clk) disable iff (!rst_n)
                                     active |-> ctu_pending[cur])
    else $error("rec_block: granted CTU has no table");

endmodule
