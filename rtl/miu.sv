// miu: Mutual Information Unit.
//
// For one pair of contingency-table entries (n_case, n_ctrl) it computes the
// partial score
//   n_case*log2(n_case) + n_ctrl*log2(n_ctrl) - (n_case+n_ctrl)*log2(n_case+n_ctrl)
// in single precision. Summed over the whole table this is N[H(X) - H(X,Y)],
// which orders combinations exactly as their mutual information does; the
// division by N and the subtraction of H(Y) are left to the host for the few
// saved combinations.
//
// Datapath (as in the architecture): the upper arm looks up n*log2(n) for the
// case and control entries in one dual-port table and adds the two values;
// the lower arm adds the two integers, looks up the sum in a second table and
// waits in a buffer for the floating-point adder of the upper arm; a
// floating-point subtractor produces the result.
//
// Timing: one value pair per cycle, result 1 + 2*FP_LATENCY cycles later
// (table read, adder, subtractor).
module miu #(
  parameter int unsigned EW         = 11,
  parameter int unsigned N_CASES    = 2000,
  parameter int unsigned N_CONTROLS = 2000,
  parameter int unsigned FP_LATENCY = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [EW-1:0] n_case,
  input  logic [EW-1:0] n_ctrl,
  output logic          out_valid,
  output logic [31:0]   y
);

  localparam int unsigned D1  = ((N_CASES > N_CONTROLS) ? N_CASES : N_CONTROLS) + 1;
  localparam int unsigned D2  = N_CASES + N_CONTROLS + 1;
  localparam int unsigned AW1 = $clog2(D1);
  localparam int unsigned AW2 = $clog2(D2);

  // upper arm: f(n_case) + f(n_ctrl)
  logic [31:0] f_case, f_ctrl, f_sum_unused;
  logic        v1;

  nlog2n_lut #(.DEPTH(D1)) u_lut_entry (
    .clk, .addr_a(AW1'(n_case)), .addr_b(AW1'(n_ctrl)),
    .data_a(f_case), .data_b(f_ctrl));

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  logic        v_up;
  logic [31:0] up;
  fp_add #(.LATENCY(FP_LATENCY)) u_add (
    .clk, .rst_n, .in_valid(v1), .a(f_case), .b(f_ctrl), .sub(1'b0),
    .out_valid(v_up), .y(up));

  // lower arm: f(n_case + n_ctrl), buffered to meet the adder output
  logic [AW2-1:0] nsum;
  logic [31:0]    f_tot, f_tot_dly;
  assign nsum = AW2'(n_case) + AW2'(n_ctrl);

  nlog2n_lut #(.DEPTH(D2)) u_lut_sum (
    .clk, .addr_a(nsum), .addr_b(nsum), .data_a(f_tot), .data_b(f_sum_unused));

  delay_line #(.WIDTH(32), .DEPTH(FP_LATENCY)) u_buf (
    .clk, .rst_n, .d(f_tot), .q(f_tot_dly));

  fp_add #(.LATENCY(FP_LATENCY)) u_sub (
    .clk, .rst_n, .in_valid(v_up), .a(up), .b(f_tot_dly), .sub(1'b1),
    .out_valid(out_valid), .y(y));

endmodule
