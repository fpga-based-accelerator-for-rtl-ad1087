// fp_add: pipelined IEEE-754 single-precision adder / subtractor.
//
// Computes a + b (sub = 0) or a - b (sub = 1). The operation is done in one
// combinational step (align the smaller operand with guard, round and sticky
// bits, add or subtract the mantissas, normalise, round to nearest even) and
// the result then passes through LATENCY registers, so a new operation is
// accepted every cycle and its result appears LATENCY cycles later. The
// architecture uses vendor floating-point cores configured with 11 stages for
// the adders and subtractors of the MIUs and the adder tree; LATENCY defaults
// to that number. Subnormal inputs and results are flushed to zero, overflow
// gives infinity; NaN is not produced by this datapath and not handled. These
// simplifications are this design's choice: the values it adds are sums of
// n*log2(n) terms, far from both ends of the range.
//
// Interface: in_valid/a/b/sub in, out_valid/y out, no back-pressure.
module fp_add #(
  parameter int unsigned LATENCY = 11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic        out_valid,
  output logic [31:0] y
);

  logic [31:0] sum_c;

  always_comb begin
    logic        sa, sb, sx, sy, eff_sub;
    logic [7:0]  ea, eb, ex, ey;
    logic [23:0] ma, mb, mx, my;
    logic [26:0] ax, ay;       // mantissa with guard, round, sticky
    logic [27:0] acc;
    logic [7:0]  d;
    logic        sticky;
    int          e;
    int          lz;
    logic [23:0] mr;
    logic        rnd;

    acc = '0;
    lz  = 0;
    mr  = '0;
    rnd = 1'b0;
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    if (ea == 8'd0) ea = 8'd0;
    if (eb == 8'd0) eb = 8'd0;

    // x is the operand with the larger magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    eff_sub = sx ^ sy;

    // align y to x
    d  = ex - ey;
    ax = {mx, 3'b000};
    ay = {my, 3'b000};
    sticky = 1'b0;
    if (d >= 8'd27) begin
      sticky = |my;
      ay = '0;
    end else begin
      for (int i = 0; i < 27; i++)
        if (i < int'(d)) sticky = sticky | ay[i];
      ay = ay >> d;
    end
    ay[0] = ay[0] | sticky;

    sum_c = '0;
    e = int'(ex);
    if (mx == 24'd0) begin
      sum_c = '0;                                   // both operands zero
    end else begin
      if (eff_sub) acc = {1'b0, ax} - {1'b0, ay};
      else         acc = {1'b0, ax} + {1'b0, ay};

      if (acc == 28'd0) begin
        sum_c = '0;                                 // exact cancellation
      end else begin
        if (acc[27]) begin                          // carry out: shift right
          acc = {1'b0, acc[27:2], acc[1] | acc[0]};
          e = e + 1;
        end else begin                              // normalise left
          lz = 0;
          for (int i = 26; i >= 0; i--) begin
            if (acc[i]) break;
            lz++;
          end
          acc = acc << lz;
          e = e - lz;
        end
        // acc[26] is the hidden bit, acc[2:0] guard/round/sticky
        mr  = acc[26:3];
        rnd = acc[2] && ((acc[1] | acc[0]) || mr[0]);
        if (rnd) begin
          mr = mr + 24'd1;
          if (mr == 24'd0) begin
            mr = 24'h800000;
            e  = e + 1;
          end
        end
        if (e <= 0)        sum_c = {sx, 31'd0};
        else if (e >= 255) sum_c = {sx, 8'hFF, 23'd0};
        else               sum_c = {sx, 8'(e), mr[22:0]};
      end
    end
  end

  // output pipeline
  logic [31:0] pipe_y [LATENCY];
  logic        pipe_v [LATENCY];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LATENCY); i++) begin
        pipe_v[i] <= 1'b0;
        pipe_y[i] <= '0;
      end
    end else begin
      pipe_v[0] <= in_valid;
      pipe_y[0] <= sum_c;
      for (int i = 1; i < int'(LATENCY); i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_y[i] <= pipe_y[i-1];
      end
    end
  end

  assign out_valid = pipe_v[LATENCY-1];
  assign y         = pipe_y[LATENCY-1];

endmodule
