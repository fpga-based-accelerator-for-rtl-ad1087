// tb_rec_block: three CTU models share one reconstruction block (K = 3,
// 3 slices of 3 values per table). Each model raises `pending` with a random
// table at random times and, while granted, presents its slices one per
// cycle. Checks: the block serves only pending CTUs and one at a time, pulls
// each slice exactly once, outputs n0, n1 and n2 = nk1 - n0 - n1 for every
// value one cycle later with the table's identifiers and first/last flags,
// serves every table (grant count) and the lowest-numbered waiting CTU first.
module tb_rec_block;
  localparam int unsigned K = 3, EW = 11, NC = 3, VPC = 3, CYC = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic          pend [NC], send [NC], first [NC], last [NC];
  logic [EW-1:0] n0 [NC][VPC][2], n1 [NC][VPC][2], nk1 [NC][VPC][2];
  logic [31:0]   ids [NC][K];
  logic          out_valid, out_first, out_last;
  logic [EW-1:0] out_n [VPC][3][2];
  logic [31:0]   out_ids [K], grants;
  int unsigned checks = 0, failures = 0;

  rec_block #(.K(K), .EW(EW), .NC(NC), .VPC(VPC)) dut (
    .clk, .rst_n, .ctu_pending(pend), .ctu_send(send), .ctu_n0(n0), .ctu_n1(n1),
    .ctu_nk1(nk1), .ctu_first(first), .ctu_last(last), .ctu_ids(ids),
    .out_valid, .out_n, .out_first, .out_last, .out_ids, .grants);

  // table contents per CTU: [slice][value][entry][half]
  logic [EW-1:0] tab [NC][CYC][VPC][3][2];
  int unsigned   slice [NC];
  int unsigned   made, served;
  // expected outputs, in order
  logic [EW-1:0] eq_n [$][VPC][3][2];
  logic          eq_f [$], eq_l [$];
  logic [31:0]   eq_id [$][K];

  always_comb begin
    for (int c = 0; c < int'(NC); c++) begin
      first[c] = (slice[c] == 0);
      last[c]  = (slice[c] == CYC - 1);
      for (int v = 0; v < int'(VPC); v++)
        for (int h = 0; h < 2; h++) begin
          n0[c][v][h]  = tab[c][slice[c]][v][0][h];
          n1[c][v][h]  = tab[c][slice[c]][v][1][h];
          nk1[c][v][h] = tab[c][slice[c]][v][0][h] + tab[c][slice[c]][v][1][h] +
                         tab[c][slice[c]][v][2][h];
        end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      int nsend, lowest;
      nsend = 0; lowest = -1;
      for (int c = int'(NC) - 1; c >= 0; c--) if (pend[c]) lowest = c;
      for (int c = 0; c < int'(NC); c++) if (send[c]) begin
        nsend++;
        checks++;
        if (!pend[c]) begin failures++; $display("FAIL: CTU %0d granted without table", c); end
        if (slice[c] == 0 && c != lowest) begin
          // a new table may only start for the lowest-numbered waiting CTU
          failures++; $display("FAIL: CTU %0d served before CTU %0d", c, lowest);
        end
        eq_n.push_back(tab[c][slice[c]]);
        eq_f.push_back(slice[c] == 0);
        eq_l.push_back(slice[c] == CYC - 1);
        eq_id.push_back(ids[c]);
        if (slice[c] == CYC - 1) begin
          slice[c] <= 0; pend[c] <= 1'b0; served++;
        end else slice[c] <= slice[c] + 1;
      end
      checks++;
      if (nsend > 1) begin failures++; $display("FAIL: %0d CTUs granted at once", nsend); end
      if (out_valid) begin
        checks++;
        if (eq_n.size() == 0 || out_n != eq_n[0] || out_first != eq_f[0] ||
            out_last != eq_l[0] || out_ids != eq_id[0]) begin
          failures++; $display("FAIL: wrong reconstructed slice");
        end
        if (eq_n.size() != 0) begin
          void'(eq_n.pop_front()); void'(eq_f.pop_front());
          void'(eq_l.pop_front()); void'(eq_id.pop_front());
        end
      end
      // new tables appear at random on idle CTUs
      for (int c = 0; c < int'(NC); c++)
        if (!pend[c] && made < 200 && $urandom_range(0, 5) == 0) begin
          for (int s = 0; s < int'(CYC); s++)
            for (int v = 0; v < int'(VPC); v++)
              for (int e = 0; e < 3; e++)
                for (int h = 0; h < 2; h++) tab[c][s][v][e][h] <= EW'($urandom_range(0, 600));
          for (int k = 0; k < int'(K); k++) ids[c][k] <= $urandom;
          pend[c] <= 1'b1;
          made++;
        end
    end
  end

  initial begin
    for (int c = 0; c < int'(NC); c++) begin
      pend[c] = 1'b0; slice[c] = 0;
      for (int k = 0; k < int'(K); k++) ids[c][k] = '0;
      for (int s = 0; s < int'(CYC); s++)
        for (int v = 0; v < int'(VPC); v++)
          for (int e = 0; e < 3; e++)
            for (int h = 0; h < 2; h++) tab[c][s][v][e][h] = '0;
    end
    made = 0; served = 0;
    fork
      begin
        rst_n = 1'b0;
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        while (made < 200 || pend[0] || pend[1] || pend[2]) @(negedge clk);
        repeat (3) @(negedge clk);
        checks++;
        if (served != 200 || grants != 200 || eq_n.size() != 0) begin
          failures++; $display("FAIL: served %0d grants %0d", served, grants);
        end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
