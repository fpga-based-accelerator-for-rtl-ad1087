// tb_ctu: the head counter and two chained CTUs (the first one, which keeps
// the fixed SNP, and an ordinary one) for third-order tables of 100 patients
// (50 cases, 50 controls: the last word group is padded with dummy
// patients). Three rounds follow a host schedule: a full load (mode 2), a
// reload of the own SNPs only (mode 1) and a new fixed SNP (mode 2). The
// testbench pulls each finished table like a reconstruction block (3 slices
// of 3 values per port), rebuilds the 27 entries for cases and controls and
// checks that the table belongs to the expected combination, that its
// entries add up to the numbers of cases and controls, and that its mutual
// information score equals the reference computed from the genotypes. The
// set of combinations of each round must be complete and no table may be
// overwritten before it is pulled.
module tb_ctu
  import epi_pkg::*;
;
  localparam int unsigned K = 3, R = 64, NP = 100, NCA = 50, NCO = 50;
  localparam int unsigned WORDS = words_per_snp(NP, R);   // 4
  localparam int unsigned CYC = 3, VPC = 3, EW = 6, MODEW = 2, NSNP = 6;
  localparam int unsigned WIDXW = $clog2(WORDS);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, round_start, s_valid, s_ready;
  logic [MODEW-1:0] round_mode;
  logic [31:0] round_base;
  logic [R-1:0] s_data;
  int unsigned checks = 0, failures = 0;

  // chain: count_last -> ctu0 -> ctu1
  logic             c_valid [3], c_last [3], c_claimed [3], c_start [3];
  logic [R-1:0]     c_data [3];
  logic [WIDXW-1:0] c_widx [3];
  logic [31:0]      c_id [3], c_ord;
  logic [MODEW-1:0] c_mode [3];
  logic [R-1:0]     c_fix_g [3][1][3];
  logic [31:0]      c_fix_id [3][1];
  logic             t_pend [2], t_send [2], t_first [2], t_last [2], t_ovr [2];
  logic [EW-1:0]    t_n0 [2][VPC][2], t_n1 [2][VPC][2], t_nk1 [2][VPC][2];
  logic [31:0]      t_ids [2][K];

  count_last #(.R(R), .WORDS(WORDS), .MODEW(MODEW)) u_cl (
    .clk, .rst_n, .round_start, .round_mode, .round_base_snp(round_base),
    .s_valid, .s_ready, .s_data, .o_valid(c_valid[0]), .o_data(c_data[0]),
    .o_widx(c_widx[0]), .o_last(c_last[0]), .o_ord(c_ord), .o_id(c_id[0]),
    .o_start(c_start[0]), .o_mode(c_mode[0]));
  assign c_claimed[0] = 1'b0;
  always_comb begin
    for (int g = 0; g < 3; g++) c_fix_g[0][0][g] = '0;
    c_fix_id[0][0] = '0;
  end

  for (genvar i = 0; i < 2; i++) begin : g_ctu
    ctu #(.K(K), .R(R), .WORDS(WORDS), .N_CASES(NCA), .N_CONTROLS(NCO), .EW(EW),
          .SEND_CYCLES(CYC), .FIRST(i == 0), .MODEW(MODEW)) u_ctu (
      .clk, .rst_n,
      .in_valid(c_valid[i]), .in_data(c_data[i]), .in_widx(c_widx[i]),
      .in_last(c_last[i]), .in_id(c_id[i]), .in_claimed(c_claimed[i]),
      .in_start(c_start[i]), .in_mode(c_mode[i]),
      .in_fix_g(c_fix_g[i]), .in_fix_id(c_fix_id[i]),
      .out_valid(c_valid[i+1]), .out_data(c_data[i+1]), .out_widx(c_widx[i+1]),
      .out_last(c_last[i+1]), .out_id(c_id[i+1]), .out_claimed(c_claimed[i+1]),
      .out_start(c_start[i+1]), .out_mode(c_mode[i+1]),
      .out_fix_g(c_fix_g[i+1]), .out_fix_id(c_fix_id[i+1]),
      .tab_pending(t_pend[i]), .tab_send(t_send[i]),
      .tab_n0(t_n0[i]), .tab_n1(t_n1[i]), .tab_nk1(t_nk1[i]),
      .tab_first_slice(t_first[i]), .tab_last_slice(t_last[i]),
      .tab_ids(t_ids[i]), .err_overrun(t_ovr[i]));
  end

  byte unsigned geno [NSNP][NP];

  function automatic real f(input int unsigned n);
    return (n < 2) ? 0.0 : real'(n) * $ln(real'(n)) / $ln(2.0);
  endfunction

  function automatic real ref_score(input int unsigned a, input int unsigned b,
                                    input int unsigned c);
    int unsigned nca [27], nco [27];
    real s = 0.0;
    foreach (nca[e]) begin nca[e] = 0; nco[e] = 0; end
    for (int p = 0; p < int'(NP); p++) begin
      int unsigned e;
      e = geno[a][p] * 9 + geno[b][p] * 3 + geno[c][p];
      if (p < int'(NCA)) nca[e]++; else nco[e]++;
    end
    foreach (nca[e]) s += f(nca[e]) + f(nco[e]) - f(nca[e] + nco[e]);
    return s;
  endfunction

  // table collection: each CTU has a reconstruction block of its own here
  // (with 4 words per SNP and 3 transfer cycles per table, the sizing rule
  // gives one CTU per block)
  real         acc_s [2];
  int unsigned sum_ca [2], sum_co [2];
  string       seen [$];

  always_comb for (int i = 0; i < 2; i++) t_send[i] = t_pend[i];

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 2; i++) if (t_send[i]) begin
        real s;
        s = t_first[i] ? 0.0 : acc_s[i];
        if (t_first[i]) begin sum_ca[i] = 0; sum_co[i] = 0; end
        for (int v = 0; v < int'(VPC); v++) begin
          int unsigned a2, o2;
          a2 = t_nk1[i][v][1] - t_n0[i][v][1] - t_n1[i][v][1];
          o2 = t_nk1[i][v][0] - t_n0[i][v][0] - t_n1[i][v][0];
          s += f(t_n0[i][v][1]) + f(t_n0[i][v][0]) - f(t_n0[i][v][1] + t_n0[i][v][0]);
          s += f(t_n1[i][v][1]) + f(t_n1[i][v][0]) - f(t_n1[i][v][1] + t_n1[i][v][0]);
          s += f(a2) + f(o2) - f(a2 + o2);
          sum_ca[i] += t_nk1[i][v][1];
          sum_co[i] += t_nk1[i][v][0];
        end
        acc_s[i] = s;
        if (t_last[i]) begin
          real r;
          r = ref_score(t_ids[i][0], t_ids[i][1], t_ids[i][2]);
          checks++;
          if (sum_ca[i] != NCA || sum_co[i] != NCO || s - r > 1e-6 || r - s > 1e-6) begin
            failures++;
            $display("FAIL: table (%0d,%0d,%0d): score %f ref %f, totals %0d/%0d",
                     t_ids[i][0], t_ids[i][1], t_ids[i][2], s, r, sum_ca[i], sum_co[i]);
          end
          seen.push_back($sformatf("%0d,%0d,%0d", t_ids[i][0], t_ids[i][1], t_ids[i][2]));
        end
      end
      if (t_ovr[0] || t_ovr[1]) begin
        checks++; failures++; $display("FAIL: table overwritten");
      end
    end
  end

  task automatic round(input int unsigned mode, input int unsigned first_snp,
                       input string expect_list [$]);
    seen.delete();
    @(negedge clk);
    round_start = 1'b1; round_mode = MODEW'(mode); round_base = first_snp;
    @(negedge clk);
    round_start = 1'b0;
    for (int s = int'(first_snp); s < int'(NSNP); s++)
      for (int w = 0; w < int'(WORDS); w++) begin
        logic [R-1:0] d;
        d = '0;
        for (int i = 0; i < 32; i++) begin
          int pc, pt;
          pc = (w / 2) * 32 + i;
          pt = int'(NCA) + (w / 2) * 32 + i;
          if (pc < int'(NCA)) d[32 + i] = (geno[s][pc] == byte'(w % 2));
          if (pt < int'(NP))  d[i]      = (geno[s][pt] == byte'(w % 2));
        end
        while ($urandom_range(0, 4) == 0) begin s_valid = 1'b0; @(negedge clk); end
        s_valid = 1'b1; s_data = d;
        @(negedge clk);
      end
    s_valid = 1'b0;
    repeat (40) @(negedge clk);
    checks++;
    if (seen.size() != expect_list.size()) begin
      failures++;
      $display("FAIL: round mode %0d from %0d: %0d tables, expected %0d", mode, first_snp,
               seen.size(), expect_list.size());
    end
    foreach (expect_list[j]) begin
      bit found = 1'b0;
      foreach (seen[m]) if (seen[m] == expect_list[j]) found = 1'b1;
      checks++;
      if (!found) begin failures++; $display("FAIL: table %s missing", expect_list[j]); end
    end
  endtask

  initial begin
    for (int s = 0; s < int'(NSNP); s++)
      for (int p = 0; p < int'(NP); p++) geno[s][p] = byte'($urandom_range(0, 2));
    for (int i = 0; i < 2; i++) begin acc_s[i] = 0.0; sum_ca[i] = 0; sum_co[i] = 0; end
    fork
      begin
        rst_n = 1'b0; round_start = 1'b0; round_mode = '0; round_base = '0;
        s_valid = 1'b0; s_data = '0;
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        round(2, 0, '{"0,1,2", "0,1,3", "0,1,4", "0,1,5", "0,2,3", "0,2,4", "0,2,5"});
        round(1, 3, '{"0,3,4", "0,3,5", "0,4,5"});
        round(2, 1, '{"1,2,3", "1,2,4", "1,2,5", "1,3,4", "1,3,5"});
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
