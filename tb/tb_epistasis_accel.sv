// tb_epistasis_accel: end-to-end test of the accelerator top at reduced
// sizes, self-checking against a software model (see accel_run).
//
// Three configurations run side by side on one clock:
//   - third order, 200 patients (dummy padding in the last word pair),
//     5 CTUs sharing reconstruction blocks, 12 SNPs, placed just below a
//     4 KB boundary so that rounds are split into several bursts;
//   - fourth order, 64 patients, 3 CTUs, 8 SNPs (exercises re-initialisation
//     modes 1, 2 and 3);
//   - second order, 100 patients, 4 CTUs, 10 SNPs (one stored SNP per
//     unit, mode 1 only).
// Each mechanism the design relies on must be observed at least once; one that
// never occurs counts as a failure. A watchdog ends the run if it hangs.
module tb_epistasis_accel;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks, failures;

  logic        fin3, fin4, fin2;
  int unsigned ch3, fl3, ch4, fl4, ch2, fl2;
  int unsigned m3 [4], m4 [4], m2 [4];
  int unsigned w3, w4, bub3, bub4, mb3, mb4, rep3, rep4, pad3, pad4;
  int unsigned w2, bub2, mb2, rep2, pad2;

  logic        rst_n3, start_round3, round_done3, clear_results3, drain3;
  logic [1:0]  round_mode3;
  logic [31:0] round_base_snp3, round_addr3, round_words3, araddr3, tables_scored3;
  logic        arvalid3, arready3, rvalid3, rready3, rlast3;
  logic [7:0]  arlen3;
  logic [2:0]  arsize3;
  logic [1:0]  arburst3, rresp3;
  logic [63:0] rdata3, res_data3;
  logic        res_valid3, res_ready3, res_last3, err_overrun3, waiting3;
  logic        rst_n4, start_round4, round_done4, clear_results4, drain4;
  logic [1:0]  round_mode4;
  logic [31:0] round_base_snp4, round_addr4, round_words4, araddr4, tables_scored4;
  logic        arvalid4, arready4, rvalid4, rready4, rlast4;
  logic [7:0]  arlen4;
  logic [2:0]  arsize4;
  logic [1:0]  arburst4, rresp4;
  logic [63:0] rdata4, res_data4;
  logic        res_valid4, res_ready4, res_last4, err_overrun4, waiting4;
  logic        rst_n2, start_round2, round_done2, clear_results2, drain2;
  logic [0:0]  round_mode2;
  logic [31:0] round_base_snp2, round_addr2, round_words2, araddr2, tables_scored2;
  logic        arvalid2, arready2, rvalid2, rready2, rlast2;
  logic [7:0]  arlen2;
  logic [2:0]  arsize2;
  logic [1:0]  arburst2, rresp2;
  logic [63:0] rdata2, res_data2;
  logic        res_valid2, res_ready2, res_last2, err_overrun2, waiting2;

  epistasis_accel #(.K(3), .N_PATIENTS(200), .N_CTU(5), .X(4), .FP_LATENCY(11)) u_dut3 (
    .clk, .rst_n(rst_n3), .start_round(start_round3), .round_mode(round_mode3),
    .round_base_snp(round_base_snp3), .round_addr(round_addr3),
    .round_words(round_words3), .round_done(round_done3), .busy(),
    .clear_results(clear_results3), .drain(drain3),
    .m_axi_arvalid(arvalid3), .m_axi_arready(arready3), .m_axi_araddr(araddr3),
    .m_axi_arlen(arlen3), .m_axi_arsize(arsize3), .m_axi_arburst(arburst3),
    .m_axi_rvalid(rvalid3), .m_axi_rready(rready3), .m_axi_rdata(rdata3),
    .m_axi_rresp(rresp3), .m_axi_rlast(rlast3),
    .res_valid(res_valid3), .res_ready(res_ready3), .res_data(res_data3),
    .res_last(res_last3), .err_overrun(err_overrun3), .tables_scored(tables_scored3));

  epistasis_accel #(.K(4), .N_PATIENTS(64), .N_CTU(3), .X(3), .FP_LATENCY(4)) u_dut4 (
    .clk, .rst_n(rst_n4), .start_round(start_round4), .round_mode(round_mode4),
    .round_base_snp(round_base_snp4), .round_addr(round_addr4),
    .round_words(round_words4), .round_done(round_done4), .busy(),
    .clear_results(clear_results4), .drain(drain4),
    .m_axi_arvalid(arvalid4), .m_axi_arready(arready4), .m_axi_araddr(araddr4),
    .m_axi_arlen(arlen4), .m_axi_arsize(arsize4), .m_axi_arburst(arburst4),
    .m_axi_rvalid(rvalid4), .m_axi_rready(rready4), .m_axi_rdata(rdata4),
    .m_axi_rresp(rresp4), .m_axi_rlast(rlast4),
    .res_valid(res_valid4), .res_ready(res_ready4), .res_data(res_data4),
    .res_last(res_last4), .err_overrun(err_overrun4), .tables_scored(tables_scored4));

  epistasis_accel #(.K(2), .N_PATIENTS(100), .N_CTU(4), .X(3), .FP_LATENCY(3)) u_dut2 (
    .clk, .rst_n(rst_n2), .start_round(start_round2), .round_mode(round_mode2),
    .round_base_snp(round_base_snp2), .round_addr(round_addr2),
    .round_words(round_words2), .round_done(round_done2), .busy(),
    .clear_results(clear_results2), .drain(drain2),
    .m_axi_arvalid(arvalid2), .m_axi_arready(arready2), .m_axi_araddr(araddr2),
    .m_axi_arlen(arlen2), .m_axi_arsize(arsize2), .m_axi_arburst(arburst2),
    .m_axi_rvalid(rvalid2), .m_axi_rready(rready2), .m_axi_rdata(rdata2),
    .m_axi_rresp(rresp2), .m_axi_rlast(rlast2),
    .res_valid(res_valid2), .res_ready(res_ready2), .res_data(res_data2),
    .res_last(res_last2), .err_overrun(err_overrun2), .tables_scored(tables_scored2));

  // some CTU has a finished table that its reconstruction block has not granted
  always_comb begin
    waiting3 = 1'b0;
    for (int i = 0; i < 5; i++)
      waiting3 = waiting3 | (u_dut3.t_pending[i] & ~u_dut3.t_send[i]);
  end

  always_comb begin
    waiting2 = 1'b0;
    for (int i = 0; i < 4; i++)
      waiting2 = waiting2 | (u_dut2.t_pending[i] & ~u_dut2.t_send[i]);
  end

  // some CTU has a finished table that its reconstruction block has not granted
  always_comb begin
    waiting4 = 1'b0;
    for (int i = 0; i < 3; i++)
      waiting4 = waiting4 | (u_dut4.t_pending[i] & ~u_dut4.t_send[i]);
  end

  accel_run #(.K(3), .NP(200), .NCTU(5), .NSNP(12), .X(4), .SEED(11), .BASE_WORD(470)) u_k3 (
    .clk, .rst_n(rst_n3), .start_round(start_round3), .round_mode(round_mode3),
    .round_base_snp(round_base_snp3), .round_addr(round_addr3),
    .round_words(round_words3), .round_done(round_done3),
    .clear_results(clear_results3), .drain(drain3), .res_valid(res_valid3),
    .res_ready(res_ready3), .res_data(res_data3), .res_last(res_last3),
    .err_overrun(err_overrun3), .tables_scored(tables_scored3),
    .arvalid(arvalid3), .arready(arready3), .araddr(araddr3), .arlen(arlen3),
    .arsize(arsize3), .arburst(arburst3), .rvalid(rvalid3), .rready(rready3),
    .rdata(rdata3), .rresp(rresp3), .rlast(rlast3), .ctu_waiting(waiting3),
    .finished(fin3), .checks(ch3), .failures(fl3), .cnt_modes(m3),
    .cnt_wait(w3), .cnt_bubbles(bub3), .cnt_multiburst(mb3),
    .cnt_replaced(rep3), .cnt_padding(pad3));

  accel_run #(.K(4), .NP(64), .NCTU(3), .NSNP(8), .X(3), .SEED(7)) u_k4 (
    .clk, .rst_n(rst_n4), .start_round(start_round4), .round_mode(round_mode4),
    .round_base_snp(round_base_snp4), .round_addr(round_addr4),
    .round_words(round_words4), .round_done(round_done4),
    .clear_results(clear_results4), .drain(drain4), .res_valid(res_valid4),
    .res_ready(res_ready4), .res_data(res_data4), .res_last(res_last4),
    .err_overrun(err_overrun4), .tables_scored(tables_scored4),
    .arvalid(arvalid4), .arready(arready4), .araddr(araddr4), .arlen(arlen4),
    .arsize(arsize4), .arburst(arburst4), .rvalid(rvalid4), .rready(rready4),
    .rdata(rdata4), .rresp(rresp4), .rlast(rlast4), .ctu_waiting(waiting4),
    .finished(fin4), .checks(ch4), .failures(fl4), .cnt_modes(m4),
    .cnt_wait(w4), .cnt_bubbles(bub4), .cnt_multiburst(mb4),
    .cnt_replaced(rep4), .cnt_padding(pad4));

  accel_run #(.K(2), .NP(100), .NCTU(4), .NSNP(10), .X(3), .SEED(3)) u_k2 (
    .clk, .rst_n(rst_n2), .start_round(start_round2), .round_mode(round_mode2),
    .round_base_snp(round_base_snp2), .round_addr(round_addr2),
    .round_words(round_words2), .round_done(round_done2),
    .clear_results(clear_results2), .drain(drain2), .res_valid(res_valid2),
    .res_ready(res_ready2), .res_data(res_data2), .res_last(res_last2),
    .err_overrun(err_overrun2), .tables_scored(tables_scored2),
    .arvalid(arvalid2), .arready(arready2), .araddr(araddr2), .arlen(arlen2),
    .arsize(arsize2), .arburst(arburst2), .rvalid(rvalid2), .rready(rready2),
    .rdata(rdata2), .rresp(rresp2), .rlast(rlast2), .ctu_waiting(waiting2),
    .finished(fin2), .checks(ch2), .failures(fl2), .cnt_modes(m2),
    .cnt_wait(w2), .cnt_bubbles(bub2), .cnt_multiburst(mb2),
    .cnt_replaced(rep2), .cnt_padding(pad2));

  task automatic mech(input int unsigned n, input string name);
    checks++;
    $display("mechanism %-40s observed %0d times", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", name);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    fork
      begin
        wait (fin3 && fin4 && fin2);
      end
      begin
        repeat (2_000_000) @(posedge clk);
        $display("FAIL: watchdog expired");
        failures++;
      end
    join_any
    disable fork;
    checks   += ch3 + ch4 + ch2;
    failures += fl3 + fl4 + fl2;
    mech(m3[1] + m4[1] + m2[1], "re-initialisation mode 1 (own SNP only)");
    mech(m3[2] + m4[2], "re-initialisation mode 2");
    mech(m4[3],         "re-initialisation mode 3 (full reload)");
    mech(w3 + w4 + w2,  "CTU waiting for shared reconstruction");
    mech(bub3 + bub4,   "stream bubble from memory");
    mech(mb3 + mb4,     "round split into several bursts");
    mech(rep3 + rep4,   "saved result displaced by a better one");
    mech(pad3,          "dummy patients masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
