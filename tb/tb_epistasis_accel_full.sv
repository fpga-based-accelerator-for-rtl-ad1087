// tb_epistasis_accel_full: the accelerator top at its default size (third
// order, 4000 patients, 140 CTUs in 10 reconstruction blocks, best 4 per
// block), run on a random dataset of 20 SNPs and checked against a software
// model (see accel_run). The top is instantiated without parameter overrides,
// so it runs exactly as it would be built.
// Every round fits in one pass of the 140 CTUs, so the mechanisms observed
// here are the re-initialisation of the first CTU's fixed SNP (mode 2) and
// the sharing of reconstruction blocks; the reduced-size testbench covers the
// others. A watchdog ends the run if it hangs.
module tb_epistasis_accel_full;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks, failures;
  logic        fin;
  int unsigned ch, fl, wt, bub, mb, rep, pad;
  int unsigned m [4];

  logic        rst_n, start_round, round_done, clear_results, drain;
  logic [1:0]  round_mode;
  logic [31:0] round_base_snp, round_addr, round_words, araddr, tables_scored;
  logic        arvalid, arready, rvalid, rready, rlast;
  logic [7:0]  arlen;
  logic [2:0]  arsize;
  logic [1:0]  arburst, rresp;
  logic [63:0] rdata, res_data;
  logic        res_valid, res_ready, res_last, err_overrun, waiting;

  epistasis_accel u_dut (
    .clk, .rst_n(rst_n), .start_round(start_round), .round_mode(round_mode),
    .round_base_snp(round_base_snp), .round_addr(round_addr),
    .round_words(round_words), .round_done(round_done), .busy(),
    .clear_results(clear_results), .drain(drain),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_rdata(rdata),
    .m_axi_rresp(rresp), .m_axi_rlast(rlast),
    .res_valid(res_valid), .res_ready(res_ready), .res_data(res_data),
    .res_last(res_last), .err_overrun(err_overrun), .tables_scored(tables_scored));

  // some CTU has a finished table that its reconstruction block has not granted
  always_comb begin
    waiting = 1'b0;
    for (int i = 0; i < 140; i++)
      waiting = waiting | (u_dut.t_pending[i] & ~u_dut.t_send[i]);
  end

  accel_run #(.K(3), .NP(4000), .NCTU(140), .NSNP(20), .X(4), .SEED(5)) u_run (
    .clk, .rst_n(rst_n), .start_round(start_round), .round_mode(round_mode),
    .round_base_snp(round_base_snp), .round_addr(round_addr),
    .round_words(round_words), .round_done(round_done),
    .clear_results(clear_results), .drain(drain), .res_valid(res_valid),
    .res_ready(res_ready), .res_data(res_data), .res_last(res_last),
    .err_overrun(err_overrun), .tables_scored(tables_scored),
    .arvalid(arvalid), .arready(arready), .araddr(araddr), .arlen(arlen),
    .arsize(arsize), .arburst(arburst), .rvalid(rvalid), .rready(rready),
    .rdata(rdata), .rresp(rresp), .rlast(rlast), .ctu_waiting(waiting),
    .finished(fin), .checks(ch), .failures(fl), .cnt_modes(m),
    .cnt_wait(wt), .cnt_bubbles(bub), .cnt_multiburst(mb),
    .cnt_replaced(rep), .cnt_padding(pad));

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
      wait (fin);
      begin
        repeat (1_000_000) @(posedge clk);
        $display("FAIL: watchdog expired");
        failures++;
      end
    join_any
    disable fork;
    checks   += ch;
    failures += fl;
    mech(m[2], "re-initialisation mode 2 (new fixed SNP)");
    mech(wt,   "CTU waiting for shared reconstruction");
    mech(mb,   "round split into several bursts");
    mech(rep,  "saved result displaced by a better one");
    mech(pad,  "dummy patients masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
