// epistasis_accel: exhaustive K-order epistasis detection accelerator.
//
// For every combination of K SNPs the accelerator builds the case/control
// contingency table (2 x 3^K genotype counts) from bit-vector genotypes and
// scores it with mutual information; the best combinations are kept for the
// host. Organisation:
//
//   AXI4 reader -> count_last -> CTU 0 (stores K-1 SNPs) -> CTU 1 -> ... -> CTU N-1
//                                   |                         |
//                         rec_block (shared by NC CTUs) ... rec_block
//                                   |                         |
//                         VPC rec units, 3*VPC MIUs,       (same)
//                         adder tree, save unit
//   save units -> result_streamer -> host
//
// The host runs the dataset through the array in rounds: for each round it
// gives the re-initialisation mode, the number of the first SNP, its memory
// address and the number of words, then pulses `start_round`. Every CTU that
// holds an SNP produces one partial table per later SNP of the round; the
// reconstruction blocks complete the tables (the third that depends on G2 of
// the streamed SNP is derived by subtraction), the MIUs and the adder tree
// compute the partial scores, the save units accumulate them and keep the
// X best combinations. After the last round the host pulses `drain` and
// reads the saved scores and SNP identifiers from the result stream. The
// division by the number of patients, the subtraction of H(Y) and the final
// sort are done by the host.
//
// Dataset format (per SNP, WORDS words of R bits, R/2 cases in the upper
// half and R/2 controls in the lower half of each word): word 2c is G0 and
// word 2c+1 is G1 of patient group c; padding patients are zero in both.
//
// Sizing follows the architecture's rules: WORDS = 2*ceil(cases/(R/2)),
// entry width = ceil(log2(cases+1)), SEND_CYCLES = largest power of three
// <= WORDS dividing 3^(K-1), NC = floor(WORDS/SEND_CYCLES) CTUs per
// reconstruction block, VPC = 3^(K-1)/SEND_CYCLES reconstruction units and
// 3*VPC MIUs per block, one save unit per block.
//
// Defaults: the third-order configuration for 4000 patients on a 64-bit
// interface with 140 CTUs (the largest array reported for the Zynq-7000
// device at that size); X (combinations kept per save unit) is this design's
// choice.
//
// `round_done` pulses when the last word of the round has been read and the
// pipeline has drained (a fixed count of cycles after the last word).
module epistasis_accel
  import epi_pkg::*;
#(
  parameter int unsigned K          = 3,
  parameter int unsigned N_PATIENTS = 4000,
  parameter int unsigned R          = 64,
  parameter int unsigned N_CTU      = 140,
  parameter int unsigned X          = 4,
  parameter int unsigned FP_LATENCY = 11,
  parameter int unsigned ADDR_W     = 32,
  localparam int unsigned MODEW     = $clog2(K)
) (
  input  logic              clk,
  input  logic              rst_n,
  // round control (from the host)
  input  logic              start_round,
  input  logic [MODEW-1:0]  round_mode,      // re-initialisation mode, 1..K-1
  input  logic [31:0]       round_base_snp,  // number of the first SNP of the round
  input  logic [ADDR_W-1:0] round_addr,      // its byte address
  input  logic [31:0]       round_words,     // words to stream
  output logic              round_done,
  output logic              busy,
  // result control
  input  logic              clear_results,
  input  logic              drain,
  // AXI4 read master (dataset)
  output logic              m_axi_arvalid,
  input  logic              m_axi_arready,
  output logic [ADDR_W-1:0] m_axi_araddr,
  output logic [7:0]        m_axi_arlen,
  output logic [2:0]        m_axi_arsize,
  output logic [1:0]        m_axi_arburst,
  input  logic              m_axi_rvalid,
  output logic              m_axi_rready,
  input  logic [R-1:0]      m_axi_rdata,
  input  logic [1:0]        m_axi_rresp,
  input  logic              m_axi_rlast,
  // results towards the host
  output logic              res_valid,
  input  logic              res_ready,
  output logic [R-1:0]      res_data,
  output logic              res_last,
  // status
  output logic              err_overrun,
  output logic [31:0]       tables_scored
);

  localparam int unsigned N_CASES    = (N_PATIENTS + 1) / 2;
  localparam int unsigned N_CONTROLS = N_PATIENTS / 2;
  localparam int unsigned WORDS      = words_per_snp(N_PATIENTS, R);
  localparam int unsigned WIDXW      = $clog2(WORDS);
  localparam int unsigned EW         = entry_bits(N_PATIENTS);
  localparam int unsigned CYC        = send_cycles(K, WORDS);
  localparam int unsigned NC         = ctus_per_block(K, WORDS);
  localparam int unsigned VPC        = rus_per_block(K, WORDS);
  localparam int unsigned NBLK       = ceil_div(N_CTU, NC);
  localparam int unsigned NFD        = (K > 2) ? K - 2 : 1;
  localparam int unsigned NMIU       = 3 * VPC;
  localparam int unsigned MIU_LAT    = 1 + 2 * FP_LATENCY;
  localparam int unsigned TREE_LAT   = ((NMIU > 1) ? $clog2(NMIU) : 0) * FP_LATENCY;
  localparam int unsigned TAGW       = 2 + 32 * K;
  localparam int unsigned DRAIN      = N_CTU + 2 * WORDS + NC * CYC
                                       + MIU_LAT + TREE_LAT + 16;

  // ------------------------------------------------------------------
  // Dataset input
  // ------------------------------------------------------------------
  logic          rd_busy, rd_done;
  logic          s_valid, s_ready;
  logic [R-1:0]  s_data;

  axi4_reader #(.R(R), .ADDR_W(ADDR_W)) u_reader (
    .clk, .rst_n,
    .start(start_round), .base_addr(round_addr), .n_words(round_words),
    .busy(rd_busy), .done(rd_done),
    .m_axi_arvalid, .m_axi_arready, .m_axi_araddr, .m_axi_arlen,
    .m_axi_arsize, .m_axi_arburst,
    .m_axi_rvalid, .m_axi_rready, .m_axi_rdata, .m_axi_rresp, .m_axi_rlast,
    .s_valid, .s_ready, .s_data);

  // ------------------------------------------------------------------
  // Systolic array: count_last and the CTU chain
  // ------------------------------------------------------------------
  logic             ch_valid   [N_CTU+1];
  logic [R-1:0]     ch_data    [N_CTU+1];
  logic [WIDXW-1:0] ch_widx    [N_CTU+1];
  logic             ch_last    [N_CTU+1];
  logic [31:0]      ch_id      [N_CTU+1];
  logic             ch_claimed [N_CTU+1];
  logic             ch_start   [N_CTU+1];
  logic [MODEW-1:0] ch_mode    [N_CTU+1];
  logic [R-1:0]     ch_fix_g   [N_CTU+1][NFD][3];
  logic [31:0]      ch_fix_id  [N_CTU+1][NFD];
  logic [31:0]      ord_unused;

  count_last #(.R(R), .WORDS(WORDS), .MODEW(MODEW)) u_count_last (
    .clk, .rst_n,
    .round_start(start_round), .round_mode, .round_base_snp,
    .s_valid, .s_ready, .s_data,
    .o_valid(ch_valid[0]), .o_data(ch_data[0]), .o_widx(ch_widx[0]),
    .o_last(ch_last[0]), .o_ord(ord_unused), .o_id(ch_id[0]),
    .o_start(ch_start[0]), .o_mode(ch_mode[0]));

  assign ch_claimed[0] = 1'b0;
  always_comb begin
    for (int j = 0; j < int'(NFD); j++) begin
      for (int g = 0; g < 3; g++) ch_fix_g[0][j][g] = '0;
      ch_fix_id[0][j] = '0;
    end
  end

  logic          t_pending [N_CTU];
  logic          t_send    [N_CTU];
  logic [EW-1:0] t_n0      [N_CTU][VPC][2];
  logic [EW-1:0] t_n1      [N_CTU][VPC][2];
  logic [EW-1:0] t_nk1     [N_CTU][VPC][2];
  logic          t_first   [N_CTU];
  logic          t_last    [N_CTU];
  logic [31:0]   t_ids     [N_CTU][K];
  logic          t_ovr     [N_CTU];

  for (genvar i = 0; i < N_CTU; i++) begin : g_ctu
    ctu #(
      .K(K), .R(R), .WORDS(WORDS), .N_CASES(N_CASES), .N_CONTROLS(N_CONTROLS),
      .EW(EW), .SEND_CYCLES(CYC), .FIRST(i == 0), .MODEW(MODEW)
    ) u_ctu (
      .clk, .rst_n,
      .in_valid(ch_valid[i]), .in_data(ch_data[i]), .in_widx(ch_widx[i]),
      .in_last(ch_last[i]), .in_id(ch_id[i]), .in_claimed(ch_claimed[i]),
      .in_start(ch_start[i]), .in_mode(ch_mode[i]),
      .in_fix_g(ch_fix_g[i]), .in_fix_id(ch_fix_id[i]),
      .out_valid(ch_valid[i+1]), .out_data(ch_data[i+1]), .out_widx(ch_widx[i+1]),
      .out_last(ch_last[i+1]), .out_id(ch_id[i+1]), .out_claimed(ch_claimed[i+1]),
      .out_start(ch_start[i+1]), .out_mode(ch_mode[i+1]),
      .out_fix_g(ch_fix_g[i+1]), .out_fix_id(ch_fix_id[i+1]),
      .tab_pending(t_pending[i]), .tab_send(t_send[i]),
      .tab_n0(t_n0[i]), .tab_n1(t_n1[i]), .tab_nk1(t_nk1[i]),
      .tab_first_slice(t_first[i]), .tab_last_slice(t_last[i]),
      .tab_ids(t_ids[i]), .err_overrun(t_ovr[i]));
  end

  // ------------------------------------------------------------------
  // Reconstruction blocks, MIUs, adder trees and save units
  // ------------------------------------------------------------------
  logic        sv_valid [NBLK][X];
  logic [31:0] sv_val   [NBLK][X];
  logic [31:0] sv_ids   [NBLK][X][K];
  logic [31:0] sv_tables[NBLK];

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    localparam int unsigned BASE = b * NC;
    localparam int unsigned NB   = (N_CTU - BASE < NC) ? N_CTU - BASE : NC;

    logic          c_pending [NB];
    logic          c_send    [NB];
    logic [EW-1:0] c_n0      [NB][VPC][2];
    logic [EW-1:0] c_n1      [NB][VPC][2];
    logic [EW-1:0] c_nk1     [NB][VPC][2];
    logic          c_first   [NB];
    logic          c_last    [NB];
    logic [31:0]   c_ids     [NB][K];

    for (genvar c = 0; c < NB; c++) begin : g_map
      assign c_pending[c]     = t_pending[BASE + c];
      assign t_send[BASE + c] = c_send[c];
      assign c_n0[c]          = t_n0[BASE + c];
      assign c_n1[c]          = t_n1[BASE + c];
      assign c_nk1[c]         = t_nk1[BASE + c];
      assign c_first[c]       = t_first[BASE + c];
      assign c_last[c]        = t_last[BASE + c];
      assign c_ids[c]         = t_ids[BASE + c];
    end

    logic          r_valid, r_first, r_last;
    logic [EW-1:0] r_n [VPC][3][2];
    logic [31:0]   r_ids [K];
    logic [31:0]   r_grants_unused;

    rec_block #(.K(K), .EW(EW), .NC(NB), .VPC(VPC)) u_rec (
      .clk, .rst_n,
      .ctu_pending(c_pending), .ctu_send(c_send),
      .ctu_n0(c_n0), .ctu_n1(c_n1), .ctu_nk1(c_nk1),
      .ctu_first(c_first), .ctu_last(c_last), .ctu_ids(c_ids),
      .out_valid(r_valid), .out_n(r_n), .out_first(r_first), .out_last(r_last),
      .out_ids(r_ids), .grants(r_grants_unused));

    // three MIUs per reconstruction unit
    logic        m_valid [NMIU];
    logic [31:0] m_y     [NMIU];
    for (genvar v = 0; v < VPC; v++) begin : g_ru
      for (genvar g = 0; g < 3; g++) begin : g_miu
        miu #(.EW(EW), .N_CASES(N_CASES), .N_CONTROLS(N_CONTROLS),
              .FP_LATENCY(FP_LATENCY)) u_miu (
          .clk, .rst_n, .in_valid(r_valid),
          .n_case(r_n[v][g][1]), .n_ctrl(r_n[v][g][0]),
          .out_valid(m_valid[v*3 + g]), .y(m_y[v*3 + g]));
      end
    end

    // table tag follows the MIU latency, then travels through the tree
    logic [TAGW-1:0] tag_in, tag_miu, tag_out;
    always_comb begin
      tag_in = '0;
      tag_in[0] = r_first;
      tag_in[1] = r_last;
      for (int k = 0; k < int'(K); k++) tag_in[2 + 32*k +: 32] = r_ids[k];
    end
    delay_line #(.WIDTH(TAGW), .DEPTH(MIU_LAT)) u_tag (
      .clk, .rst_n, .d(tag_in), .q(tag_miu));

    logic        s_v;
    logic [31:0] s_y;
    mi_adder_tree #(.M(NMIU), .FP_LATENCY(FP_LATENCY), .TAGW(TAGW)) u_tree (
      .clk, .rst_n, .in_valid(m_valid[0]), .x(m_y), .in_tag(tag_miu),
      .out_valid(s_v), .y(s_y), .out_tag(tag_out));

    logic [31:0] s_ids [K];
    always_comb begin
      for (int k = 0; k < int'(K); k++) s_ids[k] = tag_out[2 + 32*k +: 32];
    end

    save_unit #(.K(K), .X(X)) u_save (
      .clk, .rst_n, .clear(clear_results),
      .in_valid(s_v), .in_val(s_y), .in_first(tag_out[0]), .in_last(tag_out[1]),
      .in_ids(s_ids),
      .best_valid(sv_valid[b]), .best_val(sv_val[b]), .best_ids(sv_ids[b]),
      .tables(sv_tables[b]));
  end

  // ------------------------------------------------------------------
  // Results and status
  // ------------------------------------------------------------------
  logic res_busy;

  result_streamer #(.NSU(NBLK), .X(X), .K(K), .R(R)) u_results (
    .clk, .rst_n, .start(drain),
    .best_valid(sv_valid), .best_val(sv_val), .best_ids(sv_ids),
    .m_valid(res_valid), .m_ready(res_ready), .m_data(res_data), .m_last(res_last),
    .busy(res_busy));

  always_comb begin
    tables_scored = '0;
    for (int b = 0; b < int'(NBLK); b++) tables_scored = tables_scored + sv_tables[b];
    err_overrun = 1'b0;
    for (int i = 0; i < int'(N_CTU); i++) err_overrun = err_overrun | t_ovr[i];
  end

  // round completion: reader finished, then a fixed drain time
  logic        draining;
  logic [31:0] drain_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      draining   <= 1'b0;
      drain_cnt  <= '0;
      round_done <= 1'b0;
    end else begin
      round_done <= 1'b0;
      if (rd_done) begin
        draining  <= 1'b1;
        drain_cnt <= 32'(DRAIN);
      end else if (draining) begin
        if (drain_cnt == 32'd1) begin
          draining   <= 1'b0;
          round_done <= 1'b1;
        end
        drain_cnt <= drain_cnt - 32'd1;
      end
    end
  end

  assign busy = rd_busy || draining || res_busy;

endmodule
