// accel_run: one complete epistasis search on a random dataset, checked
// against a software model. The end-to-end testbenches instantiate the
// accelerator top and connect it to this module's host and memory ports;
// the parameters must match the top's (order, patients, CTUs, saved
// results per block).
//
// It fills an AXI4 memory model with NSNP random SNPs of NP patients (half
// cases, half controls) in the streamed format, then plays the host: it
// walks the prefixes of K-2 SNPs held by the first CTU in lexicographic
// order and, for each, issues rounds that load the CTUs with consecutive SNPs
// and stream the rest of the dataset. A round whose prefix changed uses the
// re-initialisation mode that replaces exactly the changed tail of the
// prefix; further rounds of the same prefix use mode 1. Afterwards it drains
// the result stream and checks:
//   - the number of tables scored equals C(NSNP, K) and each round's count;
//   - every returned entry names a valid combination and carries its score
//     (n log2 n sums computed here in double precision, within tolerance);
//   - each save unit's list is sorted;
//   - every combination clearly in the global top X was returned;
//   - no table was overwritten before transfer, no AXI protocol error.
// It also counts how often the design's mechanisms occurred.
module accel_run
  import epi_pkg::*;
#(
  parameter int unsigned K          = 3,
  parameter int unsigned NP         = 200,
  parameter int unsigned NCTU       = 5,
  parameter int unsigned NSNP       = 12,
  parameter int unsigned X          = 4,
  parameter int unsigned SEED       = 1,
  parameter int unsigned BASE_WORD  = 0       // dataset position in memory (64-bit words)
) (
  input  logic        clk,
  // host side of the accelerator
  output logic                       rst_n,
  output logic                       start_round,
  output logic [$clog2(K)-1:0]       round_mode,
  output logic [31:0]                round_base_snp,
  output logic [31:0]                round_addr,
  output logic [31:0]                round_words,
  input  logic                       round_done,
  output logic                       clear_results,
  output logic                       drain,
  input  logic                       res_valid,
  output logic                       res_ready,
  input  logic [63:0]                res_data,
  input  logic                       res_last,
  input  logic                       err_overrun,
  input  logic [31:0]                tables_scored,
  // memory side of the accelerator (AXI4 read channels)
  input  logic                       arvalid,
  output logic                       arready,
  input  logic [31:0]                araddr,
  input  logic [7:0]                 arlen,
  input  logic [2:0]                 arsize,
  input  logic [1:0]                 arburst,
  output logic                       rvalid,
  input  logic                       rready,
  output logic [63:0]                rdata,
  output logic [1:0]                 rresp,
  output logic                       rlast,
  // observation: some CTU holds a finished table its block has not granted
  input  logic                       ctu_waiting,
  // results
  output logic        finished,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned cnt_modes [4],          // rounds per re-initialisation mode
  output int unsigned cnt_wait,               // cycles a finished table waited for its block
  output int unsigned cnt_bubbles,            // cycles with no word while a round streamed
  output int unsigned cnt_multiburst,         // rounds split into several AXI bursts
  output int unsigned cnt_replaced,           // saved entries pushed out by better ones
  output int unsigned cnt_padding             // dummy patients per SNP
);

  localparam int unsigned N_CASES = (NP + 1) / 2;
  localparam int unsigned N_CTRL  = NP / 2;
  localparam int unsigned WORDS   = words_per_snp(NP, 64);
  localparam int unsigned NC      = ctus_per_block(K, WORDS);
  localparam int unsigned NBLK    = ceil_div(NCTU, NC);
  localparam int unsigned WPE     = ceil_div(32 * (1 + K), 64);
  localparam int unsigned MODEW   = $clog2(K);
  localparam int unsigned L       = K - 2;

  // ---------------- memory ----------------
  logic              mem_we;
  logic [31:0]       mem_waddr;
  logic [63:0]       mem_wdata;
  int unsigned       bursts, proto_err;

  axi_mem_model #(.R(64), .DEPTH(BASE_WORD + NSNP * WORDS), .GAPS(1'b1)) u_mem (
    .clk, .rst_n, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .arvalid, .arready, .araddr, .arlen, .arsize, .arburst,
    .rvalid, .rready, .rdata, .rresp, .rlast,
    .bursts, .protocol_errors(proto_err));

  // ---------------- mechanism counters ----------------
  logic streaming;
  always @(posedge clk) begin
    if (streaming && !(rvalid && rready)) cnt_bubbles <= cnt_bubbles + 1;
  end

  always @(posedge clk) begin
    if (ctu_waiting) cnt_wait <= cnt_wait + 1;
  end

  // ---------------- dataset and reference ----------------
  byte unsigned geno [NSNP][NP];   // patients 0..N_CASES-1 are cases

  function automatic real f(input int unsigned n);
    if (n < 2) return 0.0;
    return real'(n) * $ln(real'(n)) / $ln(2.0);
  endfunction

  function automatic longint key_of(input int unsigned c [K]);
    longint k = 0;
    for (int i = K - 1; i >= 0; i--) k = k * NSNP + longint'(c[i]);
    return k;
  endfunction

  function automatic real ref_score(input int unsigned c [K]);
    int unsigned ncase [], nctrl [];
    real s = 0.0;
    ncase = new[pow3(K)];
    nctrl = new[pow3(K)];
    foreach (ncase[e]) begin ncase[e] = 0; nctrl[e] = 0; end
    for (int p = 0; p < int'(NP); p++) begin
      int unsigned e = 0;
      for (int i = 0; i < int'(K); i++) e = e * 3 + geno[c[i]][p];
      if (p < int'(N_CASES)) ncase[e]++; else nctrl[e]++;
    end
    foreach (ncase[e]) s += f(ncase[e]) + f(nctrl[e]) - f(ncase[e] + nctrl[e]);
    return s;
  endfunction

  real ref_tab [longint];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [K=%0d NP=%0d]: %s", K, NP, what);
    end
  endtask

  // ---------------- host ----------------
  task automatic run_round(input int unsigned mode, input int unsigned s,
                           input int unsigned o);
    int unsigned t0, expect_n, b0;
    expect_n = 0;
    for (int u = 0; u < int'(NCTU); u++)
      if (o + u <= NSNP - 2) expect_n += NSNP - 1 - (o + u);
    t0 = tables_scored;
    b0 = bursts;
    cnt_modes[mode]++;
    @(posedge clk);
    start_round    <= 1'b1;
    round_mode     <= MODEW'(mode);
    round_base_snp <= s;
    round_addr     <= (BASE_WORD + s * WORDS) * 8;
    round_words    <= (NSNP - s) * WORDS;
    @(posedge clk);
    start_round <= 1'b0;
    streaming   <= 1'b1;
    while (!round_done) @(posedge clk);
    streaming <= 1'b0;
    if (bursts - b0 > 1) cnt_multiburst++;
    check(tables_scored - t0 == expect_n,
          $sformatf("round mode %0d from %0d: %0d tables, expected %0d",
                    mode, s, tables_scored - t0, expect_n));
  endtask

  initial begin
    int unsigned pre [], loaded [];
    bit          have_loaded;
    int unsigned c [K];
    longint      keys [$];
    real         scores [$];
    logic [63:0] words [$];
    int unsigned total;

    finished = 1'b0;
    checks = 0; failures = 0;
    foreach (cnt_modes[i]) cnt_modes[i] = 0;
    cnt_wait = 0; cnt_bubbles = 0; cnt_multiburst = 0;
    cnt_replaced = 0;
    cnt_padding = (WORDS / 2) * 32 * 2 - NP;
    streaming = 1'b0;
    rst_n = 1'b0;
    start_round = 1'b0; round_mode = '0; round_base_snp = '0; round_addr = '0;
    round_words = '0; clear_results = 1'b0; drain = 1'b0; res_ready = 1'b0;
    mem_we = 1'b0; mem_waddr = '0; mem_wdata = '0;

    void'($urandom(SEED));
    for (int s = 0; s < int'(NSNP); s++)
      for (int p = 0; p < int'(NP); p++) geno[s][p] = byte'($urandom_range(0, 2));

    repeat (4) @(posedge clk);
    rst_n <= 1'b1;

    // load the dataset into memory
    for (int s = 0; s < int'(NSNP); s++)
      for (int w = 0; w < int'(WORDS); w++) begin
        logic [63:0] word;
        word = '0;
        for (int i = 0; i < 32; i++) begin
          int pc, pt;
          pc = (w / 2) * 32 + i;
          pt = int'(N_CASES) + (w / 2) * 32 + i;
          if (pc < int'(N_CASES)) word[32 + i] = (geno[s][pc] == byte'(w % 2));
          if (pt < int'(NP))      word[i]      = (geno[s][pt] == byte'(w % 2));
        end
        @(posedge clk);
        mem_we <= 1'b1; mem_waddr <= BASE_WORD + s * WORDS + w; mem_wdata <= word;
      end
    @(posedge clk);
    mem_we <= 1'b0;

    // reference scores of every combination
    total = 0;
    for (int i = 0; i < int'(K); i++) c[i] = i;
    forever begin
      int i;
      ref_tab[key_of(c)] = ref_score(c);
      total++;
      i = K - 1;
      while (i >= 0 && c[i] == NSNP - K + i) i--;
      if (i < 0) break;
      c[i]++;
      for (int j = i + 1; j < int'(K); j++) c[j] = c[j-1] + 1;
    end

    @(posedge clk);
    clear_results <= 1'b1;
    @(posedge clk);
    clear_results <= 1'b0;

    // rounds, prefix by prefix
    pre = new[L];
    loaded = new[L];
    have_loaded = 1'b0;
    for (int i = 0; i < int'(L); i++) pre[i] = i;
    forever begin
      int last_p, first_own, i;
      last_p = (L == 0) ? -1 : int'(pre[L-1]);
      if (last_p <= int'(NSNP) - 3) begin
        first_own = last_p + 1;
        for (int o = first_own; o < int'(NSNP) - 1; o += NCTU) begin
          if (o == first_own) begin
            int d;
            d = 0;
            if (have_loaded) while (d < int'(L) && pre[d] == loaded[d]) d++;
            run_round(L - d + 1, (d < int'(L)) ? pre[d] : o, o);
            foreach (pre[j]) loaded[j] = pre[j];
            have_loaded = 1'b1;
          end else begin
            run_round(1, o, o);
          end
        end
      end
      // next prefix in lexicographic order
      if (L == 0) break;
      i = L - 1;
      while (i >= 0 && pre[i] == NSNP - L + i) i--;
      if (i < 0) break;
      pre[i]++;
      for (int j = i + 1; j < int'(L); j++) pre[j] = pre[j-1] + 1;
    end

    check(tables_scored == total,
          $sformatf("tables scored %0d, combinations %0d", tables_scored, total));
    check(!err_overrun, "partial table overwritten");
    check(proto_err == 0, "AXI protocol error");

    // drain the results
    @(posedge clk);
    drain <= 1'b1;
    @(posedge clk);
    drain <= 1'b0;
    res_ready <= 1'b1;
    forever begin
      @(posedge clk);
      if (res_valid && res_ready) begin
        words.push_back(res_data);
        if (res_last) break;
      end
    end
    res_ready <= 1'b0;
    check(words.size() == NBLK * X * WPE,
          $sformatf("result words %0d, expected %0d", words.size(), NBLK * X * WPE));

    // parse, check scores, sortedness
    for (int b = 0; b < int'(NBLK); b++) begin
      logic [31:0] prev;
      bit          have_prev;
      have_prev = 1'b0;
      for (int x = 0; x < int'(X); x++) begin
        logic [32*WPE*2-1:0] ent;
        logic [31:0] val;
        int unsigned cc [K];
        bit ok;
        ent = '0;
        for (int w = 0; w < int'(WPE); w++)
          ent[64*w +: 64] = words[(b * X + x) * WPE + w];
        val = ent[31:0];
        if (val == 32'hFF80_0000) continue;
        ok = 1'b1;
        for (int k = 0; k < int'(K); k++) begin
          cc[k] = ent[32*(k+1) +: 32];
          if (cc[k] >= NSNP) ok = 1'b0;
          if (k > 0 && cc[k] <= cc[k-1]) ok = 1'b0;
        end
        check(ok, $sformatf("block %0d entry %0d: bad combination", b, x));
        if (ok) begin
          real r, h;
          r = ref_tab[key_of(cc)];
          h = from_fp32(val);
          check((h - r < 0.05 + 1e-4 * (r < 0 ? -r : r)) &&
                (r - h < 0.05 + 1e-4 * (r < 0 ? -r : r)),
                $sformatf("block %0d entry %0d: score %f, reference %f", b, x, h, r));
          keys.push_back(key_of(cc));
          scores.push_back(r);
        end
        if (have_prev) check(!fp32_gt(val, prev), "save list not sorted");
        prev = val;
        have_prev = 1'b1;
      end
    end

    // global top X must be present (skip near-ties at the boundary)
    begin
      real all [$];
      real cut;
      foreach (ref_tab[k]) all.push_back(ref_tab[k]);
      all.rsort();
      cut = (all.size() > X) ? all[X] : -1.0e30;
      foreach (ref_tab[k]) begin
        if (ref_tab[k] > cut + 0.1 + 1e-4 * (cut < 0 ? -cut : cut)) begin
          bit found;
          found = 1'b0;
          foreach (keys[j]) if (keys[j] == k) found = 1'b1;
          check(found, $sformatf("top combination %0d not returned", k));
        end
      end
    end

    cnt_replaced = (total > NBLK * X) ? total - NBLK * X : 0;
    finished = 1'b1;
  end

endmodule
