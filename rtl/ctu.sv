// ctu: Contingency Table Unit of the systolic array (general architecture,
// any order K >= 2).
//
// A CTU stores one SNP (the first unit of the array stores K-1) and, for every
// later SNP of the round that streams past it, builds the partial contingency
// table of the K-th order combination
//   (fixed SNPs of the first unit, own stored SNP, streamed SNP).
// The K-2 "fixed" SNPs of the first unit are read from its RAMs and sent down
// the array together with each streamed word, as G0, G1 and G2 words, so every
// unit sees all K SNPs of its combinations while storing only one of them.
//
// Per word the unit ANDs the 3^(K-1) combinations of G0/G1/G2 of the K-1
// stored SNPs with the streamed word, popcounts cases and controls separately
// and accumulates. It works in three phases, as in the architecture:
//   1. while its own SNP is being captured (odd words: G0 held from the even
//      word, G1 current), it builds the complete (K-1)-order table n(K-1);
//   2. on G0 words of a later SNP it accumulates n(..,0);
//   3. on G1 words it accumulates n(..,1). Phases 2 and 3 alternate.
// G2 is never streamed: it is formed as NOR(G0,G1) masked with the valid
// patients of each word group, so dummy patients that pad the last words are
// ignored. n(..,2) is left to the reconstruction units.
//
// Which SNP a unit stores is decided in the stream itself: a `claimed` bit
// travels with every word. After a round start an empty unit claims the first
// unclaimed SNP that reaches it; the first unit claims `mode` SNPs (mode =
// re-initialisation mode: the last `mode` of its K-1 stored SNPs are
// replaced, the others kept from the previous round). This claim bit and the
// SNP identifiers carried with each table are this design's means of
// following the processing order of the architecture.
//
// Pipeline (five stages, the architecture's count): A input and RAM read,
// B operand selection / G2, C AND, D popcount, E accumulate; the finished
// table is copied into a second register set (F) and offered to the
// reconstruction block through three ports: n(..,0), n(..,1) and n(K-1).
// The block pulls it with `tab_send` in SEND_CYCLES slices of
// 3^(K-1)/SEND_CYCLES values per port. `err_overrun` flags a table finished
// while the previous one was still waiting (must never happen when the block
// is dimensioned by the sizing rules).
//
// The stream leaves the unit one cycle after it enters (register stage B).
module ctu
  import epi_pkg::*;
#(
  parameter int unsigned K           = 3,
  parameter int unsigned R           = 64,
  parameter int unsigned WORDS       = 126,
  parameter int unsigned N_CASES     = 2000,
  parameter int unsigned N_CONTROLS  = 2000,
  parameter int unsigned EW          = 11,
  parameter int unsigned SEND_CYCLES = 9,
  parameter bit          FIRST       = 1'b0,
  parameter int unsigned MODEW       = 2,
  localparam int unsigned WIDXW = $clog2(WORDS),
  localparam int unsigned NF    = K - 2,                 // fixed SNPs
  localparam int unsigned NFD   = (K > 2) ? K - 2 : 1,   // port dimension
  localparam int unsigned Q     = pow3(K - 1),           // combinations of stored SNPs
  localparam int unsigned VPC   = Q / SEND_CYCLES        // values per port per cycle
) (
  input  logic             clk,
  input  logic             rst_n,
  // stream in (from count_last or the previous CTU)
  input  logic             in_valid,
  input  logic [R-1:0]     in_data,
  input  logic [WIDXW-1:0] in_widx,
  input  logic             in_last,
  input  logic [31:0]      in_id,
  input  logic             in_claimed,
  input  logic             in_start,
  input  logic [MODEW-1:0] in_mode,
  input  logic [R-1:0]     in_fix_g  [NFD][3],
  input  logic [31:0]      in_fix_id [NFD],
  // stream out (to the next CTU)
  output logic             out_valid,
  output logic [R-1:0]     out_data,
  output logic [WIDXW-1:0] out_widx,
  output logic             out_last,
  output logic [31:0]      out_id,
  output logic             out_claimed,
  output logic             out_start,
  output logic [MODEW-1:0] out_mode,
  output logic [R-1:0]     out_fix_g  [NFD][3],
  output logic [31:0]      out_fix_id [NFD],
  // partial table towards the reconstruction block
  output logic             tab_pending,
  input  logic             tab_send,
  output logic [EW-1:0]    tab_n0  [VPC][2],   // [value][1 = cases, 0 = controls]
  output logic [EW-1:0]    tab_n1  [VPC][2],
  output logic [EW-1:0]    tab_nk1 [VPC][2],
  output logic             tab_first_slice,
  output logic             tab_last_slice,
  output logic [31:0]      tab_ids [K],        // fixed..., own, streamed
  output logic             err_overrun
);

  localparam int unsigned HALF = R / 2;
  localparam int unsigned CH   = WORDS / 2;
  localparam int unsigned AW   = (CH > 1) ? $clog2(CH) : 1;
  localparam int unsigned PCW  = $clog2(HALF + 1);
  localparam int unsigned SCW  = (SEND_CYCLES > 1) ? $clog2(SEND_CYCLES) : 1;

  typedef enum logic [1:0] {EMPTY, CAPTURING, READY} own_state_e;
  typedef enum logic [1:0] {K_PREV, K_G0, K_G1} acc_kind_e;

  // ------------------------------------------------------------------
  // Stage A: claim decision, RAM write and read
  // ------------------------------------------------------------------
  own_state_e        own_state;
  logic              claiming;        // this unit owns the SNP now streaming
  logic              fix_claiming;    // (first unit) a fixed slot is being filled
  logic [31:0]       fix_slot;        // next fixed slot to fill (first unit)
  logic [31:0]       own_id;

  logic [AW-1:0]     a_chunk;
  logic              a_g1;
  logic              a_cap_own, a_cap_fix, a_proc, a_claim;

  assign a_chunk = AW'(in_widx >> 1);
  assign a_g1    = in_widx[0];

  always_comb begin
    logic new_snp;
    new_snp   = in_valid && (in_widx == '0);
    a_cap_own = 1'b0;
    a_cap_fix = 1'b0;
    if (new_snp) begin
      if (!in_claimed && own_state == EMPTY) begin
        if (FIRST && (fix_slot < NF)) a_cap_fix = 1'b1;
        else                          a_cap_own = 1'b1;
      end
    end else if (in_valid) begin
      a_cap_own = claiming;
      a_cap_fix = fix_claiming;
    end
    a_proc  = in_valid && (own_state == READY);
    a_claim = a_cap_own || a_cap_fix;
  end

  // own SNP storage
  logic [R-1:0] own_g0_q, own_g1_q;

  snp_ram #(.WIDTH(R), .DEPTH(CH)) u_own_g0 (
    .clk, .we(a_cap_own && !a_g1), .waddr(a_chunk), .wdata(in_data),
    .raddr(a_chunk), .rdata(own_g0_q));
  snp_ram #(.WIDTH(R), .DEPTH(CH)) u_own_g1 (
    .clk, .we(a_cap_own && a_g1), .waddr(a_chunk), .wdata(in_data),
    .raddr(a_chunk), .rdata(own_g1_q));

  // valid-patient mask of one word group (dummy patients excluded)
  function automatic logic [R-1:0] group_mask(input logic [AW-1:0] c);
    logic [R-1:0] m;
    m = '0;
    for (int i = 0; i < int'(HALF); i++) begin
      m[HALF + i] = (int'(c) * int'(HALF) + i) < int'(N_CASES);
      m[i]        = (int'(c) * int'(HALF) + i) < int'(N_CONTROLS);
    end
    return m;
  endfunction

  // ------------------------------------------------------------------
  // Stage B registers (also the stream output)
  // ------------------------------------------------------------------
  logic             b_valid, b_last, b_g1, b_cap_own, b_proc, b_claimed;
  logic [R-1:0]     b_data;
  logic [AW-1:0]    b_chunk;
  logic [WIDXW-1:0] b_widx;
  logic [31:0]      b_id;
  logic             b_start;
  logic [MODEW-1:0] b_mode;
  logic [R-1:0]     b_fix_g  [NFD][3];
  logic [31:0]      b_fix_id [NFD];
  logic [R-1:0]     held_g0;          // G0 word of the SNP being captured

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_valid   <= 1'b0;
      b_last    <= 1'b0;
      b_g1      <= 1'b0;
      b_cap_own <= 1'b0;
      b_proc    <= 1'b0;
      b_claimed <= 1'b0;
      b_data    <= '0;
      b_chunk   <= '0;
      b_widx    <= '0;
      b_id      <= '0;
      b_start   <= 1'b0;
      b_mode    <= '0;
    end else begin
      b_valid   <= in_valid;
      b_last    <= in_last;
      b_g1      <= a_g1;
      b_cap_own <= a_cap_own;
      b_proc    <= a_proc;
      b_claimed <= in_claimed || a_claim;
      b_data    <= in_data;
      b_chunk   <= a_chunk;
      b_widx    <= in_widx;
      b_id      <= in_id;
      b_start   <= in_start;
      b_mode    <= in_mode;
    end
  end

  always_ff @(posedge clk) begin
    if (b_cap_own && !b_g1) held_g0 <= b_data;
  end

  // ------------------------------------------------------------------
  // Claim / round state
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      own_state    <= EMPTY;
      claiming     <= 1'b0;
      fix_claiming <= 1'b0;
      fix_slot     <= '0;
      own_id       <= '0;
    end else if (in_start) begin
      own_state    <= EMPTY;
      claiming     <= 1'b0;
      fix_claiming <= 1'b0;
      // first unit: keep the first K-1-mode stored SNPs
      fix_slot     <= (int'(K) - 1 - int'(in_mode) < 0) ? 32'd0
                                                       : 32'(int'(K) - 1 - int'(in_mode));
    end else if (in_valid) begin
      if (a_cap_own) begin
        own_state <= in_last ? READY : CAPTURING;
        claiming  <= !in_last;
        if (in_widx == '0) own_id <= in_id;
      end
      if (a_cap_fix) begin
        fix_claiming <= !in_last;
        if (in_last) fix_slot <= fix_slot + 32'd1;
      end
    end
  end

  // ------------------------------------------------------------------
  // Fixed SNPs: stored here in the first unit, forwarded otherwise
  // ------------------------------------------------------------------
  if (FIRST && NF > 0) begin : g_fixed_store
    logic [R-1:0] fx_g0_q [NF];
    logic [R-1:0] fx_g1_q [NF];
    logic [31:0]  fx_id   [NF];
    logic [R-1:0] b_mask;

    for (genvar j = 0; j < NF; j++) begin : g_slot
      logic we_slot;
      assign we_slot = a_cap_fix && (fix_slot == 32'(j));
      snp_ram #(.WIDTH(R), .DEPTH(CH)) u_fx_g0 (
        .clk, .we(we_slot && !a_g1), .waddr(a_chunk), .wdata(in_data),
        .raddr(a_chunk), .rdata(fx_g0_q[j]));
      snp_ram #(.WIDTH(R), .DEPTH(CH)) u_fx_g1 (
        .clk, .we(we_slot && a_g1), .waddr(a_chunk), .wdata(in_data),
        .raddr(a_chunk), .rdata(fx_g1_q[j]));
      always_ff @(posedge clk) begin
        if (!rst_n) fx_id[j] <= '0;
        else if (we_slot && in_widx == '0) fx_id[j] <= in_id;
      end
    end

    assign b_mask = group_mask(b_chunk);
    always_comb begin
      for (int j = 0; j < int'(NF); j++) begin
        b_fix_g[j][0] = fx_g0_q[j];
        b_fix_g[j][1] = fx_g1_q[j];
        b_fix_g[j][2] = ~(fx_g0_q[j] | fx_g1_q[j]) & b_mask;
        b_fix_id[j]   = fx_id[j];
      end
    end
  end else begin : g_fixed_fwd
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int j = 0; j < int'(NFD); j++) begin
          b_fix_g[j][0] <= '0;
          b_fix_g[j][1] <= '0;
          b_fix_g[j][2] <= '0;
          b_fix_id[j]   <= '0;
        end
      end else begin
        b_fix_g  <= in_fix_g;
        b_fix_id <= in_fix_id;
      end
    end
  end

  assign out_valid   = b_valid;
  assign out_data    = b_data;
  assign out_widx    = b_widx;
  assign out_last    = b_last;
  assign out_id      = b_id;
  assign out_claimed = b_claimed;
  assign out_start   = b_start;
  assign out_mode    = b_mode;
  assign out_fix_g   = b_fix_g;
  assign out_fix_id  = b_fix_id;

  // ------------------------------------------------------------------
  // Stage B -> C: operand selection, G2, AND
  // ------------------------------------------------------------------
  logic [R-1:0] own_g [3];
  logic [R-1:0] prod_b [Q];

  always_comb begin
    logic [R-1:0] mask;
    mask = group_mask(b_chunk);
    if (b_cap_own) begin
      own_g[0] = held_g0;
      own_g[1] = b_data;
    end else begin
      own_g[0] = own_g0_q;
      own_g[1] = own_g1_q;
    end
    own_g[2] = ~(own_g[0] | own_g[1]) & mask;

    for (int q = 0; q < int'(Q); q++) begin
      int unsigned rem;
      logic [R-1:0] p;
      rem = q;
      p   = own_g[rem % 3];           // last digit: own SNP
      rem = rem / 3;
      for (int j = int'(NF) - 1; j >= 0; j--) begin
        p   = p & b_fix_g[j][rem % 3];
        rem = rem / 3;
      end
      if (b_proc) p = p & b_data;     // phases 2 and 3
      prod_b[q] = p;
    end
  end

  logic          c_valid, c_first, c_last;
  acc_kind_e     c_kind;
  logic [R-1:0]  c_prod [Q];
  logic [31:0]   c_ids  [K];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_valid <= 1'b0;
      c_first <= 1'b0;
      c_last  <= 1'b0;
      c_kind  <= K_PREV;
    end else begin
      c_valid <= b_valid && (b_proc || (b_cap_own && b_g1));
      c_first <= (b_chunk == '0);
      c_last  <= b_last;
      c_kind  <= b_proc ? (b_g1 ? K_G1 : K_G0) : K_PREV;
    end
  end

  always_ff @(posedge clk) begin
    c_prod <= prod_b;
    for (int j = 0; j < int'(NF); j++) c_ids[j] <= b_fix_id[j];
    c_ids[K-2] <= own_id;
    c_ids[K-1] <= b_id;
  end

  // ------------------------------------------------------------------
  // Stage D: popcount per half
  // ------------------------------------------------------------------
  logic [PCW-1:0] cnt_c [Q][2];

  for (genvar q = 0; q < Q; q++) begin : g_pop
    for (genvar h = 0; h < 2; h++) begin : g_half
      logic [HALF-1:0] hw;
      logic [5:0]   part [HALF/32];
      assign hw = c_prod[q][h*HALF +: HALF];
      for (genvar s = 0; s < HALF / 32; s++) begin : g_slice
        popcount32 u_pop (.word(hw[s*32 +: 32]), .count(part[s]));
      end
      always_comb begin
        cnt_c[q][h] = '0;
        for (int s = 0; s < int'(HALF / 32); s++) cnt_c[q][h] = cnt_c[q][h] + PCW'(part[s]);
      end
    end
  end

  logic           d_valid, d_first, d_last;
  acc_kind_e      d_kind;
  logic [PCW-1:0] d_cnt [Q][2];
  logic [31:0]    d_ids [K];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_first <= 1'b0;
      d_last  <= 1'b0;
      d_kind  <= K_PREV;
    end else begin
      d_valid <= c_valid;
      d_first <= c_first;
      d_last  <= c_last;
      d_kind  <= c_kind;
    end
  end

  always_ff @(posedge clk) begin
    d_cnt <= cnt_c;
    d_ids <= c_ids;
  end

  // ------------------------------------------------------------------
  // Stage E: accumulation
  // ------------------------------------------------------------------
  logic [EW-1:0] acc_k1 [Q][2];
  logic [EW-1:0] acc_t0 [Q][2];
  logic [EW-1:0] acc_t1 [Q][2];
  logic          e_done;
  logic [31:0]   e_ids [K];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_done <= 1'b0;
      for (int q = 0; q < int'(Q); q++)
        for (int h = 0; h < 2; h++) begin
          acc_k1[q][h] <= '0;
          acc_t0[q][h] <= '0;
          acc_t1[q][h] <= '0;
        end
    end else begin
      e_done <= d_valid && d_last && (d_kind == K_G1);
      if (d_valid) begin
        for (int q = 0; q < int'(Q); q++)
          for (int h = 0; h < 2; h++) begin
            unique case (d_kind)
              K_PREV: acc_k1[q][h] <= (d_first ? '0 : acc_k1[q][h]) + EW'(d_cnt[q][h]);
              K_G0:   acc_t0[q][h] <= (d_first ? '0 : acc_t0[q][h]) + EW'(d_cnt[q][h]);
              default: acc_t1[q][h] <= (d_first ? '0 : acc_t1[q][h]) + EW'(d_cnt[q][h]);
            endcase
          end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (d_valid && d_last) e_ids <= d_ids;
  end

  // ------------------------------------------------------------------
  // Stage F: table hold registers and sliced transfer
  // ------------------------------------------------------------------
  logic [EW-1:0]  hold_t0 [Q][2];
  logic [EW-1:0]  hold_t1 [Q][2];
  logic [EW-1:0]  hold_k1 [Q][2];
  logic [SCW-1:0] slice;
  logic           finishing;

  assign finishing = tab_pending && tab_send && (slice == SCW'(SEND_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tab_pending <= 1'b0;
      slice       <= '0;
      err_overrun <= 1'b0;
    end else begin
      if (tab_pending && tab_send)
        slice <= finishing ? '0 : slice + SCW'(1);
      if (e_done) begin
        tab_pending <= 1'b1;
        if (tab_pending && !finishing) err_overrun <= 1'b1;
      end else if (finishing) begin
        tab_pending <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (e_done) begin
      hold_t0 <= acc_t0;
      hold_t1 <= acc_t1;
      hold_k1 <= acc_k1;
      tab_ids <= e_ids;
    end
  end

  always_comb begin
    for (int v = 0; v < int'(VPC); v++)
      for (int h = 0; h < 2; h++) begin
        tab_n0[v][h]  = hold_t0[int'(slice) * int'(VPC) + v][h];
        tab_n1[v][h]  = hold_t1[int'(slice) * int'(VPC) + v][h];
        tab_nk1[v][h] = hold_k1[int'(slice) * int'(VPC) + v][h];
      end
  end

  assign tab_first_slice = (slice == '0);
  assign tab_last_slice  = (slice == SCW'(SEND_CYCLES - 1));

  // a table must be pulled before the next one of this unit is finished
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(e_done && tab_pending && !finishing))
    else $error("ctu: partial table overwritten before transfer");

endmodule
