// epi_pkg: constants, sizing functions and single-precision helpers shared by
// the epistasis detection accelerator.
//
// The sizing functions turn the design-time dataset description (order K,
// number of patients, interface width R) into the dimensions of the datapath:
// words streamed per SNP, contingency-table entry width, number of cycles used
// to move one partial table to a reconstruction block, CTUs sharing one block
// and reconstruction units per block. The formulas follow the sizing rules of
// the architecture (words per SNP rounded up to an even count, table transfer
// in the largest power of three that fits in the words of one SNP, blocks
// shared by floor(words/cycles) CTUs).
//
// The real-number helpers (to_fp32 / from_fp32) are used only to fill the
// n*log2(n) look-up tables at elaboration time and by testbenches.
package epi_pkg;

  // 3^e for small non-negative e
  function automatic int unsigned pow3(input int unsigned e);
    int unsigned r = 1;
    for (int unsigned i = 0; i < e; i++) r = r * 3;
    return r;
  endfunction

  // Words streamed per SNP for a balanced dataset: ceil(cases/(R/2)) word
  // pairs, one G0 word and one G1 word per pair (always an even count).
  function automatic int unsigned words_per_snp(input int unsigned n_patients,
                                                input int unsigned r_bits);
    int unsigned half = r_bits / 2;
    int unsigned cases = (n_patients + 1) / 2;
    return 2 * ((cases + half - 1) / half);
  endfunction

  // Bits of one contingency-table entry: enough for n_patients/2.
  function automatic int unsigned entry_bits(input int unsigned n_patients);
    return $clog2((n_patients + 1) / 2 + 1);
  endfunction

  // Cycles used to send one partial table from a CTU: the largest power of
  // three that divides 3^(K-1) and does not exceed the words per SNP.
  function automatic int unsigned send_cycles(input int unsigned k,
                                              input int unsigned words);
    int unsigned c = 1;
    while ((c * 3 <= words) && (c * 3 <= pow3(k - 1))) c = c * 3;
    return c;
  endfunction

  // CTUs that share one reconstruction block.
  function automatic int unsigned ctus_per_block(input int unsigned k,
                                                 input int unsigned words);
    return words / send_cycles(k, words);
  endfunction

  // Reconstruction units inside one block (values per port per cycle).
  function automatic int unsigned rus_per_block(input int unsigned k,
                                                input int unsigned words);
    return pow3(k - 1) / send_cycles(k, words);
  endfunction

  // ceil(a/b)
  function automatic int unsigned ceil_div(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // ---------------------------------------------------------------------
  // Single-precision helpers (elaboration / testbench use only)
  // ---------------------------------------------------------------------

  // Round a real to IEEE-754 single precision (round to nearest even);
  // values below the normal range flush to zero.
  function automatic logic [31:0] to_fp32(input real v);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [23:0] mk;
    logic        g, st;
    d = $realtobits(v);
    s = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    mk = m[52:29];
    g  = m[28];
    st = |m[27:0];
    if (g && (st || mk[0])) begin
      mk = mk + 24'd1;
      if (mk == 24'd0) begin
        mk = 24'h800000;
        e  = e + 1;
      end
    end
    if (e <= 0) return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), mk[22:0]};
  endfunction

  // Single precision to real (no NaN handling; zero and normals only).
  function automatic real from_fp32(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // n * log2(n) in single precision, 0 for n = 0 and n = 1.
  function automatic logic [31:0] nlog2n_fp32(input int unsigned n);
    if (n < 2) return 32'd0;
    return to_fp32(real'(n) * $ln(real'(n)) / $ln(2.0));
  endfunction

  // a > b for single-precision numbers (no NaN; +0 and -0 compare equal).
  function automatic logic fp32_gt(input logic [31:0] a, input logic [31:0] b);
    logic a_zero, b_zero;
    a_zero = (a[30:0] == 31'd0);
    b_zero = (b[30:0] == 31'd0);
    if (a_zero && b_zero) return 1'b0;
    if (a[31] != b[31]) return !a[31];
    if (!a[31]) return a[30:0] > b[30:0];
    return a[30:0] < b[30:0];
  endfunction

endpackage
