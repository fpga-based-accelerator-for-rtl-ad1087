// tb_save_unit: sends 300 tables of 1 to 9 partial scores (first/last flags,
// random gaps, mixed signs) with random SNP identifiers to a save unit
// keeping the best 4. A model accumulates each table in single precision and
// keeps its own sorted top 4; after every table the unit's list (scores,
// identifiers, valid flags) and table count must match the model. A `clear`
// in the middle must empty the list and restart the table count.
module tb_save_unit
  import epi_pkg::*;
;
  localparam int unsigned K = 3, X = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clear, in_valid, in_first, in_last;
  logic [31:0] in_val, in_ids [K];
  logic        best_valid [X];
  logic [31:0] best_val [X], best_ids [X][K], tables;
  int unsigned checks = 0, failures = 0;

  logic        m_valid [X];
  logic [31:0] m_val [X], m_ids [X][K];

  save_unit #(.K(K), .X(X)) dut (.clk, .rst_n, .clear, .in_valid, .in_val, .in_first,
    .in_last, .in_ids, .best_valid, .best_val, .best_ids, .tables);

  task automatic compare(input int t);
    checks++;
    for (int i = 0; i < int'(X); i++)
      if (best_valid[i] != m_valid[i] ||
          (m_valid[i] && (best_val[i] != m_val[i] || best_ids[i] != m_ids[i]))) begin
        failures++;
        $display("FAIL: table %0d entry %0d: %b %h / model %b %h", t, i,
                 best_valid[i], best_val[i], m_valid[i], m_val[i]);
        break;
      end
  endtask

  initial begin
    fork
      begin
        rst_n = 1'b0; clear = 1'b0; in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
        in_val = '0;
        foreach (in_ids[k]) in_ids[k] = '0;
        for (int i = 0; i < int'(X); i++) begin
          m_valid[i] = 1'b0; m_val[i] = '0;
          for (int k = 0; k < int'(K); k++) m_ids[i][k] = '0;
        end
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        for (int t = 0; t < 300; t++) begin
          int unsigned n;
          logic [31:0] acc, ids [K];
          int pos;
          if (t == 150) begin
            @(negedge clk); clear = 1'b1;
            @(negedge clk); clear = 1'b0;
            for (int i = 0; i < int'(X); i++) m_valid[i] = 1'b0;
            compare(-1);
          end
          n = $urandom_range(1, 9);
          foreach (ids[k]) ids[k] = $urandom;
          acc = 32'h0;
          for (int s = 0; s < int'(n); s++) begin
            logic [31:0] v;
            while ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 1'b0; end
            @(negedge clk);
            v = to_fp32(real'(int'($urandom_range(0, 200000)) - 60000) / 128.0);
            in_valid = 1'b1; in_val = v; in_first = (s == 0); in_last = (s == int'(n) - 1);
            in_ids = ids;
            acc = (s == 0) ? v : to_fp32(from_fp32(acc) + from_fp32(v));
          end
          @(negedge clk);
          in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
          // model insertion
          pos = -1;
          for (int i = int'(X) - 1; i >= 0; i--)
            if (!m_valid[i] || fp32_gt(acc, m_val[i])) pos = i;
          if (pos >= 0) begin
            for (int i = int'(X) - 1; i > pos; i--) begin
              m_valid[i] = m_valid[i-1]; m_val[i] = m_val[i-1]; m_ids[i] = m_ids[i-1];
            end
            m_valid[pos] = 1'b1; m_val[pos] = acc; m_ids[pos] = ids;
          end
          repeat (3) @(negedge clk);
          compare(t);
        end
        checks++;
        if (tables != 150) begin failures++; $display("FAIL: tables %0d", tables); end
      end
      begin #1ms; $display("FAIL: watchdog"); failures++; end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
