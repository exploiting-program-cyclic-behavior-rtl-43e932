// tb_rbs_buffer_table: random lookups, allocations, touches and write-backs against a
// reference directory that keeps recency as an ordered list (most recent first).
// Checks the hit answer and buffer on every lookup, and the victim choice on every cycle:
// empty buffer (lowest index) first, then least recently used clean, then least recently
// used dirty. Also counts that each of the three victim cases occurred.
module tb_rbs_buffer_table;
  localparam int unsigned NBUFS = 4, NBANKS = 4, RA_W = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0;
  logic [1:0] lk_bank = 0;
  logic [RA_W-1:0] lk_row = 0;
  logic lk_hit;
  logic [1:0] lk_buf, vic_buf;
  logic vic_valid, vic_dirty;
  logic [1:0] vic_bank;
  logic [RA_W-1:0] vic_row;
  logic touch_en = 0, touch_dirty = 0, alloc_en = 0, clean_en = 0;
  logic [1:0] touch_buf = 0, alloc_buf = 0, alloc_bank = 0, clean_buf = 0;
  logic [RA_W-1:0] alloc_row = 0;
  logic [NBUFS-1:0] valid_o, dirty_o;
  logic [1:0] bank_o [NBUFS];
  logic [RA_W-1:0] row_o [NBUFS];

  rbs_buffer_table #(.NBUFS(NBUFS), .NBANKS(NBANKS), .RA_W(RA_W)) dut (.*);

  // reference
  bit m_valid [NBUFS];
  bit m_dirty [NBUFS];
  int m_bank [NBUFS];
  int m_row [NBUFS];
  int order [$];          // most recent first
  int checks = 0, failures = 0;
  int n_free = 0, n_clean = 0, n_dirty = 0;

  function automatic void use_buf(int k);
    foreach (order[i]) if (order[i] == k) begin order.delete(i); break; end
    order.push_front(k);
  endfunction

  function automatic int ref_victim();
    for (int k = 0; k < NBUFS; k++) if (!m_valid[k]) return k;
    for (int i = NBUFS - 1; i >= 0; i--) if (!m_dirty[order[i]]) return order[i];
    return order[NBUFS - 1];
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NBUFS; k++) begin m_valid[k] = 0; m_dirty[k] = 0; order.push_back(k); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int v, hit_k, op;
      @(negedge clk);
      touch_en = 0; alloc_en = 0; clean_en = 0;
      lk_bank = 2'($urandom); lk_row = RA_W'($urandom % 3);   // few rows: frequent hits
      #1;
      hit_k = -1;
      for (int k = 0; k < NBUFS; k++)
        if (m_valid[k] && m_bank[k] == int'(lk_bank) && m_row[k] == int'(lk_row)) hit_k = k;
      checks++;
      if (lk_hit !== (hit_k >= 0) || (hit_k >= 0 && lk_buf !== 2'(hit_k))) begin
        failures++;
        $display("lookup b%0d r%0d: hit %0d buf %0d, expected %0d", lk_bank, lk_row, lk_hit, lk_buf, hit_k);
      end
      v = ref_victim();
      checks++;
      if (vic_buf !== 2'(v) || vic_valid !== m_valid[v] || vic_dirty !== (m_valid[v] && m_dirty[v]) ||
          (m_valid[v] && (vic_bank !== 2'(m_bank[v]) || vic_row !== RA_W'(m_row[v])))) begin
        failures++;
        $display("victim %0d expected %0d", vic_buf, v);
      end
      for (int k = 0; k < NBUFS; k++) begin
        checks++;
        if (valid_o[k] !== m_valid[k] || (m_valid[k] && (dirty_o[k] !== m_dirty[k] ||
            int'(bank_o[k]) != m_bank[k] || int'(row_o[k]) != m_row[k]))) begin
          failures++; $display("directory entry %0d differs", k);
        end
      end
      if (!m_valid[v]) n_free++; else if (!m_dirty[v]) n_clean++; else n_dirty++;
      // act like the controller: hit -> touch; miss -> (clean if dirty) alloc
      op = $urandom % 8;
      if (hit_k >= 0) begin
        touch_en = 1; touch_buf = 2'(hit_k); touch_dirty = ($urandom % 2) == 1;
        use_buf(hit_k);
        if (touch_dirty) m_dirty[hit_k] = 1;
      end else if (m_valid[v] && m_dirty[v]) begin
        clean_en = 1; clean_buf = 2'(v);
        m_valid[v] = 0; m_dirty[v] = 0;
      end else if (op == 0 && m_valid[v]) begin
        ; // idle cycle
      end else begin
        alloc_en = 1; alloc_buf = 2'(v); alloc_bank = lk_bank; alloc_row = lk_row;
        m_valid[v] = 1; m_dirty[v] = 0; m_bank[v] = int'(lk_bank); m_row[v] = int'(lk_row);
        use_buf(v);
      end
    end
    @(negedge clk); touch_en = 0; alloc_en = 0; clean_en = 0;
    checks++;
    if (n_free == 0 || n_clean == 0 || n_dirty == 0) begin
      failures++;
      $display("victim cases not all seen: free %0d clean %0d dirty %0d", n_free, n_clean, n_dirty);
    end
    $display("victim cases: free %0d clean %0d dirty %0d", n_free, n_clean, n_dirty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
