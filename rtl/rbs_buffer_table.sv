// rbs_buffer_table: the controller's directory of the shared row buffers.
//
// For each of the NBUFS buffers it keeps whether the buffer holds a row, which bank and row,
// whether a column write has modified it (dirty) and its recency rank (0 = most recently
// used, NBUFS-1 = least). From this it answers two questions combinationally:
//   lookup  - does a buffer already hold (lk_bank, lk_row)?  -> lk_hit, lk_buf
//   victim  - which buffer should a new row go to?          -> vic_buf and its contents
// Victim choice follows the replacement rule of row buffer sharing: an empty buffer if there
// is one; otherwise the least recently used unmodified buffer, since it can be reused
// without a write-back; only when every buffer is modified, the least recently used
// (oldest) modified one. Ties between empty buffers go to the lowest index.
//
// Updates, applied at the clock edge (one per cycle, the controller never overlaps them):
//   touch_en  buffer touch_buf becomes most recently used; touch_dirty also marks it modified
//   alloc_en  buffer alloc_buf now holds (alloc_bank, alloc_row), clean, most recently used
//   clean_en  buffer clean_buf was written back and is empty again
// The full contents (valid, dirty, bank, row) are also output, for the request scheduler's
// hit test over its whole queue.
// Recency is kept as a rank per buffer: a touched buffer takes rank 0 and every buffer that
// ranked ahead of it moves back by one. "Oldest modified" is read as least recently used
// among the modified buffers.
module rbs_buffer_table #(
  parameter int unsigned NBUFS  = rbs_pkg::NUM_BUFS,
  parameter int unsigned NBANKS = rbs_pkg::NUM_BANKS,
  parameter int unsigned RA_W   = $clog2(rbs_pkg::ROWS),
  localparam int unsigned BA_W  = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned BF_W  = (NBUFS  > 1) ? $clog2(NBUFS)  : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic [BA_W-1:0] lk_bank,
  input  logic [RA_W-1:0] lk_row,
  output logic            lk_hit,
  output logic [BF_W-1:0] lk_buf,
  // victim
  output logic [BF_W-1:0] vic_buf,
  output logic            vic_valid,
  output logic            vic_dirty,
  output logic [BA_W-1:0] vic_bank,
  output logic [RA_W-1:0] vic_row,
  // updates
  input  logic            touch_en,
  input  logic [BF_W-1:0] touch_buf,
  input  logic            touch_dirty,
  input  logic            alloc_en,
  input  logic [BF_W-1:0] alloc_buf,
  input  logic [BA_W-1:0] alloc_bank,
  input  logic [RA_W-1:0] alloc_row,
  input  logic            clean_en,
  input  logic [BF_W-1:0] clean_buf,
  // state, for observation
  output logic [NBUFS-1:0] valid_o,
  output logic [NBUFS-1:0] dirty_o,
  output logic [BA_W-1:0]  bank_o [NBUFS],
  output logic [RA_W-1:0]  row_o  [NBUFS]
);

  logic            valid [NBUFS];
  logic            dirty [NBUFS];
  logic [BA_W-1:0] bank  [NBUFS];
  logic [RA_W-1:0] row   [NBUFS];
  logic [BF_W-1:0] rank  [NBUFS];

  always_comb
    for (int k = 0; k < NBUFS; k++) begin
      valid_o[k] = valid[k];
      dirty_o[k] = dirty[k];
      bank_o[k]  = bank[k];
      row_o[k]   = row[k];
    end

  // ------------------------------------------------------------ lookup
  always_comb begin
    lk_hit = 1'b0;
    lk_buf = '0;
    for (int k = 0; k < NBUFS; k++)
      if (valid[k] && bank[k] == lk_bank && row[k] == lk_row) begin
        lk_hit = 1'b1;
        lk_buf = BF_W'(k);
      end
  end

  // ------------------------------------------------------------ victim selection
  always_comb begin
    logic            have_free, have_clean;
    logic [BF_W-1:0] free_k, clean_k, dirty_k;
    logic [BF_W-1:0] clean_r, dirty_r;
    have_free  = 1'b0;
    have_clean = 1'b0;
    free_k  = '0;
    clean_k = '0;
    dirty_k = '0;
    clean_r = '0;
    dirty_r = '0;
    for (int k = NBUFS - 1; k >= 0; k--)
      if (!valid[k]) begin
        have_free = 1'b1;
        free_k    = BF_W'(k);
      end
    for (int k = 0; k < NBUFS; k++) begin
      if (valid[k] && !dirty[k] && (!have_clean || rank[k] > clean_r)) begin
        have_clean = 1'b1;
        clean_k    = BF_W'(k);
        clean_r    = rank[k];
      end
      if (valid[k] && dirty[k] && rank[k] >= dirty_r) begin
        dirty_k = BF_W'(k);
        dirty_r = rank[k];
      end
    end
    if (have_free)       vic_buf = free_k;
    else if (have_clean) vic_buf = clean_k;
    else                 vic_buf = dirty_k;
    vic_valid = valid[vic_buf];
    vic_dirty = valid[vic_buf] && dirty[vic_buf];
    vic_bank  = bank[vic_buf];
    vic_row   = row[vic_buf];
  end

  // ------------------------------------------------------------ updates
  logic            use_en;
  logic [BF_W-1:0] use_buf;
  assign use_en  = touch_en || alloc_en;
  assign use_buf = alloc_en ? alloc_buf : touch_buf;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NBUFS; k++) begin
        valid[k] <= 1'b0;
        dirty[k] <= 1'b0;
        bank[k]  <= '0;
        row[k]   <= '0;
        rank[k]  <= BF_W'(k);
      end
    end else begin
      if (use_en)
        for (int k = 0; k < NBUFS; k++)
          if (BF_W'(k) == use_buf)         rank[k] <= '0;
          else if (rank[k] < rank[use_buf]) rank[k] <= rank[k] + 1'b1;
      if (touch_en && touch_dirty) dirty[touch_buf] <= 1'b1;
      if (alloc_en) begin
        valid[alloc_buf] <= 1'b1;
        dirty[alloc_buf] <= 1'b0;
        bank[alloc_buf]  <= alloc_bank;
        row[alloc_buf]   <= alloc_row;
      end
      if (clean_en) begin
        valid[clean_buf] <= 1'b0;
        dirty[clean_buf] <= 1'b0;
      end
    end
  end

endmodule
