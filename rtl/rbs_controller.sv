// rbs_controller: memory controller for a DDR2 SDRAM with shared row buffers.
//
// The processor side offers burst-sized requests (valid/ready handshake): a read or a
// write of BL x DQ bits at a burst address, with a tag. The address is split, from the top,
// into row, bank and burst-within-row (row:bank:column interleaving, this design's choice).
// Requests wait in a queue (rbs_sched_queue) that hands the command engine the oldest
// request whose row is already open, else the oldest request; requests to one address keep
// their order. The engine serves one request at a time, but while it waits for the timing
// of a miss (write-back, activation, tRCD) the queue's offered request may go ahead if it
// hits a different buffer: its column command is issued from the queue in any cycle in
// which the engine itself issues nothing (hit overlap). Read data returns on
// resp_valid/resp_rdata/resp_tag, CL cycles after the READ command, so reads may complete
// out of request order; the tag tells them apart. Writes are posted and get no response.
//
// For each request the directory (rbs_buffer_table) is searched for a buffer that already
// holds the row, in any of the NBUFS shared buffers, whatever bank it belongs to:
//   hit            -> READ/WRITE to that buffer.
//   miss, victim clean or empty -> ACT the row into the victim buffer, then READ/WRITE.
//   miss, victim modified       -> PRE (write the victim back to its own bank), ACT, READ/WRITE.
// The victim is an empty buffer, else the least recently used unmodified buffer, else the
// least recently used modified one. Because a buffer is not tied to a bank, one active bank
// may hold up to NBUFS rows open while the other banks are idle.
// Each command waits until rbs_timing says its bank, buffer and data bus are ready. When
// the refresh interval expires the controller stops taking requests, waits for all banks
// and issues REF; open buffers stay open across refresh.
//
// Timing: a request enters the queue at the handshake edge, the engine takes it at the
// next edge (S_IDLE), decodes it the cycle after (S_LOOK), and a hit issues its column
// command the cycle after that at the earliest. A hit read on an idle controller therefore
// returns data 3 + CL cycles after the request handshake.
// The document gives the scheme (shared buffers, crossbar, LRU-among-unmodified
// replacement, Table 2 timing) and says the scheduler reorders and interleaves requests; the
// request queue's policy, the hit-overlap lane, the address mapping and the handshake are
// this design's choices.
module rbs_controller
  import rbs_pkg::*;
#(
  parameter int unsigned NBANKS   = NUM_BANKS,
  parameter int unsigned NBUFS    = NUM_BUFS,
  parameter int unsigned ROWS_P   = ROWS,
  parameter int unsigned COLS_P   = COLS,
  parameter int unsigned DQ_P     = DQ,
  parameter int unsigned BL_P     = BL,
  parameter int unsigned T_RCD_P  = T_RCD,
  parameter int unsigned T_CCD_P  = T_CCD,
  parameter int unsigned T_WTR_P  = T_WTR,
  parameter int unsigned T_RP_P   = T_RP,
  parameter int unsigned T_RAS_P  = T_RAS,
  parameter int unsigned T_REFI_P = T_REFI,
  parameter int unsigned T_RFC_P  = T_RFC,
  parameter int unsigned T_XBAR_P = T_XBAR,
  parameter int unsigned QDEPTH_P = QDEPTH,
  parameter int unsigned MAXBYP_P = MAX_BYPASS,
  parameter int unsigned TAG_W_P  = TAG_W,
  localparam int unsigned BW      = BL_P * DQ_P,
  localparam int unsigned RA_W    = $clog2(ROWS_P),
  localparam int unsigned BA_W    = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned BF_W    = (NBUFS  > 1) ? $clog2(NBUFS)  : 1,
  localparam int unsigned BI_W    = $clog2(COLS_P / BL_P),
  localparam int unsigned ADDR_W  = RA_W + BA_W + BI_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [BW-1:0]     req_wdata,
  input  logic [TAG_W_P-1:0] req_tag,
  output logic              resp_valid,
  output logic [BW-1:0]     resp_rdata,
  output logic [TAG_W_P-1:0] resp_tag,
  // SDRAM side
  output ddr_cmd_t          cmd,
  output logic [BW-1:0]     mem_wdata,
  input  logic [BW-1:0]     mem_rdata,
  input  logic              mem_rdata_valid,
  // statistics
  output rbs_stats_t        stats
);

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_PRE, S_ACT, S_COL, S_REF} state_e;
  state_e state;

  // ------------------------------------------------------------ latched request
  logic            r_we;
  logic [RA_W-1:0] r_row;
  logic [BA_W-1:0] r_bank;
  logic [BI_W-1:0] r_burst;
  logic [BW-1:0]   r_wdata;
  logic [TAG_W_P-1:0] r_tag;
  logic [BF_W-1:0] r_buf;        // buffer serving the request
  logic [BA_W-1:0] r_vbank;      // bank of the dirty victim

  // ------------------------------------------------------------ directory and timing
  logic            lk_hit;
  logic [BF_W-1:0] lk_buf, vic_buf;
  logic            vic_valid, vic_dirty;
  logic [BA_W-1:0] vic_bank;
  logic            touch_en, alloc_en, clean_en, touch_dirty;
  logic [BF_W-1:0] touch_buf;
  logic [NBUFS-1:0] tbl_valid;
  logic [BA_W-1:0] tbl_bank [NBUFS];
  logic [RA_W-1:0] tbl_row  [NBUFS];

  rbs_buffer_table #(.NBUFS(NBUFS), .NBANKS(NBANKS), .RA_W(RA_W)) u_table (
    .clk        (clk),
    .rst_n      (rst_n),
    .lk_bank    (r_bank),
    .lk_row     (r_row),
    .lk_hit     (lk_hit),
    .lk_buf     (lk_buf),
    .vic_buf    (vic_buf),
    .vic_valid  (vic_valid),
    .vic_dirty  (vic_dirty),
    .vic_bank   (vic_bank),
    .vic_row    (),
    .touch_en   (touch_en),
    .touch_buf  (touch_buf),
    .touch_dirty(touch_dirty),
    .alloc_en   (alloc_en),
    .alloc_buf  (r_buf),
    .alloc_bank (r_bank),
    .alloc_row  (r_row),
    .clean_en   (clean_en),
    .clean_buf  (r_buf),
    .valid_o    (tbl_valid),
    .dirty_o    (),
    .bank_o     (tbl_bank),
    .row_o      (tbl_row)
  );

  // ------------------------------------------------------------ request queue
  logic              q_valid, q_ready, q_we, q_bypass;
  logic [ADDR_W-1:0] q_addr;
  logic [BW-1:0]     q_wdata;
  logic [TAG_W_P-1:0] q_tag;

  rbs_sched_queue #(
    .DEPTH(QDEPTH_P), .MAX_BYPASS(MAXBYP_P), .NBUFS(NBUFS), .RA_W(RA_W), .BA_W(BA_W),
    .BI_W(BI_W), .BW(BW), .TAG_W(TAG_W_P)
  ) u_queue (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (req_valid),
    .in_ready  (req_ready),
    .in_we     (req_we),
    .in_addr   (req_addr),
    .in_wdata  (req_wdata),
    .in_tag    (req_tag),
    .dir_valid (tbl_valid),
    .dir_bank  (tbl_bank),
    .dir_row   (tbl_row),
    .out_valid (q_valid),
    .out_ready (q_ready),
    .out_we    (q_we),
    .out_addr  (q_addr),
    .out_wdata (q_wdata),
    .out_tag   (q_tag),
    .out_hit   (),
    .out_bypass(q_bypass)
  );

  // Buffer holding the row of the offered request, if any (hit-overlap lane).
  logic [RA_W-1:0] q_row;
  logic [BA_W-1:0] q_bank;
  logic [BI_W-1:0] q_burst;
  logic            q_hit;
  logic [BF_W-1:0] q_buf;
  assign {q_row, q_bank, q_burst} = q_addr;
  always_comb begin
    q_hit = 1'b0;
    q_buf = '0;
    for (int k = 0; k < NBUFS; k++)
      if (tbl_valid[k] && tbl_bank[k] == q_bank && tbl_row[k] == q_row) begin
        q_hit = 1'b1;
        q_buf = BF_W'(k);
      end
  end

  logic bank_ready    [NBANKS];
  logic buf_act_ready [NBUFS];
  logic buf_col_ready [NBUFS];
  logic buf_pre_ready [NBUFS];
  logic all_banks_ready, rd_ok, wr_ok, ref_due;

  rbs_timing #(
    .NBANKS(NBANKS), .NBUFS(NBUFS), .BL_P(BL_P),
    .T_RCD_P(T_RCD_P), .T_CCD_P(T_CCD_P), .T_WTR_P(T_WTR_P), .T_RP_P(T_RP_P),
    .T_RAS_P(T_RAS_P), .T_REFI_P(T_REFI_P), .T_RFC_P(T_RFC_P), .T_XBAR_P(T_XBAR_P)
  ) u_timing (
    .clk            (clk),
    .rst_n          (rst_n),
    .cmd            (cmd),
    .bank_ready     (bank_ready),
    .all_banks_ready(all_banks_ready),
    .buf_act_ready  (buf_act_ready),
    .buf_col_ready  (buf_col_ready),
    .buf_pre_ready  (buf_pre_ready),
    .rd_ok          (rd_ok),
    .wr_ok          (wr_ok),
    .ref_due        (ref_due)
  );

  // ------------------------------------------------------------ command issue
  logic issue_pre, issue_act, issue_col, issue_ref, issue_ovl, engine_busy;

  always_comb begin
    issue_pre = (state == S_PRE) && buf_pre_ready[r_buf] && bank_ready[r_vbank];
    issue_act = (state == S_ACT) && buf_act_ready[r_buf] && bank_ready[r_bank];
    issue_col = (state == S_COL) && buf_col_ready[r_buf] && (r_we ? wr_ok : rd_ok);
    issue_ref = (state == S_REF) && all_banks_ready;
    // Hit overlap: the engine is serving a miss and waits on its PRE, its ACT or tRCD
    // (never on the data bus, so overlapped writes cannot hold back its READ for good); the
    // offered request hits a buffer other than the one the miss uses, and that buffer and
    // the data bus are ready.
    engine_busy = (state == S_PRE) || (state == S_ACT) ||
                  ((state == S_COL) && !buf_col_ready[r_buf]);
    issue_ovl = engine_busy && !(issue_pre || issue_act || issue_col) && !ref_due &&
                q_valid && q_hit && (q_buf != r_buf) && buf_col_ready[q_buf] &&
                (q_we ? wr_ok : rd_ok);

    cmd        = '0;
    cmd.op     = CMD_NOP;
    cmd.buf_id = 2'(r_buf);
    cmd.bank   = 2'(r_bank);
    cmd.row    = 16'(r_row);
    cmd.col    = 11'({r_burst, {$clog2(BL_P){1'b0}}});
    if (issue_pre) begin
      cmd.op   = CMD_PRE;
      cmd.bank = 2'(r_vbank);
    end
    if (issue_act) cmd.op = CMD_ACT;
    if (issue_col) cmd.op = r_we ? CMD_WRITE : CMD_READ;
    if (issue_ref) cmd.op = CMD_REF;
    if (issue_ovl) begin
      cmd.op     = q_we ? CMD_WRITE : CMD_READ;
      cmd.buf_id = 2'(q_buf);
      cmd.bank   = 2'(q_bank);
      cmd.row    = 16'(q_row);
      cmd.col    = 11'({q_burst, {$clog2(BL_P){1'b0}}});
    end

    mem_wdata   = issue_ovl ? q_wdata : r_wdata;
    touch_en    = issue_col || issue_ovl;
    touch_buf   = issue_ovl ? q_buf : r_buf;
    touch_dirty = issue_ovl ? q_we  : r_we;
    alloc_en  = issue_act;
    clean_en  = issue_pre;
  end

  assign q_ready    = ((state == S_IDLE) && !ref_due) || issue_ovl;
  assign resp_valid = mem_rdata_valid;
  assign resp_rdata = mem_rdata;

  // Tags of issued READs, in issue order; the device returns data in the same order.
  localparam int unsigned TQ = 4;
  logic [TAG_W_P-1:0] tagq [TQ];
  logic [2:0]         tagn;
  logic               tag_push;
  assign tag_push = (issue_col && !r_we) || (issue_ovl && !q_we);
  assign resp_tag = tagq[0];

  always_ff @(posedge clk) begin
    if (!rst_n) tagn <= '0;
    else        tagn <= tagn + 3'(tag_push) - 3'(mem_rdata_valid);
    if (mem_rdata_valid)
      for (int i = 0; i < TQ - 1; i++) tagq[i] <= tagq[i + 1];
    if (tag_push) tagq[2'(tagn - 3'(mem_rdata_valid))] <= issue_ovl ? q_tag : r_tag;
  end

  // ------------------------------------------------------------ state machine
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      stats <= '0;
    end else begin
      if (issue_ovl) begin
        stats.hits       <= stats.hits + 1;
        stats.overlapped <= stats.overlapped + 1;
        if (q_bypass) stats.bypasses <= stats.bypasses + 1;
      end
      unique case (state)
        S_IDLE:
          if (ref_due) state <= S_REF;
          else if (q_valid) begin
            state <= S_LOOK;
            if (q_bypass) stats.bypasses <= stats.bypasses + 1;
          end
        S_LOOK:
          if (lk_hit) begin
            stats.hits <= stats.hits + 1;
            state      <= S_COL;
          end else begin
            stats.misses <= stats.misses + 1;
            state        <= (vic_valid && vic_dirty) ? S_PRE : S_ACT;
          end
        S_PRE:
          if (issue_pre) begin
            stats.writebacks <= stats.writebacks + 1;
            state            <= S_ACT;
          end
        S_ACT:
          if (issue_act) state <= S_COL;
        S_COL:
          if (issue_col) state <= S_IDLE;
        S_REF:
          if (issue_ref) begin
            stats.refreshes <= stats.refreshes + 1;
            state           <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && q_ready && q_valid) begin
      r_we    <= q_we;
      r_wdata <= q_wdata;
      r_tag   <= q_tag;
      {r_row, r_bank, r_burst} <= q_addr;
    end
    if (state == S_LOOK) begin
      r_buf   <= lk_hit ? lk_buf : vic_buf;
      r_vbank <= vic_bank;
    end
  end

  // ------------------------------------------------------------ rules
  // A request that is not taken stays on offer unchanged.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && !req_ready) |=> (req_valid && $stable(req_addr) && $stable(req_we)))
    else $error("rbs_controller: request withdrawn or changed before it was taken");

  // The read tag queue never overflows nor underflows.
  a_tagq: assert property (@(posedge clk) disable iff (!rst_n)
    (tagn <= 3'(TQ)) && !(mem_rdata_valid && tagn == 0 && !tag_push))
    else $error("rbs_controller: read tag queue out of step with read data");

  // Every column command addresses a buffer that holds the request's row.
  a_col_open: assert property (@(posedge clk) disable iff (!rst_n)
    (issue_col |-> tbl_valid[r_buf]) and (issue_ovl |-> tbl_valid[q_buf]))
    else $error("rbs_controller: column command to an empty buffer");

endmodule
