// rbs_sched_queue: request queue and reordering scheduler of the RBS memory controller.
//
// Requests from the processor wait here in arrival order (entry 0 is the oldest). Whenever
// the command engine can take a request, the queue offers the oldest request whose row is
// already open in one of the shared row buffers (a predicted hit), so hits are not held up
// behind a request that needs an activation. If no request hits, the oldest one goes.
// Requests to one burst address keep their order without a separate check: they share
// bank and row, so they are hits or misses together, and the older one is always found
// first. To stay fair, once the oldest request has been passed over MAX_BYPASS times it is
// taken next.
// The hit test compares every queued request with the directory contents (dir_*), which
// the engine does not change while it waits for a new request.
//
// Interface: in_* is a valid/ready port (in_ready while the queue has room); out_* offers
// the chosen request, taken when out_valid && out_ready. out_hit says the directory held
// its row when it was offered; out_bypass says an older request was passed over.
// Timing: a request written at edge t can be offered in the cycle after t.
// The document gives only that the controller's scheduler reorders requests to cut
// latency; hit-first selection, the queue depth and the bypass limit are this design's.
module rbs_sched_queue #(
  parameter int unsigned DEPTH      = rbs_pkg::QDEPTH,
  parameter int unsigned MAX_BYPASS = rbs_pkg::MAX_BYPASS,
  parameter int unsigned NBUFS      = rbs_pkg::NUM_BUFS,
  parameter int unsigned RA_W       = $clog2(rbs_pkg::ROWS),
  parameter int unsigned BA_W       = $clog2(rbs_pkg::NUM_BANKS),
  parameter int unsigned BI_W       = $clog2(rbs_pkg::COLS / rbs_pkg::BL),
  parameter int unsigned BW         = rbs_pkg::BL * rbs_pkg::DQ,
  parameter int unsigned TAG_W      = rbs_pkg::TAG_W,
  localparam int unsigned ADDR_W    = RA_W + BA_W + BI_W,
  localparam int unsigned CNT_W     = $clog2(DEPTH + 1),
  localparam int unsigned IDX_W     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the processor
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_we,
  input  logic [ADDR_W-1:0] in_addr,
  input  logic [BW-1:0]     in_wdata,
  input  logic [TAG_W-1:0]  in_tag,
  // directory contents
  input  logic [NBUFS-1:0]  dir_valid,
  input  logic [BA_W-1:0]   dir_bank [NBUFS],
  input  logic [RA_W-1:0]   dir_row  [NBUFS],
  // to the command engine
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_we,
  output logic [ADDR_W-1:0] out_addr,
  output logic [BW-1:0]     out_wdata,
  output logic [TAG_W-1:0]  out_tag,
  output logic              out_hit,
  output logic              out_bypass
);

  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [BW-1:0]     wdata;
    logic [TAG_W-1:0]  tag;
  } entry_t;

  entry_t          q [DEPTH];
  logic [CNT_W-1:0] count;
  logic [$clog2(MAX_BYPASS + 1)-1:0] head_bypass;

  // ------------------------------------------------------------ choice
  logic            hit  [DEPTH];
  logic            elig [DEPTH];
  logic [IDX_W-1:0] sel;
  logic            any_elig;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      logic [RA_W-1:0] r;
      logic [BA_W-1:0] b;
      r = q[i].addr[ADDR_W-1 -: RA_W];
      b = q[i].addr[BI_W +: BA_W];
      hit[i] = 1'b0;
      for (int k = 0; k < NBUFS; k++)
        if (dir_valid[k] && dir_bank[k] == b && dir_row[k] == r) hit[i] = 1'b1;
      elig[i] = (CNT_W'(i) < count) && hit[i];
    end
    any_elig = 1'b0;
    sel      = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (elig[i]) begin
        any_elig = 1'b1;
        sel      = IDX_W'(i);
      end
    if (int'(head_bypass) >= MAX_BYPASS || !any_elig) sel = '0;
  end

  assign in_ready   = (count < CNT_W'(DEPTH));
  assign out_valid  = (count != 0);
  assign out_we     = q[sel].we;
  assign out_addr   = q[sel].addr;
  assign out_wdata  = q[sel].wdata;
  assign out_tag    = q[sel].tag;
  assign out_hit    = hit[sel];
  assign out_bypass = (sel != 0);

  // ------------------------------------------------------------ storage
  logic             deq, enq;
  logic [CNT_W-1:0] wpos;
  assign deq  = out_valid && out_ready;
  assign enq  = in_valid && in_ready;
  assign wpos = count - CNT_W'(deq);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count       <= '0;
      head_bypass <= '0;
    end else begin
      count <= count + CNT_W'(enq) - CNT_W'(deq);
      if (deq) head_bypass <= (sel == 0) ? '0 : head_bypass + 1'b1;
    end
    if (deq)
      for (int i = 0; i < DEPTH - 1; i++)
        if (IDX_W'(i) >= sel) q[i] <= q[i + 1];
    if (enq) q[wpos[IDX_W-1:0]] <= '{we: in_we, addr: in_addr, wdata: in_wdata, tag: in_tag};
  end

  initial assert (DEPTH >= 1 && MAX_BYPASS >= 1) else $error("rbs_sched_queue: bad parameters");

endmodule
