// rbs_memory_system: processor-facing DDR2 memory with row buffer sharing.
//
// Idle row buffers of a multi-bank DDR2 SDRAM are lent to whichever bank is busy: programs
// tend to work on one bank for long phases, and the extra open rows turn conflicts within
// that bank into row-buffer hits. This top joins the memory controller (rbs_controller:
// request queue, directory, replacement, timing, refresh) to the SDRAM device (rbs_sdram: bank arrays,
// crossbar, shared row buffers, column multiplexer) through the command bus.
//
// Interface (one clock, the SDRAM clock; synchronous active-low reset):
//   req_valid/req_ready/req_we/req_addr/req_wdata/req_tag  one burst (BL x DQ bits) per
//                 request; req_addr = {row, bank, burst index within the row}; req_ready
//                 while the controller's request queue has room.
//   resp_valid/resp_rdata/resp_tag  read data with the request's tag. Reads to open rows
//                 may overtake older requests, so responses can come out of request order;
//                 requests to the same address never overtake each other.
//   stats         hit, miss, write-back, refresh and reorder counts.
//   cmd_mon       the command on the SDRAM bus, for observation.
// The processor and caches that issue the requests are outside this design.
// Defaults are the document's: 4 banks, 4 shared buffers, MT47H128M4B6-5E timing; the row
// and column counts, CAS latency and burst length are taken from that part's data sheet.
module rbs_memory_system
  import rbs_pkg::*;
#(
  parameter int unsigned NBANKS   = NUM_BANKS,
  parameter int unsigned NBUFS    = NUM_BUFS,
  parameter int unsigned ROWS_P   = ROWS,
  parameter int unsigned COLS_P   = COLS,
  parameter int unsigned DQ_P     = DQ,
  parameter int unsigned BL_P     = BL,
  parameter int unsigned CL_P     = CL,
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
  localparam int unsigned ADDR_W  = $clog2(ROWS_P) + ((NBANKS > 1) ? $clog2(NBANKS) : 1)
                                    + $clog2(COLS_P / BL_P)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [BW-1:0]     req_wdata,
  input  logic [TAG_W_P-1:0] req_tag,
  output logic              resp_valid,
  output logic [BW-1:0]     resp_rdata,
  output logic [TAG_W_P-1:0] resp_tag,
  output rbs_stats_t        stats,
  output ddr_cmd_t          cmd_mon
);

  ddr_cmd_t      cmd;
  logic [BW-1:0] mem_wdata, mem_rdata;
  logic          mem_rdata_valid;

  rbs_controller #(
    .NBANKS(NBANKS), .NBUFS(NBUFS), .ROWS_P(ROWS_P), .COLS_P(COLS_P), .DQ_P(DQ_P),
    .BL_P(BL_P), .T_RCD_P(T_RCD_P), .T_CCD_P(T_CCD_P), .T_WTR_P(T_WTR_P), .T_RP_P(T_RP_P),
    .T_RAS_P(T_RAS_P), .T_REFI_P(T_REFI_P), .T_RFC_P(T_RFC_P), .T_XBAR_P(T_XBAR_P),
    .QDEPTH_P(QDEPTH_P), .MAXBYP_P(MAXBYP_P), .TAG_W_P(TAG_W_P)
  ) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .req_valid      (req_valid),
    .req_ready      (req_ready),
    .req_we         (req_we),
    .req_addr       (req_addr),
    .req_wdata      (req_wdata),
    .req_tag        (req_tag),
    .resp_valid     (resp_valid),
    .resp_rdata     (resp_rdata),
    .resp_tag       (resp_tag),
    .cmd            (cmd),
    .mem_wdata      (mem_wdata),
    .mem_rdata      (mem_rdata),
    .mem_rdata_valid(mem_rdata_valid),
    .stats          (stats)
  );

  rbs_sdram #(
    .NBANKS(NBANKS), .NBUFS(NBUFS), .ROWS_P(ROWS_P), .COLS_P(COLS_P), .DQ_P(DQ_P),
    .BL_P(BL_P), .CL_P(CL_P)
  ) u_sdram (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd        (cmd),
    .wdata      (mem_wdata),
    .rdata      (mem_rdata),
    .rdata_valid(mem_rdata_valid)
  );

  assign cmd_mon = cmd;

endmodule
