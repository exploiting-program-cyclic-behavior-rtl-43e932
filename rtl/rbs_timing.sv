// rbs_timing: DDR2 timing tracker for the row-buffer-sharing controller.
//
// Every command the controller issues (cmd, sampled at the clock edge) loads down-counters;
// a resource is ready when its counter is zero. A constraint of N cycles loaded at edge t
// lets the dependent command be sampled at edge t+N at the earliest. Counters are only
// raised, never shortened, by a new command.
//
//   ACT bank b, buffer k : bank b busy T_RAS+T_RP (the array restores its row and precharges
//                          its bit lines before the next activation, i.e. tRC);
//                          buffer k column-ready and reloadable after T_RCD+T_XBAR;
//                          buffer k may be written back after T_RAS.
//   PRE buffer k -> b    : bank b busy T_RP+T_XBAR (restore through the crossbar);
//                          buffer k reloadable after T_RP.
//   READ                 : next column command after T_CCD.
//   WRITE                : next column command after T_CCD; next READ after BL/2 + T_WTR
//                          (end of the write burst on the pins, then tWTR).
//   REF                  : every bank busy T_RFC; refresh interval restarts.
// ref_due rises T_REFI cycles after reset or the last REF and stays high until a REF.
// For PRE the controller puts the bank the buffer belongs to on cmd.bank.
//
// The timing values are the document's (Table of MT47H128M4B6-5E parameters) rounded up to
// 5 ns clocks. Which resource each one applies to once buffers are shared, the
// read-to-write spacing (tCCD) and the refresh cycle time T_RFC are this design's choices.
module rbs_timing
  import rbs_pkg::*;
#(
  parameter int unsigned NBANKS   = NUM_BANKS,
  parameter int unsigned NBUFS    = NUM_BUFS,
  parameter int unsigned BL_P     = BL,
  parameter int unsigned T_RCD_P  = T_RCD,
  parameter int unsigned T_CCD_P  = T_CCD,
  parameter int unsigned T_WTR_P  = T_WTR,
  parameter int unsigned T_RP_P   = T_RP,
  parameter int unsigned T_RAS_P  = T_RAS,
  parameter int unsigned T_REFI_P = T_REFI,
  parameter int unsigned T_RFC_P  = T_RFC,
  parameter int unsigned T_XBAR_P = T_XBAR,
  localparam int unsigned BA_W    = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned BF_W    = (NBUFS  > 1) ? $clog2(NBUFS)  : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ddr_cmd_t cmd,
  output logic     bank_ready    [NBANKS],
  output logic     all_banks_ready,
  output logic     buf_act_ready [NBUFS],
  output logic     buf_col_ready [NBUFS],
  output logic     buf_pre_ready [NBUFS],
  output logic     rd_ok,
  output logic     wr_ok,
  output logic     ref_due
);

  typedef logic [15:0] cnt_t;

  localparam cnt_t ACT_BANK = cnt_t'(T_RAS_P + T_RP_P - 1);
  localparam cnt_t ACT_COL  = cnt_t'(T_RCD_P + T_XBAR_P - 1);
  localparam cnt_t ACT_PRE  = cnt_t'(T_RAS_P - 1);
  localparam cnt_t PRE_BANK = cnt_t'(T_RP_P + T_XBAR_P - 1);
  localparam cnt_t PRE_BUF  = cnt_t'(T_RP_P - 1);
  localparam cnt_t COL_COL  = cnt_t'(T_CCD_P - 1);
  localparam cnt_t WR_RD    = cnt_t'(BL_P / 2 + T_WTR_P - 1);
  localparam cnt_t REF_BANK = cnt_t'(T_RFC_P - 1);
  localparam cnt_t REFI     = cnt_t'(T_REFI_P - 1);

  function automatic cnt_t raise(cnt_t cur, cnt_t val);
    return (val > cur) ? val : cur;
  endfunction

  function automatic cnt_t dec(cnt_t cur);
    return (cur != 0) ? cur - 1'b1 : cur;
  endfunction

  cnt_t bank_cnt [NBANKS];
  cnt_t bact_cnt [NBUFS];
  cnt_t bcol_cnt [NBUFS];
  cnt_t bpre_cnt [NBUFS];
  cnt_t ccd_cnt, wtr_cnt, refi_cnt;

  wire [BA_W-1:0] cb = cmd.bank[BA_W-1:0];
  wire [BF_W-1:0] ck = cmd.buf_id[BF_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANKS; b++) bank_cnt[b] <= '0;
      for (int k = 0; k < NBUFS; k++) begin
        bact_cnt[k] <= '0;
        bcol_cnt[k] <= '0;
        bpre_cnt[k] <= '0;
      end
      ccd_cnt  <= '0;
      wtr_cnt  <= '0;
      refi_cnt <= REFI;
    end else begin
      for (int b = 0; b < NBANKS; b++) begin
        cnt_t n;
        n = dec(bank_cnt[b]);
        if (cmd.op == CMD_ACT && cb == BA_W'(b)) n = raise(n, ACT_BANK);
        if (cmd.op == CMD_PRE && cb == BA_W'(b)) n = raise(n, PRE_BANK);
        if (cmd.op == CMD_REF)                   n = raise(n, REF_BANK);
        bank_cnt[b] <= n;
      end
      for (int k = 0; k < NBUFS; k++) begin
        cnt_t na, nc, np;
        na = dec(bact_cnt[k]);
        nc = dec(bcol_cnt[k]);
        np = dec(bpre_cnt[k]);
        if (cmd.op == CMD_ACT && ck == BF_W'(k)) begin
          na = raise(na, ACT_COL);
          nc = raise(nc, ACT_COL);
          np = raise(np, ACT_PRE);
        end
        if (cmd.op == CMD_PRE && ck == BF_W'(k)) na = raise(na, PRE_BUF);
        bact_cnt[k] <= na;
        bcol_cnt[k] <= nc;
        bpre_cnt[k] <= np;
      end
      begin
        cnt_t nccd, nwtr;
        nccd = dec(ccd_cnt);
        nwtr = dec(wtr_cnt);
        if (cmd.op == CMD_READ || cmd.op == CMD_WRITE) nccd = raise(nccd, COL_COL);
        if (cmd.op == CMD_WRITE)                        nwtr = raise(nwtr, WR_RD);
        ccd_cnt <= nccd;
        wtr_cnt <= nwtr;
      end
      if (cmd.op == CMD_REF) refi_cnt <= REFI;
      else                   refi_cnt <= dec(refi_cnt);
    end
  end

  always_comb begin
    all_banks_ready = 1'b1;
    for (int b = 0; b < NBANKS; b++) begin
      bank_ready[b]   = (bank_cnt[b] == 0);
      all_banks_ready = all_banks_ready && bank_ready[b];
    end
    for (int k = 0; k < NBUFS; k++) begin
      buf_act_ready[k] = (bact_cnt[k] == 0);
      buf_col_ready[k] = (bcol_cnt[k] == 0);
      buf_pre_ready[k] = (bpre_cnt[k] == 0);
    end
    rd_ok   = (ccd_cnt == 0) && (wtr_cnt == 0);
    wr_ok   = (ccd_cnt == 0);
    ref_due = (refi_cnt == 0);
  end

endmodule
