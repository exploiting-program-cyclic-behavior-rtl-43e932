// tb_rbs_timing: issues single commands to the timing tracker at its default (document)
// timing and measures, for each dependent resource, after how many clock edges the next
// command could be sampled. Expected spacings, in 5 ns cycles:
//   ACT -> column command on that buffer   tRCD + crossbar   3 + 1 = 4
//   ACT -> write-back of that buffer       tRAS              8
//   ACT -> next ACT on that bank           tRAS + tRP        8 + 3 = 11
//   PRE -> ACT on that bank                tRP + crossbar    3 + 1 = 4
//   PRE -> reload of that buffer           tRP               3
//   READ -> READ/WRITE, WRITE -> WRITE     tCCD              2
//   WRITE -> READ                          BL/2 + tWTR       2 + 2 = 4
//   REF -> ACT (any bank)                  tRFC              21
// and the refresh request after a (shortened) refresh interval of 40 cycles.
module tb_rbs_timing;
  import rbs_pkg::*;
  localparam int unsigned REFI = 40;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0;
  ddr_cmd_t cmd;
  logic bank_ready [4];
  logic all_banks_ready;
  logic buf_act_ready [4];
  logic buf_col_ready [4];
  logic buf_pre_ready [4];
  logic rd_ok, wr_ok, ref_due;
  int checks = 0, failures = 0;

  rbs_timing #(.T_REFI_P(REFI)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: spacing %0d, expected %0d", what, got, exp);
    end
  endtask

  // Issue one command and measure when each watched resource becomes ready again.
  int g_col, g_pre, g_bank, g_other_bank, g_act, g_rd, g_wr, g_all, g_ref;
  task automatic issue(cmd_op_e op, int bank, int bufk);
    @(negedge clk);
    cmd = '0; cmd.op = op; cmd.bank = 2'(bank); cmd.buf_id = 2'(bufk);
    @(negedge clk);
    cmd = '0; cmd.op = CMD_NOP;
    g_col = 0; g_pre = 0; g_bank = 0; g_other_bank = 0; g_act = 0; g_rd = 0; g_wr = 0; g_all = 0; g_ref = 0;
    for (int k = 1; k < 60; k++) begin
      if (g_ref == 0 && ref_due) g_ref = k;
      if (g_col == 0 && buf_col_ready[bufk]) g_col = k;
      if (g_pre == 0 && buf_pre_ready[bufk]) g_pre = k;
      if (g_act == 0 && buf_act_ready[bufk]) g_act = k;
      if (g_bank == 0 && bank_ready[bank]) g_bank = k;
      if (g_other_bank == 0 && bank_ready[(bank + 1) % 4]) g_other_bank = k;
      if (g_rd == 0 && rd_ok) g_rd = k;
      if (g_wr == 0 && wr_ok) g_wr = k;
      if (g_all == 0 && all_banks_ready) g_all = k;
      @(negedge clk);
    end
  endtask

  initial begin
    int t0;
    cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t0 = 0;
    issue(CMD_ACT, 1, 2);
    check("ACT->col", g_col, 4);
    check("ACT->PRE", g_pre, 8);
    check("ACT->ACT same bank", g_bank, 11);
    check("ACT->ACT other bank", g_other_bank, 1);
    check("ACT->reload buffer", g_act, 4);
    issue(CMD_PRE, 1, 2);
    check("PRE->ACT bank", g_bank, 4);
    check("PRE->reload buffer", g_act, 3);
    issue(CMD_READ, 0, 2);
    check("READ->READ", g_rd, 2);
    check("READ->WRITE", g_wr, 2);
    issue(CMD_WRITE, 0, 2);
    check("WRITE->WRITE", g_wr, 2);
    check("WRITE->READ", g_rd, 4);
    // refresh interval: count from reset release; ref_due must be up by now and stay up
    checks++;
    if (!ref_due) begin failures++; $display("ref_due not raised"); end
    issue(CMD_REF, 3, 0);
    check("REF->ACT", g_all, 21);
    check("REF->ACT bank", g_bank, 21);
    check("REF->ref_due", g_ref, REFI);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
