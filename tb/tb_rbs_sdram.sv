// tb_rbs_sdram: drives the RBS SDRAM device directly with ACT/READ/WRITE/PRE/REF commands,
// spaced well apart, and compares against a reference of bank arrays and buffers kept in
// the testbench. Checks read data, that read data arrives exactly CL cycles after the
// cycle carrying READ, that written-back buffers reach the right bank and row, and that
// several buffers can hold rows of one bank at once (counted, must happen).
module tb_rbs_sdram;
  import rbs_pkg::*;
  localparam int unsigned NB = 4, NK = 4, R = 8, C = 16, DQW = 4, BLN = 4, CLN = 3;
  localparam int unsigned NBU = C / BLN, BW = BLN * DQW;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0;
  ddr_cmd_t cmd;
  logic [BW-1:0] wdata, rdata;
  logic rdata_valid;
  int checks = 0, failures = 0, cyc = 0, shared_seen = 0, wb_seen = 0, ref_seen = 0;

  rbs_sdram #(.ROWS_P(R), .COLS_P(C), .DQ_P(DQW), .BL_P(BLN), .CL_P(CLN)) dut (.*);

  logic [BW-1:0] mem  [NB][R][NBU];
  logic [BW-1:0] bdat [NK][NBU];
  bit  bopen [NK];
  bit  bdirty [NK];
  int  bbank [NK], brow [NK];
  logic [BW-1:0] exp_q [$];
  int due_q [$];

  always @(posedge clk) cyc <= cyc + 1;

  // read data monitor
  always @(negedge clk) if (rst_n && rdata_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected read data"); end
    else begin
      logic [BW-1:0] e; int d;
      e = exp_q.pop_front(); d = due_q.pop_front();
      if (rdata !== e || cyc != d) begin
        failures++;
        $display("read data %h at cycle %0d, expected %h at %0d", rdata, cyc, e, d);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(cmd_op_e op, int bank, int row, int col, int k, logic [BW-1:0] d, int gap);
    @(negedge clk);
    cmd = '0; cmd.op = op; cmd.bank = 2'(bank); cmd.row = 16'(row); cmd.col = 11'(col);
    cmd.buf_id = 2'(k); wdata = d;
    if (op == CMD_READ) begin exp_q.push_back(bdat[k][col / BLN]); due_q.push_back(cyc + CLN); end
    @(negedge clk);
    cmd = '0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic act(int bank, int row, int k);
    int n;
    n = 0;
    for (int j = 0; j < NK; j++) if (bopen[j] && j != k && bbank[j] == bank) n++;
    if (n > 0) shared_seen++;
    send(CMD_ACT, bank, row, 0, k, '0, 4);
    bopen[k] = 1; bdirty[k] = 0; bbank[k] = bank; brow[k] = row;
    for (int i = 0; i < NBU; i++) bdat[k][i] = mem[bank][row][i];
  endtask

  task automatic pre(int k);
    send(CMD_PRE, bbank[k], 0, 0, k, '0, 4);
    for (int i = 0; i < NBU; i++) mem[bbank[k]][brow[k]][i] = bdat[k][i];
    bopen[k] = 0; bdirty[k] = 0;
    wb_seen++;
  endtask

  task automatic wr(int k, int b, logic [BW-1:0] d);
    send(CMD_WRITE, 0, 0, b * BLN, k, d, 0);
    bdat[k][b] = d; bdirty[k] = 1;
  endtask

  initial begin
    cmd = '0; wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // initialise every row through buffer 0
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < R; r++) begin
        act(b, r, 0);
        for (int i = 0; i < NBU; i++) wr(0, i, BW'($urandom));
        pre(0);
      end
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      int k, op;
      k  = $urandom % NK;
      op = $urandom % 10;
      if (!bopen[k] || op == 0) begin
        if (bopen[k] && bdirty[k]) pre(k);
        // favour one bank so several buffers hold its rows
        act(($urandom % 4 == 0) ? $urandom % NB : 1, $urandom % R, k);
      end else if (op < 4) begin
        wr(k, $urandom % NBU, BW'($urandom));
      end else if (op == 4 && bdirty[k]) begin
        pre(k);
      end else if (op == 5) begin
        send(CMD_REF, 0, 0, 0, 0, '0, 2);
        ref_seen++;
      end else begin
        send(CMD_READ, 0, 0, ($urandom % NBU) * BLN, k, '0, $urandom % 2);
      end
    end
    // write everything back and read every row again through buffer 3
    for (int k = 0; k < NK; k++) if (bopen[k] && bdirty[k]) pre(k);
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < R; r++) begin
        act(b, r, 3);
        for (int i = 0; i < NBU; i++) send(CMD_READ, 0, 0, i * BLN, 3, '0, 0);
      end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d reads never returned", exp_q.size()); end
    checks++;
    if (shared_seen == 0 || wb_seen == 0 || ref_seen == 0) begin
      failures++;
      $display("mechanism missing: shared %0d write-back %0d refresh %0d", shared_seen, wb_seen, ref_seen);
    end
    $display("shared-bank activations %0d, write-backs %0d, refreshes %0d", shared_seen, wb_seen, ref_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
