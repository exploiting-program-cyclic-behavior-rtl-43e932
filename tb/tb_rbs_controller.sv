// tb_rbs_controller: directed test of the memory controller, with the RBS SDRAM device as
// its memory. For each request it checks the exact command sequence the controller issues
// (hit: column command only; miss to an empty or clean buffer: ACT then column command;
// miss when every buffer is modified: PRE of the least recently used one, ACT, column
// command), the data returned, the spacing of dependent commands (tRCD + crossbar, tRP,
// tRAS, tCCD, write-to-read) and the latency of a read hit on an idle bus (3 + CL cycles
// from the request handshake to the data). The walk-through opens four rows of one bank at
// once, which a one-buffer-per-bank part cannot, and has a refresh. Last, a miss that needs
// a write-back is followed at once by a hit to another buffer: the hit's READ must go out
// while the miss waits between its PRE and ACT, and both reads must be answered by tag.
module tb_rbs_controller;
  import rbs_pkg::*;
  localparam int unsigned R = 16, C = 32, REFI = 600;
  localparam int unsigned AW = 4 + 2 + 3, BW = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [AW-1:0] req_addr = '0;
  logic [BW-1:0] req_wdata = '0;
  logic [3:0] req_tag = '0, resp_tag;
  logic resp_valid;
  logic [BW-1:0] resp_rdata;
  ddr_cmd_t cmd;
  logic [BW-1:0] mem_wdata, mem_rdata;
  logic mem_rdata_valid;
  rbs_stats_t stats;

  rbs_controller #(.ROWS_P(R), .COLS_P(C), .T_REFI_P(REFI)) dut (.*);
  rbs_sdram #(.ROWS_P(R), .COLS_P(C)) u_mem (
    .clk(clk), .rst_n(rst_n), .cmd(cmd), .wdata(mem_wdata), .rdata(mem_rdata),
    .rdata_valid(mem_rdata_valid));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // command log and timing monitor (last issue cycle per buffer / bank)
  cmd_op_e ops [$];
  int last_act_buf [4], last_act_bank [4], last_pre_buf [4], last_pre_bank [4];
  int last_col = -100, last_wr = -100, n_ref = 0;
  always @(negedge clk) if (rst_n && cmd.op != CMD_NOP) begin
    int k, b;
    k = int'(cmd.buf_id); b = int'(cmd.bank);
    if (cmd.op != CMD_REF) ops.push_back(cmd.op);
    case (cmd.op)
      CMD_ACT: begin
        checks++;
        if (cyc - last_act_bank[b] < T_RAS + T_RP || cyc - last_pre_bank[b] < T_RP + T_XBAR ||
            cyc - last_pre_buf[k] < T_RP) begin
          failures++; $display("ACT too early at %0d", cyc);
        end
        last_act_buf[k] = cyc; last_act_bank[b] = cyc;
      end
      CMD_PRE: begin
        checks++;
        if (cyc - last_act_buf[k] < T_RAS) begin failures++; $display("PRE before tRAS at %0d", cyc); end
        last_pre_buf[k] = cyc; last_pre_bank[b] = cyc;
      end
      CMD_READ, CMD_WRITE: begin
        checks++;
        if (cyc - last_act_buf[k] < T_RCD + T_XBAR || cyc - last_col < T_CCD ||
            (cmd.op == CMD_READ && cyc - last_wr < BL / 2 + T_WTR)) begin
          failures++; $display("column command too early at %0d", cyc);
        end
        last_col = cyc;
        if (cmd.op == CMD_WRITE) last_wr = cyc;
      end
      CMD_REF: n_ref++;
      default: ;
    endcase
  end

  // read responses
  logic [BW-1:0] rsp_q [$];
  int rsp_cyc [$];
  logic [3:0] rsp_tag_last;
  always @(negedge clk) if (rst_n && resp_valid) begin
    rsp_q.push_back(resp_rdata); rsp_cyc.push_back(cyc); rsp_tag_last = resp_tag;
  end

  logic [BW-1:0] model [int];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] addr(int row, int bank, int burst);
    return {4'(row), 2'(bank), 3'(burst)};
  endfunction

  // One request; exp lists the commands it must produce. Returns handshake cycle.
  task automatic access(bit we, int row, int bank, int burst, string exp);
    cmd_op_e want [$];
    int hs, n0;
    logic [AW-1:0] a;
    a = addr(row, bank, burst);
    foreach (exp[i])
      case (exp[i])
        "P": want.push_back(CMD_PRE);
        "A": want.push_back(CMD_ACT);
        "R": want.push_back(CMD_READ);
        "W": want.push_back(CMD_WRITE);
        default: ;
      endcase
    ops.delete();
    n0 = rsp_q.size();
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = BW'($urandom); req_tag = 4'($urandom);
    do @(posedge clk); while (!req_ready);
    hs = cyc;
    @(negedge clk); req_valid = 0;
    if (we) model[int'(a)] = req_wdata;
    repeat (40) @(negedge clk);
    checks++;
    if (ops.size() != want.size()) begin
      failures++; $display("request r%0d b%0d: %0d commands, expected %s", row, bank, ops.size(), exp);
    end else
      foreach (want[i]) if (ops[i] != want[i]) begin
        failures++; $display("request r%0d b%0d: command %0d is %s, expected %s", row, bank, i,
                             ops[i].name(), exp);
        break;
      end
    if (!we) begin
      checks++;
      if (rsp_q.size() != n0 + 1) begin failures++; $display("no read response"); end
      else begin
        logic [BW-1:0] d; int c;
        d = rsp_q.pop_back(); c = rsp_cyc.pop_back();
        checks++;
        if (rsp_tag_last !== req_tag) begin failures++; $display("response tag %0d expected %0d", rsp_tag_last, req_tag); end
        if (model.exists(int'(a)) && d !== model[int'(a)]) begin
          failures++; $display("read r%0d b%0d: %h expected %h", row, bank, d, model[int'(a)]);
        end
        if (exp == "R") begin
          checks++;
          // handshake edge hs; queue, S_IDLE, S_LOOK; READ three edges later; data CL after
          if (c - hs != 3 + CL) begin failures++; $display("hit latency %0d", c - hs); end
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      last_act_buf[i] = -100; last_act_bank[i] = -100; last_pre_buf[i] = -100; last_pre_bank[i] = -100;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    access(1, 0, 1, 2, "AW");    // empty buffer
    access(0, 0, 1, 2, "R");     // hit
    access(0, 1, 1, 0, "AR");    // bank 1 takes a second buffer
    access(0, 2, 1, 0, "AR");    // third
    access(0, 3, 1, 0, "AR");    // fourth: all four buffers hold rows of bank 1
    access(0, 0, 1, 2, "R");     // all four rows still open
    access(0, 1, 1, 5, "R");
    access(0, 2, 1, 1, "R");
    access(0, 3, 1, 7, "R");
    access(0, 4, 1, 0, "AR");    // LRU is row 0 but it is modified: clean row 1 is replaced
    access(0, 0, 1, 2, "R");     // row 0 kept
    access(1, 2, 1, 3, "W");     // make every buffer modified
    access(1, 3, 1, 3, "W");
    access(1, 4, 1, 3, "W");
    access(0, 5, 2, 0, "PAR");   // all modified: oldest (row 0) written back
    access(0, 0, 1, 2, "AR");    // row 0 reloaded from the array: data survived write-back
    access(1, 6, 1, 6, "AW");    // reloaded row 0 is the only clean buffer
    access(0, 4, 1, 3, "R");
    // wait for the refresh interval
    while (n_ref == 0 && cyc < 3 * REFI) @(negedge clk);
    checks++;
    if (n_ref == 0 || stats.refreshes == 0) begin failures++; $display("no refresh"); end
    access(0, 2, 1, 3, "R");     // buffers stay open across refresh
    // Hit overlapped with a miss. Buffers hold rows 2, 3, 4, 6 of bank 1, all modified;
    // row 3 is least recently used and becomes the victim of the miss.
    begin
      logic [AW-1:0] a1, a2;
      logic [BW-1:0] d1, d2;
      bit seen1, seen2;
      a1 = addr(7, 3, 1);   // miss: PRE row 3, ACT, READ
      a2 = addr(4, 1, 3);   // hit on row 4
      ops.delete();
      rsp_q.delete();
      @(negedge clk);
      req_valid = 1; req_we = 0; req_addr = a1; req_tag = 4'd9;
      do @(posedge clk); while (!req_ready);
      @(negedge clk);
      req_addr = a2; req_tag = 4'd10;
      do @(posedge clk); while (!req_ready);
      @(negedge clk); req_valid = 0;
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        if (resp_valid && resp_tag == 4'd9)  begin seen1 = 1; d1 = resp_rdata; end
        if (resp_valid && resp_tag == 4'd10) begin seen2 = 1; d2 = resp_rdata; end
      end
      checks++;
      if (ops.size() != 4 || ops[0] != CMD_PRE || ops[1] != CMD_READ || ops[2] != CMD_ACT ||
          ops[3] != CMD_READ) begin
        failures++; $display("overlap: %0d commands, expected PRE READ ACT READ", ops.size());
      end
      checks++;
      if (!seen1 || !seen2 || d2 !== model[int'(a2)]) begin
        failures++; $display("overlap: reads not answered correctly");
      end
      checks++;
      if (stats.overlapped != 1) begin failures++; $display("overlap: %0d counted", stats.overlapped); end
    end
    checks++;
    if (stats.hits != 12 || stats.misses != 9 || stats.writebacks != 2) begin
      failures++;
      $display("stats hits %0d misses %0d write-backs %0d", stats.hits, stats.misses, stats.writebacks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
