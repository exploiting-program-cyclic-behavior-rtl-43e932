// tb_rbs_memory_system: end-to-end test of the RBS memory system at a reduced array size
// (16 rows x 32 columns per bank) and a shortened refresh interval.
//
// Requests are offered back to back, so the controller's queue fills and reorders them.
// Traffic comes in phases, as programs do: in each phase most requests go to one bank,
// over a handful of its rows, with some requests to other banks. Every written burst is
// kept in a reference memory and every read is checked, in order, against it (all memory is
// written once at the start, so every read has a known answer); reads are matched to
// their answers by tag, since reads to open rows may overtake older requests. Alongside, the testbench
// follows the command bus and counts each mechanism of the design, failing if one never
// happens: row hits, activations into an empty or clean buffer, write-backs of modified
// victims, several buffers holding rows of the same bank, refresh (with requests held off),
// reads held back by the write-to-read rule, and hits overlapped with a miss (a column
// command to another buffer between an activation and that activation's own column
// command).
module tb_rbs_memory_system;
  import rbs_pkg::*;
  localparam int unsigned R = 16, C = 32, REFI = 700;
  localparam int unsigned AW = 4 + 2 + 3, BW = 16;
  localparam int unsigned NREQ = 6000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [AW-1:0] req_addr = '0;
  logic [BW-1:0] req_wdata = '0;
  logic [3:0] req_tag = '0, resp_tag;
  logic resp_valid;
  logic [BW-1:0] resp_rdata;
  rbs_stats_t stats;
  ddr_cmd_t cmd_mon;

  rbs_memory_system #(.ROWS_P(R), .COLS_P(C), .T_REFI_P(REFI)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [BW-1:0] model [1 << AW];
  // outstanding reads by tag: expected data, and the order they were requested in
  logic [BW-1:0] exp_d [16];
  bit  pending [16];
  int  n_pending = 0, n_out_of_order = 0;
  int  order_q [$];

  // responses
  always @(negedge clk) if (rst_n && resp_valid) begin
    checks++;
    if (!pending[resp_tag]) begin failures++; $display("response with unknown tag %0d", resp_tag); end
    else begin
      if (resp_rdata !== exp_d[resp_tag]) begin
        failures++; $display("read tag %0d: %h expected %h at %0d", resp_tag, resp_rdata, exp_d[resp_tag], cyc);
      end
      pending[resp_tag] = 0; n_pending--;
      if (order_q[0] != int'(resp_tag)) n_out_of_order++;
      foreach (order_q[i]) if (order_q[i] == int'(resp_tag)) begin order_q.delete(i); break; end
    end
  end

  // mechanism counters from the command bus
  int n_act = 0, n_pre = 0, n_ref = 0, n_shared = 0, n_wtr = 0, n_refhold = 0, n_rd = 0, n_wr = 0;
  bit b_open [4];
  int b_bank [4];
  int last_wr = -100;
  int act_buf = -1, n_ovl = 0;   // buffer activated and not yet accessed
  always @(negedge clk) if (rst_n) begin
    case (cmd_mon.op)
      CMD_ACT: begin
        n_act++;
        for (int k = 0; k < 4; k++)
          if (k != int'(cmd_mon.buf_id) && b_open[k] && b_bank[k] == int'(cmd_mon.bank)) begin
            n_shared++; break;
          end
        b_open[cmd_mon.buf_id] = 1; b_bank[cmd_mon.buf_id] = int'(cmd_mon.bank);
        act_buf = int'(cmd_mon.buf_id);
      end
      CMD_PRE: begin n_pre++; b_open[cmd_mon.buf_id] = 0; end
      CMD_REF: begin n_ref++; if (req_valid) n_refhold++; end
      CMD_WRITE: begin n_wr++; last_wr = cyc; end
      CMD_READ: begin n_rd++; if (cyc - last_wr == BL / 2 + T_WTR) n_wtr++; end
      default: ;
    endcase
    if (cmd_mon.op inside {CMD_READ, CMD_WRITE}) begin
      if (act_buf >= 0 && int'(cmd_mon.buf_id) != act_buf) n_ovl++;
      if (int'(cmd_mon.buf_id) == act_buf) act_buf = -1;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Requests go back to back; a read takes the next free tag.
  int next_tag = 0;
  task automatic request(bit we, logic [AW-1:0] a);
    if (!we) while (pending[next_tag]) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = BW'($urandom); req_tag = 4'(next_tag);
    do @(posedge clk); while (!req_ready);
    if (we) model[a] = req_wdata;
    else begin
      exp_d[next_tag] = model[a]; pending[next_tag] = 1; n_pending++;
      order_q.push_back(next_tag);
      next_tag = (next_tag + 1) % 16;
    end
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    int hot_bank, t0;
    for (int k = 0; k < 4; k++) b_open[k] = 0;
    for (int t = 0; t < 16; t++) pending[t] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill all memory
    for (int a = 0; a < (1 << AW); a++) request(1, AW'(a));
    t0 = cyc;
    hot_bank = 0;
    for (int n = 0; n < NREQ; n++) begin
      int bank, row;
      if (n % 300 == 0) hot_bank = $urandom % 4;                 // new phase
      bank = ($urandom % 20 == 0) ? $urandom % 4 : hot_bank;      // ~95% to the hot bank
      row  = (($urandom % 8 == 0) ? $urandom % R : (hot_bank * 3 + $urandom % 4) % R);
      request(($urandom % 3) == 0, {4'(row), 2'(bank), 3'($urandom)});
    end
    repeat (400) @(negedge clk);
    checks++;
    if (n_pending != 0) begin failures++; $display("%0d reads unanswered", n_pending); end
    $display("hits %0d misses %0d write-backs %0d refreshes %0d", stats.hits, stats.misses,
             stats.writebacks, stats.refreshes);
    $display("ACT %0d PRE %0d shared-bank ACT %0d REF %0d reads after tWTR %0d requests held by REF %0d",
             n_act, n_pre, n_shared, n_ref, n_wtr, n_refhold);
    $display("requests served ahead of older ones %0d, reads answered out of order %0d",
             stats.bypasses, n_out_of_order);
    $display("hits overlapped with a miss %0d (seen after an activation %0d)",
             stats.overlapped, n_ovl);
    $display("row hit rate %0d%%, %0d cycles for %0d requests",
             100 * stats.hits / (stats.hits + stats.misses), cyc - t0, NREQ);
    // counters agree with the command bus
    checks++;
    if (stats.misses != 32'(n_act) || stats.writebacks != 32'(n_pre) || stats.refreshes != 32'(n_ref) ||
        stats.hits + stats.misses != 32'(n_rd + n_wr) || stats.overlapped < 32'(n_ovl)) begin
      failures++; $display("statistics disagree with the command bus");
    end
    // every mechanism happened
    checks++;
    if (stats.hits == 0 || n_act == 0 || n_pre == 0 || n_shared == 0 || n_ref == 0 ||
        n_wtr == 0 || n_refhold == 0 || n_act == n_pre || stats.bypasses == 0 ||
        n_out_of_order == 0 || n_ovl == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
