// tb_rbs_full: the RBS memory system at its default size (4 banks of 16K rows x 2K 4-bit
// columns, 4 shared row buffers, DDR2-400 timing, 70 us refresh interval).
//
// It writes a burst in each of five rows of bank 2 and in one row of every other bank,
// reads them all back in a different order, rewrites four rows of bank 2 and reads those
// back, and keeps issuing reads until the first
// refresh has passed (14000 cycles), then reads everything once more. Checks: every read
// returns what was written; the read-back of the four rewritten rows of bank 2 hits (four
// rows of one bank open at once); the first refresh arrives no earlier than 14000 cycles
// after reset; every request is served.
module tb_rbs_full;
  import rbs_pkg::*;
  localparam int unsigned AW = 14 + 2 + 9, BW = 16;
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

  rbs_memory_system dut (.*);

  int checks = 0, failures = 0, cyc = 0, ref_cyc = -1;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n && cmd_mon.op == CMD_REF && ref_cyc < 0) ref_cyc = cyc;

  // Reads are matched to their answers by tag.
  logic [BW-1:0] exp_d [16];
  bit pending [16];
  int n_pending = 0, next_tag = 0;
  always @(negedge clk) if (rst_n && resp_valid) begin
    checks++;
    if (!pending[resp_tag]) begin failures++; $display("unexpected response tag %0d", resp_tag); end
    else if (resp_rdata !== exp_d[resp_tag]) begin
      failures++; $display("read %h expected %h", resp_rdata, exp_d[resp_tag]);
    end
    if (pending[resp_tag]) begin pending[resp_tag] = 0; n_pending--; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AW-1:0] addrs [8];
  logic [BW-1:0] data  [8];

  task automatic request(bit we, logic [AW-1:0] a, logic [BW-1:0] d, logic [BW-1:0] e);
    @(negedge clk);
    while (pending[next_tag]) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d; req_tag = 4'(next_tag);
    do @(posedge clk); while (!req_ready);
    if (!we) begin
      exp_d[next_tag] = e; pending[next_tag] = 1; n_pending++;
      next_tag = (next_tag + 1) % 16;
    end
    @(negedge clk);
    req_valid = 0;
    // let the request complete before the next one, so hit counts are per request
    repeat (24) @(negedge clk);
  endtask

  initial begin
    int h0;
    // five rows of bank 2, then one row in banks 0, 1, 3
    for (int i = 0; i < 5; i++) addrs[i] = {14'(1000 + 517 * i), 2'd2, 9'(37 * i + 3)};
    addrs[5] = {14'd16383, 2'd0, 9'd511};
    addrs[6] = {14'd0,     2'd1, 9'd0};
    addrs[7] = {14'd8191,  2'd3, 9'd256};
    for (int i = 0; i < 8; i++) data[i] = BW'($urandom);
    for (int t = 0; t < 16; t++) pending[t] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) request(1, addrs[i], data[i], '0);
    // banks 0, 1, 3 took buffers from bank 2's rows; write-backs kept their data
    for (int i = 7; i >= 0; i--) request(0, addrs[i], '0, data[i]);
    // rewrite rows 1..4 of bank 2: modified buffers are replaced only when every buffer is
    // modified, so after four writes all four buffers hold rows of bank 2
    for (int i = 1; i < 5; i++) begin
      data[i] = BW'($urandom);
      request(1, addrs[i], data[i], '0);
    end
    h0 = int'(stats.hits);
    for (int i = 4; i >= 1; i--) request(0, addrs[i], '0, data[i]);
    checks++;
    if (int'(stats.hits) - h0 != 4) begin failures++; $display("four open rows of bank 2 did not all hit"); end
    while (ref_cyc < 0 && cyc < 20000) request(0, addrs[cyc % 8], '0, data[cyc % 8]);
    checks++;
    if (ref_cyc < int'(T_REFI) || stats.refreshes == 0) begin
      failures++; $display("first refresh at %0d", ref_cyc);
    end
    for (int i = 0; i < 8; i++) request(0, addrs[i], '0, data[i]);
    repeat (20) @(negedge clk);
    checks++;
    if (n_pending != 0) begin failures++; $display("%0d reads unanswered", n_pending); end
    $display("hits %0d misses %0d write-backs %0d refreshes %0d, first refresh at cycle %0d",
             stats.hits, stats.misses, stats.writebacks, stats.refreshes, ref_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
