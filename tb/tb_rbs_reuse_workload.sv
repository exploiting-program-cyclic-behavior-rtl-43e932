// tb_rbs_reuse_workload: row reuse-distance workloads on the RBS memory system.
//
// A program phase that cycles over k rows of a single bank has a row reuse distance of
// k-1. One buffer per bank turns every access of such a phase into a row miss once k > 1;
// with the four buffers shared, the active bank keeps up to four rows open. For each k the
// testbench reads the k rows of bank 2 in turn, 60 reads, one at a time, and checks the
// exact number of row misses: k for k <= 4 (first touch only) and all 60 for k = 5
// (least-recently-used replacement of four buffers over a cycle of five rows). It also
// runs the same four-row cycle spread over four banks, which must hit just the same, and
// reports the mean read latency of each run in clock cycles.
// The workload only reads, so every buffer stays unmodified and replacement is pure
// least-recently-used. (Written rows would stay open until all buffers were modified.) The
// first read of an address records its value; every later read must return the same.
module tb_rbs_reuse_workload;
  import rbs_pkg::*;
  localparam int unsigned R = 16, C = 32;
  localparam int unsigned AW = 4 + 2 + 3, BW = 16, NREAD = 60;
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

  rbs_memory_system #(.ROWS_P(R), .COLS_P(C), .T_REFI_P(1000000)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [BW-1:0] model [1 << AW];
  bit            known [1 << AW];

  // One read: wait for the answer, check it and return the latency.
  task automatic access(logic [AW-1:0] a, output int lat);
    int t0;
    @(negedge clk);
    req_valid = 1; req_addr = a; req_tag = 4'(a);
    do @(posedge clk); while (!req_ready);
    t0 = cyc;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    lat = cyc - t0;
    checks++;
    if (resp_tag !== 4'(a) || (known[a] && resp_rdata !== model[a])) begin
      failures++; $display("read %0d wrong", a);
    end
    model[a] = resp_rdata;
    known[a] = 1'b1;
    repeat (12) @(negedge clk);   // let the bank recover, so every read starts alike
  endtask

  // Read NREAD times cycling over the given rows/banks; check the number of misses.
  task automatic run(string name, int k, int bank_step, int exp_miss);
    int m0, lat, sum;
    // empty the buffers of the rows used: read a far row of every bank five times over
    for (int i = 0; i < 5; i++)
      for (int b = 0; b < 4; b++) access({4'(15 - i), 2'(b), 3'd0}, lat);
    m0 = int'(stats.misses);
    sum = 0;
    for (int n = 0; n < NREAD; n++) begin
      int j;
      j = n % k;
      access({4'(1 + j), 2'((2 + j * bank_step) % 4), 3'(n % 8)}, lat);
      sum += lat;
    end
    checks++;
    if (int'(stats.misses) - m0 != exp_miss) begin
      failures++;
      $display("%s: %0d misses, expected %0d", name, int'(stats.misses) - m0, exp_miss);
    end
    $display("%-28s misses %2d of %0d, mean read latency %0d.%0d cycles", name,
             int'(stats.misses) - m0, NREAD, sum / NREAD, (10 * sum / NREAD) % 10);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run("1 row of bank 2",       1, 0, 1);
    run("2 rows of bank 2",      2, 0, 2);
    run("3 rows of bank 2",      3, 0, 3);
    run("4 rows of bank 2",      4, 0, 4);
    run("5 rows of bank 2",      5, 0, NREAD);
    run("4 rows in 4 banks",     4, 1, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
