// tb_rbs_sched_queue: random enqueues, random engine readiness and a random directory,
// checked every cycle against a reference queue kept as a list. The reference picks the
// oldest request whose bank and row are in the directory and that has no older request to
// the same address; else the oldest; and the oldest once it has been passed over
// MAX_BYPASS times. Checks the offered request (all fields, hit and bypass flags), the full
// flag, and counts that reordering, the bypass limit and a full queue all occurred, and how
// often a request waited behind an older request to the same address.
module tb_rbs_sched_queue;
  localparam int unsigned DEPTH = 4, MAXB = 3, NB = 4, RA_W = 2, BA_W = 2, BI_W = 1;
  localparam int unsigned BW = 8, TAG_W = 4, AW = RA_W + BA_W + BI_W;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0;
  logic in_valid = 0, in_ready, in_we = 0;
  logic [AW-1:0] in_addr = '0;
  logic [BW-1:0] in_wdata = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic [NB-1:0] dir_valid = '0;
  logic [BA_W-1:0] dir_bank [NB];
  logic [RA_W-1:0] dir_row [NB];
  logic out_valid, out_ready = 0, out_we, out_hit, out_bypass;
  logic [AW-1:0] out_addr;
  logic [BW-1:0] out_wdata;
  logic [TAG_W-1:0] out_tag;

  rbs_sched_queue #(.DEPTH(DEPTH), .MAX_BYPASS(MAXB), .NBUFS(NB), .RA_W(RA_W), .BA_W(BA_W),
                    .BI_W(BI_W), .BW(BW), .TAG_W(TAG_W)) dut (.*);

  typedef struct { bit we; int addr; int wdata; int tag; } req_t;
  req_t q [$];
  int head_byp = 0;
  int checks = 0, failures = 0;
  int n_reorder = 0, n_blocked = 0, n_forced = 0, n_full = 0;

  function automatic bit is_hit(int a);
    int r, b;
    r = a >> (BA_W + BI_W);
    b = (a >> BI_W) & ((1 << BA_W) - 1);
    for (int k = 0; k < NB; k++) if (dir_valid[k] && int'(dir_bank[k]) == b && int'(dir_row[k]) == r) return 1;
    return 0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NB; k++) begin dir_bank[k] = '0; dir_row[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int s, first_hit;
      bit blocked_seen;
      @(negedge clk);
      // new stimulus
      if (n % 7 == 0)
        for (int k = 0; k < NB; k++) begin
          dir_valid[k] = ($urandom % 4) != 0; dir_bank[k] = BA_W'($urandom); dir_row[k] = RA_W'($urandom);
        end
      in_valid  = ($urandom % 3) != 0;
      in_we     = 1'($urandom % 2);
      in_addr   = AW'($urandom);
      in_wdata  = BW'($urandom);
      in_tag    = TAG_W'($urandom);
      out_ready = ($urandom % 3) == 0;
      #1;
      // reference choice
      s = 0; first_hit = -1; blocked_seen = 0;
      foreach (q[i]) begin
        bit same;
        same = 0;
        for (int j = 0; j < i; j++) if (q[j].addr == q[i].addr) same = 1;
        if (is_hit(q[i].addr) && same) blocked_seen = 1;
        if (first_hit < 0 && is_hit(q[i].addr) && !same) first_hit = i;
      end
      if (first_hit > 0 && head_byp >= MAXB) n_forced++;
      else if (first_hit > 0) s = first_hit;
      checks++;
      if (in_ready !== (q.size() < DEPTH)) begin failures++; $display("in_ready wrong"); end
      if (q.size() == DEPTH) n_full++;
      checks++;
      if (out_valid !== (q.size() != 0)) begin failures++; $display("out_valid wrong"); end
      else if (q.size() != 0) begin
        checks++;
        if (out_we !== q[s].we || int'(out_addr) != q[s].addr || int'(out_wdata) != q[s].wdata ||
            int'(out_tag) != q[s].tag || out_hit !== is_hit(q[s].addr) || out_bypass !== (s != 0)) begin
          failures++;
          $display("cycle %0d: offered addr %0d tag %0d, expected entry %0d addr %0d tag %0d",
                   n, out_addr, out_tag, s, q[s].addr, q[s].tag);
        end
      end
      // advance the reference at the edge
      if (out_ready && q.size() != 0) begin
        if (s != 0) begin n_reorder++; head_byp++; end else head_byp = 0;
        if (blocked_seen) n_blocked++;
        q.delete(s);
      end
      if (in_valid && in_ready)
        q.push_back('{we: in_we, addr: int'(in_addr), wdata: int'(in_wdata), tag: int'(in_tag)});
    end
    checks++;
    if (n_reorder == 0 || n_forced == 0 || n_full == 0) begin
      failures++;
      $display("mechanism missing");
    end
    $display("reordered %0d, same-address blocked %0d, bypass limit %0d, full cycles %0d",
             n_reorder, n_blocked, n_forced, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
