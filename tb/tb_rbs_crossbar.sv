// tb_rbs_crossbar: drives random bank rows, buffer rows and selections into the crossbar
// and checks that, one clock later, every selected path carries the selected row with its
// strobe, and that unselected paths raise no strobe.
module tb_rbs_crossbar;
  localparam int unsigned NBANKS = 4, NBUFS = 4, ROW_BITS = 48;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0;
  logic [ROW_BITS-1:0] bank_row [NBANKS];
  logic ld_en [NBUFS];
  logic [1:0] ld_bank [NBUFS];
  logic buf_ld_en [NBUFS];
  logic [ROW_BITS-1:0] buf_ld_data [NBUFS];
  logic [ROW_BITS-1:0] buf_row [NBUFS];
  logic wb_en [NBANKS];
  logic [1:0] wb_buf [NBANKS];
  logic bank_wb_en [NBANKS];
  logic [ROW_BITS-1:0] bank_wb_data [NBANKS];
  int checks = 0, failures = 0;

  rbs_crossbar #(.NBANKS(NBANKS), .NBUFS(NBUFS), .ROW_BITS(ROW_BITS)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ROW_BITS-1:0] exp_ld [NBUFS];
    logic [ROW_BITS-1:0] exp_wb [NBANKS];
    logic exp_ldv [NBUFS];
    logic exp_wbv [NBANKS];
    for (int i = 0; i < 4; i++) begin ld_en[i] = 0; wb_en[i] = 0; ld_bank[i] = 0; wb_buf[i] = 0;
      bank_row[i] = '0; buf_row[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        bank_row[i] = {$urandom, 16'($urandom)};
        buf_row[i]  = {$urandom, 16'($urandom)};
        ld_en[i]    = ($urandom % 3) == 0;
        ld_bank[i]  = 2'($urandom);
        wb_en[i]    = ($urandom % 3) == 0;
        wb_buf[i]   = 2'($urandom);
      end
      for (int i = 0; i < 4; i++) begin
        exp_ldv[i] = ld_en[i];
        exp_ld[i]  = bank_row[ld_bank[i]];
        exp_wbv[i] = wb_en[i];
        exp_wb[i]  = buf_row[wb_buf[i]];
      end
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        ld_en[i] = 0; wb_en[i] = 0;
        checks++;
        if (buf_ld_en[i] !== exp_ldv[i] || (exp_ldv[i] && buf_ld_data[i] !== exp_ld[i])) begin
          failures++;
          $display("load path buffer %0d wrong", i);
        end
        checks++;
        if (bank_wb_en[i] !== exp_wbv[i] || (exp_wbv[i] && bank_wb_data[i] !== exp_wb[i])) begin
          failures++;
          $display("write-back path bank %0d wrong", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
