// tb_row_buffer: checks loads, burst writes and burst reads of one row buffer against a
// row kept in the testbench. Random operations; a read's data is checked one clock later.
module tb_row_buffer;
  localparam int unsigned COLS = 64, DQ = 4, BL = 4;
  localparam int unsigned ROW_BITS = COLS * DQ, BW = BL * DQ;
  logic clk = 0;
  always #5 clk = ~clk;

  logic load_en = 0, wr_en = 0, rd_en = 0;
  logic [ROW_BITS-1:0] load_data = '0, row_q;
  logic [$clog2(COLS)-1:0] wr_col = '0, rd_col = '0;
  logic [BW-1:0] wr_data = '0, rd_data;
  logic [ROW_BITS-1:0] model;
  int checks = 0, failures = 0;

  row_buffer #(.COLS(COLS), .DQ(DQ), .BL(BL)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < ROW_BITS / 32; i++) load_data[i*32 +: 32] = $urandom;
    load_en = 1;
    @(negedge clk); load_en = 0;
    model = load_data;
    checks++; if (row_q !== model) failures++;
    for (int n = 0; n < 2000; n++) begin
      int op, b;
      logic [BW-1:0] expect_rd;
      op = $urandom % 10;
      b  = $urandom % (COLS / BL);
      if (op == 0) begin
        for (int i = 0; i < ROW_BITS / 32; i++) load_data[i*32 +: 32] = $urandom;
        load_en = 1;
        @(negedge clk); load_en = 0;
        model = load_data;
      end else if (op < 5) begin
        wr_en = 1; wr_col = ($clog2(COLS))'(b * BL + ($urandom % BL)); wr_data = BW'($urandom);
        @(negedge clk); wr_en = 0;
        model[b*BW +: BW] = wr_data;
      end else begin
        rd_en = 1; rd_col = ($clog2(COLS))'(b * BL);
        expect_rd = model[b*BW +: BW];
        @(negedge clk); rd_en = 0;
        checks++;
        if (rd_data !== expect_rd) begin
          failures++;
          $display("burst %0d read %h expected %h", b, rd_data, expect_rd);
        end
      end
      checks++;
      if (row_q !== model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
