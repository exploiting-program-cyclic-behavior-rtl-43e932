// tb_dram_bank_array: checks the bank array model's row restore and activation read.
// Writes distinct patterns into every row of a small array, then activates rows in a
// shuffled order and checks that each row appears on act_data exactly one clock after
// act_en, and that an activation without a later restore leaves the row unchanged.
module tb_dram_bank_array;
  localparam int unsigned ROWS = 32, ROW_BITS = 64;
  logic clk = 0;
  always #5 clk = ~clk;

  logic act_en = 0, wb_en = 0;
  logic [$clog2(ROWS)-1:0] act_row = '0, wb_row = '0;
  logic [ROW_BITS-1:0] act_data, wb_data = '0;
  int checks = 0, failures = 0;

  dram_bank_array #(.ROWS(ROWS), .ROW_BITS(ROW_BITS)) dut (.*);

  function automatic logic [ROW_BITS-1:0] pat(int r, int salt);
    return {32'(r * 32'h9E37_79B9 + salt), 32'(~r ^ (salt << 4))};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // restore every row
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); wb_en = 1; wb_row = r[$clog2(ROWS)-1:0]; wb_data = pat(r, 7);
    end
    @(negedge clk); wb_en = 0;
    // activate in a shuffled order, check one cycle later
    for (int i = 0; i < 2 * ROWS; i++) begin
      int r;
      r = (i * 13 + 5) % ROWS;
      @(negedge clk); act_en = 1; act_row = r[$clog2(ROWS)-1:0];
      @(negedge clk); act_en = 0;
      checks++;
      if (act_data !== pat(r, 7)) begin
        failures++;
        $display("row %0d read %h expected %h", r, act_data, pat(r, 7));
      end
    end
    // restore and activate the same row on one edge: activation sees the old row
    @(negedge clk); wb_en = 1; act_en = 1; wb_row = 3; act_row = 3; wb_data = pat(3, 99);
    @(negedge clk); wb_en = 0; act_en = 0;
    checks++; if (act_data !== pat(3, 7)) failures++;
    @(negedge clk); act_en = 1; act_row = 3;
    @(negedge clk); act_en = 0;
    checks++; if (act_data !== pat(3, 99)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
