// rbs_crossbar: bank-to-buffer interconnect of the RBS SDRAM.
//
// In a conventional DDR2 part each bank has its own row buffer. Here any buffer may hold a
// row of any bank, so the row paths go through a crossbar. Each buffer has a multiplexer
// that picks one bank's activation data (load path); each bank has a multiplexer that picks
// one buffer's contents for a restore (write-back path). Both paths are registered, which
// gives the one memory-cycle crossbar delay: a selection presented at edge t delivers its
// row, with a valid strobe, during the cycle after edge t.
//
// Interface: ld_en[k]/ld_bank[k] steer bank ld_bank[k] into buffer k; wb_en[b]/wb_buf[b]
// steer buffer wb_buf[b] into bank b. Several selections may be active in one cycle.
// Registering both paths, and having a separate restore multiplexer per bank, are this
// design's choices; the document gives the crossbar as four multiplexers with one cycle delay.
module rbs_crossbar #(
  parameter int unsigned NBANKS   = rbs_pkg::NUM_BANKS,
  parameter int unsigned NBUFS    = rbs_pkg::NUM_BUFS,
  parameter int unsigned ROW_BITS = rbs_pkg::COLS * rbs_pkg::DQ,
  localparam int unsigned BA_W    = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned BF_W    = (NBUFS  > 1) ? $clog2(NBUFS)  : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // load path: bank arrays -> buffers
  input  logic [ROW_BITS-1:0] bank_row   [NBANKS],
  input  logic                ld_en      [NBUFS],
  input  logic [BA_W-1:0]     ld_bank    [NBUFS],
  output logic                buf_ld_en  [NBUFS],
  output logic [ROW_BITS-1:0] buf_ld_data[NBUFS],
  // write-back path: buffers -> bank arrays
  input  logic [ROW_BITS-1:0] buf_row    [NBUFS],
  input  logic                wb_en      [NBANKS],
  input  logic [BF_W-1:0]     wb_buf     [NBANKS],
  output logic                bank_wb_en [NBANKS],
  output logic [ROW_BITS-1:0] bank_wb_data[NBANKS]
);

  for (genvar k = 0; k < NBUFS; k++) begin : g_ld
    always_ff @(posedge clk) begin
      if (!rst_n) buf_ld_en[k] <= 1'b0;
      else        buf_ld_en[k] <= ld_en[k];
      if (ld_en[k]) buf_ld_data[k] <= bank_row[ld_bank[k]];
    end
  end

  for (genvar b = 0; b < NBANKS; b++) begin : g_wb
    always_ff @(posedge clk) begin
      if (!rst_n) bank_wb_en[b] <= 1'b0;
      else        bank_wb_en[b] <= wb_en[b];
      if (wb_en[b]) bank_wb_data[b] <= buf_row[wb_buf[b]];
    end
  end

endmodule
